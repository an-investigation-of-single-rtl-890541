// tb_single_core: self-checking testbench of the single-core node, run with
// and without the output latches. The host port stores NLEADS leads of
// synthetic ECG samples, the instruction memory gets the baseline-removal
// program (leads processed one after the other), and after halted the host
// port reads every result, which is compared with a direct computation of
// the filter. The unit must never stall, so the run must take exactly the
// reference model's instruction count plus one cycle.
module tb_single_core;
  import biosig_pkg::*;
  import asm_pkg::*;

  localparam int NSAMP  = 64;
  localparam int NLEADS = 8;
  localparam int STRIDE = 1024;
  localparam int IN0 = 0, TMP0 = 8192, OUT0 = 16384;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             im_we = 1'b0;
  logic [IM_AW-1:0] im_waddr = '0;
  instr_t           im_wdata = '0;
  logic             host_sel = 1'b1;
  dm_req_t          host_req = '0;
  word_t            host_rdata [2];
  logic             halted [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  single_core dut_lat (.clk, .rst_n, .im_we, .im_waddr, .im_wdata, .host_sel, .host_req,
                       .host_rdata(host_rdata[0]), .halted(halted[0]));
  single_core #(.USE_LATCHES(1'b0)) dut_nolat (.clk, .rst_n, .im_we, .im_waddr, .im_wdata,
                       .host_sel, .host_req, .host_rdata(host_rdata[1]), .halted(halted[1]));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  instr_t prog[$];
  word_t  x[$];
  int     cycles [2];
  bit     done [2] = '{1'b0, 1'b0};
  iss     m;

  initial begin
    ecg_program(prog, IN0, TMP0, OUT0, NSAMP, NLEADS, STRIDE);
    m = new();
    foreach (prog[i]) m.im[i] = prog[i];
    for (int l = 0; l < NLEADS; l++)
      for (int n = 0; n < NSAMP; n++) m.dm[IN0 + l * STRIDE + n] = ecg_sample(l, n);
    void'(m.run(10000000));
    // load program and samples while in reset
    foreach (prog[i]) begin
      @(negedge clk); im_we = 1'b1; im_waddr = IM_AW'(i); im_wdata = prog[i];
    end
    @(negedge clk) im_we = 1'b0;
    for (int l = 0; l < NLEADS; l++)
      for (int n = 0; n < NSAMP; n++) begin
        @(negedge clk);
        host_req.we = 1'b1; host_req.waddr = dm_addr_t'(IN0 + l * STRIDE + n);
        host_req.wdata = ecg_sample(l, n);
      end
    @(negedge clk) begin host_req = '0; host_sel = 1'b0; end
    @(negedge clk) rst_n = 1'b1;
    cycles = '{0, 0};
    // cycles: rising edges from reset release up to the one that sets halted
    while (!(halted[0] && halted[1]) && cycles[0] < 1000000) begin
      @(negedge clk);
      for (int d = 0; d < 2; d++) if (cycles[d] == 0 || !done[d]) begin
        cycles[d]++;
        done[d] = halted[d];
      end
    end
    for (int d = 0; d < 2; d++) begin
      chk(halted[d], "halted");
      chk(cycles[d] == m.steps + 1, $sformatf("dut %0d: %0d cycles, expected %0d", d, cycles[d], m.steps + 1));
    end
    $display("single core: %0d cycles for %0d samples of %0d leads (%0d per sample)",
             cycles[0], NSAMP, NLEADS, cycles[0] / NSAMP);
    // read the results back
    @(negedge clk) host_sel = 1'b1;
    for (int l = 0; l < NLEADS; l++) begin
      x.delete();
      for (int n = 0; n < NSAMP; n++) x.push_back(ecg_sample(l, n));
      for (int n = 2; n < NSAMP - 2; n++) begin
        @(negedge clk); host_req.re = 1'b1; host_req.raddr = dm_addr_t'(OUT0 + l * STRIDE + n);
        @(posedge clk) #1;
        for (int d = 0; d < 2; d++)
          chk(host_rdata[d] == ecg_ref(x, n),
              $sformatf("dut %0d lead %0d y[%0d]=%h expected %h", d, l, n, host_rdata[d], ecg_ref(x, n)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
