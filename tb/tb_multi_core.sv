// tb_multi_core: self-checking testbench of the multi-core node. Every unit
// gets the baseline-removal program for its own lead; the leads are laid out
// 1024 words apart, so two units share each input bank and the crossbar has
// to arbitrate. The results are read through the host port and compared with
// a direct computation of the filter. For each unit the run must take its
// reference instruction count plus one cycle plus the cycles it was stalled;
// unit 0 has the highest priority and must never stall, and some unit must.
module tb_multi_core;
  import biosig_pkg::*;
  import asm_pkg::*;

  localparam int NP     = 8;
  localparam int NSAMP  = 64;
  localparam int STRIDE = 1024;
  localparam int IN0 = 0, TMP0 = 8192, OUT0 = 16384;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [NP-1:0]    im_we = '0;
  logic [IM_AW-1:0] im_waddr = '0;
  instr_t           im_wdata = '0;
  logic             host_sel = 1'b1;
  dm_req_t          host_req = '0;
  word_t            host_rdata;
  logic [NP-1:0]    halted, stall;
  int checks = 0, failures = 0;
  int cycles [NP], stalls [NP], steps [NP];
  bit done [NP];

  always #5 clk = ~clk;

  multi_core dut (.clk, .rst_n, .im_we, .im_waddr, .im_wdata, .host_sel, .host_req,
                  .host_rdata, .halted, .stall);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  instr_t prog[$];
  word_t  x[$];
  int     total_stalls, maxc;

  initial begin
    for (int p = 0; p < NP; p++) begin
      automatic iss m = new();
      ecg_program(prog, IN0 + p * STRIDE, TMP0 + p * STRIDE, OUT0 + p * STRIDE, NSAMP, 1, 0);
      foreach (prog[i]) m.im[i] = prog[i];
      for (int n = 0; n < NSAMP; n++) m.dm[IN0 + p * STRIDE + n] = ecg_sample(p, n);
      void'(m.run(10000000));
      steps[p] = m.steps;
      foreach (prog[i]) begin
        @(negedge clk); im_we = '0; im_we[p] = 1'b1; im_waddr = IM_AW'(i); im_wdata = prog[i];
      end
    end
    @(negedge clk) im_we = '0;
    for (int l = 0; l < NP; l++)
      for (int n = 0; n < NSAMP; n++) begin
        @(negedge clk);
        host_req.we = 1'b1; host_req.waddr = dm_addr_t'(IN0 + l * STRIDE + n);
        host_req.wdata = ecg_sample(l, n);
      end
    @(negedge clk) begin host_req = '0; host_sel = 1'b0; end
    for (int p = 0; p < NP; p++) begin cycles[p] = 0; stalls[p] = 0; done[p] = 1'b0; end
    @(negedge clk) rst_n = 1'b1;
    while (halted != '1 && cycles[NP-1] < 1000000) begin
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (!done[p] && stall[p]) stalls[p]++;
      @(negedge clk);
      for (int p = 0; p < NP; p++) if (!done[p]) begin
        cycles[p]++;
        done[p] = halted[p];
      end
    end
    total_stalls = 0; maxc = 0;
    for (int p = 0; p < NP; p++) begin
      chk(halted[p], $sformatf("unit %0d halted", p));
      chk(cycles[p] == steps[p] + 1 + stalls[p],
          $sformatf("unit %0d: %0d cycles, expected %0d + 1 + %0d stalls", p, cycles[p], steps[p], stalls[p]));
      total_stalls += stalls[p];
      if (cycles[p] > maxc) maxc = cycles[p];
      $display("unit %0d: %0d cycles, %0d stalled", p, cycles[p], stalls[p]);
    end
    chk(stalls[0] == 0, "unit 0 (highest priority) never stalls");
    chk(total_stalls > 0, "bank conflicts stalled some unit");
    $display("multi core: %0d cycles for %0d samples (%0d per sample per unit)", maxc, NSAMP, maxc / NSAMP);
    @(negedge clk) host_sel = 1'b1;
    for (int l = 0; l < NP; l++) begin
      x.delete();
      for (int n = 0; n < NSAMP; n++) x.push_back(ecg_sample(l, n));
      for (int n = 2; n < NSAMP - 2; n++) begin
        @(negedge clk); host_req.re = 1'b1; host_req.raddr = dm_addr_t'(OUT0 + l * STRIDE + n);
        @(posedge clk) #1;
        chk(host_rdata == ecg_ref(x, n),
            $sformatf("lead %0d y[%0d]=%h expected %h", l, n, host_rdata, ecg_ref(x, n)));
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
