// tb_biosig_platform: end-to-end testbench of the top level at its default
// size (8 units, 16 banks of 2k words, 4k-word instruction memories): both
// nodes condition the same 8-lead ECG record of 1024 samples per lead. The
// single-core node runs one program that processes the leads in turn; in the
// multi-core node each unit processes one lead. Input, scratch and output
// areas of the leads are 1024 words apart, so the 16 kBytes of input and the
// 16 kBytes of results each span four banks and pairs of units compete for
// them.
//
// Checks: every result of both nodes against a direct computation of the
// filter; cycle counts (single core: instruction count plus one, no stall;
// each multi-core unit: its instruction count plus one plus its stalled
// cycles). Counted mechanisms, each of which must occur: crossbar conflicts
// that stall a unit (clock gated), cycles in which two or more units are
// stalled together, host loading and read-back of the data memories, and
// program loading of every instruction memory.
module tb_biosig_platform;
  import biosig_pkg::*;
  import asm_pkg::*;

  localparam int NP     = 8;
  localparam int NSAMP  = 1024;
  localparam int STRIDE = 1024;
  localparam int IN0 = 0, TMP0 = 8192, OUT0 = 16384;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             sc_im_we = 1'b0;
  logic [IM_AW-1:0] sc_im_waddr = '0, mc_im_waddr = '0;
  instr_t           sc_im_wdata = '0, mc_im_wdata = '0;
  logic             sc_host_sel = 1'b1, mc_host_sel = 1'b1;
  dm_req_t          sc_host_req = '0, mc_host_req = '0;
  word_t            sc_host_rdata, mc_host_rdata;
  logic             sc_halted;
  logic [NP-1:0]    mc_im_we = '0, mc_halted, mc_stall;

  int checks = 0, failures = 0;
  int sc_cycles, sc_steps;
  int cycles [NP], stalls [NP], steps [NP];
  bit done [NP], sc_done;
  int n_host_wr = 0, n_host_rd = 0, n_im_wr = 0, n_multi_stall = 0, total_stalls = 0;

  always #5 clk = ~clk;

  biosig_platform dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  instr_t prog[$];
  word_t  x[$];
  iss     msc;
  int     maxc;

  initial begin
    // single-core program and its reference run
    ecg_program(prog, IN0, TMP0, OUT0, NSAMP, NP, STRIDE);
    msc = new();
    foreach (prog[i]) msc.im[i] = prog[i];
    for (int l = 0; l < NP; l++)
      for (int n = 0; n < NSAMP; n++) msc.dm[IN0 + l * STRIDE + n] = ecg_sample(l, n);
    void'(msc.run(10000000));
    sc_steps = msc.steps;
    foreach (prog[i]) begin
      @(negedge clk); sc_im_we = 1'b1; sc_im_waddr = IM_AW'(i); sc_im_wdata = prog[i]; n_im_wr++;
    end
    @(negedge clk) sc_im_we = 1'b0;
    // multi-core programs, one lead per unit
    for (int p = 0; p < NP; p++) begin
      automatic iss m = new();
      ecg_program(prog, IN0 + p * STRIDE, TMP0 + p * STRIDE, OUT0 + p * STRIDE, NSAMP, 1, 0);
      foreach (prog[i]) m.im[i] = prog[i];
      for (int n = 0; n < NSAMP; n++) m.dm[IN0 + p * STRIDE + n] = ecg_sample(p, n);
      void'(m.run(10000000));
      steps[p] = m.steps;
      foreach (prog[i]) begin
        @(negedge clk); mc_im_we = '0; mc_im_we[p] = 1'b1; mc_im_waddr = IM_AW'(i);
        mc_im_wdata = prog[i]; n_im_wr++;
      end
    end
    @(negedge clk) mc_im_we = '0;
    // the ECG record into both data memories
    for (int l = 0; l < NP; l++)
      for (int n = 0; n < NSAMP; n++) begin
        @(negedge clk);
        sc_host_req.we = 1'b1; sc_host_req.waddr = dm_addr_t'(IN0 + l * STRIDE + n);
        sc_host_req.wdata = ecg_sample(l, n);
        mc_host_req = sc_host_req;
        n_host_wr += 2;
      end
    @(negedge clk) begin
      sc_host_req = '0; mc_host_req = '0; sc_host_sel = 1'b0; mc_host_sel = 1'b0;
    end
    for (int p = 0; p < NP; p++) begin cycles[p] = 0; stalls[p] = 0; done[p] = 1'b0; end
    sc_cycles = 0; sc_done = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    while (!(sc_halted && mc_halted == '1) && sc_cycles < 4000000) begin
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (!done[p] && mc_stall[p]) stalls[p]++;
      if ($countones(mc_stall) >= 2) n_multi_stall++;
      @(negedge clk);
      for (int p = 0; p < NP; p++) if (!done[p]) begin
        cycles[p]++;
        done[p] = mc_halted[p];
      end
      if (!sc_done) begin
        sc_cycles++;
        sc_done = sc_halted;
      end
    end
    chk(sc_halted, "single core halted");
    chk(sc_cycles == sc_steps + 1, $sformatf("single core: %0d cycles, expected %0d", sc_cycles, sc_steps + 1));
    maxc = 0;
    for (int p = 0; p < NP; p++) begin
      chk(mc_halted[p], $sformatf("unit %0d halted", p));
      chk(cycles[p] == steps[p] + 1 + stalls[p],
          $sformatf("unit %0d: %0d cycles, expected %0d + 1 + %0d stalls", p, cycles[p], steps[p], stalls[p]));
      total_stalls += stalls[p];
      if (cycles[p] > maxc) maxc = cycles[p];
    end
    $display("single core: %0d cycles, %0d per sample (8 leads)", sc_cycles, sc_cycles / NSAMP);
    $display("multi core : %0d cycles, %0d per sample per unit, %0d stall cycles in all",
             maxc, maxc / NSAMP, total_stalls);
    // read back and compare both nodes
    @(negedge clk) begin sc_host_sel = 1'b1; mc_host_sel = 1'b1; end
    for (int l = 0; l < NP; l++) begin
      x.delete();
      for (int n = 0; n < NSAMP; n++) x.push_back(ecg_sample(l, n));
      for (int n = 2; n < NSAMP - 2; n++) begin
        @(negedge clk);
        sc_host_req.re = 1'b1; sc_host_req.raddr = dm_addr_t'(OUT0 + l * STRIDE + n);
        mc_host_req = sc_host_req;
        @(posedge clk) #1;
        n_host_rd += 2;
        chk(sc_host_rdata == ecg_ref(x, n), $sformatf("single core lead %0d y[%0d]", l, n));
        chk(mc_host_rdata == ecg_ref(x, n), $sformatf("multi core lead %0d y[%0d]", l, n));
      end
    end
    $display("mechanisms: stall cycles %0d, cycles with >=2 units stalled %0d, host writes %0d, host reads %0d, program words %0d",
             total_stalls, n_multi_stall, n_host_wr, n_host_rd, n_im_wr);
    chk(total_stalls > 0, "crossbar conflict stalled a unit");
    chk(n_multi_stall > 0, "several units stalled together");
    chk(n_host_wr > 0 && n_host_rd > 0 && n_im_wr > 0, "host and program loading used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
