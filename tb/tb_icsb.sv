// tb_icsb: self-checking testbench of the crossbar. Eight units issue random
// reads and writes, concentrated on a few banks so that conflicts are
// frequent. A reference arbiter (fixed priority, unit 0 first, read and write
// ports separate) gives the expected grants; the testbench checks what each
// bank receives, each unit's stall, and that the read data returned one
// cycle after a granted read comes from the bank that unit read. It counts
// read conflicts, write conflicts and cycles where a read and a write of
// different units share one bank without conflict.
module tb_icsb;
  import biosig_pkg::*;
  localparam int NP = 8;
  logic      clk = 1'b0, rst_n = 1'b0;
  dm_req_t   pu_req     [NP];
  word_t     pu_rdata   [NP];
  logic [NP-1:0] stall;
  bank_req_t bank_req   [N_BANK];
  word_t     bank_rdata [N_BANK];
  int checks = 0, failures = 0, rconf = 0, wconf = 0, shared = 0;
  int last_bank [NP];

  always #5 clk = ~clk;

  icsb #(.NP(NP)) dut (.clk, .rst_n, .pu_req, .pu_rdata, .stall, .bank_req, .bank_rdata);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int rwin [N_BANK], wwin [N_BANK];
    bit exp_stall;
    foreach (pu_req[i]) pu_req[i] = '0;
    foreach (bank_rdata[b]) bank_rdata[b] = '0;
    foreach (last_bank[i]) last_bank[i] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      foreach (bank_rdata[b]) bank_rdata[b] = word_t'({4'(b), 12'($urandom)});
      #1;
      for (int i = 0; i < NP; i++)
        if (last_bank[i] >= 0)
          chk(pu_rdata[i] == bank_rdata[last_bank[i]], $sformatf("unit %0d read data", i));
      for (int i = 0; i < NP; i++) begin
        pu_req[i].re    = ($urandom % 3) == 0;
        pu_req[i].raddr = {4'($urandom % 4), 11'($urandom)};
        pu_req[i].we    = ($urandom % 3) == 0;
        pu_req[i].waddr = {4'($urandom % 4), 11'($urandom)};
        pu_req[i].wdata = word_t'($urandom);
      end
      #1;
      foreach (rwin[b]) begin rwin[b] = -1; wwin[b] = -1; end
      for (int i = 0; i < NP; i++) begin
        if (pu_req[i].re) begin
          if (rwin[bank_of(pu_req[i].raddr)] < 0) rwin[bank_of(pu_req[i].raddr)] = i;
          else rconf++;
        end
        if (pu_req[i].we) begin
          if (wwin[bank_of(pu_req[i].waddr)] < 0) wwin[bank_of(pu_req[i].waddr)] = i;
          else wconf++;
        end
      end
      for (int b = 0; b < N_BANK; b++) begin
        chk(bank_req[b].re == (rwin[b] >= 0), $sformatf("bank %0d re", b));
        chk(bank_req[b].we == (wwin[b] >= 0), $sformatf("bank %0d we", b));
        if (rwin[b] >= 0) chk(bank_req[b].raddr == row_of(pu_req[rwin[b]].raddr), "read row of winner");
        if (wwin[b] >= 0) chk(bank_req[b].waddr == row_of(pu_req[wwin[b]].waddr) &&
                              bank_req[b].wdata == pu_req[wwin[b]].wdata, "write of winner");
        if (rwin[b] >= 0 && wwin[b] >= 0 && rwin[b] != wwin[b]) shared++;
      end
      for (int i = 0; i < NP; i++) begin
        exp_stall = (pu_req[i].re && rwin[bank_of(pu_req[i].raddr)] != i) ||
                    (pu_req[i].we && wwin[bank_of(pu_req[i].waddr)] != i);
        chk(stall[i] == exp_stall, $sformatf("unit %0d stall", i));
        if (pu_req[i].re && rwin[bank_of(pu_req[i].raddr)] == i) last_bank[i] = bank_of(pu_req[i].raddr);
      end
    end
    chk(rconf > 0 && wconf > 0 && shared > 0, "conflicts and shared banks exercised");
    $display("read conflicts %0d, write conflicts %0d, shared-bank cycles %0d", rconf, wconf, shared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
