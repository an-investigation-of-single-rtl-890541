// tb_data_mem: self-checking testbench of the 16-bank data memory. The host
// port writes a pattern over the whole 32k-word space and reads part of it
// back; then the bank-request ports write and read all banks in the same
// cycles, and the host port reads what they wrote. Checks that the host port
// overrides the bank requests while host_sel is high.
module tb_data_mem;
  import biosig_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0, host_sel = 1'b0;
  bank_req_t bank_req   [N_BANK];
  word_t     bank_rdata [N_BANK];
  dm_req_t   host_req;
  word_t     host_rdata;
  word_t     ref_mem [1 << DM_AW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_mem dut (.clk, .rst_n, .bank_req, .bank_rdata, .host_sel, .host_req, .host_rdata);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic word_t pat(int a);
    return word_t'(a * 40503 + 17);
  endfunction

  initial begin
    host_req = '0;
    foreach (bank_req[b]) bank_req[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    host_sel = 1'b1;
    for (int a = 0; a < (1 << DM_AW); a++) begin
      @(negedge clk);
      host_req.we = 1'b1; host_req.waddr = dm_addr_t'(a); host_req.wdata = pat(a);
      // bank requests must be ignored while the host owns the memory
      foreach (bank_req[b]) begin
        bank_req[b].we = 1'b1; bank_req[b].waddr = 11'(a); bank_req[b].wdata = 16'hDEAD;
      end
      ref_mem[a] = pat(a);
    end
    @(negedge clk);
    host_req.we = 1'b0;
    foreach (bank_req[b]) bank_req[b] = '0;
    for (int t = 0; t < 2000; t++) begin
      automatic int a = $urandom % (1 << DM_AW);
      @(negedge clk); host_req.re = 1'b1; host_req.raddr = dm_addr_t'(a);
      @(posedge clk) #1;
      chk(host_rdata == ref_mem[a], $sformatf("host read %h", a));
    end
    // bank ports: every bank writes and reads in the same cycle
    host_req.re = 1'b0;
    @(negedge clk) host_sel = 1'b0;
    for (int t = 0; t < 300; t++) begin
      int rrow [N_BANK];
      @(negedge clk);
      foreach (bank_req[b]) begin
        bank_req[b].we = 1'b1; bank_req[b].waddr = 11'($urandom);
        bank_req[b].wdata = word_t'($urandom);
        bank_req[b].re = 1'b1; rrow[b] = $urandom % 2048; bank_req[b].raddr = 11'(rrow[b]);
      end
      @(posedge clk) #1;
      foreach (bank_req[b]) begin
        automatic int ra = b * 2048 + rrow[b];
        automatic word_t e = (bank_req[b].waddr == bank_req[b].raddr) ? bank_req[b].wdata : ref_mem[ra];
        chk(bank_rdata[b] == e, $sformatf("bank %0d read", b));
        ref_mem[b * 2048 + int'(bank_req[b].waddr)] = bank_req[b].wdata;
      end
    end
    @(negedge clk);
    foreach (bank_req[b]) bank_req[b] = '0;
    host_sel = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      automatic int a = $urandom % (1 << DM_AW);
      @(negedge clk); host_req.re = 1'b1; host_req.raddr = dm_addr_t'(a);
      @(posedge clk) #1;
      chk(host_rdata == ref_mem[a], $sformatf("host read back %h", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
