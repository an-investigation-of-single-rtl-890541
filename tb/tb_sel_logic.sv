// tb_sel_logic: self-checking testbench of the single-core selection logic.
// Random read/write requests are checked for reaching exactly the bank their
// address names (and no other bank), with the row and write data intact; the
// read data of each bank is a distinct value per cycle, and the data handed
// back to the unit one cycle after a read must come from the bank read.
module tb_sel_logic;
  import biosig_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0;
  dm_req_t   pu_req;
  word_t     pu_rdata;
  bank_req_t bank_req   [N_BANK];
  word_t     bank_rdata [N_BANK];
  int checks = 0, failures = 0;
  logic [BSEL_W-1:0] last_rbank;
  logic              had_read;

  always #5 clk = ~clk;

  sel_logic dut (.clk, .rst_n, .pu_req, .pu_rdata, .bank_req, .bank_rdata);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    pu_req = '0;
    foreach (bank_rdata[b]) bank_rdata[b] = '0;
    had_read = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // the banks answer the previous cycle's read: tag data with bank number
      foreach (bank_rdata[b]) bank_rdata[b] = word_t'({4'(b), 12'($urandom)});
      #1;
      if (had_read)
        chk(pu_rdata == bank_rdata[last_rbank], $sformatf("read data from bank %0d", last_rbank));
      pu_req = dm_req_t'({$urandom, $urandom});
      #1;
      for (int b = 0; b < N_BANK; b++) begin
        chk(bank_req[b].re == (pu_req.re && bank_of(pu_req.raddr) == 4'(b)), "read select");
        chk(bank_req[b].we == (pu_req.we && bank_of(pu_req.waddr) == 4'(b)), "write select");
        if (bank_req[b].re) chk(bank_req[b].raddr == row_of(pu_req.raddr), "read row");
        if (bank_req[b].we) chk(bank_req[b].waddr == row_of(pu_req.waddr) &&
                                bank_req[b].wdata == pu_req.wdata, "write row/data");
      end
      if (pu_req.re) begin
        last_rbank = bank_of(pu_req.raddr);
        had_read = 1'b1;
      end
    end
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
