// tb_mem_bank: self-checking testbench of one 2k x 16 two-port memory bank.
// Random reads and writes on both ports in the same cycles are compared with
// a reference array; covers read-during-write of the same word (new data is
// returned), read data held while re is low, and the one-cycle read latency.
module tb_mem_bank;
  localparam int DEPTH = 2048;
  logic        clk = 1'b0;
  logic        re, we;
  logic [10:0] raddr, waddr;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_mem [DEPTH];
  logic [15:0] exp_rd;
  int checks = 0, failures = 0, rdw = 0;

  always #5 clk = ~clk;

  mem_bank dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 11'(i); wdata = 16'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      re = ($urandom % 4) != 0;
      we = ($urandom % 2) != 0;
      raddr = 11'($urandom % 64);
      waddr = ($urandom % 4 == 0) ? raddr : 11'($urandom % 64);
      wdata = 16'($urandom);
      if (re) exp_rd = (we && waddr == raddr) ? wdata : ref_mem[raddr];
      if (re && we && waddr == raddr) rdw++;
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== exp_rd) begin
        failures++;
        $display("FAIL t=%0d rdata=%h exp=%h", t, rdata, exp_rd);
      end
    end
    checks++;
    if (rdw == 0) begin failures++; $display("FAIL: no read-during-write"); end
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
