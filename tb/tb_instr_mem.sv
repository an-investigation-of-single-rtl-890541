// tb_instr_mem: self-checking testbench of the 4k x 24 instruction memory.
// Loads every word through the write port, then reads random addresses and
// checks the registered read data one cycle later.
module tb_instr_mem;
  logic        clk = 1'b0;
  logic [11:0] raddr = '0, waddr = '0;
  logic [23:0] rdata, wdata = '0;
  logic        we = 1'b0;
  logic [23:0] ref_mem [4096];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  instr_mem dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      we = 1; waddr = 12'(i); wdata = 24'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk) raddr = 12'($urandom);
      @(posedge clk) #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("FAIL addr=%h rdata=%h exp=%h", raddr, rdata, ref_mem[raddr]);
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
