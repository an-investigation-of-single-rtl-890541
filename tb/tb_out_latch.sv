// tb_out_latch: self-checking testbench of the glitch-blocking output
// latches. The input is changed several times while the clock is high (the
// glitches after a rising edge); the output must not move then. While the
// clock is low the output must follow the input at once. Also counts the
// output transitions: one settled value per cycle.
module tb_out_latch;
  logic        clk = 1'b0;
  logic [47:0] d = '0, q, q_at_rise;
  int checks = 0, failures = 0;

  out_latch dut (.clk, .d, .q);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      // low phase: transparent
      d = {16'($urandom), 32'($urandom)};
      #1 chk(q == d, "transparent while clk low");
      d = {16'($urandom), 32'($urandom)};
      #1 chk(q == d, "follows a change while clk low");
      #3 clk = 1'b1;
      q_at_rise = q;
      // high phase: glitches on d must not pass
      repeat (4) begin
        #1 d = {16'($urandom), 32'($urandom)};
        #0 chk(q == q_at_rise, "opaque while clk high");
      end
      #1 clk = 1'b0;
      #0.5 chk(q == d, "passes the settled value when clk falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
