// tb_clk_gate: self-checking testbench of the stall clock gate. The enable is
// set at random while the clock is low and also toggled while it is high;
// the gated clock must pulse exactly in the cycles whose enable was high at
// the rising edge, for the whole high phase, and never otherwise.
module tb_clk_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0, pulses = 0, gated = 0, exp_pulses = 0;
  bit en_at_rise;

  clk_gate dut (.clk, .en, .gclk);

  always @(posedge gclk) pulses++;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      #2 en = ($urandom % 3) != 0;
      #2 chk(gclk == 1'b0, "gclk low while clk low");
      en_at_rise = en;
      if (en_at_rise) exp_pulses++; else gated++;
      #1 clk = 1'b1;
      #1 chk(gclk == en_at_rise, "gclk follows the enable seen before the edge");
      en = ~en;                      // change during the high phase
      #2 chk(gclk == en_at_rise, "no glitch when en changes while clk high");
      #2 clk = 1'b0;
    end
    chk(pulses == exp_pulses, $sformatf("pulses %0d expected %0d", pulses, exp_pulses));
    chk(gated > 0, "some cycles gated");
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
