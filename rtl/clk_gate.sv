// clk_gate: clock gate that halts a processing unit while it waits for a
// memory bank it lost to a higher-priority unit.
//
// The usual latch-and-AND gate: the enable is captured by a latch that is
// transparent while clk is low, so gclk cannot be cut short or glitch when
// en changes during the high phase. gclk follows clk in every cycle whose
// enable was high before the rising edge. The latch is intended.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
