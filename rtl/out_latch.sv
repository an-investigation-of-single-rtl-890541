// out_latch: the glitch-blocking latches at a processing unit's output ports.
//
// After the rising clock edge the core's address and data outputs settle
// through several transitions; without latches every transition toggles the
// selection logic or crossbar and the bank inputs. These latches are opaque
// while the clock is high and transparent while it is low, so each output bit
// moves once per cycle, after it has settled. The memories sample on the
// rising edge, when the latches have already passed the settled value, so the
// latches add no cycle of latency. The platform uses 48 of them per processing
// unit; this design reads those 48 bits as the data-memory request (read
// enable and address, write enable, address and data).
// With USE_LATCH=0 the outputs pass straight through (the "without latches"
// variant the platform was compared with).
module out_latch #(
  parameter int unsigned W         = 48,
  parameter bit          USE_LATCH = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (USE_LATCH) begin : g_latch
    // Intended latch: transparent while clk is low.
    always_latch begin
      if (!clk) q = d;
    end
  end else begin : g_wire
    assign q = d;
  end

endmodule
