// instr_mem: instruction memory of one processing unit, 4k words of 24 bits
// (12 kBytes), as the platform gives each processing unit.
//
// The fetch port reads synchronously: rdata shows mem[raddr] from the rising
// edge that sampled raddr. The write port loads the program; how programs are
// loaded is this design's own choice (load while the core is held in reset).
module instr_mem #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 24,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
