// mem_bank: one data-memory bank, a two-port memory with one write port and
// one read port that can both be used in the same cycle.
//
// The platform builds its 64-kByte data memory from 16 of these banks of
// 2k x 16 bits, the largest two-port macro its memory generator produced.
// Here the bank is a plain array with a registered read, which synthesis maps
// to a memory. A read of the word being written in the same cycle returns the
// new data (write-first); that choice, and keeping rdata unchanged while re is
// low, are this design's own.
//
// Timing: write on the rising edge when we=1; rdata shows mem[raddr] from the
// rising edge where re=1 until the next read.
module mem_bank #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= (we && (waddr == raddr)) ? wdata : mem[raddr];
  end

endmodule
