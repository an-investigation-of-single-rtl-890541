// pu: one processing unit: a processing core, its private 4k x 24-bit
// instruction memory, the 48 glitch-blocking output latches and the clock
// gate that halts the unit while it waits for a memory bank.
//
// The core and its instruction memory run on a gated clock. When the
// interconnect cannot grant every request of the unit in a cycle it raises
// stall; the gate then suppresses the next rising edge, the core keeps its
// state and presents the same requests again. Because another unit may read
// the same bank meanwhile, the read data of the last cycle in which the unit
// advanced is kept in a hold register (on the free-running clock) and given
// to the core for as long as it stays stalled; that register is this design's
// own addition. The instruction memory is loaded through im_we/im_waddr/
// im_wdata while rst_n holds the core in reset.
//
// Timing: req is valid from the falling edge (after the latches open) until
// the next rising edge; rdata is expected one cycle after a granted read.
module pu
  import biosig_pkg::*;
#(
  parameter bit USE_LATCHES = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stall,
  input  logic             im_we,
  input  logic [IM_AW-1:0] im_waddr,
  input  instr_t           im_wdata,
  output dm_req_t          req,
  input  word_t            rdata,
  output logic             halted
);

  logic             gclk;
  logic [IM_AW-1:0] im_addr;
  instr_t           instr;
  dm_req_t          core_req;
  word_t            core_rdata, rdata_hold;
  logic             fresh;

  clk_gate u_cg (
    .clk  (clk),
    .en   (!stall),
    .gclk (gclk)
  );

  instr_mem #(.DEPTH(IM_DEPTH), .WIDTH(INSTR_W)) u_im (
    .clk   (gclk),
    .raddr (im_addr),
    .rdata (instr),
    .we    (im_we),
    .waddr (im_waddr),
    .wdata (im_wdata)
  );

  proc_core u_pc (
    .clk     (gclk),
    .rst_n   (rst_n),
    .im_addr (im_addr),
    .instr   (instr),
    .req     (core_req),
    .rdata   (core_rdata),
    .halted  (halted)
  );

  out_latch #(.W($bits(dm_req_t)), .USE_LATCH(USE_LATCHES)) u_lat (
    .clk (clk),
    .d   (core_req),
    .q   (req)
  );

  // fresh: the unit advanced at the last edge, so rdata belongs to the load
  // now in stage 2. Otherwise the held copy is used.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh      <= 1'b0;
      rdata_hold <= '0;
    end else begin
      fresh <= !stall;
      if (fresh) rdata_hold <= rdata;
    end
  end

  assign core_rdata = fresh ? rdata : rdata_hold;

endmodule
