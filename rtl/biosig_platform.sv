// biosig_platform: top level holding the two processing platforms for
// multi-lead ECG conditioning side by side: the single-core reference node
// (one processing unit, selection logic, 16-bank data memory) and the
// multi-core node (N processing units, crossbar, the same 16-bank data
// memory). The two share only clk and rst_n; every other port belongs to one
// node and carries its prefix (sc_ single-core, mc_ multi-core). Both nodes
// run the same kind of program: the single-core one processes the leads in
// turn, the multi-core one processes one lead per unit at a clock several
// times lower for the same sample rate.
module biosig_platform
  import biosig_pkg::*;
#(
  parameter int unsigned N_PU        = 8,
  parameter bit          USE_LATCHES = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // single-core node
  input  logic             sc_im_we,
  input  logic [IM_AW-1:0] sc_im_waddr,
  input  instr_t           sc_im_wdata,
  input  logic             sc_host_sel,
  input  dm_req_t          sc_host_req,
  output word_t            sc_host_rdata,
  output logic             sc_halted,
  // multi-core node
  input  logic [N_PU-1:0]  mc_im_we,
  input  logic [IM_AW-1:0] mc_im_waddr,
  input  instr_t           mc_im_wdata,
  input  logic             mc_host_sel,
  input  dm_req_t          mc_host_req,
  output word_t            mc_host_rdata,
  output logic [N_PU-1:0]  mc_halted,
  output logic [N_PU-1:0]  mc_stall
);

  single_core #(.USE_LATCHES(USE_LATCHES)) u_sc (
    .clk        (clk),
    .rst_n      (rst_n),
    .im_we      (sc_im_we),
    .im_waddr   (sc_im_waddr),
    .im_wdata   (sc_im_wdata),
    .host_sel   (sc_host_sel),
    .host_req   (sc_host_req),
    .host_rdata (sc_host_rdata),
    .halted     (sc_halted)
  );

  multi_core #(.N_PU(N_PU), .USE_LATCHES(USE_LATCHES)) u_mc (
    .clk        (clk),
    .rst_n      (rst_n),
    .im_we      (mc_im_we),
    .im_waddr   (mc_im_waddr),
    .im_wdata   (mc_im_wdata),
    .host_sel   (mc_host_sel),
    .host_req   (mc_host_req),
    .host_rdata (mc_host_rdata),
    .halted     (mc_halted),
    .stall      (mc_stall)
  );

endmodule
