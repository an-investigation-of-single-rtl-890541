// multi_core: the multi-core node. N processing units (8 by default), each
// with its own instruction memory, share the 16 data-memory banks through the
// crossbar; for the ECG application each unit processes one lead.
//
// When units address the same bank on the same port in one cycle, the
// crossbar serves the highest-priority one and clock-gates the others for
// that cycle (stall, one bit per unit, is brought out so the stall cycles can
// be counted). All units run from one clock and one supply; the node needs no
// faster memory clock. Loading works as in single_core: im_we has one bit
// per unit and im_waddr/im_wdata are shared; the host port owns the data
// memory while host_sel is high.
module multi_core
  import biosig_pkg::*;
#(
  parameter int unsigned N_PU        = 8,
  parameter bit          USE_LATCHES = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_PU-1:0]  im_we,
  input  logic [IM_AW-1:0] im_waddr,
  input  instr_t           im_wdata,
  input  logic             host_sel,
  input  dm_req_t          host_req,
  output word_t            host_rdata,
  output logic [N_PU-1:0]  halted,
  output logic [N_PU-1:0]  stall
);

  dm_req_t   req        [N_PU];
  word_t     rdata      [N_PU];
  bank_req_t bank_req   [N_BANK];
  word_t     bank_rdata [N_BANK];

  for (genvar i = 0; i < N_PU; i++) begin : g_pu
    pu #(.USE_LATCHES(USE_LATCHES)) u_pu (
      .clk      (clk),
      .rst_n    (rst_n),
      .stall    (stall[i]),
      .im_we    (im_we[i]),
      .im_waddr (im_waddr),
      .im_wdata (im_wdata),
      .req      (req[i]),
      .rdata    (rdata[i]),
      .halted   (halted[i])
    );
  end

  icsb #(.NP(N_PU)) u_icsb (
    .clk        (clk),
    .rst_n      (rst_n),
    .pu_req     (req),
    .pu_rdata   (rdata),
    .stall      (stall),
    .bank_req   (bank_req),
    .bank_rdata (bank_rdata)
  );

  data_mem u_dm (
    .clk        (clk),
    .rst_n      (rst_n),
    .bank_req   (bank_req),
    .bank_rdata (bank_rdata),
    .host_sel   (host_sel),
    .host_req   (host_req),
    .host_rdata (host_rdata)
  );

endmodule
