// single_core: the single-core reference node. One processing unit reaches
// all 16 data-memory banks through the selection logic; it processes the ECG
// leads one after the other.
//
// With one requester there are no conflicts, so the unit never stalls. The
// instruction memory is loaded with im_we/im_waddr/im_wdata and the data
// memory through the host port (host_sel high), both while rst_n is low;
// then rst_n is released and the program runs until halted rises.
module single_core
  import biosig_pkg::*;
#(
  parameter bit USE_LATCHES = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             im_we,
  input  logic [IM_AW-1:0] im_waddr,
  input  instr_t           im_wdata,
  input  logic             host_sel,
  input  dm_req_t          host_req,
  output word_t            host_rdata,
  output logic             halted
);

  dm_req_t   req;
  word_t     rdata;
  bank_req_t bank_req   [N_BANK];
  word_t     bank_rdata [N_BANK];

  pu #(.USE_LATCHES(USE_LATCHES)) u_pu (
    .clk      (clk),
    .rst_n    (rst_n),
    .stall    (1'b0),
    .im_we    (im_we),
    .im_waddr (im_waddr),
    .im_wdata (im_wdata),
    .req      (req),
    .rdata    (rdata),
    .halted   (halted)
  );

  sel_logic u_sl (
    .clk        (clk),
    .rst_n      (rst_n),
    .pu_req     (req),
    .pu_rdata   (rdata),
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
