// sel_logic: selection logic (SL) of the single-core node, connecting the one
// processing unit to the 16 data-memory banks.
//
// The bank field of the read address selects the bank whose read port gets
// the read, and the bank field of the write address the bank whose write port
// gets the write; a read and a write can go to different banks, or to the
// same bank, in the same cycle. The bank of each read is registered so that
// the data coming back one cycle later is taken from that bank. There is a
// single requester, so nothing is ever refused.
module sel_logic
  import biosig_pkg::*;
#(
  parameter int unsigned NB = N_BANK
) (
  input  logic      clk,
  input  logic      rst_n,
  input  dm_req_t   pu_req,
  output word_t     pu_rdata,
  output bank_req_t bank_req   [NB],
  input  word_t     bank_rdata [NB]
);

  logic [BSEL_W-1:0] rsel_q;

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      bank_req[b].re    = pu_req.re && (bank_of(pu_req.raddr) == BSEL_W'(b));
      bank_req[b].raddr = row_of(pu_req.raddr);
      bank_req[b].we    = pu_req.we && (bank_of(pu_req.waddr) == BSEL_W'(b));
      bank_req[b].waddr = row_of(pu_req.waddr);
      bank_req[b].wdata = pu_req.wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rsel_q <= '0;
    else if (pu_req.re) rsel_q <= bank_of(pu_req.raddr);
  end

  assign pu_rdata = bank_rdata[rsel_q];

endmodule
