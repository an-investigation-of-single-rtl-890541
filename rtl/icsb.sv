// icsb: the interconnect crossbar of the multi-core node. It lets each of the
// N processing units reach every one of the 16 shared memory banks.
//
// Every bank has a read port and a write port, and each port is arbitrated on
// its own: among the units that address the bank on that port in a cycle, the
// one with the highest priority is granted (unit 0 highest, a fixed order of
// this design's choosing). A unit that had any request refused gets stall for
// that cycle, which gates its clock; it repeats its requests in the next
// cycle. Units that use different banks, or the two ports of one bank, never
// wait for one another. The bank of each granted read is registered per unit
// so the data returned one cycle later is routed to that unit.
module icsb
  import biosig_pkg::*;
#(
  parameter int unsigned NP = 8,
  parameter int unsigned NB = N_BANK
) (
  input  logic      clk,
  input  logic      rst_n,
  input  dm_req_t   pu_req     [NP],
  output word_t     pu_rdata   [NP],
  output logic      [NP-1:0] stall,
  output bank_req_t bank_req   [NB],
  input  word_t     bank_rdata [NB]
);

  logic [NP-1:0]     rgnt, wgnt;
  logic [NB-1:0]     rbusy, wbusy;
  logic [BSEL_W-1:0] rsel_q [NP];

  always_comb begin
    rgnt  = '0;
    wgnt  = '0;
    rbusy = '0;
    wbusy = '0;
    for (int b = 0; b < NB; b++) begin
      bank_req[b] = '0;
    end
    // fixed priority: lower index first
    for (int i = 0; i < NP; i++) begin
      if (pu_req[i].re && !rbusy[bank_of(pu_req[i].raddr)]) begin
        rbusy[bank_of(pu_req[i].raddr)]       = 1'b1;
        rgnt[i]                               = 1'b1;
        bank_req[bank_of(pu_req[i].raddr)].re    = 1'b1;
        bank_req[bank_of(pu_req[i].raddr)].raddr = row_of(pu_req[i].raddr);
      end
      if (pu_req[i].we && !wbusy[bank_of(pu_req[i].waddr)]) begin
        wbusy[bank_of(pu_req[i].waddr)]       = 1'b1;
        wgnt[i]                               = 1'b1;
        bank_req[bank_of(pu_req[i].waddr)].we    = 1'b1;
        bank_req[bank_of(pu_req[i].waddr)].waddr = row_of(pu_req[i].waddr);
        bank_req[bank_of(pu_req[i].waddr)].wdata = pu_req[i].wdata;
      end
    end
    for (int i = 0; i < NP; i++) begin
      stall[i] = (pu_req[i].re && !rgnt[i]) || (pu_req[i].we && !wgnt[i]);
    end
  end

  for (genvar i = 0; i < NP; i++) begin : g_ret
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       rsel_q[i] <= '0;
      else if (rgnt[i]) rsel_q[i] <= bank_of(pu_req[i].raddr);
    end
    assign pu_rdata[i] = bank_rdata[rsel_q[i]];
  end

  // A refused request always means another unit holds that bank port.
  for (genvar i = 0; i < NP; i++) begin : g_chk
    a_stall_has_cause : assert property (@(posedge clk) disable iff (!rst_n)
      stall[i] |-> ((pu_req[i].re && !rgnt[i] && rbusy[bank_of(pu_req[i].raddr)]) ||
                    (pu_req[i].we && !wgnt[i] && wbusy[bank_of(pu_req[i].waddr)])));
  end

endmodule
