// data_mem: the shared data memory (DM): 16 two-port banks of 2k x 16 bits,
// 64 kBytes in all, each with its own read and write port.
//
// The banks are driven by the selection logic (single-core node) or the
// crossbar (multi-core node) through bank_req, one request per bank. The host
// port is this design's own: while host_sel is high it takes over all banks,
// so a testbench or system controller can store input samples and read back
// results while the cores are held in reset. Host read data appears on
// host_rdata one cycle after the read, like a core read.
module data_mem
  import biosig_pkg::*;
#(
  parameter int unsigned NB    = N_BANK,
  parameter int unsigned DEPTH = BANK_DEPTH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  bank_req_t bank_req   [NB],
  output word_t     bank_rdata [NB],
  input  logic      host_sel,
  input  dm_req_t   host_req,
  output word_t     host_rdata
);

  bank_req_t         eff [NB];
  logic [BSEL_W-1:0] hsel_q;

  for (genvar b = 0; b < NB; b++) begin : g_bank
    always_comb begin
      if (host_sel) begin
        eff[b].re    = host_req.re && (bank_of(host_req.raddr) == BSEL_W'(b));
        eff[b].raddr = row_of(host_req.raddr);
        eff[b].we    = host_req.we && (bank_of(host_req.waddr) == BSEL_W'(b));
        eff[b].waddr = row_of(host_req.waddr);
        eff[b].wdata = host_req.wdata;
      end else begin
        eff[b] = bank_req[b];
      end
    end

    mem_bank #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_mb (
      .clk   (clk),
      .re    (eff[b].re),
      .raddr (eff[b].raddr),
      .rdata (bank_rdata[b]),
      .we    (eff[b].we),
      .waddr (eff[b].waddr),
      .wdata (eff[b].wdata)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        hsel_q <= '0;
    else if (host_sel && host_req.re)  hsel_q <= bank_of(host_req.raddr);
  end

  assign host_rdata = bank_rdata[hsel_q];

endmodule
