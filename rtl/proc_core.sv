// proc_core: the processing core (PC) of a processing unit: a 16-bit
// RISC-style core with sixteen working registers, a Harvard memory model and
// a two-stage pipeline.
//
// Stage 1 holds the instruction that the instruction memory returned. It
// decodes it, reads the register file, generates the data-memory read address
// (loads read in this stage, the data arrives in stage 2) and resolves
// branches; the next fetch address is computed here, so a taken branch costs
// no cycle. Stage 2 executes (add, subtract, logic, single-cycle multiply,
// multi-bit shifts, min/max, compare) and writes the result to a register,
// or stores a register to the data memory. A stage-2 result is forwarded to
// stage 1, so every instruction issues in one cycle with a two-cycle latency.
// The stage structure follows the platform description; the instruction set
// encoding (see biosig_pkg), forwarding and branch handling are this design's.
//
// Interface: im_addr/instr to the instruction memory (synchronous read);
// req is the data-memory request (one read and one write per cycle), rdata
// the read data for the load now in stage 2. clk is the gated clock: when the
// processing unit is stalled the whole core simply does not see an edge.
// halted rises one cycle after HALT reaches stage 1, when all earlier
// instructions have finished.
module proc_core
  import biosig_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  output logic [IM_AW-1:0] im_addr,
  input  instr_t           instr,
  output dm_req_t          req,
  input  word_t            rdata,
  output logic             halted
);

  // ---------------- state ----------------
  word_t            rf [NREGS];
  logic             s1_valid;
  logic [IM_AW-1:0] s1_pc;
  logic             halted_q;

  logic             s2_wen;      // writes register s2_rd
  logic             s2_ld;       // result comes from the data memory
  logic             s2_st;       // stores s2_sdata at s2_addr
  funct_e           s2_fn;
  logic [3:0]       s2_rd;
  word_t            s2_a, s2_b;
  dm_addr_t         s2_addr;
  word_t            s2_sdata;

  // ---------------- stage 2: execute ----------------
  word_t s2_res;
  logic signed [2*DATA_W-1:0] prod;

  always_comb begin
    prod = $signed(s2_a) * $signed(s2_b);
    unique case (s2_fn)
      FN_ADD:  s2_res = s2_a + s2_b;
      FN_SUB:  s2_res = s2_a - s2_b;
      FN_AND:  s2_res = s2_a & s2_b;
      FN_OR:   s2_res = s2_a | s2_b;
      FN_XOR:  s2_res = s2_a ^ s2_b;
      FN_SLL:  s2_res = s2_a << s2_b[3:0];
      FN_SRL:  s2_res = s2_a >> s2_b[3:0];
      FN_SRA:  s2_res = word_t'($signed(s2_a) >>> s2_b[3:0]);
      FN_MUL:  s2_res = prod[DATA_W-1:0];
      FN_MULH: s2_res = prod[2*DATA_W-1:DATA_W];
      FN_MIN:  s2_res = ($signed(s2_a) < $signed(s2_b)) ? s2_a : s2_b;
      FN_MAX:  s2_res = ($signed(s2_a) > $signed(s2_b)) ? s2_a : s2_b;
      FN_SLT:  s2_res = word_t'($signed(s2_a) < $signed(s2_b));
      default: s2_res = '0;
    endcase
    if (s2_ld) s2_res = rdata;
  end

  function automatic word_t fwd(input logic [3:0] idx);
    return (s2_wen && (s2_rd == idx)) ? s2_res : rf[idx];
  endfunction

  // ---------------- stage 1: decode ----------------
  opcode_e          op;
  logic [3:0]       rd, ra, rb;
  logic [11:0]      imm12;
  word_t            simm, opa, opb, opd;
  dm_addr_t         agen;
  logic             taken;
  logic [IM_AW-1:0] pc_next;

  logic             d_wen, d_ld, d_st;
  funct_e           d_fn;
  word_t            d_a, d_b;

  always_comb begin
    op    = s1_valid ? opcode_e'(instr[23:20]) : OP_NOP;
    rd    = instr[19:16];
    ra    = instr[15:12];
    rb    = instr[11:8];
    imm12 = instr[11:0];
    simm  = word_t'($signed(imm12));
    opa   = fwd(ra);
    opb   = fwd(rb);
    opd   = fwd(rd);
    agen  = opa[DM_AW-1:0] + simm[DM_AW-1:0];

    d_wen = 1'b0;
    d_ld  = 1'b0;
    d_st  = 1'b0;
    d_fn  = FN_ADD;
    d_a   = opa;
    d_b   = opb;
    taken = 1'b0;
    unique case (op)
      OP_ALU:  begin d_wen = 1'b1; d_fn = funct_e'(instr[3:0]); end
      OP_ADDI: begin d_wen = 1'b1; d_b = simm; end
      OP_SHI: begin
        d_wen = 1'b1;
        d_b   = word_t'(imm12[3:0]);
        unique case (imm12[5:4])
          2'd1:    d_fn = FN_SRL;
          2'd2:    d_fn = FN_SRA;
          default: d_fn = FN_SLL;
        endcase
      end
      OP_LI:   begin d_wen = 1'b1; d_a = instr[15:0]; d_b = '0; end
      OP_LD:   begin d_wen = 1'b1; d_ld = 1'b1; end
      OP_ST:   d_st = 1'b1;
      OP_BEQ:  taken = (opd == opa);
      OP_BNE:  taken = (opd != opa);
      OP_BLT:  taken = ($signed(opd) < $signed(opa));
      OP_JMP:  taken = 1'b1;
      default: ;
    endcase

    if (!s1_valid)          pc_next = '0;
    else if (taken)         pc_next = imm12;
    else if (op == OP_HALT) pc_next = s1_pc;
    else                    pc_next = s1_pc + 1'b1;
  end

  assign im_addr = pc_next;
  assign halted  = halted_q;

  // data-memory request: read from stage 1, write from stage 2
  always_comb begin
    req.re    = d_ld;
    req.raddr = agen;
    req.we    = s2_st;
    req.waddr = s2_addr;
    req.wdata = s2_sdata;
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_pc    <= '0;
      halted_q <= 1'b0;
      s2_wen   <= 1'b0;
      s2_ld    <= 1'b0;
      s2_st    <= 1'b0;
      s2_fn    <= FN_ADD;
      s2_rd    <= '0;
      s2_a     <= '0;
      s2_b     <= '0;
      s2_addr  <= '0;
      s2_sdata <= '0;
    end else begin
      s1_valid <= 1'b1;
      s1_pc    <= pc_next;
      if (op == OP_HALT) halted_q <= 1'b1;
      s2_wen   <= d_wen;
      s2_ld    <= d_ld;
      s2_st    <= d_st;
      s2_fn    <= d_fn;
      s2_rd    <= rd;
      s2_a     <= d_a;
      s2_b     <= d_b;
      s2_addr  <= agen;
      s2_sdata <= opd;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) rf[i] <= '0;
    end else if (s2_wen) begin
      rf[s2_rd] <= s2_res;
    end
  end

endmodule
