// asm_pkg: testbench support for the processing core: instruction encoders,
// a reference instruction-set model (written from the instruction-set
// definition, independent of the pipelined core) and the generator of the ECG
// conditioning program used by the system testbenches.
//
// The ECG program removes the baseline of each lead by a grey-scale
// morphological opening with a 3-sample structuring element:
//   e[n] = min(x[n-1], x[n], x[n+1])          for n = 1 .. N-2
//   o[n] = max(e[n-1], e[n], e[n+1])          for n = 2 .. N-3
//   y[n] = x[n] - o[n]                        for n = 2 .. N-3
// It loops over NLEADS leads whose input, scratch and output areas start at
// in_base, tmp_base and out_base and advance by stride per lead.
package asm_pkg;
  import biosig_pkg::*;

  function automatic instr_t i_alu(funct_e f, int rd, int ra, int rb);
    return {OP_ALU, 4'(rd), 4'(ra), 4'(rb), 4'd0, f};
  endfunction
  function automatic instr_t i_addi(int rd, int ra, int imm);
    return {OP_ADDI, 4'(rd), 4'(ra), 12'(imm)};
  endfunction
  function automatic instr_t i_shi(int rd, int ra, int kind, int sh);
    return {OP_SHI, 4'(rd), 4'(ra), 6'd0, 2'(kind), 4'(sh)};
  endfunction
  function automatic instr_t i_li(int rd, int imm);
    return {OP_LI, 4'(rd), 16'(imm)};
  endfunction
  function automatic instr_t i_ld(int rd, int ra, int imm);
    return {OP_LD, 4'(rd), 4'(ra), 12'(imm)};
  endfunction
  function automatic instr_t i_st(int rs, int ra, int imm);
    return {OP_ST, 4'(rs), 4'(ra), 12'(imm)};
  endfunction
  function automatic instr_t i_br(opcode_e op, int rx, int ry, int tgt);
    return {op, 4'(rx), 4'(ry), 12'(tgt)};
  endfunction
  function automatic instr_t i_jmp(int tgt);
    return {OP_JMP, 8'd0, 12'(tgt)};
  endfunction
  function automatic instr_t i_halt();
    return {OP_HALT, 20'd0};
  endfunction
  function automatic instr_t i_nop();
    return '0;
  endfunction

  // Reference model: executes one instruction at a time.
  class iss;
    word_t  rf [NREGS];
    word_t  dm [int unsigned];
    instr_t im [int unsigned];
    int     steps;

    function new();
      foreach (rf[i]) rf[i] = '0;
      steps = 0;
    endfunction

    function word_t rd_dm(int unsigned a);
      return dm.exists(a) ? dm[a] : '0;
    endfunction

    function word_t alu(funct_e f, word_t a, word_t b);
      logic signed [31:0] p;
      p = $signed(a) * $signed(b);
      case (f)
        FN_ADD:  return a + b;
        FN_SUB:  return a - b;
        FN_AND:  return a & b;
        FN_OR:   return a | b;
        FN_XOR:  return a ^ b;
        FN_SLL:  return a << b[3:0];
        FN_SRL:  return a >> b[3:0];
        FN_SRA:  return word_t'($signed(a) >>> b[3:0]);
        FN_MUL:  return p[15:0];
        FN_MULH: return p[31:16];
        FN_MIN:  return ($signed(a) < $signed(b)) ? a : b;
        FN_MAX:  return ($signed(a) > $signed(b)) ? a : b;
        FN_SLT:  return {15'd0, $signed(a) < $signed(b)};
        default: return '0;
      endcase
    endfunction

    // Runs until HALT or max_steps; returns 1 on HALT.
    function bit run(int max_steps);
      int unsigned pc = 0;
      for (int s = 0; s < max_steps; s++) begin
        instr_t  w  = im.exists(pc) ? im[pc] : '0;
        opcode_e op = opcode_e'(w[23:20]);
        int      rd = int'(w[19:16]);
        int      ra = int'(w[15:12]);
        int      rb = int'(w[11:8]);
        word_t   simm = word_t'($signed(w[11:0]));
        int unsigned ea = int'(15'(rf[ra] + simm));
        int unsigned npc = (pc + 1) % IM_DEPTH;
        steps++;
        case (op)
          OP_ALU:  rf[rd] = alu(funct_e'(w[3:0]), rf[ra], rf[rb]);
          OP_ADDI: rf[rd] = rf[ra] + simm;
          OP_SHI:  rf[rd] = alu((w[5:4] == 2'd1) ? FN_SRL : (w[5:4] == 2'd2) ? FN_SRA : FN_SLL,
                                rf[ra], word_t'(w[3:0]));
          OP_LI:   rf[rd] = w[15:0];
          OP_LD:   rf[rd] = rd_dm(ea);
          OP_ST:   dm[ea] = rf[rd];
          OP_BEQ:  if (rf[rd] == rf[ra]) npc = w[11:0];
          OP_BNE:  if (rf[rd] != rf[ra]) npc = w[11:0];
          OP_BLT:  if ($signed(rf[rd]) < $signed(rf[ra])) npc = w[11:0];
          OP_JMP:  npc = w[11:0];
          OP_HALT: return 1'b1;
          default: ;
        endcase
        pc = npc;
      end
      return 1'b0;
    endfunction
  endclass

  // ECG baseline-removal program (see header). r0 stays 0.
  function automatic void ecg_program(ref instr_t prog[$], input int in_base, input int tmp_base,
                                      input int out_base, input int nsamp, input int nleads,
                                      input int stride);
    int lead_lbl, l1, l2;
    prog.delete();
    prog.push_back(i_li(11, in_base));
    prog.push_back(i_li(12, tmp_base));
    prog.push_back(i_li(13, out_base));
    prog.push_back(i_li(14, nleads));
    prog.push_back(i_li(15, stride));
    lead_lbl = prog.size();
    prog.push_back(i_addi(1, 11, 1));
    prog.push_back(i_addi(2, 12, 1));
    prog.push_back(i_li(4, nsamp - 2));
    l1 = prog.size();
    prog.push_back(i_ld(5, 1, -1));
    prog.push_back(i_ld(6, 1, 0));
    prog.push_back(i_ld(7, 1, 1));
    prog.push_back(i_alu(FN_MIN, 8, 5, 6));
    prog.push_back(i_alu(FN_MIN, 8, 8, 7));
    prog.push_back(i_st(8, 2, 0));
    prog.push_back(i_addi(1, 1, 1));
    prog.push_back(i_addi(2, 2, 1));
    prog.push_back(i_addi(4, 4, -1));
    prog.push_back(i_br(OP_BNE, 4, 0, l1));
    prog.push_back(i_addi(1, 12, 2));
    prog.push_back(i_addi(2, 11, 2));
    prog.push_back(i_addi(3, 13, 2));
    prog.push_back(i_li(4, nsamp - 4));
    l2 = prog.size();
    prog.push_back(i_ld(5, 1, -1));
    prog.push_back(i_ld(6, 1, 0));
    prog.push_back(i_ld(7, 1, 1));
    prog.push_back(i_alu(FN_MAX, 8, 5, 6));
    prog.push_back(i_alu(FN_MAX, 8, 8, 7));
    prog.push_back(i_ld(9, 2, 0));
    prog.push_back(i_alu(FN_SUB, 9, 9, 8));
    prog.push_back(i_st(9, 3, 0));
    prog.push_back(i_addi(1, 1, 1));
    prog.push_back(i_addi(2, 2, 1));
    prog.push_back(i_addi(3, 3, 1));
    prog.push_back(i_addi(4, 4, -1));
    prog.push_back(i_br(OP_BNE, 4, 0, l2));
    prog.push_back(i_alu(FN_ADD, 11, 11, 15));
    prog.push_back(i_alu(FN_ADD, 12, 12, 15));
    prog.push_back(i_alu(FN_ADD, 13, 13, 15));
    prog.push_back(i_addi(14, 14, -1));
    prog.push_back(i_br(OP_BNE, 14, 0, lead_lbl));
    prog.push_back(i_halt());
  endfunction

  // Direct reference of the baseline removal for one sample position.
  function automatic word_t ecg_ref(ref word_t x[$], input int n);
    word_t e [3];
    word_t o;
    for (int k = 0; k < 3; k++) begin
      int m = n - 1 + k;
      word_t a = x[m-1], b = x[m], c = x[m+1];
      word_t mn = ($signed(a) < $signed(b)) ? a : b;
      e[k] = ($signed(mn) < $signed(c)) ? mn : c;
    end
    o = ($signed(e[0]) > $signed(e[1])) ? e[0] : e[1];
    o = ($signed(o) > $signed(e[2])) ? o : e[2];
    return x[n] - o;
  endfunction

  // Synthetic ECG-like sample: slow baseline wander, a sharp beat every 64
  // samples and a little pseudo-random noise.
  function automatic word_t ecg_sample(int lead, int n);
    int wander = ((n + 37 * lead) % 256) - 128;
    int beat   = ((n % 64) == 10) ? 900 : ((n % 64) == 11) ? 400 : ((n % 64) == 9) ? 200 : 0;
    int noise  = int'((n * 1103 + lead * 7919) % 17) - 8;
    return word_t'(wander * 2 + beat + noise + lead * 10);
  endfunction

endpackage
