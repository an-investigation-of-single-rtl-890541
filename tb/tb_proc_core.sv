// tb_proc_core: self-checking testbench of the processing core.
//
// The core runs against a behavioural instruction memory and data memory.
// Each program is also run on the reference instruction-set model, and the
// data memory and (through stores) the registers are compared afterwards.
// Programs: every instruction in turn with back-to-back dependences (to hit
// forwarding from stage 2 into stage 1, including load results feeding an
// address), a branch loop, random straight-line programs, and the ECG
// baseline-removal loop. The cycle count from reset release to halted is
// checked to be the instruction count plus two for straight-line programs
// (one instruction per cycle, two-cycle latency).
module tb_proc_core;
  import biosig_pkg::*;
  import asm_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [IM_AW-1:0] im_addr;
  instr_t           instr;
  dm_req_t          req;
  word_t            rdata;
  logic             halted;

  instr_t im [IM_DEPTH];
  word_t  dm [1 << DM_AW];

  int checks = 0, failures = 0;
  int cycles;

  always #5 clk = ~clk;

  proc_core dut (
    .clk     (clk),
    .rst_n   (rst_n),
    .im_addr (im_addr),
    .instr   (instr),
    .req     (req),
    .rdata   (rdata),
    .halted  (halted)
  );

  always_ff @(posedge clk) instr <= im[im_addr];
  always_ff @(posedge clk) begin
    if (req.we) dm[req.waddr] <= req.wdata;
    if (req.re) rdata <= (req.we && req.waddr == req.raddr) ? req.wdata : dm[req.raddr];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Loads prog, initialises dm[0..init_n-1] with init values in both the
  // core's memory and the model, runs both and compares dm[0..cmp_n-1].
  task automatic run_prog(ref instr_t prog[$], input int init_n, input int cmp_n,
                          input int exp_cycles, input string name);
    iss m = new();
    rst_n = 1'b0;
    foreach (im[i]) im[i] = '0;
    for (int i = 0; i < cmp_n; i++) dm[i] = '0;
    foreach (prog[i]) begin
      im[i]   = prog[i];
      m.im[i] = prog[i];
    end
    for (int i = 0; i < init_n; i++) begin
      dm[i]   = word_t'($urandom);
      m.dm[i] = dm[i];
    end
    void'(m.run(200000));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!halted && cycles < 400000);
    repeat (2) @(posedge clk);
    check(halted, {name, ": halted"});
    for (int i = 0; i < cmp_n; i++) begin
      check(dm[i] == m.rd_dm(i), $sformatf("%s: dm[%0d]=%h expected %h", name, i, dm[i], m.rd_dm(i)));
    end
    if (exp_cycles > 0)
      check(cycles == exp_cycles, $sformatf("%s: %0d cycles, expected %0d", name, cycles, exp_cycles));
  endtask

  instr_t prog[$];

  initial begin
    // ---- 1: every operation, dependent chains ----
    prog.delete();
    prog.push_back(i_li(1, 16'h1234));
    prog.push_back(i_li(2, 16'hF00D));
    prog.push_back(i_alu(FN_ADD, 3, 1, 2));
    prog.push_back(i_alu(FN_SUB, 4, 3, 1));
    prog.push_back(i_alu(FN_AND, 5, 4, 3));
    prog.push_back(i_alu(FN_OR,  6, 5, 1));
    prog.push_back(i_alu(FN_XOR, 7, 6, 2));
    prog.push_back(i_li(8, 5));
    prog.push_back(i_alu(FN_SLL, 9, 2, 8));
    prog.push_back(i_alu(FN_SRL, 10, 2, 8));
    prog.push_back(i_alu(FN_SRA, 11, 2, 8));
    prog.push_back(i_alu(FN_MUL, 12, 1, 2));
    prog.push_back(i_alu(FN_MULH, 13, 1, 2));
    prog.push_back(i_alu(FN_MIN, 14, 1, 2));
    prog.push_back(i_alu(FN_MAX, 15, 1, 2));
    for (int r = 1; r < 16; r++) prog.push_back(i_st(r, 0, 100 + r));
    prog.push_back(i_alu(FN_SLT, 3, 2, 1));
    prog.push_back(i_shi(4, 2, 0, 3));
    prog.push_back(i_shi(5, 2, 1, 7));
    prog.push_back(i_shi(6, 2, 2, 15));
    prog.push_back(i_addi(7, 1, -2048));
    prog.push_back(i_addi(8, 0, 3));          // r8 = 3 (pointer)
    prog.push_back(i_ld(9, 8, 0));            // r9 = dm[3]
    prog.push_back(i_alu(FN_AND, 9, 9, 9));
    prog.push_back(i_li(10, 20));
    prog.push_back(i_st(10, 8, 1));           // dm[4] = 20
    prog.push_back(i_ld(11, 8, 1));           // load right after the store
    prog.push_back(i_ld(12, 11, 0));          // address from a load in stage 2
    prog.push_back(i_addi(12, 12, 1));
    for (int r = 3; r < 13; r++) prog.push_back(i_st(r, 0, 200 + r));
    prog.push_back(i_halt());
    run_prog(prog, 32, 256, prog.size() + 1, "ops");

    // ---- 2: loops and every branch kind ----
    prog.delete();
    prog.push_back(i_li(1, 0));               // 0 sum
    prog.push_back(i_li(2, 10));              // 1 count
    prog.push_back(i_li(3, 0));               // 2 index
    prog.push_back(i_ld(4, 3, 0));            // 3 loop: r4 = dm[i]
    prog.push_back(i_alu(FN_ADD, 1, 1, 4));   // 4
    prog.push_back(i_st(1, 3, 40));           // 5 running sum
    prog.push_back(i_addi(3, 3, 1));          // 6
    prog.push_back(i_br(OP_BNE, 3, 2, 3));    // 7
    prog.push_back(i_li(5, -3));              // 8
    prog.push_back(i_br(OP_BLT, 5, 0, 11));   // 9 taken
    prog.push_back(i_st(5, 0, 60));           // 10 skipped
    prog.push_back(i_br(OP_BEQ, 3, 2, 13));   // 11 taken
    prog.push_back(i_st(5, 0, 61));           // 12 skipped
    prog.push_back(i_br(OP_BLT, 0, 5, 16));   // 13 not taken
    prog.push_back(i_st(5, 0, 62));           // 14
    prog.push_back(i_jmp(17));                // 15
    prog.push_back(i_st(5, 0, 63));           // 16 skipped
    prog.push_back(i_br(OP_BEQ, 5, 0, 19));   // 17 not taken
    prog.push_back(i_st(2, 0, 64));           // 18
    prog.push_back(i_halt());                 // 19
    run_prog(prog, 32, 80, 0, "branches");
    // 3 + 10*5 + 10 remaining instructions, halted two cycles after HALT issues
    check(cycles == 3 + 50 + 9 + 1, $sformatf("branches: %0d cycles", cycles));

    // ---- 3: random straight-line programs ----
    for (int t = 0; t < 40; t++) begin
      automatic int n = 30 + ($urandom % 40);
      prog.delete();
      for (int r = 1; r < 16; r++) prog.push_back(i_li(r, $urandom));
      for (int k = 0; k < n; k++) begin
        automatic int sel = $urandom % 8;
        automatic int rd = 1 + ($urandom % 15), ra = 1 + ($urandom % 15), rb = 1 + ($urandom % 15);
        case (sel)
          0, 1, 2: prog.push_back(i_alu(funct_e'($urandom % 13), rd, ra, rb));
          3: prog.push_back(i_addi(rd, ra, $urandom));
          4: prog.push_back(i_shi(rd, ra, $urandom % 3, $urandom));
          5: prog.push_back(i_ld(rd, 0, $urandom % 64));
          6: prog.push_back(i_st(rd, 0, $urandom % 64));
          default: begin
            prog.push_back(i_alu(FN_AND, ra, ra, 0));    // ra = 0
            prog.push_back(i_ld(rd, ra, $urandom % 64));
          end
        endcase
      end
      for (int r = 1; r < 16; r++) prog.push_back(i_st(r, 0, 100 + r));
      prog.push_back(i_halt());
      run_prog(prog, 64, 128, prog.size() + 1, $sformatf("random%0d", t));
    end

    // ---- 4: ECG baseline removal, one lead of 40 samples ----
    ecg_program(prog, 0, 100, 200, 40, 1, 0);
    run_prog(prog, 40, 260, 0, "ecg");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
