// tb_pu: self-checking testbench of one processing unit (core, instruction
// memory, output latches, clock gate, read-data hold).
//
// The testbench plays the interconnect: it refuses a request at random by
// raising stall for that cycle, carries out no access of a refused cycle,
// and scribbles on the read data whenever it is not the unit's own fresh
// read (as another unit using the bank would). Programs are loaded through
// the unit's load port. Results are compared with the reference model, and
// the cycle count must equal the stall-free count plus the stalled cycles.
module tb_pu;
  import biosig_pkg::*;
  import asm_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0, stall = 1'b0;
  logic             im_we = 1'b0;
  logic [IM_AW-1:0] im_waddr = '0;
  instr_t           im_wdata = '0;
  dm_req_t          req;
  word_t            rdata;
  logic             halted;
  word_t            dm [1 << DM_AW];
  int checks = 0, failures = 0, cycles, stalls, stall_pct;

  always #5 clk = ~clk;

  pu dut (.clk, .rst_n, .stall, .im_we, .im_waddr, .im_wdata, .req, .rdata, .halted);

  // behavioural interconnect + memory
  always_ff @(posedge clk) begin
    if (!stall && req.we) dm[req.waddr] <= req.wdata;
    if (!stall && req.re) rdata <= (req.we && req.waddr == req.raddr) ? req.wdata : dm[req.raddr];
    else                  rdata <= word_t'($urandom);
  end
  always @(negedge clk) begin
    #1 stall = rst_n && (req.re || req.we) && (($urandom % 100) < stall_pct);
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic run(ref instr_t prog[$], input int ninit, input int ncmp, input int base_cycles,
                     input string name);
    iss m = new();
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < prog.size() + 1; i++) begin
      @(negedge clk);
      im_we = 1'b1; im_waddr = IM_AW'(i);
      im_wdata = (i < prog.size()) ? prog[i] : i_halt();
      if (i < prog.size()) m.im[i] = prog[i];
    end
    @(negedge clk) im_we = 1'b0;
    for (int i = 0; i < ncmp; i++) dm[i] = '0;
    for (int i = 0; i < ninit; i++) begin dm[i] = word_t'($urandom); m.dm[i] = dm[i]; end
    void'(m.run(100000));
    @(negedge clk) rst_n = 1'b1;
    cycles = 0; stalls = 0;
    do begin
      @(posedge clk);
      if (stall) stalls++;
      @(negedge clk);
      cycles++;
    end while (!halted && cycles < 200000);
    chk(halted, {name, ": halted"});
    repeat (2) @(negedge clk);
    for (int i = 0; i < ncmp; i++)
      chk(dm[i] == m.rd_dm(i), $sformatf("%s dm[%0d]=%h exp %h", name, i, dm[i], m.rd_dm(i)));
    if (base_cycles > 0)
      chk(cycles == base_cycles + stalls,
          $sformatf("%s: %0d cycles, %0d stalls, expected %0d", name, cycles, stalls, base_cycles + stalls));
    chk(stall_pct == 0 || stalls > 0, {name, ": stalls happened"});
  endtask

  instr_t prog[$];
  int total_stalls = 0;

  initial begin
    for (int t = 0; t < 30; t++) begin
      automatic int n = 40 + ($urandom % 40);
      stall_pct = (t == 0) ? 0 : 10 + ($urandom % 60);
      prog.delete();
      for (int r = 1; r < 16; r++) prog.push_back(i_li(r, $urandom));
      for (int k = 0; k < n; k++) begin
        automatic int rd = 1 + ($urandom % 15), ra = 1 + ($urandom % 15), rb = 1 + ($urandom % 15);
        case ($urandom % 6)
          0, 1: prog.push_back(i_alu(funct_e'($urandom % 13), rd, ra, rb));
          2: prog.push_back(i_ld(rd, 0, $urandom % 64));
          3: prog.push_back(i_st(rd, 0, $urandom % 64));
          4: begin
            prog.push_back(i_ld(rd, 0, $urandom % 64));
            prog.push_back(i_alu(FN_ADD, ra, rd, rb));       // use the load at once
          end
          default: prog.push_back(i_addi(rd, ra, $urandom));
        endcase
      end
      for (int r = 1; r < 16; r++) prog.push_back(i_st(r, 0, 100 + r));
      prog.push_back(i_halt());
      run(prog, 64, 128, prog.size() + 1, $sformatf("random%0d", t));
      total_stalls += stalls;
    end
    stall_pct = 40;
    ecg_program(prog, 0, 100, 200, 48, 1, 0);
    run(prog, 48, 260, 0, "ecg");
    chk(total_stalls > 0, "stalls exercised");
    $display("stall cycles: %0d", total_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
