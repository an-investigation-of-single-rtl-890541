// tb_multi_core_stress: crossbar stress test of the multi-core node. All
// eight units run random load/store/ALU programs whose data lives in the same
// two banks (each unit has its own 32-word slice of bank 0 and of bank 1), so
// nearly every memory access competes with other units on the same port.
// This exercises refused reads, refused writes, cycles in which one of a
// unit's two requests is granted and the other refused, and load data that
// must survive several stalled cycles. For each of 12 rounds the slices are
// compared with a per-unit reference model, and each unit's cycle count
// must be its instruction count plus one plus its stalled cycles.
module tb_multi_core_stress;
  import biosig_pkg::*;
  import asm_pkg::*;

  localparam int NP = 8;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [NP-1:0]    im_we = '0;
  logic [IM_AW-1:0] im_waddr = '0;
  instr_t           im_wdata = '0;
  logic             host_sel = 1'b1;
  dm_req_t          host_req = '0;
  word_t            host_rdata;
  logic [NP-1:0]    halted, stall;
  int checks = 0, failures = 0, total_stalls = 0, heavy = 0;

  always #5 clk = ~clk;

  multi_core dut (.clk, .rst_n, .im_we, .im_waddr, .im_wdata, .host_sel, .host_req,
                  .host_rdata, .halted, .stall);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic int slot(int p, int bank, int k);
    return bank * 2048 + p * 32 + k;
  endfunction

  task automatic round(int r);
    iss     m [NP];
    instr_t prog[$];
    int     cycles [NP], stalls [NP];
    bit     done [NP];
    rst_n = 1'b0;
    host_sel = 1'b1;
    for (int p = 0; p < NP; p++) begin
      m[p] = new();
      prog.delete();
      prog.push_back(i_li(15, slot(p, 0, 0)));
      prog.push_back(i_li(14, slot(p, 1, 0)));
      for (int g = 1; g < 14; g++) prog.push_back(i_li(g, $urandom));
      for (int k = 0; k < 60; k++) begin
        automatic int rd = 1 + ($urandom % 13), ra = 1 + ($urandom % 13), rb = 1 + ($urandom % 13);
        automatic int base = 14 + ($urandom % 2);
        case ($urandom % 5)
          0: prog.push_back(i_alu(funct_e'($urandom % 13), rd, ra, rb));
          1: prog.push_back(i_ld(rd, base, $urandom % 16));
          2: prog.push_back(i_st(rd, base, $urandom % 16));
          3: begin
            prog.push_back(i_ld(rd, base, $urandom % 16));
            prog.push_back(i_alu(FN_XOR, ra, rd, rb));
          end
          default: begin
            prog.push_back(i_ld(rd, 15, $urandom % 16));
            prog.push_back(i_st(ra, 14, $urandom % 16));
          end
        endcase
      end
      for (int g = 1; g < 14; g++) prog.push_back(i_st(g, 14, 16 + g));
      prog.push_back(i_halt());
      foreach (prog[i]) m[p].im[i] = prog[i];
      foreach (prog[i]) begin
        @(negedge clk); im_we = '0; im_we[p] = 1'b1; im_waddr = IM_AW'(i); im_wdata = prog[i];
      end
      @(negedge clk) im_we = '0;
      for (int b = 0; b < 2; b++)
        for (int k = 0; k < 32; k++) begin
          @(negedge clk);
          host_req = '0;
          host_req.we = 1'b1; host_req.waddr = dm_addr_t'(slot(p, b, k));
          host_req.wdata = (k < 16) ? word_t'($urandom) : '0;
          m[p].dm[slot(p, b, k)] = host_req.wdata;
        end
      void'(m[p].run(100000));
    end
    @(negedge clk) begin host_req = '0; host_sel = 1'b0; end
    for (int p = 0; p < NP; p++) begin cycles[p] = 0; stalls[p] = 0; done[p] = 1'b0; end
    @(negedge clk) rst_n = 1'b1;
    while (halted != '1 && cycles[0] < 100000) begin
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (!done[p] && stall[p]) stalls[p]++;
      if ($countones(stall) >= 4) heavy++;
      @(negedge clk);
      for (int p = 0; p < NP; p++) if (!done[p]) begin
        cycles[p]++;
        done[p] = halted[p];
      end
    end
    for (int p = 0; p < NP; p++) begin
      chk(halted[p], $sformatf("round %0d unit %0d halted", r, p));
      chk(cycles[p] == m[p].steps + 1 + stalls[p],
          $sformatf("round %0d unit %0d: %0d cycles, expected %0d + 1 + %0d", r, p, cycles[p],
                    m[p].steps, stalls[p]));
      total_stalls += stalls[p];
    end
    chk(stalls[0] == 0, "unit 0 never stalls");
    @(negedge clk) host_sel = 1'b1;
    for (int p = 0; p < NP; p++)
      for (int b = 0; b < 2; b++)
        for (int k = 0; k < 32; k++) begin
          @(negedge clk); host_req.re = 1'b1; host_req.raddr = dm_addr_t'(slot(p, b, k));
          @(posedge clk) #1;
          chk(host_rdata == m[p].rd_dm(slot(p, b, k)),
              $sformatf("round %0d unit %0d bank %0d word %0d: %h expected %h", r, p, b, k,
                        host_rdata, m[p].rd_dm(slot(p, b, k))));
        end
    @(negedge clk) host_req = '0;
  endtask

  initial begin
    for (int r = 0; r < 12; r++) round(r);
    $display("stalled unit-cycles %0d, cycles with 4 or more units stalled %0d", total_stalls, heavy);
    chk(total_stalls > 1000, "heavy contention reached");
    chk(heavy > 0, "many units stalled at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
