// tb_risc_processor: end-to-end test of the pipelined processor at its default
// sizes (256-word instruction and data memories).
//
// Part 1, timing: a directed program checks that independent instructions
// complete one per clock, that a load followed by its user costs exactly one
// stall cycle and that a taken branch costs three cycles, by measuring the
// distance between OUT pulses.
// Part 2, function: random programs (all ALU functions in register and immediate
// form, loads, stores, IN, OUT, forward branches and a counted loop) are run on
// the processor and on an instruction-by-instruction reference model written in
// this testbench. The sequence of OUT values, the final registers and the final
// data memory must agree.
// Every pipeline mechanism -- EX/MEM and MEM/WB forwarding, load-use stall, taken
// and not-taken branch, store, load, IN, OUT and each of the nine ALU functions --
// is counted; one that never happens counts as a failure.
module tb_risc_processor;
  import risc_pkg::*;
  import risc_asm_pkg::*;

  localparam int IW = 256;  // default instruction memory words
  localparam int DW = 256;  // default data memory words
  localparam int N_PROGRAMS = 40;
  localparam int BODY = 160;

  logic        clk = 1'b0;
  logic        rst;
  word_t       in_a, in_b, out_z, prog_wdata;
  logic [3:0]  in_s;
  logic        out_z_valid, prog_we;
  logic [7:0]  prog_addr;

  risc_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_stall = 0, n_fwd_exmem = 0, n_fwd_memwb = 0, n_taken = 0, n_not_taken = 0;
  int n_store = 0, n_load = 0, n_in = 0, n_out = 0;
  int n_alu [9];

  always @(posedge clk) if (!rst) begin
    if (dut.stall) n_stall++;
    if (dut.fwd_a == FWD_EXMEM || dut.fwd_b == FWD_EXMEM) n_fwd_exmem++;
    if (dut.fwd_a == FWD_MEMWB || dut.fwd_b == FWD_MEMWB) n_fwd_memwb++;
    if (dut.branch_taken) n_taken++;
    if (dut.ex_mem.ctrl.branch && !dut.ex_mem.cond) n_not_taken++;
    if (dut.ex_mem.ctrl.mem_write) n_store++;
    if (dut.mem_wb.ctrl.mem_read) n_load++;
    if (dut.id_ex.ctrl.in_port) n_in++;
    if (out_z_valid) n_out++;
    if (dut.id_ex.ctrl.reg_write && !dut.id_ex.ctrl.mem_read && !dut.id_ex.ctrl.in_port &&
        int'(dut.id_ex.ctrl.alu_sel) < 9)
      n_alu[int'(dut.id_ex.ctrl.alu_sel)]++;
  end

  // OUT pulses observed on the pins
  word_t  outs [$];
  longint out_cycle [$];
  always @(posedge clk) if (!rst && out_z_valid) begin
    outs.push_back(out_z);
    out_cycle.push_back(cycle);
  end

  // ------------------------------------------------------------ program handling
  word_t prog [IW];
  word_t halt_word;

  task automatic load_and_reset();
    rst = 1'b1;
    for (int i = 0; i < IW; i++) begin
      prog_we = 1'b1; prog_addr = 8'(i); prog_wdata = prog[i];
      @(posedge clk); #1;
    end
    prog_we = 1'b0;
    @(posedge clk); #1;
    outs.delete(); out_cycle.delete();
    rst = 1'b0;
  endtask

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%h) expected %0d (0x%h)", what, got, got, exp, exp);
    end
  endtask

  // ------------------------------------------------------------ reference model
  word_t  m_reg [8];
  word_t  m_mem [DW];
  word_t  m_outs [$];
  int     m_steps;

  function automatic word_t ref_alu(int sel, word_t x, word_t z);
    case (sel)
      0: return x & z;       1: return ~(x & z);
      2: return x | z;       3: return ~(x | z);
      4: return x ^ z;       5: return ~(x ^ z);
      6: return ~x;          7: return x + z;
      8: return x - z;       default: return '0;
    endcase
  endfunction

  task automatic run_model();
    int pc = 0;
    m_outs.delete();
    foreach (m_reg[i]) m_reg[i] = '0;
    m_steps = 0;
    while (m_steps < 100000) begin
      word_t w = prog[(pc / 4) % IW];
      int op = int'(w[31:28]), sel = int'(w[27:24]);
      int rd = int'(w[23:21]), rs = int'(w[20:18]), rt = int'(w[17:15]);
      word_t imm = word_t'(signed'(w[14:0]));
      word_t res = '0;
      logic wr = 1'b0;
      int next = pc + 4;
      if (w == halt_word) break;
      m_steps++;
      case (op)
        0: begin res = ref_alu(sel, m_reg[rs], m_reg[rt]); wr = 1; end
        1: begin res = ref_alu(sel, m_reg[rs], imm); wr = 1; end
        2: begin res = m_mem[((m_reg[rs] + imm) >> 2) % DW]; wr = 1; end
        3: m_mem[((m_reg[rs] + imm) >> 2) % DW] = m_reg[rt];
        4: if (m_reg[rs] == 0) next = int'(word_t'(pc + 4) + imm);
        5: if (m_reg[rs] != 0) next = int'(word_t'(pc + 4) + imm);
        6: begin
             case (imm[1:0])
               2'd0: res = in_a; 2'd1: res = in_b; 2'd2: res = word_t'(in_s); default: res = '0;
             endcase
             wr = 1;
           end
        7: m_outs.push_back(m_reg[rt]);
        default: ;
      endcase
      if (wr && rd != 0) m_reg[rd] = res;
      pc = next;
    end
  endtask

  // ------------------------------------------------------------ random programs
  function automatic reg_addr_t rr();
    return reg_addr_t'($urandom % 8);
  endfunction

  task automatic make_random_program();
    int i = 0;
    foreach (prog[k]) prog[k] = nop();
    // counted loop: r1 = 3 + rnd; do r1 -= 1 while r1 != 0
    prog[i++] = li(3'd1, 3 + int'($urandom % 4));
    prog[i++] = i_alu(ALU_ADD, 3'd2, 3'd2, int'($urandom % 100));
    prog[i++] = i_alu(ALU_SUB, 3'd1, 3'd1, 1);
    prog[i++] = bnez(3'd1, -12);
    while (i < BODY) begin
      int kind = int'($urandom % 16);
      case (kind)
        0, 1, 2, 3: prog[i] = r_alu(alu_sel_e'($urandom % 9), rr(), rr(), rr());
        4, 5:       prog[i] = i_alu(alu_sel_e'($urandom % 9), rr(), rr(), int'($urandom));
        6, 7:       prog[i] = lw(rr(), ($urandom % 2) ? 3'd0 : rr(), int'($urandom % 64) * 4);
        8, 9:       prog[i] = sw(rr(), ($urandom % 2) ? 3'd0 : rr(), int'($urandom % 64) * 4);
        10:         prog[i] = in_p(rr(), int'($urandom % 4));
        11, 12:     prog[i] = out_p(rr());
        13: begin
          // forward branch that stays inside the body (target <= halt)
          int skip = int'($urandom % 4);
          if (skip > BODY - i - 1) skip = BODY - i - 1;
          prog[i] = ($urandom % 2) ? beqz(rr(), skip * 4) : bnez(rr(), skip * 4);
        end
        default: begin
          // dependent pair: a load or ALU op directly followed by its user
          reg_addr_t d = reg_addr_t'(1 + $urandom % 7);
          prog[i] = ($urandom % 2) ? lw(d, 3'd0, int'($urandom % 64) * 4)
                                   : i_alu(ALU_ADD, d, rr(), int'($urandom % 50));
          if (i + 1 < BODY) begin
            i++;
            prog[i] = ($urandom % 2) ? r_alu(alu_sel_e'($urandom % 9), rr(), d, rr()) : out_p(d);
          end
        end
      endcase
      i++;
    end
    prog[BODY] = halt_word;
  endtask

  // ------------------------------------------------------------ main
  initial begin
    prog_we = 1'b0; prog_addr = '0; prog_wdata = '0; rst = 1'b1;
    in_a = 32'h1357_9BDF; in_b = 32'hFFFF_FFF0; in_s = 4'd6;
    foreach (n_alu[k]) n_alu[k] = 0;
    halt_word = beqz(3'd0, -4);

    // ---------------- part 1: cycle timing
    foreach (prog[k]) prog[k] = nop();
    prog[0]  = li(3'd1, 7);
    prog[1]  = li(3'd2, 9);
    prog[2]  = out_p(3'd1);                       // pulse 0
    for (int k = 3; k < 13; k++) prog[k] = li(reg_addr_t'(3 + k % 5), k);
    prog[13] = out_p(3'd2);                       // pulse 1: 11 cycles later
    prog[14] = sw(3'd2, 3'd0, 8);
    prog[15] = lw(3'd3, 3'd0, 8);
    prog[16] = out_p(3'd3);                       // pulse 2: 2 + 1 stall = 4 cycles later
    prog[17] = beqz(3'd0, 4);
    prog[18] = out_p(3'd1);                       // skipped
    prog[19] = out_p(3'd2);                       // pulse 3: 2 + 3 penalty = 5 cycles later
    prog[20] = halt_word;
    load_and_reset();
    repeat (60) @(posedge clk);
    expect_eq("timing: OUT count", outs.size(), 4);
    if (outs.size() == 4) begin
      expect_eq("timing: out0", outs[0], 7);
      expect_eq("timing: out1", outs[1], 9);
      expect_eq("timing: out2 (loaded)", outs[2], 9);
      expect_eq("timing: out3", outs[3], 9);
      expect_eq("timing: 11 independent instructions take 11 cycles", out_cycle[1] - out_cycle[0], 11);
      expect_eq("timing: load-use costs one stall", out_cycle[2] - out_cycle[1], 4);
      expect_eq("timing: taken branch costs three cycles", out_cycle[3] - out_cycle[2], 5);
    end

    // ---------------- part 2: random programs against the reference model
    for (int p = 0; p < N_PROGRAMS; p++) begin
      in_a = $urandom; in_b = $urandom; in_s = 4'($urandom);
      make_random_program();
      load_and_reset();
      // the data memory is not reset: the model starts from its contents
      for (int k = 0; k < DW; k++) m_mem[k] = dut.u_dmem.mem[k];
      run_model();
      if (m_steps >= 100000) begin failures++; $display("FAIL model did not halt"); end
      repeat (4 * m_steps + 40) @(posedge clk);
      expect_eq($sformatf("prog %0d: OUT count", p), outs.size(), m_outs.size());
      for (int k = 0; k < m_outs.size() && k < outs.size(); k++)
        expect_eq($sformatf("prog %0d: OUT %0d", p, k), outs[k], m_outs[k]);
      for (int r = 0; r < 8; r++)
        expect_eq($sformatf("prog %0d: r%0d", p, r), dut.u_rb.regs[r] & {32{r != 0}}, m_reg[r]);
      for (int k = 0; k < DW; k++)
        expect_eq($sformatf("prog %0d: mem[%0d]", p, k), dut.u_dmem.mem[k], m_mem[k]);
    end

    // ---------------- every mechanism must have happened
    expect_eq("load-use stall seen",      longint'(n_stall > 0), 1);
    expect_eq("EX/MEM forwarding seen",   longint'(n_fwd_exmem > 0), 1);
    expect_eq("MEM/WB forwarding seen",   longint'(n_fwd_memwb > 0), 1);
    expect_eq("taken branch seen",        longint'(n_taken > 0), 1);
    expect_eq("not-taken branch seen",    longint'(n_not_taken > 0), 1);
    expect_eq("store seen",               longint'(n_store > 0), 1);
    expect_eq("load seen",                longint'(n_load > 0), 1);
    expect_eq("IN seen",                  longint'(n_in > 0), 1);
    expect_eq("OUT seen",                 longint'(n_out > 0), 1);
    for (int k = 0; k < 9; k++) expect_eq($sformatf("ALU function %0d seen", k), longint'(n_alu[k] > 0), 1);
    $display("mechanisms: stall=%0d fwd_exmem=%0d fwd_memwb=%0d taken=%0d not_taken=%0d store=%0d load=%0d in=%0d out=%0d",
             n_stall, n_fwd_exmem, n_fwd_memwb, n_taken, n_not_taken, n_store, n_load, n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
