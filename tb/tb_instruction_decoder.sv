// tb_instruction_decoder: self-checking test of the instruction decoder. Random
// instruction words of every opcode are decoded and each control field, the
// register addresses and the sign-extended immediate are compared with an
// expectation table written per opcode in the testbench. Bubbles (valid = 0) and
// unknown opcodes must produce no register, memory or port writes.
module tb_instruction_decoder;
  import risc_pkg::*;

  logic  clk = 1'b0;
  logic  valid;
  logic [31:0] instr;
  ctrl_t ctrl;
  word_t imm;
  int checks = 0, failures = 0;

  instruction_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%h valid=%b got %h exp %h", what, instr, valid, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      // columns: reg_write uses_rs uses_rt mem_read mem_write branch in out b_imm a_pc
      logic [9:0] e;
      int op;
      logic [31:0] exp_imm;
      instr = $urandom;
      valid = (n % 10) != 0;
      op = int'(instr[31:28]);
      #1;
      case (op)
        0: e = 10'b1110000000;
        1: e = 10'b1100000010;
        2: e = 10'b1101000010;
        3: e = 10'b0110100010;
        4, 5: e = 10'b0100010011;
        6: e = 10'b1000001000;
        7: e = 10'b0010000100;
        default: e = 10'b0;
      endcase
      if (!valid) e = 10'b0;
      expect_eq("reg_write", 32'(ctrl.reg_write), 32'(e[9]));
      expect_eq("uses_rs",   32'(ctrl.uses_rs),   32'(e[8]));
      expect_eq("uses_rt",   32'(ctrl.uses_rt),   32'(e[7]));
      expect_eq("mem_read",  32'(ctrl.mem_read),  32'(e[6]));
      expect_eq("mem_write", 32'(ctrl.mem_write), 32'(e[5]));
      expect_eq("branch",    32'(ctrl.branch),    32'(e[4]));
      expect_eq("in_port",   32'(ctrl.in_port),   32'(e[3]));
      expect_eq("out_port",  32'(ctrl.out_port),  32'(e[2]));
      expect_eq("alu_b_imm", 32'(ctrl.alu_b_imm), 32'(e[1]));
      expect_eq("alu_a_pc",  32'(ctrl.alu_a_pc),  32'(e[0]));
      if (valid && (op == 4 || op == 5)) expect_eq("branch_nz", 32'(ctrl.branch_nz), 32'(op == 5));
      if (valid && op >= 2 && op <= 5)   expect_eq("alu_sel(add)", 32'(ctrl.alu_sel), 32'h7);
      if (op <= 1)                       expect_eq("alu_sel", 32'(ctrl.alu_sel), 32'(instr[27:24]));
      expect_eq("rd", 32'(ctrl.rd), 32'(instr[23:21]));
      expect_eq("rs", 32'(ctrl.rs), 32'(instr[20:18]));
      expect_eq("rt", 32'(ctrl.rt), 32'(instr[17:15]));
      exp_imm = instr[14] ? (32'hFFFF_8000 | 32'(instr[14:0])) : 32'(instr[14:0]);
      expect_eq("imm", imm, exp_imm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
