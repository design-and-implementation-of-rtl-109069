// instruction_decoder: decode half of the instruction register unit.
//
// Turns the fetched instruction word into the control bundle that steers the rest
// of the pipeline. As in the processor's description it has two separate
// decoders: the ALU decoder (ALU select line, operand sources, branch, memory and
// port controls) and the register bank decoder (which registers are read and
// whether and where the result is written). It also sign-extends the 15-bit
// immediate ("Sign Ex" in the pipeline diagram). Purely combinational.
// An instruction that is not valid (a pipeline bubble) or has an unknown opcode
// produces no writes of any kind. The encoding is this design's own (see risc_pkg).
module instruction_decoder
  import risc_pkg::*;
(
  input  logic        valid,
  input  logic [31:0] instr,
  output ctrl_t       ctrl,
  output word_t       imm
);

  opcode_e op;
  assign op  = opcode_e'(instr[31:28]);
  assign imm = {{(XLEN-IMM_W){instr[IMM_W-1]}}, instr[IMM_W-1:0]};

  // ALU decoder
  always_comb begin
    ctrl.alu_sel   = alu_sel_e'(instr[27:24]);
    ctrl.alu_a_pc  = 1'b0;
    ctrl.alu_b_imm = 1'b0;
    ctrl.branch    = 1'b0;
    ctrl.branch_nz = 1'b0;
    ctrl.in_port   = 1'b0;
    ctrl.out_port  = 1'b0;
    ctrl.mem_read  = 1'b0;
    ctrl.mem_write = 1'b0;
    if (valid) begin
      unique case (op)
        OP_ALU:  ;
        OP_ALUI: ctrl.alu_b_imm = 1'b1;
        OP_LW: begin
          ctrl.alu_sel   = ALU_ADD;
          ctrl.alu_b_imm = 1'b1;
          ctrl.mem_read  = 1'b1;
        end
        OP_SW: begin
          ctrl.alu_sel   = ALU_ADD;
          ctrl.alu_b_imm = 1'b1;
          ctrl.mem_write = 1'b1;
        end
        OP_BEQZ, OP_BNEZ: begin
          ctrl.alu_sel   = ALU_ADD;
          ctrl.alu_a_pc  = 1'b1;
          ctrl.alu_b_imm = 1'b1;
          ctrl.branch    = 1'b1;
          ctrl.branch_nz = (op == OP_BNEZ);
        end
        OP_IN:   ctrl.in_port  = 1'b1;
        OP_OUT:  ctrl.out_port = 1'b1;
        default: ;
      endcase
    end
  end

  // Register bank decoder
  always_comb begin
    ctrl.rd        = instr[23:21];
    ctrl.rs        = instr[20:18];
    ctrl.rt        = instr[17:15];
    ctrl.reg_write = 1'b0;
    ctrl.uses_rs   = 1'b0;
    ctrl.uses_rt   = 1'b0;
    if (valid) begin
      unique case (op)
        OP_ALU:  begin ctrl.reg_write = 1'b1; ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1; end
        OP_ALUI: begin ctrl.reg_write = 1'b1; ctrl.uses_rs = 1'b1; end
        OP_LW:   begin ctrl.reg_write = 1'b1; ctrl.uses_rs = 1'b1; end
        OP_SW:   begin ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1; end
        OP_BEQZ, OP_BNEZ: ctrl.uses_rs = 1'b1;
        OP_IN:   ctrl.reg_write = 1'b1;
        OP_OUT:  ctrl.uses_rt = 1'b1;
        default: ;
      endcase
    end
  end

endmodule
