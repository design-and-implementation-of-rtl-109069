// risc_pkg: types and constants shared by the 32-bit pipelined RISC processor.
//
// The ALU select codes are the nine functions of the processor's ALU function
// table (0000 = AND ... 1000 = A - B). Everything else here -- the instruction
// word layout, the opcodes and the control bundle carried down the pipeline -- is
// this design's own choice, because no instruction encoding is published for the
// processor beyond the ALU select codes.
//
// Instruction word (32 bits):
//   [31:28] opcode   [27:24] ALU select   [23:21] rd   [20:18] rs   [17:15] rt
//   [14:0]  immediate, sign-extended to 32 bits
package risc_pkg;

  localparam int unsigned XLEN   = 32;  // data path width
  localparam int unsigned REG_AW = 3;   // register address width (8 registers)
  localparam int unsigned IMM_W  = 15;  // immediate field width

  // ALU select line codes (function table of the ALU)
  typedef enum logic [3:0] {
    ALU_AND  = 4'b0000,
    ALU_NAND = 4'b0001,
    ALU_OR   = 4'b0010,
    ALU_NOR  = 4'b0011,
    ALU_XOR  = 4'b0100,
    ALU_XNOR = 4'b0101,
    ALU_NOTA = 4'b0110,
    ALU_ADD  = 4'b0111,
    ALU_SUB  = 4'b1000
  } alu_sel_e;

  // Opcodes
  typedef enum logic [3:0] {
    OP_ALU  = 4'd0,  // rd = rs <sel> rt
    OP_ALUI = 4'd1,  // rd = rs <sel> sext(imm)
    OP_LW   = 4'd2,  // rd = mem[rs + sext(imm)]
    OP_SW   = 4'd3,  // mem[rs + sext(imm)] = rt
    OP_BEQZ = 4'd4,  // if (rs == 0) pc = pc + 4 + sext(imm)
    OP_BNEZ = 4'd5,  // if (rs != 0) pc = pc + 4 + sext(imm)
    OP_IN   = 4'd6,  // rd = input register imm[1:0] (0: A, 1: B, 2: S)
    OP_OUT  = 4'd7   // Z = rt
  } opcode_e;

  typedef logic [REG_AW-1:0] reg_addr_t;
  typedef logic [XLEN-1:0]   word_t;

  // Control signals produced by the two decoders and carried down the pipeline
  typedef struct packed {
    // ALU decoder
    alu_sel_e  alu_sel;
    logic      alu_a_pc;    // ALU operand A is the next PC (branch target)
    logic      alu_b_imm;   // ALU operand B is the sign-extended immediate
    logic      branch;      // conditional branch
    logic      branch_nz;   // taken when rs != 0 (else when rs == 0)
    logic      in_port;     // result comes from an input register
    logic      out_port;    // write rt to the Z output register
    logic      mem_read;    // load
    logic      mem_write;   // store
    // register bank decoder
    logic      reg_write;
    logic      uses_rs;
    logic      uses_rt;
    reg_addr_t rd;
    reg_addr_t rs;
    reg_addr_t rt;
  } ctrl_t;

  // Forwarding source selection for an ALU operand
  typedef enum logic [1:0] {
    FWD_NONE  = 2'd0,  // value read from the register bank
    FWD_EXMEM = 2'd1,  // ALU result waiting in EX/MEM
    FWD_MEMWB = 2'd2   // write-back value in MEM/WB
  } fwd_sel_e;

endpackage
