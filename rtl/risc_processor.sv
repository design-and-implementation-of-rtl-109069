// risc_processor: 32-bit RISC processor with a five-stage pipeline.
//
// Stages, each separated by a pipeline register:
//   IF  - the program counter addresses the instruction memory, whose one-cycle
//         read delivers the instruction register of IF/ID in the next cycle;
//   ID  - the instruction decoder (ALU decoder + register bank decoder) builds the
//         control bundle, the register bank is read and the immediate extended;
//   EX  - the ALU computes the result, the memory address or the branch target
//         (next PC + offset), and "zero?" tests rs for the branch condition;
//   MEM - the data memory is read or written; a taken branch redirects the PC;
//   WB  - a multiplexer picks the ALU result or the loaded word and writes it to
//         the register bank.
// One instruction can complete per clock. Results are forwarded from EX/MEM and
// MEM/WB to the ALU operand multiplexers; a load followed directly by a user of
// its result costs one stall cycle. Branches are resolved from EX/MEM, as in the
// pipeline diagram: when taken, the three younger instructions are squashed
// (3-cycle penalty); there are no delay slots.
//
// Interface: clk, synchronous active-high rst. in_a, in_b and in_s are the input
// registers the program reads with IN (the A, B and S pins of the processor
// symbol; S also carries the keypad selection in the vending application).
// out_z is the output register the program writes with OUT; out_z_valid pulses
// for one cycle on each OUT. prog_* load the instruction memory (hold rst while
// loading). Widths follow the 32-bit data path; the processor symbol prints the
// data pins as (32:0), read here as 32 bits.
//
// The stage structure, the ALU functions and the register bank behaviour follow
// the document; the instruction encoding, memory sizes, register count
// interpretation, forwarding/stall rules, branch scheme and I/O are this design's.
module risc_processor
  import risc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256,
  localparam int unsigned IAW       = $clog2(IMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [XLEN-1:0] in_a,
  input  logic [XLEN-1:0] in_b,
  input  logic [3:0]      in_s,
  output logic [XLEN-1:0] out_z,
  output logic            out_z_valid,
  input  logic            prog_we,
  input  logic [IAW-1:0]  prog_addr,
  input  logic [XLEN-1:0] prog_wdata
);

  // ---------------------------------------------------------------- pipeline registers
  typedef struct packed {
    logic  valid;
    word_t npc;
  } if_id_t;

  typedef struct packed {
    ctrl_t ctrl;
    word_t npc;
    word_t a;
    word_t b;
    word_t imm;
  } id_ex_t;

  typedef struct packed {
    ctrl_t ctrl;
    word_t result;
    word_t store_data;
    logic  cond;
  } ex_mem_t;

  typedef struct packed {
    ctrl_t ctrl;
    word_t result;
    word_t lmd;
  } mem_wb_t;

  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  // ---------------------------------------------------------------- input registers
  word_t      reg_a, reg_b;
  logic [3:0] reg_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_a <= '0;
      reg_b <= '0;
      reg_s <= '0;
    end else begin
      reg_a <= in_a;
      reg_b <= in_b;
      reg_s <= in_s;
    end
  end

  // ---------------------------------------------------------------- hazards
  logic     stall;
  logic     branch_taken;
  word_t    branch_target;
  fwd_sel_e fwd_a, fwd_b;

  assign branch_taken  = ex_mem.ctrl.branch && ex_mem.cond;
  assign branch_target = ex_mem.result;

  // ---------------------------------------------------------------- IF
  word_t pc, pc_plus4, ir;

  program_counter u_pc (
    .clk           (clk),
    .rst           (rst),
    .stall         (stall),
    .branch_taken  (branch_taken),
    .branch_target (branch_target),
    .pc            (pc),
    .pc_plus4      (pc_plus4)
  );

  instruction_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk        (clk),
    .rst        (rst),
    .en         (!stall || branch_taken),
    .addr       (pc),
    .rdata      (ir),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_wdata (prog_wdata)
  );

  always_ff @(posedge clk) begin
    if (rst || branch_taken) begin
      if_id <= '0;
    end else if (!stall) begin
      if_id.valid <= 1'b1;
      if_id.npc   <= pc_plus4;
    end
  end

  // ---------------------------------------------------------------- ID
  ctrl_t id_ctrl;
  word_t id_imm, rf_rs, rf_rt, wb_value;

  instruction_decoder u_dec (
    .valid (if_id.valid),
    .instr (ir),
    .ctrl  (id_ctrl),
    .imm   (id_imm)
  );

  register_bank #(.NUM_REGS(2 ** REG_AW), .WIDTH(XLEN)) u_rb (
    .clk    (clk),
    .rst    (rst),
    .wr_rd  (mem_wb.ctrl.reg_write),
    .waddr  (mem_wb.ctrl.rd),
    .wdata  (wb_value),
    .raddr1 (id_ctrl.rs),
    .rdata1 (rf_rs),
    .raddr2 (id_ctrl.rt),
    .rdata2 (rf_rt)
  );

  hazard_unit u_hz (
    .id_uses_rs    (id_ctrl.uses_rs),
    .id_uses_rt    (id_ctrl.uses_rt),
    .id_rs         (id_ctrl.rs),
    .id_rt         (id_ctrl.rt),
    .ex_rs         (id_ex.ctrl.rs),
    .ex_rt         (id_ex.ctrl.rt),
    .ex_mem_read   (id_ex.ctrl.mem_read),
    .ex_reg_write  (id_ex.ctrl.reg_write),
    .ex_rd         (id_ex.ctrl.rd),
    .mem_reg_write (ex_mem.ctrl.reg_write),
    .mem_mem_read  (ex_mem.ctrl.mem_read),
    .mem_rd        (ex_mem.ctrl.rd),
    .wb_reg_write  (mem_wb.ctrl.reg_write),
    .wb_rd         (mem_wb.ctrl.rd),
    .fwd_a         (fwd_a),
    .fwd_b         (fwd_b),
    .stall         (stall)
  );

  always_ff @(posedge clk) begin
    if (rst || branch_taken || stall) begin
      id_ex <= '0;
    end else begin
      id_ex.ctrl <= id_ctrl;
      id_ex.npc  <= if_id.npc;
      id_ex.a    <= rf_rs;
      id_ex.b    <= rf_rt;
      id_ex.imm  <= id_imm;
    end
  end

  // ---------------------------------------------------------------- EX
  word_t ex_a, ex_b, alu_a, alu_b, alu_y, ex_result, in_value;

  always_comb begin
    unique case (fwd_a)
      FWD_EXMEM: ex_a = ex_mem.result;
      FWD_MEMWB: ex_a = wb_value;
      default:   ex_a = id_ex.a;
    endcase
    unique case (fwd_b)
      FWD_EXMEM: ex_b = ex_mem.result;
      FWD_MEMWB: ex_b = wb_value;
      default:   ex_b = id_ex.b;
    endcase
  end

  assign alu_a = id_ex.ctrl.alu_a_pc  ? id_ex.npc : ex_a;
  assign alu_b = id_ex.ctrl.alu_b_imm ? id_ex.imm : ex_b;

  alu #(.WIDTH(XLEN)) u_alu (
    .a      (alu_a),
    .b      (alu_b),
    .s      (id_ex.ctrl.alu_sel),
    .aluout (alu_y)
  );

  always_comb begin
    unique case (id_ex.imm[1:0])
      2'd0:    in_value = reg_a;
      2'd1:    in_value = reg_b;
      2'd2:    in_value = word_t'(reg_s);
      default: in_value = '0;
    endcase
  end

  assign ex_result = id_ex.ctrl.in_port ? in_value : alu_y;

  always_ff @(posedge clk) begin
    if (rst || branch_taken) begin
      ex_mem <= '0;
    end else begin
      ex_mem.ctrl       <= id_ex.ctrl;
      ex_mem.result     <= ex_result;
      ex_mem.store_data <= ex_b;
      ex_mem.cond       <= id_ex.ctrl.branch_nz ? (ex_a != '0) : (ex_a == '0);
    end
  end

  // ---------------------------------------------------------------- MEM
  word_t dmem_rdata;

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk   (clk),
    .we    (ex_mem.ctrl.mem_write),
    .addr  (ex_mem.result),
    .wdata (ex_mem.store_data),
    .rdata (dmem_rdata)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_z       <= '0;
      out_z_valid <= 1'b0;
    end else begin
      out_z_valid <= ex_mem.ctrl.out_port;
      if (ex_mem.ctrl.out_port) out_z <= ex_mem.store_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_wb <= '0;
    end else begin
      mem_wb.ctrl   <= ex_mem.ctrl;
      mem_wb.result <= ex_mem.result;
      mem_wb.lmd    <= dmem_rdata;
    end
  end

  // ---------------------------------------------------------------- WB
  assign wb_value = mem_wb.ctrl.mem_read ? mem_wb.lmd : mem_wb.result;

  // ---------------------------------------------------------------- pipeline rules
  // A stall is only raised for a real instruction waiting in ID.
  a_stall_needs_instr : assert property (@(posedge clk) disable iff (rst)
    stall |-> if_id.valid);
  // A taken branch leaves IF/ID, ID/EX and EX/MEM empty in the next cycle.
  a_branch_squashes : assert property (@(posedge clk) disable iff (rst)
    branch_taken |=> !if_id.valid && id_ex.ctrl == '0 && ex_mem.ctrl == '0);
  // A load-use stall lasts exactly one cycle.
  a_stall_one_cycle : assert property (@(posedge clk) disable iff (rst)
    stall && !branch_taken |=> !stall);

endmodule
