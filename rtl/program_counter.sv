// program_counter: fetch address register of the instruction fetch stage.
//
// Holds the byte address of the instruction being fetched. Each rising clock edge
// it advances by 4 (one 32-bit instruction) through its own adder, or loads the
// branch target when a branch is taken; the choice is the multiplexer in front of
// the PC in the pipeline diagram. A load-use stall holds the PC. A taken branch
// wins over a stall, because the stalled instruction is squashed by the branch.
// pc_plus4 is the sequential next address, passed down the pipeline as the
// base of branch targets. Reset (synchronous, active high) sets the PC to
// RESET_PC; that value and the stall/priority rules are this design's choices.
module program_counter
  import risc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            stall,
  input  logic            branch_taken,
  input  logic [XLEN-1:0] branch_target,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] pc_plus4
);

  assign pc_plus4 = pc + XLEN'(4);

  always_ff @(posedge clk) begin
    if (rst)               pc <= RESET_PC;
    else if (branch_taken) pc <= branch_target;
    else if (!stall)       pc <= pc_plus4;
  end

endmodule
