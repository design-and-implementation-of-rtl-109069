// instruction_memory: the instruction store of the fetch stage.
//
// WORDS 32-bit words, addressed by byte address (bits [1:0] are ignored). A read
// takes one clock cycle: the word at addr is registered on the rising edge when
// en = 1 and appears on rdata in the following cycle, which is the one-cycle
// instruction-cache delay of the fetch stage. With en = 0 rdata holds, which is how
// a stall keeps the instruction register steady; the output register therefore
// doubles as the instruction register of the IF/ID pipeline register.
// A separate write port (prog_we, prog_addr as a word index) loads the program;
// how programs get into the memory is not published and is this design's choice.
// The memory has no reset; rdata is cleared by rst so that it starts defined.
module instruction_memory
  import risc_pkg::*;
#(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic [XLEN-1:0] addr,
  output logic [XLEN-1:0] rdata,
  input  logic            prog_we,
  input  logic [AW-1:0]   prog_addr,
  input  logic [XLEN-1:0] prog_wdata
);

  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst)     rdata <= '0;
    else if (en) rdata <= mem[addr[AW+1:2]];
  end

endmodule
