// data_memory: the memory unit accessed in the memory-access stage.
//
// WORDS 32-bit words addressed by byte address (bits [1:0] ignored, word accesses
// only). Writes happen on the rising clock edge when we = 1; reads are
// combinational, so the loaded word is captured by the MEM/WB pipeline register at
// the end of the same cycle. The size, the word-only access and the read timing
// are this design's choices; the memory is not reset.
module data_memory
  import risc_pkg::*;
#(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [XLEN-1:0] addr,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] rdata
);

  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
