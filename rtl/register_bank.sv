// register_bank: the processor's general purpose registers, built from D flip-flops.
//
// NUM_REGS registers of WIDTH bits. Behaviour on the rising clock edge follows the
// register function table: with reset = 1 every register is cleared whatever the
// input; with reset = 0 and wr_rd = 1 the input word is stored at waddr; with
// wr_rd = 0 nothing is stored and the registers are only read.
//
// This design's own choices: two asynchronous read ports (the pipeline reads rs
// and rt in the same cycle), a write that is visible on a read port in the same
// cycle (so the write-back stage and the decode stage can share a cycle), and
// register 0 that always reads zero (writes to it are ignored), which gives
// programs a constant zero for moves and unconditional branches.
module register_bank
  import risc_pkg::*;
#(
  parameter int unsigned NUM_REGS = 8,
  parameter int unsigned WIDTH    = XLEN,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic             clk,
  input  logic             rst,     // synchronous, active high
  input  logic             wr_rd,   // 1: write, 0: read only
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1,
  input  logic [AW-1:0]    raddr2,
  output logic [WIDTH-1:0] rdata2
);

  logic [WIDTH-1:0] regs [NUM_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (wr_rd && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic logic [WIDTH-1:0] read_port(logic [AW-1:0] ra);
    if (ra == '0)                   return '0;
    else if (wr_rd && ra == waddr)  return wdata;
    else                            return regs[ra];
  endfunction

  assign rdata1 = read_port(raddr1);
  assign rdata2 = read_port(raddr2);

endmodule
