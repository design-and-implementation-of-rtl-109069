// hazard_unit: result forwarding and load-use interlock of the five-stage pipeline.
//
// Forwarding: an instruction in EX whose source register is written by an older
// instruction still in the pipeline takes the value from EX/MEM (one instruction
// ahead) or, failing that, from the write-back value in MEM/WB (two ahead) instead
// of the stale register bank value. These are the extra inputs of the ALU
// operand multiplexers and the wire back from the write-back stage in the
// pipeline diagram. Register 0 is never forwarded (it always reads zero).
// A load's data is only known at the end of MEM, so it cannot be forwarded from
// EX/MEM: when the instruction in ID reads the register that a load in EX will
// write, stall = 1 holds PC and IF/ID for one cycle and a bubble enters ID/EX.
// Purely combinational. The forwarding priorities and the one-cycle interlock are
// this design's choices; the document only names the forwarding of results.
module hazard_unit
  import risc_pkg::*;
(
  // instruction in ID
  input  logic      id_uses_rs,
  input  logic      id_uses_rt,
  input  reg_addr_t id_rs,
  input  reg_addr_t id_rt,
  // instruction in EX
  input  reg_addr_t ex_rs,
  input  reg_addr_t ex_rt,
  input  logic      ex_mem_read,
  input  logic      ex_reg_write,
  input  reg_addr_t ex_rd,
  // instruction in MEM
  input  logic      mem_reg_write,
  input  logic      mem_mem_read,
  input  reg_addr_t mem_rd,
  // instruction in WB
  input  logic      wb_reg_write,
  input  reg_addr_t wb_rd,
  output fwd_sel_e  fwd_a,
  output fwd_sel_e  fwd_b,
  output logic      stall
);

  function automatic fwd_sel_e pick(reg_addr_t src);
    if (src == '0)                                              return FWD_NONE;
    else if (mem_reg_write && !mem_mem_read && mem_rd == src)   return FWD_EXMEM;
    else if (wb_reg_write && wb_rd == src)                      return FWD_MEMWB;
    else                                                        return FWD_NONE;
  endfunction

  assign fwd_a = pick(ex_rs);
  assign fwd_b = pick(ex_rt);

  assign stall = ex_mem_read && ex_reg_write && ex_rd != '0 &&
                 ((id_uses_rs && id_rs == ex_rd) || (id_uses_rt && id_rt == ex_rd));

endmodule
