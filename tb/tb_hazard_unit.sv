// tb_hazard_unit: self-checking test of forwarding selection and the load-use
// stall. Random pipeline situations are applied and the outputs compared with a
// reference worked out in the testbench: EX/MEM wins over MEM/WB, loads in
// EX/MEM are not forwarded, register 0 is never forwarded, and a stall is raised
// exactly when the instruction in ID reads the destination of a load in EX.
module tb_hazard_unit;
  import risc_pkg::*;

  logic      clk = 1'b0;
  logic      id_uses_rs, id_uses_rt, ex_mem_read, ex_reg_write, mem_reg_write, mem_mem_read, wb_reg_write;
  reg_addr_t id_rs, id_rt, ex_rs, ex_rt, ex_rd, mem_rd, wb_rd;
  fwd_sel_e  fwd_a, fwd_b;
  logic      stall;
  int checks = 0, failures = 0;
  int n_stall = 0, n_exmem = 0, n_memwb = 0;

  hazard_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_fwd(reg_addr_t src);
    if (src == 0) return 0;
    if (mem_reg_write && !mem_mem_read && mem_rd == src) return 1;
    if (wb_reg_write && wb_rd == src) return 2;
    return 0;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic exp_stall;
      {id_uses_rs, id_uses_rt, ex_mem_read, ex_reg_write, mem_reg_write, mem_mem_read, wb_reg_write} = 7'($urandom);
      // small register range so that matches are frequent
      id_rs = reg_addr_t'($urandom % 4); id_rt = reg_addr_t'($urandom % 4);
      ex_rs = reg_addr_t'($urandom % 4); ex_rt = reg_addr_t'($urandom % 4);
      ex_rd = reg_addr_t'($urandom % 4); mem_rd = reg_addr_t'($urandom % 4); wb_rd = reg_addr_t'($urandom % 4);
      #1;
      exp_stall = ex_mem_read && ex_reg_write && ex_rd != 0 &&
                  ((id_uses_rs && id_rs == ex_rd) || (id_uses_rt && id_rt == ex_rd));
      checks += 3;
      if (int'(fwd_a) != ref_fwd(ex_rs)) begin failures++; $display("FAIL fwd_a %0d exp %0d", fwd_a, ref_fwd(ex_rs)); end
      if (int'(fwd_b) != ref_fwd(ex_rt)) begin failures++; $display("FAIL fwd_b %0d exp %0d", fwd_b, ref_fwd(ex_rt)); end
      if (stall !== exp_stall) begin failures++; $display("FAIL stall %b exp %b", stall, exp_stall); end
      n_stall += int'(exp_stall);
      n_exmem += int'(ref_fwd(ex_rs) == 1);
      n_memwb += int'(ref_fwd(ex_rs) == 2);
    end
    checks++;
    if (n_stall == 0 || n_exmem == 0 || n_memwb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
