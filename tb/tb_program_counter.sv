// tb_program_counter: self-checking test of the program counter: reset value,
// +4 per cycle, hold during a stall, load of a branch target, and priority of a
// taken branch over a stall. The expected PC is tracked by the testbench.
module tb_program_counter;
  logic        clk = 1'b0;
  logic        rst, stall, branch_taken;
  logic [31:0] branch_target, pc, pc_plus4, exp_pc;
  int checks = 0, failures = 0;

  program_counter dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; stall = 1'b0; branch_taken = 1'b0; branch_target = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    exp_pc = 32'h0;
    for (int n = 0; n < 2000; n++) begin
      checks++;
      if (pc !== exp_pc || pc_plus4 !== exp_pc + 4) begin
        failures++;
        $display("FAIL cycle %0d pc %h exp %h", n, pc, exp_pc);
      end
      stall = ($urandom % 4) == 0;
      branch_taken = ($urandom % 7) == 0;
      branch_target = $urandom & 32'h0000_FFFC;
      @(posedge clk); #1;
      if (branch_taken)  exp_pc = branch_target;
      else if (!stall)   exp_pc = exp_pc + 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
