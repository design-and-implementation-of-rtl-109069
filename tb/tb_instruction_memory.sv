// tb_instruction_memory: self-checking test of the instruction memory. The
// memory is filled through the program port with a pattern, then read back by
// byte address; each word must appear exactly one clock after its address is
// presented, and must hold while en = 0.
module tb_instruction_memory;
  localparam int WORDS = 64;
  logic        clk = 1'b0;
  logic        rst, en, prog_we;
  logic [31:0] addr, rdata, prog_wdata;
  logic [5:0]  prog_addr;
  int checks = 0, failures = 0;

  instruction_memory #(.WORDS(WORDS)) dut (.*);

  function automatic logic [31:0] pattern(int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'h0F0F_0F0F;
  endfunction

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    rst = 1'b1; en = 1'b0; prog_we = 1'b0; addr = '0; prog_addr = '0; prog_wdata = '0;
    for (int i = 0; i < WORDS; i++) begin
      prog_we = 1'b1; prog_addr = 6'(i); prog_wdata = pattern(i);
      @(posedge clk); #1;
    end
    prog_we = 1'b0; rst = 1'b0;
    checks++;
    if (rdata !== 32'h0) begin failures++; $display("FAIL rdata not cleared by reset"); end
    for (int n = 0; n < 300; n++) begin
      int w;
      w = $urandom % WORDS;
      en = 1'b1; addr = 32'(w * 4) | 32'($urandom % 4);
      @(posedge clk); #1;
      checks++;
      if (rdata !== pattern(w)) begin
        failures++;
        $display("FAIL word %0d got %h exp %h", w, rdata, pattern(w));
      end
      // hold with en = 0 while the address changes
      held = rdata;
      en = 1'b0; addr = 32'(($urandom % WORDS) * 4);
      @(posedge clk); #1;
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL rdata changed with en = 0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
