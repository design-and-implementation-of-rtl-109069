// tb_data_memory: self-checking test of the data memory: random word writes by
// byte address, combinational read-back compared with a model array, and no
// change when we = 0.
module tb_data_memory;
  localparam int WORDS = 64;
  logic        clk = 1'b0;
  logic        we;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_memory #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      we = 1'b1; addr = 32'(i * 4); wdata = $urandom; model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      int w;
      w = $urandom % WORDS;
      we = 1'($urandom); addr = 32'(w * 4); wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[w]) begin
        failures++;
        $display("FAIL word %0d got %h exp %h", w, rdata, model[w]);
      end
      @(posedge clk); #1;
      if (we) model[w] = wdata;
      checks++;
      if (rdata !== model[w]) begin
        failures++;
        $display("FAIL after write word %0d got %h exp %h", w, rdata, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
