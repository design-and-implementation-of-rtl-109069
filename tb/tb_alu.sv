// tb_alu: self-checking test of the ALU. Every select code 0000..1111 is applied
// to directed corner operands and to random operands, and ALUOUT is compared with
// a reference written from the ALU function table (unused codes must give 0).
module tb_alu;
  import risc_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  logic [3:0]  s;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .s(s), .aluout(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(logic [31:0] x, logic [31:0] z, int sel);
    case (sel)
      0: return x & z;
      1: return ~(x & z);
      2: return x | z;
      3: return ~(x | z);
      4: return x ^ z;
      5: return ~(x ^ z);
      6: return ~x;
      7: return 32'(longint'(x) + longint'(z));
      8: return 32'(longint'(x) - longint'(z));
      default: return 32'h0;
    endcase
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] z, int sel);
    logic [31:0] exp;
    a = x; b = z; s = 4'(sel);
    #1;
    exp = ref_alu(x, z, sel);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL s=%b a=%h b=%h got %h exp %h", s, x, z, y, exp);
    end
  endtask

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_000A, 32'h1};
    // worked example from the function table: select 0011 is NOR
    check(32'h0000_00F0, 32'h0000_000F, 3);
    if (y !== 32'hFFFF_FF00) failures++;
    checks++;
    for (int sel = 0; sel < 16; sel++) begin
      foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j], sel);
      for (int n = 0; n < 200; n++) check($urandom, $urandom, sel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
