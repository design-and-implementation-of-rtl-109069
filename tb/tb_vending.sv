// tb_vending: the newspaper vending machine application running on the processor.
//
// The program follows the machine's flow: initialise (stock of 2 copies of each of
// 4 papers in data memory), display the options, wait for a keypad selection on
// the S input, check it (a paper number 1..4 that is still in stock), and either
// deliver (Z = 0x100 | paper, stock decremented) or reject (Z = 0xE00 | key, the
// "condition fails" path). After the key is released the options are displayed
// again (Z = 0xD00). The testbench presses a sequence of keys and compares every
// Z word and the final stock with a small model of the machine.
module tb_vending;
  import risc_pkg::*;
  import risc_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  word_t       in_a, in_b, out_z, prog_wdata;
  logic [3:0]  in_s;
  logic        out_z_valid, prog_we;
  logic [7:0]  prog_addr;

  risc_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_deliver = 0, n_reject = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t outs [$];
  always @(posedge clk) if (!rst && out_z_valid) outs.push_back(out_z);

  word_t prog [256];

  initial begin
    word_t exp [$];
    int stock [5];
    int keys [12] = '{1, 1, 1, 3, 9, 4, 2, 2, 2, 15, 3, 3};

    foreach (prog[k]) prog[k] = nop();
    prog[0]  = li(3'd1, 2);
    prog[1]  = sw(3'd1, 3'd0, 4);
    prog[2]  = sw(3'd1, 3'd0, 8);
    prog[3]  = sw(3'd1, 3'd0, 12);
    prog[4]  = sw(3'd1, 3'd0, 16);
    prog[5]  = li(3'd7, 'hD00);                    // DISPLAY
    prog[6]  = out_p(3'd7);
    prog[7]  = in_p(3'd2, 2);                      // WAIT: r2 = keypad
    prog[8]  = beqz(3'd2, -8);
    prog[9]  = i_alu(ALU_SUB, 3'd3, 3'd2, 5);      // CHECK: S - 5 < 0 ?
    prog[10] = i_alu(ALU_AND, 3'd3, 3'd3, -16384);
    prog[11] = beqz(3'd3, 48);                     // -> REJECT
    prog[12] = i_alu(ALU_ADD, 3'd4, 3'd2, 0);
    prog[13] = r_alu(ALU_ADD, 3'd4, 3'd4, 3'd4);   // r4 = 2S
    prog[14] = r_alu(ALU_ADD, 3'd4, 3'd4, 3'd4);   // r4 = 4S, stock address
    prog[15] = lw(3'd5, 3'd4, 0);
    prog[16] = beqz(3'd5, 28);                     // sold out -> REJECT
    prog[17] = i_alu(ALU_SUB, 3'd5, 3'd5, 1);
    prog[18] = sw(3'd5, 3'd4, 0);
    prog[19] = i_alu(ALU_OR, 3'd6, 3'd2, 'h100);
    prog[20] = out_p(3'd6);                        // DELIVER
    prog[21] = in_p(3'd2, 2);                      // RELEASE: wait for key up
    prog[22] = bnez(3'd2, -8);
    prog[23] = beqz(3'd0, -76);                    // -> DISPLAY
    prog[24] = i_alu(ALU_OR, 3'd6, 3'd2, 'hE00);   // REJECT
    prog[25] = out_p(3'd6);
    prog[26] = beqz(3'd0, -24);                    // -> RELEASE

    in_a = '0; in_b = '0; in_s = '0; prog_we = 1'b0; prog_addr = '0; prog_wdata = '0;
    rst = 1'b1;
    for (int i = 0; i < 256; i++) begin
      prog_we = 1'b1; prog_addr = 8'(i); prog_wdata = prog[i];
      @(posedge clk); #1;
    end
    prog_we = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;

    // model of the machine
    for (int k = 1; k <= 4; k++) stock[k] = 2;
    exp.push_back(32'hD00);
    repeat (40) @(posedge clk);
    foreach (keys[n]) begin
      int k;
      k = keys[n];
      if (k >= 1 && k <= 4 && stock[k] > 0) begin
        stock[k]--;
        exp.push_back(32'h100 | 32'(k));
        n_deliver++;
      end else begin
        exp.push_back(32'hE00 | 32'(k));
        n_reject++;
      end
      exp.push_back(32'hD00);
      #1 in_s = 4'(k);
      repeat (30) @(posedge clk);
      #1 in_s = '0;
      repeat (30) @(posedge clk);
    end

    checks++;
    if (outs.size() != exp.size()) begin
      failures++;
      $display("FAIL %0d Z words, expected %0d", outs.size(), exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (i >= outs.size() || outs[i] !== exp[i]) begin
        failures++;
        $display("FAIL Z word %0d: got %h expected %h", i, (i < outs.size()) ? outs[i] : 32'hx, exp[i]);
      end
    end
    for (int k = 1; k <= 4; k++) begin
      checks++;
      if (dut.u_dmem.mem[k] != 32'(stock[k])) begin
        failures++;
        $display("FAIL stock of paper %0d: %0d expected %0d", k, dut.u_dmem.mem[k], stock[k]);
      end
    end
    checks++;
    if (n_deliver == 0 || n_reject == 0) failures++;
    $display("vending: %0d delivered, %0d rejected", n_deliver, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
