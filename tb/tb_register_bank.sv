// tb_register_bank: self-checking test of the register bank. Checks the
// behaviour of the register function table (reset clears, wr/rd = 1 stores,
// wr/rd = 0 only reads), both read ports, the same-cycle write-to-read bypass and
// that register 0 always reads zero, against a model array kept in the testbench.
module tb_register_bank;
  logic        clk = 1'b0;
  logic        rst, wr_rd;
  logic [2:0]  waddr, raddr1, raddr2;
  logic [31:0] wdata, rdata1, rdata2;
  logic [31:0] model [8];
  int checks = 0, failures = 0;

  register_bank #(.NUM_REGS(8), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_read(logic [2:0] r, logic [31:0] exp);
    raddr1 = r; raddr2 = 3'(r + 1);
    #1;
    checks++;
    if (rdata1 !== exp) begin
      failures++;
      $display("FAIL read r%0d got %h exp %h", r, rdata1, exp);
    end
    checks++;
    if (rdata2 !== model[3'(r + 1)]) begin
      failures++;
      $display("FAIL read2 r%0d got %h exp %h", 3'(r + 1), rdata2, model[3'(r + 1)]);
    end
  endtask

  initial begin
    logic [2:0] r;
    wr_rd = 1'b0; waddr = '0; wdata = '0; raddr1 = '0; raddr2 = '0;
    // reset row of the function table
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    for (int r = 0; r < 8; r++) expect_read(3'(r), 32'h0);
    // write row: store 1010 into every register
    for (int r = 1; r < 8; r++) begin
      wr_rd = 1'b1; waddr = 3'(r); wdata = 32'b1010 + 32'(r << 8);
      @(posedge clk); #1;
      model[r] = wdata;
    end
    wr_rd = 1'b0;
    for (int r = 0; r < 8; r++) expect_read(3'(r), model[r]);
    // read row: wr/rd = 0 must not store
    waddr = 3'd3; wdata = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    expect_read(3'd3, model[3]);
    // register 0 ignores writes
    wr_rd = 1'b1; waddr = 3'd0; wdata = 32'h1234_5678;
    @(posedge clk); #1;
    wr_rd = 1'b0;
    expect_read(3'd0, 32'h0);
    // same-cycle bypass: written value visible before the edge
    wr_rd = 1'b1; waddr = 3'd5; wdata = 32'hCAFE_0005;
    expect_read(3'd5, 32'hCAFE_0005);
    @(posedge clk); #1;
    model[5] = 32'hCAFE_0005;
    wr_rd = 1'b0;
    // random traffic
    for (int n = 0; n < 500; n++) begin
      wr_rd = 1'($urandom); waddr = 3'($urandom); wdata = $urandom;
      @(posedge clk); #1;
      if (wr_rd && waddr != 0) model[waddr] = wdata;
      wr_rd = 1'b0;
      r = 3'($urandom);
      expect_read(r, model[r]);
    end
    // reset clears everything again
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    for (int r = 0; r < 8; r++) expect_read(3'(r), 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
