// tb_bzfmd_mult: self-checking test of the 8 x 8 BZ-FMD multiplier. Runs the
// corner operands and random pairs, checks every product against a * b, checks
// that done comes exactly MW+1 cycles after the start edge (MW cycles busy) and
// that the product stays stable while idle.
module tb_bzfmd_mult;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        start;
  logic [7:0]  mcand, mplier;
  logic        busy, done;
  logic [15:0] product;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bzfmd_mult dut (
    .clk(clk), .rst_n(rst_n), .start(start), .multiplicand(mcand),
    .multiplier(mplier), .busy(busy), .done(done), .product(product)
  );

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [7:0] a, input logic [7:0] b);
    int n;
    @(negedge clk);
    mcand = a; mplier = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    mplier = 8'($urandom);   // the multiplier operand is held inside
    n = 1;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (product !== 16'(a) * 16'(b)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, product);
    end
    checks++;
    if (n != 9) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 9", n);
    end
    @(negedge clk);
    checks++;
    if (product !== 16'(a) * 16'(b) || busy) begin
      failures++;
      $display("FAIL product not held");
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; mcand = '0; mplier = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(8'd0, 8'd0);
    run(8'd255, 8'd255);
    run(8'd255, 8'd0);
    run(8'd0, 8'd255);
    run(8'd1, 8'd128);
    run(8'd128, 8'd1);
    run(8'hAA, 8'h55);
    for (int k = 0; k < 2000; k++) run(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
