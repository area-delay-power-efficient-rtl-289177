// tb_arith_module: self-checking test of the arithmetic module (8 functional
// units of 4 x 8 multipliers each, and the pipeline adder unit) at its default
// size. Each step presents random input vectors and starts the multipliers; at
// done the output must equal sum_i V_i(t - 7 + i), where V_i(t) is the reference
// inner product of row i of the coefficients with the vectors of step t. The
// step length (9 cycles from start to done) is checked too.
module tb_arith_module;
  localparam int L = 4, N = 8, STEPS = 300;
  logic        clk = 1'b0;
  logic        rst_n, start;
  logic [7:0]  x [N][L][N];
  logic [7:0]  h [N][N];
  logic        busy, done;
  logic [15:0] y [L];
  logic [15:0] vref [STEPS][N][L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arith_module dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .h(h),
                    .busy(busy), .done(done), .y(y));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    foreach (x[i, l, j]) x[i][l][j] = '0;
    foreach (h[i, j]) h[i][j] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < STEPS; t++) begin
      int n;
      foreach (x[i, l, j]) x[i][l][j] = 8'($urandom);
      for (int i = 0; i < N; i++)
        for (int l = 0; l < L; l++) begin
          vref[t][i][l] = '0;
          for (int j = 0; j < N; j++) vref[t][i][l] += 16'(x[i][l][j]) * 16'(h[i][j]);
        end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      foreach (x[i, l, j]) x[i][l][j] = 8'($urandom);
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      checks++;
      if (n != 9) begin failures++; $display("FAIL step length %0d", n); end
      for (int l = 0; l < L; l++) begin
        logic [15:0] e;
        e = '0;
        for (int i = 0; i < N; i++) if (t - 7 + i >= 0) e += vref[t - 7 + i][i][l];
        checks++;
        if (y[l] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d l%0d %h expected %h", t, l, y[l], e);
        end
      end
      if (t % 3 == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
