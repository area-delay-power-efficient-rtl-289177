// tb_fu: self-checking test of the functional unit (4 inner product cells of
// 8 points sharing one coefficient row). Every output lane is compared with a
// reference inner product; done must come 9 cycles after the start edge.
module tb_fu;
  logic        clk = 1'b0;
  logic        rst_n, start;
  logic [7:0]  x [4][8];
  logic [7:0]  h [8];
  logic        busy, done;
  logic [15:0] v [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fu dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .h(h),
          .busy(busy), .done(done), .v(v));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    foreach (x[l, j]) x[l][j] = '0;
    foreach (h[j]) h[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      logic [15:0] ref_v [4];
      int n;
      foreach (h[j]) h[j] = 8'($urandom);
      for (int l = 0; l < 4; l++) begin
        ref_v[l] = '0;
        for (int j = 0; j < 8; j++) begin
          x[l][j] = 8'($urandom);
          ref_v[l] += 16'(x[l][j]) * 16'(h[j]);
        end
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (v[l] !== ref_v[l]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d %h expected %h", l, v[l], ref_v[l]);
        end
      end
      checks++;
      if (n != 9) begin failures++; $display("FAIL latency %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
