// tb_pau: self-checking test of the pipeline adder unit (L = 4, N = 8, 16 bit).
// Presents a random V_0 .. V_7 each step (with idle cycles between steps) and
// checks y(t) = sum_i V_i(t - 7 + i) modulo 2^16, values before the first step
// being zero.
module tb_pau;
  logic        clk = 1'b0;
  logic        rst_n, en;
  logic [15:0] v [8][4];
  logic [15:0] y [4];
  logic [15:0] hist [$][8][4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pau dut (.clk(clk), .rst_n(rst_n), .en(en), .v(v), .y(y));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0;
    foreach (v[i, l]) v[i][l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      foreach (v[i, l]) v[i][l] = (t % 50 == 3) ? 16'hffff : 16'($urandom);
      hist.push_back(v);
      #1;
      for (int l = 0; l < 4; l++) begin
        logic [15:0] e;
        e = '0;
        for (int i = 0; i < 8; i++)
          if (t - 7 + i >= 0) e += hist[t - 7 + i][i][l];
        checks++;
        if (y[l] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d l%0d %h expected %h", t, l, y[l], e);
        end
      end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      if ($urandom_range(0, 2) == 0) repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
