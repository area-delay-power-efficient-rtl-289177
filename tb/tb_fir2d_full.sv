// tb_fir2d_full: full-size run of the 2D FIR filter with every parameter at its
// default: one 512 x 512 image of random 8-bit samples, an 8 x 8 impulse response
// of random 8-bit coefficients, blocks of 4 samples. The image streams in without
// gaps followed by seven flush blocks; all 65536 output blocks are compared with a
// reference zero-padded 2D convolution modulo 2^16. It also checks that the image
// takes 65536 block steps of 9 cycles each (the B-cycle multipliers plus one).
module tb_fir2d_full;
  localparam int M = 512, L = 4, N = 8, P = M / L;
  localparam int BLOCKS = M * P;
  logic        clk = 1'b0;
  logic        rst_n, in_valid, in_ready, out_valid;
  logic [7:0]  x_in [L];
  logic [7:0]  h [N][N];
  logic [15:0] y [L];
  logic [7:0]  img [M][M];
  int checks = 0, failures = 0, n_out = 0, n_acc = 0;
  longint cyc = 0, first_acc = -1, last_acc = -1;

  always #5 clk = ~clk;

  fir2d_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .h(h), .out_valid(out_valid), .y(y)
  );

  initial begin : watchdog
    repeat (700000) @(posedge clk);
    failures++;
    $display("watchdog: %0d output blocks", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_y(int m, int n);
    logic [15:0] acc;
    acc = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (m - i >= 0 && n - j >= 0) acc += 16'(h[i][j]) * 16'(img[m-i][n-j]);
    return acc;
  endfunction

  // the block on x_in is always the next one; it changes after each accept
  always_comb begin
    for (int l = 0; l < L; l++)
      x_in[l] = (n_acc < BLOCKS) ? img[n_acc / P][(n_acc % P) * L + l] : 8'd0;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    foreach (h[i, j]) h[i][j] = 8'($urandom);
    foreach (img[m, n]) img[m][n] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    in_valid = 1'b1;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      if (first_acc < 0) first_acc <= cyc;
      if (n_acc == BLOCKS - 1) last_acc <= cyc;
      if (n_acc == BLOCKS + N - 2) in_valid <= 1'b0;
      n_acc <= n_acc + 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid && n_out < BLOCKS) begin
      int m, k;
      m = n_out / P; k = n_out % P;
      for (int l = 0; l < L; l++) begin
        logic [15:0] e;
        e = ref_y(m, k*L + l);
        checks++;
        if (y[l] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL m%0d n%0d: %h expected %h", m, k*L+l, y[l], e);
        end
      end
      n_out++;
    end
  end

  initial begin
    wait (n_out == BLOCKS);
    checks++;
    if (last_acc - first_acc != (longint'(BLOCKS) - 1) * 9) begin
      failures++;
      $display("FAIL image took %0d cycles between first and last block", last_acc - first_acc);
    end
    $display("image of %0d blocks in %0d cycles", BLOCKS, last_acc - first_acc + 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
