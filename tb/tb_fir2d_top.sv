// tb_fir2d_top: end-to-end test of the 2D FIR filter at a reduced image size
// (32 x 32, so 8 blocks per row; L = 4, N = 8, 8-bit samples and 16-bit outputs
// as by default). Streams two different frames back to back, then seven flush
// blocks, with random gaps on in_valid, and compares every output block with a
// reference zero-padded 2D convolution modulo 2^16. It also checks the block
// step length (B+1 = 9 cycles) and counts the mechanisms of the design, each of
// which must occur: input stalls (in_valid while not ready), idle input cycles,
// left-border and top-border zero padding, a frame following a frame, and sums
// that wrap modulo 2^16.
module tb_fir2d_top;
  localparam int M = 32, L = 4, N = 8, P = M / L;
  localparam int FRAMES = 2;
  localparam int BLOCKS = FRAMES * M * P;
  logic        clk = 1'b0;
  logic        rst_n, in_valid, in_ready, out_valid;
  logic [7:0]  x_in [L];
  logic [7:0]  h [N][N];
  logic [15:0] y [L];
  logic [7:0]  img [FRAMES][M][M];
  int checks = 0, failures = 0;
  int n_stall = 0, n_idle = 0, n_left = 0, n_top = 0, n_frame = 0, n_wrap = 0;
  int n_out = 0, last_accept = -1, cyc = 0;

  always #5 clk = ~clk;

  fir2d_top #(.M(M)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .h(h), .out_valid(out_valid), .y(y)
  );

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference output of frame f, row m, column n, at full precision
  function automatic int ref_y(int f, int m, int n);
    int acc;
    acc = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (m - i >= 0 && n - j >= 0) acc += int'(h[i][j]) * int'(img[f][m-i][n-j]);
    return acc;
  endfunction

  // input side: stream blocks in raster order, then N-1 zero flush blocks
  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    foreach (x_in[l]) x_in[l] = '0;
    foreach (h[i, j]) h[i][j] = 8'($urandom);
    foreach (img[f, m, n]) img[f][m][n] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < BLOCKS + N - 1; b++) begin
      int f, m, k;
      f = b / (M * P); m = (b / P) % M; k = b % P;
      while ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      for (int l = 0; l < L; l++) x_in[l] = (b < BLOCKS) ? img[f][m][k*L + l] : 8'd0;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && !in_ready) n_stall++;
    if (rst_n && !in_valid && in_ready) n_idle++;
    if (rst_n && in_valid && in_ready) begin
      if (last_accept >= 0) begin
        checks++;
        if (cyc - last_accept < 9) begin
          failures++;
          $display("FAIL block step of %0d cycles", cyc - last_accept);
        end
      end
      last_accept = cyc;
    end
  end

  // output side
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int f, m, k;
      f = n_out / (M * P); m = (n_out / P) % M; k = n_out % P;
      if (f < FRAMES) begin
        for (int l = 0; l < L; l++) begin
          int r;
          r = ref_y(f, m, k*L + l);
          if (r > 65535) n_wrap++;
          checks++;
          if (y[l] !== 16'(r)) begin
            failures++;
            if (failures < 10) $display("FAIL f%0d m%0d n%0d: %h expected %h", f, m, k*L+l, y[l], 16'(r));
          end
        end
        if (k*L < N - 1) n_left++;
        if (m < N - 1) n_top++;
        if (f > 0 && m < N - 1) n_frame++;
      end
      n_out++;
    end
  end

  initial begin
    wait (n_out == BLOCKS);
    repeat (20) @(negedge clk);
    $display("stalls %0d idle %0d left %0d top %0d frame %0d wrap %0d outputs %0d",
             n_stall, n_idle, n_left, n_top, n_frame, n_wrap, n_out);
    checks++;
    if (n_stall == 0 || n_idle == 0 || n_left == 0 || n_top == 0 || n_frame == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
