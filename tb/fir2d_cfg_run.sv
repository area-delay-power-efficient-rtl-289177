// fir2d_cfg_run: test harness for one configuration of the 2D FIR filter. It
// streams one M x M frame of random 8-bit samples (then N-1 flush blocks)
// through a fir2d_top with the given M, L and N, applies a random N x N impulse
// response, and compares every output with a reference zero-padded 2D
// convolution modulo 2^16. It also checks that the frame takes M*M/L block steps
// of 9 cycles. finished goes high when all outputs have been seen; checks and
// failures count the comparisons.
module fir2d_cfg_run #(
  parameter int M = 64,
  parameter int L = 4,
  parameter int N = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int P = M / L;
  localparam int BLOCKS = M * P;
  logic        in_valid, in_ready, out_valid;
  logic [7:0]  x_in [L];
  logic [7:0]  h [N][N];
  logic [15:0] y [L];
  logic [7:0]  img [M][M];
  int n_out = 0, n_acc = 0;
  longint cyc = 0, first_acc = -1, last_acc = -1;

  fir2d_top #(.M(M), .L(L), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .h(h), .out_valid(out_valid), .y(y)
  );

  function automatic logic [15:0] ref_y(int m, int n);
    logic [15:0] acc;
    acc = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (m - i >= 0 && n - j >= 0) acc += 16'(h[i][j]) * 16'(img[m-i][n-j]);
    return acc;
  endfunction

  always_comb begin
    for (int l = 0; l < L; l++)
      x_in[l] = (n_acc < BLOCKS) ? img[n_acc / P][(n_acc % P) * L + l] : 8'd0;
  end

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    foreach (h[i, j]) h[i][j] = 8'($urandom);
    foreach (img[m, n]) img[m][n] = 8'($urandom);
    in_valid = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    in_valid = 1'b1;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_ready) begin
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
          if (failures < 5) $display("FAIL L=%0d N=%0d m%0d n%0d: %h expected %h", L, N, m, k*L+l, y[l], e);
        end
      end
      n_out++;
      if (n_out == BLOCKS) begin
        checks++;
        if (last_acc - first_acc != (longint'(BLOCKS) - 1) * 9) begin
          failures++;
          $display("FAIL L=%0d N=%0d frame took %0d cycles", L, N, last_acc - first_acc);
        end
        $display("L=%0d N=%0d: %0d x %0d frame, %0d blocks, %0d cycles", L, N, M, M, BLOCKS, last_acc - first_acc + 9);
        finished = 1'b1;
      end
    end
  end
endmodule
