// tb_memory_module: self-checking test of the row memory (shift register
// blocks, skew registers, input register units). Runs with a 32 x 32 image
// (P = 8 blocks per row), L = 4, N = 8, over two and a
// half frames with idle cycles, and compares every sample of every input vector
// with the expected window: tap i carries the block of row m-i, column k-i,
// x(m-i, (k-i)L + l - j), for the output block that entered i steps earlier,
// zero outside that block's frame.
module tb_memory_module;
  localparam int M = 32, L = 4, N = 8, P = M / L;
  localparam int STEPS = 5 * M * P / 2;
  logic       clk = 1'b0;
  logic       rst_n, en;
  logic [7:0] x_in [L];
  logic [7:0] s [N][L][N];
  logic [7:0] blocks [STEPS][L];
  int checks = 0, failures = 0, zero_left = 0, zero_top = 0;

  always #5 clk = ~clk;

  memory_module #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x_in(x_in), .s(s));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample n of the row that block b belongs to, as used for output block o
  // (i rows below b); rows above the top of o's frame read as zero
  function automatic logic [7:0] pix(int o, int b, int n, output bit left, output bit top);
    int f_o, f_b;
    left = 0; top = 0;
    f_o = o / (M * P);
    f_b = (b < 0) ? -1 : b / (M * P);
    if (f_b != f_o) begin top = 1; return 8'd0; end
    if (n < 0) begin left = 1; return 8'd0; end
    // n counts samples from the start of the block's own row
    return blocks[b - (b % P) + n / L][n % L];
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b0;
    foreach (x_in[l]) x_in[l] = '0;
    foreach (blocks[t, l]) blocks[t][l] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < STEPS; t++) begin
      @(negedge clk);
      x_in = blocks[t];
      #1;
      for (int i = 0; i < N; i++) begin
        int b;
        b = t - i * (P + 1);
        if (t - i < 0) continue;   // serves an output before the stream start
        for (int l = 0; l < L; l++) begin
          for (int j = 0; j < N; j++) begin
            bit left, top;
            logic [7:0] e;
            e = pix(t - i, b, (b < 0) ? 0 : (b % P) * L + l - j, left, top);
            if (left) zero_left++;
            if (top) zero_top++;
            checks++;
            if (s[i][l][j] !== e) begin
              failures++;
              if (failures < 10) $display("FAIL t%0d i%0d l%0d j%0d: %h expected %h", t, i, l, j, s[i][l][j], e);
            end
          end
        end
      end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    checks++;
    if (zero_left == 0 || zero_top == 0) begin
      failures++;
      $display("FAIL border masking never exercised");
    end
    $display("left-border zeros %0d, top-border zeros %0d", zero_left, zero_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
