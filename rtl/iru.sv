// iru: input register unit. Turns the stream of L-sample blocks of one image row
// into the L overlapping N-point input vectors needed for the L outputs of a
// block.
//
// The current block x(kL .. kL+L-1) arrives on cur (cur[l] = x(kL+l)). N-1
// registers D1 .. D(N-1) hold the N-1 samples before it, newest first:
// D(j+1) = x(kL-1-j). With L = 4 and N = 8, D1..D4 load the four samples of the
// current block and D5..D7 load the old contents of D1..D3. Output vector l,
// tap j is
//   s[l][j] = x(kL + l - j),   l = 0 .. L-1, j = 0 .. N-1
// taken from the current block or from the registers.
//
// Image borders: a sample left of column 0 (kL + l - j < 0, decided from the
// block column index col_blk) and every sample of a row that lies above the
// image (row_ok low) reads as zero, so the filter computes a zero-padded 2D
// convolution. The registers load the masked samples on en, one block step.
// The register arrangement follows the reference IRU; the border masking and
// the newest-first register order are this design's choices.
// s is combinational from cur and the registers.
module iru #(
  parameter int unsigned L  = 4,
  parameter int unsigned N  = 8,
  parameter int unsigned B  = 8,
  parameter int unsigned CW = 7    // width of the block column index
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [B-1:0]  cur [L],
  input  logic [CW-1:0] col_blk,
  input  logic          row_ok,
  output logic [B-1:0]  s [L][N]
);

  localparam int unsigned WN = L + N - 1;   // samples in the window

  logic [B-1:0] hist [N-1];   // D1 .. D(N-1)
  logic [B-1:0] win  [WN];    // win[t] = x(kL + L-1 - t)

  always_comb begin
    for (int t = 0; t < int'(L); t++) win[t] = row_ok ? cur[L-1-t] : '0;
    for (int t = 0; t < int'(N) - 1; t++) win[L+t] = row_ok ? hist[t] : '0;

    for (int l = 0; l < int'(L); l++) begin
      for (int j = 0; j < int'(N); j++) begin
        if (int'(col_blk) * int'(L) + l - j < 0) s[l][j] = '0;
        else                                     s[l][j] = win[L-1-l+j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < int'(N) - 1; t++) hist[t] <= '0;
    end else if (en) begin
      for (int t = 0; t < int'(N) - 1; t++) hist[t] <= win[t];
    end
  end

endmodule
