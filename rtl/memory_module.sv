// memory_module: row memory and input register units of the filter. For every
// block step it supplies, for each of the N image rows m, m-1, .., m-N+1 that
// the N x N filter window covers, the L overlapping N-point input vectors.
//
// The input block stream (one block of L samples per step, rows of P = M/L
// blocks in raster order) feeds a chain of N-1 shift register blocks. Tap 0 is
// the input itself; tap i is the output of SRB i after a one-block skew
// register, which then feeds SRB i+1. Tap i is thus the input delayed by
// i*(P+1) steps: the block of row m-i in the same column, one step later per
// row. The extra step per row is what the pipeline adder unit needs, because it
// adds the contribution of row m-i exactly i steps after that of row m. Each tap
// drives one input register unit.
//
// A column counter and a row counter follow the position of the incoming block
// (the stream is assumed to start at row 0, column 0 after reset and frames of
// M rows to follow each other). From them each tap's column and row are derived
// to mask samples outside the image: left of column 0 and above row 0 of the
// output's frame (rows of the previous frame) read as zero.
//
// Sample 0 of each vector of tap 0, s[0][l][0], is the current input sample
// x_in[l] itself, so those outputs are wired straight to the input.
//
// Timing: en is one block step. s is combinational: tap 0 comes straight from
// x_in, the other taps from registers; all registers advance on en.
// SRBs, IRUs and the chaining follow the reference design; the skew registers,
// the counters and the border masking are this design's choices.
module memory_module #(
  parameter int unsigned M = 512,   // image is M x M samples
  parameter int unsigned L = 4,
  parameter int unsigned N = 8,
  parameter int unsigned B = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [B-1:0] x_in [L],
  output logic [B-1:0] s [N][L][N]
);

  localparam int unsigned P  = M / L;
  localparam int unsigned CW = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1;

  initial begin
    assert (M % L == 0) else $error("memory_module: M must be a multiple of L");
    assert (N - 1 <= P) else $error("memory_module: N-1 must not exceed M/L");
  end

  logic [CW-1:0] col_cnt;
  logic [RW-1:0] row_cnt;
  logic [B-1:0]  tap [N][L];
  logic [CW-1:0] tap_col [N];
  logic          tap_row_ok [N];

  // block position counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_cnt <= '0;
      row_cnt <= '0;
    end else if (en) begin
      if (col_cnt == CW'(P - 1)) begin
        col_cnt <= '0;
        row_cnt <= (row_cnt == RW'(M - 1)) ? '0 : row_cnt + 1'b1;
      end else begin
        col_cnt <= col_cnt + 1'b1;
      end
    end
  end

  // Tap i serves the output block that entered i steps ago (position: i columns
  // to the left of the current block, possibly in the previous row or frame).
  // Its own block lies i rows above that one and exists only if that output
  // block's row is at least i.
  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      int c_o;
      int r_o;
      c_o = int'(col_cnt) - i;
      r_o = int'(row_cnt);
      if (c_o < 0) begin
        c_o = c_o + int'(P);
        r_o = r_o - 1;
        if (r_o < 0) r_o = r_o + int'(M);
      end
      tap_col[i]    = CW'(c_o);
      tap_row_ok[i] = (r_o >= i);
    end
  end

  always_comb begin
    for (int l = 0; l < int'(L); l++) tap[0][l] = x_in[l];
  end

  for (genvar i = 1; i < int'(N); i++) begin : g_row
    logic [B-1:0] srb_out [L];
    logic [B-1:0] skew    [L];

    srb #(.L(L), .B(B), .P(P)) u_srb (
      .clk  (clk),
      .en   (en),
      .din  (tap[i-1]),
      .dout (srb_out)
    );

    always_ff @(posedge clk) begin
      if (en) skew <= srb_out;
    end

    always_comb begin
      for (int l = 0; l < int'(L); l++) tap[i][l] = skew[l];
    end
  end

  for (genvar i = 0; i < int'(N); i++) begin : g_iru
    iru #(.L(L), .N(N), .B(B), .CW(CW)) u_iru (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (en),
      .cur     (tap[i]),
      .col_blk (tap_col[i]),
      .row_ok  (tap_row_ok[i]),
      .s       (s[i])
    );
  end

endmodule
