// fir2d_top: block-based, non-separable 2D FIR filter in fully direct form.
//
// Computes y(m, n) = sum_{i,j=0}^{N-1} h(i, j) * x(m-i, n-j) (modulo 2^DW,
// unsigned, zero outside the image) for an M x M image that arrives in raster
// order, L samples (one block) at a time. Each block step consumes one block
// x(m, kL .. kL+L-1) and produces one block of L outputs. The memory module keeps
// the N-1 previous image rows in shift register blocks and forms the input
// vectors; the arithmetic module multiplies them with the impulse response in
// N functional units and sums the rows in the pipeline adder unit.
//
// Interface: x_in[l] = x(m, kL+l) is accepted when in_valid and in_ready are both
// high. in_ready is low while the multipliers work, so one block step takes B+1
// clock cycles (the sequential BZ-FMD multipliers need B cycles). out_valid
// pulses with y[l] = y(m', kL'+l) for the block that was accepted N-1 steps
// earlier; outputs come in input order. To flush the last N-1 blocks of an
// image, send N-1 more blocks (for example the start of the next frame). h is
// the impulse response, h[i][j] = h(i, j); keep it stable while in_ready is low.
// The stream must start at row 0, column 0 after reset.
// The blocks and the way they are connected follow the reference architecture;
// the handshake, the row skew, the border handling and the output timing are this
// design's choices.
module fir2d_top
  import fir2d_pkg::*;
#(
  parameter int unsigned M  = IMG_M,
  parameter int unsigned L  = BLK_L,
  parameter int unsigned N  = TAPS_N,
  parameter int unsigned B  = SAMP_B,
  parameter int unsigned DW = DATA_D
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [B-1:0]  x_in [L],
  input  logic [B-1:0]  h [N][N],
  output logic          out_valid,
  output logic [DW-1:0] y [L]
);

  localparam int unsigned FW = $clog2(N);

  logic          accept;
  logic          busy, done;
  logic [B-1:0]  s [N][L][N];
  logic [FW-1:0] fill;   // block steps taken so far, saturating at N-1

  assign in_ready = !busy;
  assign accept   = in_valid && in_ready;

  memory_module #(.M(M), .L(L), .N(N), .B(B)) u_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (accept),
    .x_in  (x_in),
    .s     (s)
  );

  arith_module #(.L(L), .N(N), .B(B), .DW(DW)) u_arith (
    .clk   (clk),
    .rst_n (rst_n),
    .start (accept),
    .x     (s),
    .h     (h),
    .busy  (busy),
    .done  (done),
    .y     (y)
  );

  // the output of a step belongs to the block accepted N-1 steps earlier; it is
  // valid once that many steps have been taken
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fill <= '0;
    else if (done && fill != FW'(N - 1)) fill <= fill + 1'b1;
  end

  assign out_valid = done && (fill == FW'(N - 1));

  // handshake rules: no block is taken while the multipliers work, and the
  // coefficients, fed straight to the multipliers' adders, stay put meanwhile
  a_no_accept_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !accept);
  logic [N*N*B-1:0] h_flat;
  always_comb begin
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) h_flat[(i*N + j)*B +: B] = h[i][j];
  end
  a_h_stable: assert property (@(posedge clk) disable iff (!rst_n) busy && $past(busy) |-> $stable(h_flat));

endmodule
