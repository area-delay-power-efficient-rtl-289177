// arith_module: arithmetic module of the filter. N functional units, one per
// row of the N x N impulse response, and the pipeline adder unit.
//
// FU i multiplies the L input vectors of image row m-i (from input register unit
// i) with coefficient row h[i] and yields V_i; the PAU adds V_0 .. V_{N-1} into
// the L outputs. All N*L*N BZ-FMD multipliers start together on start and finish
// together B+1 cycles later; done then pulses, the PAU advances on that pulse and
// y is valid in the same cycle. h must stay stable while busy.
// Sums are modulo 2^DW. The structure follows the reference design; the start /
// busy / done sequencing is this design's choice.
module arith_module #(
  parameter int unsigned L  = 4,
  parameter int unsigned N  = 8,
  parameter int unsigned B  = 8,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [B-1:0]  x [N][L][N],
  input  logic [B-1:0]  h [N][N],
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] y [L]
);

  logic [DW-1:0] v [N][L];
  logic [N-1:0]  f_busy, f_done;

  for (genvar i = 0; i < int'(N); i++) begin : g_fu
    fu #(.L(L), .N(N), .B(B), .DW(DW)) u_fu (
      .clk   (clk),
      .rst_n (rst_n),
      .start (start),
      .x     (x[i]),
      .h     (h[i]),
      .busy  (f_busy[i]),
      .done  (f_done[i]),
      .v     (v[i])
    );
  end

  assign busy = |f_busy;
  assign done = &f_done;

  pau #(.L(L), .N(N), .DW(DW)) u_pau (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (done),
    .v     (v),
    .y     (y)
  );

endmodule
