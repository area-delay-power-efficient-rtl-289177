// ipc: inner product cell. Forms the N-point inner product
//   ip = sum_{j=0}^{N-1} h[j] * x[j]   (modulo 2^DW)
// of one input vector x and one row h of the impulse response matrix.
//
// N BZ-FMD multipliers work in parallel, one per tap; the coefficient h[j] is the
// multiplicand (it is fed straight to the multiplier's adder and stays constant)
// and the sample x[j] is the multiplier operand, captured at start. The N
// products, zero-extended or truncated to DW bits, are summed by an adder tree of
// N-1 MCLAs. Which operand is the multiplicand is this design's choice.
//
// Timing: pulse start while busy is low; x is sampled at that edge and h must be
// stable until done. done pulses B+1 cycles after start (B cycles of the
// multipliers plus the start cycle) and ip is valid from then until the next
// start. All operands are unsigned.
module ipc #(
  parameter int unsigned N  = 8,   // taps per row
  parameter int unsigned B  = 8,   // sample / coefficient width
  parameter int unsigned DW = 16   // output and adder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [B-1:0]  x [N],
  input  logic [B-1:0]  h [N],
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] ip
);

  logic [2*B-1:0] prod   [N];
  logic [DW-1:0]  prod_w [N];
  logic [N-1:0]   m_busy, m_done;

  for (genvar j = 0; j < int'(N); j++) begin : g_mul
    bzfmd_mult #(.PW(B), .MW(B)) u_mul (
      .clk          (clk),
      .rst_n        (rst_n),
      .start        (start),
      .multiplicand (h[j]),
      .multiplier   (x[j]),
      .busy         (m_busy[j]),
      .done         (m_done[j]),
      .product      (prod[j])
    );
    assign prod_w[j] = DW'(prod[j]);
  end

  adder_tree #(.K(N), .DW(DW)) u_at (.in_w(prod_w), .sum(ip));

  assign busy = |m_busy;
  assign done = &m_done;

endmodule
