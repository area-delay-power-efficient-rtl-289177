// fu: functional unit. Applies one row h of the N x N impulse response to the
// L input vectors that one input register unit forms from one image row, giving
// the L-sample partial result vector V:
//   v[l] = sum_j h[j] * x[l][j]   for l = 0 .. L-1   (modulo 2^DW)
//
// It holds L inner product cells that share the coefficient row and are started
// together. Timing is that of ipc: start while busy is low, done B+1 cycles
// later, v valid from done until the next start.
module fu #(
  parameter int unsigned L  = 4,
  parameter int unsigned N  = 8,
  parameter int unsigned B  = 8,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [B-1:0]  x [L][N],
  input  logic [B-1:0]  h [N],
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] v [L]
);

  logic [L-1:0] c_busy, c_done;

  for (genvar l = 0; l < int'(L); l++) begin : g_ipc
    ipc #(.N(N), .B(B), .DW(DW)) u_ipc (
      .clk   (clk),
      .rst_n (rst_n),
      .start (start),
      .x     (x[l]),
      .h     (h),
      .busy  (c_busy[l]),
      .done  (c_done[l]),
      .ip    (v[l])
    );
  end

  assign busy = |c_busy;
  assign done = &c_done;

endmodule
