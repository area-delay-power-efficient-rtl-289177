// pau: pipeline adder unit. Adds the N partial result vectors V_0 .. V_{N-1} of
// the functional units into the L filter outputs, in L independent lanes.
//
// Each lane is a chain of N-1 D registers and N-1 MCLAs: V_0 enters the first D
// register, stage i adds V_i to the register before it and stores the sum in the
// next D register, and the last MCLA adds V_{N-1} and drives y directly:
//   d_0 <= V_0,  d_i <= d_{i-1} + V_i (i = 1 .. N-2),  y = d_{N-2} + V_{N-1}.
// So V_i must belong to the block that entered stage 0 i steps earlier: the
// functional unit of image row m-i has to work on a block i steps after the one
// of row m. The filter arranges this skew in its row memory. Sums wrap modulo
// 2^DW. The registers advance on en (one block step); y is combinational.
// The chain follows the reference PAU; the skew requirement and the
// combinational output are read from its drawing.
module pau #(
  parameter int unsigned L  = 4,
  parameter int unsigned N  = 8,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] v [N][L],
  output logic [DW-1:0] y [L]
);

  initial begin
    assert (N >= 2) else $error("pau: N must be at least 2");
  end

  logic [DW-1:0] d    [N-1][L];   // D registers
  logic [DW-1:0] sum  [N-1][L];   // MCLA outputs, stage i+1 adds V_{i+1}
  logic [L-1:0]  co_unused [N-1];

  for (genvar i = 0; i < int'(N) - 1; i++) begin : g_stage
    for (genvar l = 0; l < int'(L); l++) begin : g_lane
      mcla #(.W(DW)) u_add (
        .a    (d[i][l]),
        .b    (v[i+1][l]),
        .s    (sum[i][l]),
        .cout (co_unused[i][l])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N) - 1; i++)
        for (int l = 0; l < int'(L); l++) d[i][l] <= '0;
    end else if (en) begin
      for (int l = 0; l < int'(L); l++) d[0][l] <= v[0][l];
      for (int i = 1; i < int'(N) - 1; i++)
        for (int l = 0; l < int'(L); l++) d[i][l] <= sum[i-1][l];
    end
  end

  always_comb begin
    for (int l = 0; l < int'(L); l++) y[l] = sum[N-2][l];
  end

endmodule
