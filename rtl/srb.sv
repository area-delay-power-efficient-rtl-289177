// srb: shift register block. L serial-in parallel-out shift registers, one per
// sample position of a block, each P words of B bits deep. On every block step
// (en) the block on din enters and the block that entered P steps earlier
// appears on dout, so with P = M/L the block delays a row of the image by exactly
// one row. With the default sizes the block holds 4 x 128 words.
//
// The registers have no reset: they are storage, and the filter ignores what
// they hold before a whole row has been written (the row masking in the input
// register units). dout is the register contents, valid right after the edge.
module srb #(
  parameter int unsigned L = 4,
  parameter int unsigned B = 8,
  parameter int unsigned P = 128   // words per shift register
) (
  input  logic         clk,
  input  logic         en,
  input  logic [B-1:0] din  [L],
  output logic [B-1:0] dout [L]
);

  logic [B-1:0] sr [L][P];

  always_ff @(posedge clk) begin
    if (en) begin
      for (int l = 0; l < int'(L); l++) begin
        sr[l][0] <= din[l];
        for (int w = 1; w < int'(P); w++) sr[l][w] <= sr[l][w-1];
      end
    end
  end

  always_comb begin
    for (int l = 0; l < int'(L); l++) dout[l] = sr[l][P-1];
  end

endmodule
