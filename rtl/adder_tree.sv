// adder_tree: sums K words of DW bits with K-1 MCLA adders arranged as a
// balanced binary tree (the adder tree, AT, inside an inner product cell).
//
// The tree is laid out as a heap: the K operands are the leaves and each of the
// K-1 internal nodes is one MCLA adding its two children. For K = 8 this gives
// the 4 + 2 + 1 arrangement of three adder levels. Sums are
// taken modulo 2^DW: the carry out of every MCLA is dropped, as the intermediate
// word width is fixed at DW bits. Purely combinational.
module adder_tree #(
  parameter int unsigned K  = 8,   // number of operands
  parameter int unsigned DW = 16   // word width (MCLA width)
) (
  input  logic [DW-1:0] in_w [K],
  output logic [DW-1:0] sum
);

  // heap numbering: node 0 is the root, nodes K-1 .. 2K-2 are the operands and
  // internal node i (0 .. K-2) is the MCLA sum of nodes 2i+1 and 2i+2
  logic [DW-1:0] node [2*K-1];
  logic [K-1:0]  co_unused;

  for (genvar j = 0; j < int'(K); j++) begin : g_leaf
    assign node[K-1+j] = in_w[j];
  end

  for (genvar i = 0; i < int'(K) - 1; i++) begin : g_add
    mcla #(.W(DW)) u_add (
      .a    (node[2*i+1]),
      .b    (node[2*i+2]),
      .s    (node[i]),
      .cout (co_unused[i])
    );
  end
  assign co_unused[K-1] = 1'b0;

  assign sum = node[0];

endmodule
