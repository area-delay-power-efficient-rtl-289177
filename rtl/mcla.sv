// mcla: W-bit modified carry look-ahead (MCLA) parallel prefix adder.
//
// Instead of the ordinary carries the adder computes modified carries
//   M_i = g_i + g_{i-1} + p_{i-1} g_{i-2} + ... + p_{i-1}...p_1 g_0
// with g_i = a_i & b_i, p_i = a_i | b_i and d_i = a_i ^ b_i. The true carry out of
// bit i is c_i = M_i & p_i and the sum bit is S_i = d_i ^ (p_{i-1} & M_{i-1}).
// The prefix starts from two-bit pairs (G*_i, P*_{i-1}) = (g_i | g_{i-1},
// p_{i-1} & p_{i-2}); even and odd bit positions then form two separate prefix
// chains that are combined with the (G, P) operator at distances 2, 4, 8, ...
// The lower half of the bits gets its modified carries from these chains
// directly. The upper half forms local groups that reach down only to the middle
// of the word, and each local group is then joined with the modified carry of
// the lower half at bit W/2-2 (even positions) or W/2-1 (odd positions), as in
//   M_8 = G_{8:7} + P_{7:6} G_{6:-1}  (16-bit case).
// Both halves are therefore computed in parallel.
//
// The equations, the cell types and the split into halves follow the MCLA
// description; the exact placement of prefix cells (a Kogge-Stone pattern inside
// each half) is this design's choice. There is no carry input.
//
// Interface: a, b (W bits) in, s (W bits) and cout out. Purely combinational.
// W must be even and at least 4; the filter uses W = 8 in the multiplier and
// W = 16 in the adder trees and the pipeline adder unit.
module mcla #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned H  = W / 2;
  localparam int unsigned LV = (H > 1) ? $clog2(H) : 1;

  initial begin
    assert (W >= 4 && W % 2 == 0)
      else $error("mcla: W must be even and at least 4");
  end

  // (G, P) pair of a bit group and the prefix operator
  //   (G_hi, P_hi) o (G_lo, P_lo) = (G_hi | P_hi & G_lo, P_hi & P_lo)
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  function automatic gp_t lg_op(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  logic [W-1:0] g, p, d;
  logic [W-1:0] m;   // modified carries M_i
  logic [W-1:0] c;   // true carries c_i
  gp_t          lvl [LV+1][W];

  always_comb begin
    g = a & b;
    p = a | b;
    d = a ^ b;

    // pairs (G*_i, P*_{i-1}); bits below 0 have g = p = 0
    for (int i = 0; i < W; i++) begin
      lvl[0][i].g = g[i] | ((i >= 1) ? g[i-1] : 1'b0);
      lvl[0][i].p = ((i >= 1) ? p[i-1] : 1'b0) & ((i >= 2) ? p[i-2] : 1'b0);
    end

    // stride-2 prefix chains, kept inside each half
    for (int lv = 0; lv < LV; lv++) begin
      for (int i = 0; i < W; i++) begin
        int span;
        int lo;
        span = 2 << lv;
        lo   = (i < int'(H)) ? 0 : int'(H);
        if (i - span >= lo) lvl[lv+1][i] = lg_op(lvl[lv][i], lvl[lv][i-span]);
        else                lvl[lv+1][i] = lvl[lv][i];
      end
    end

    // modified carries: lower half directly, upper half joined with the
    // lower-half modified carry below its local group
    for (int i = 0; i < W; i++) begin
      if (i < int'(H)) begin
        m[i] = lvl[LV][i].g;
      end else begin
        int j0;
        j0 = ((i - int'(H)) % 2 == 0) ? int'(H) : int'(H) + 1;
        m[i] = lvl[LV][i].g | (lvl[LV][i].p & m[j0-2]);
      end
    end

    c = m & p;
    s[0] = d[0];
    for (int i = 1; i < W; i++) s[i] = d[i] ^ c[i-1];
    cout = c[W-1];
  end

endmodule
