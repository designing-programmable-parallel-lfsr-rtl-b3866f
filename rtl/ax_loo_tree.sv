// ax_loo_tree: last-output-only (LOO) prefix tree of AX nodes.
//
// Computes  y = c ^ (d[1]&f[1]) ^ (d[2]&f[2]) ^ ... ^ (d[M]&f[M]),
// the single right-most output of a prefix computation over the M+1 elements
// c, (d[1],f[1]), ..., (d[M],f[M]). Only the nodes that feed that last output
// are kept, which is what turns a prefix network into a LOO tree.
//
// TOPO selects the tree:
//   PPT_SERIAL     - the ripple chain of the serial algorithm: acc <- acc U^d[t] f[t]
//                    for t = 1..M (M AX nodes, depth M).
//   PPT_BRENT_KUNG - the Brent-Kung up-sweep. Level 1 pairs element 2i with
//                    element 2i+1 through an AX node whose D input is the
//                    generating bit of the right element; the left element is
//                    c (for i = 0) or the product d&f. Higher levels pair
//                    partial sums through AX nodes with D tied to 1 (XOR). An
//                    unpaired element passes to the next level. For M+1 = 5
//                    this gives the 3-level tree with 2 nodes on the first level.
//   PPT_KOGGE_STONE - the tree behind the last output of a Kogge-Stone network:
//                    the same pairing aligned to the last element, so on a
//                    level with an odd count element 0 (holding the free term
//                    c) is the one passed up and joins late. Same depth as
//                    Brent-Kung.
// Purely combinational. Requires M >= 1.
// LOO trees of AX nodes and the Brent-Kung default follow the source method;
// the exact tree shape (up-sweep with pass-through of unpaired elements) and
// the three offered topologies are this design's reading of it.
module ax_loo_tree
  import pplfsr_pkg::*;
#(
  parameter int unsigned M    = 5,              // number of product terms
  parameter ppt_topo_e   TOPO = PPT_BRENT_KUNG
) (
  input  logic         c,        // free term (coefficient 1)
  input  logic [M:1]   d,        // generating-sequence bits of the terms
  input  logic [M:1]   f,        // values multiplied by d
  output logic         y
);

  localparam int unsigned K     = M + 1;          // elements including c
  localparam int unsigned DEPTH = bk_depth(K);

  if (TOPO == PPT_SERIAL) begin : g_serial
    logic [M:0] acc;
    assign acc[0] = c;
    for (genvar t = 1; t <= M; t++) begin : g_node
      ax_cell u_ax (.a(acc[t-1]), .d(d[t]), .b(f[t]), .y(acc[t]));
    end
    assign y = acc[M];
  end else begin : g_tree
    // lv[l][i]: i-th partial sum after l levels (only bk_count(K,l) used).
    // Brent-Kung pairs (2i, 2i+1); Kogge-Stone pairs (2i-o, 2i+1-o) with
    // o = 1 when the level has an odd count, element 0 then passing up.
    localparam bit RIGHT = (TOPO == PPT_KOGGE_STONE);
    logic [K-1:0] lv [DEPTH+1];

    // level 0 values (consumed only as left operands of level 1 or pass-through)
    assign lv[0][0] = c;
    for (genvar t = 1; t < K; t++) begin : g_leaf
      assign lv[0][t] = d[t] & f[t];
    end

    for (genvar l = 1; l <= DEPTH; l++) begin : g_lvl
      localparam int unsigned CPREV = bk_count(K, l - 1);
      localparam int unsigned CCUR  = bk_count(K, l);
      localparam int unsigned OFS = (RIGHT && (CPREV % 2 == 1)) ? 1 : 0;
      for (genvar i = 0; i < CCUR; i++) begin : g_node
        localparam int unsigned LI = (2 * i >= OFS) ? 2 * i - OFS : 0;  // left operand
        if ((OFS == 1 && i == 0) || (OFS == 0 && 2 * i + 1 >= CPREV)) begin : g_pass
          assign lv[l][i] = lv[l-1][LI];
        end else if (l == 1) begin : g_first
          // fold the right element's product straight into the AX node
          ax_cell u_ax (.a(lv[0][LI]), .d(d[LI+1]), .b(f[LI+1]), .y(lv[1][i]));
        end else begin : g_upper
          ax_cell u_ax (.a(lv[l-1][LI]), .d(1'b1), .b(lv[l-1][LI+1]), .y(lv[l][i]));
        end
      end
      for (genvar i = CCUR; i < K; i++) begin : g_unused
        assign lv[l][i] = 1'b0;
      end
    end

    assign y = lv[DEPTH][0];
  end

endmodule
