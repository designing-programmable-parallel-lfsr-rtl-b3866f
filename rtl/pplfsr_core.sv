// pplfsr_core: combinational next-state function of a programmable n-bit
// j-parallel Galois LFSR built from parallel prefix trees.
//
// It gives the state the serial programmable LFSR
//     F_1 <- D_0 F_n + M_k,   F_i <- D_{i-1} F_n + F_{i-1}  (i = 2..n)
// reaches after J clocks, fed with M_0, M_1, ..., M_{J-1} in that order, for any
// generating sequence D_0..D_{n-1} applied at run time (D_n = 1 implied).
// Three cascaded stages do it:
//   stage 1 (pplfsr_stage1)  feedback bits F_n^1..F_n^{J-1}, one LOO tree each
//   stage 2 (pplfsr_stage2)  polynomial sums of all N next-state bits
//   stage 3 (pplfsr_postproc) adds the old-state / input terms
// S1_TOPO[k] and S2_TOPO[i-1] choose the tree of each equation (Brent-Kung by
// default). Purely combinational, no clock. The three-stage structure follows
// the source method; the topology arrays are this design's interface for its
// per-equation choice of tree.
module pplfsr_core
  import pplfsr_pkg::*;
#(
  parameter int unsigned       N       = 8,
  parameter int unsigned       J       = 5,
  parameter ppt_topo_e [J-1:0] S1_TOPO = {J{PPT_BRENT_KUNG}},
  parameter ppt_topo_e [N-1:0] S2_TOPO = {N{PPT_BRENT_KUNG}}
) (
  input  logic [N-1:0] state,       // state[i-1] = F_i^0
  input  logic [N-1:0] poly,        // poly[i]    = D_i
  input  logic [J-1:0] msg,         // msg[k]     = M_k, M_0 first
  output logic [N-1:0] next_state   // next_state[i-1] = F_i^J
);

  logic [J-1:0] fn;
  logic [N-1:0] sum;

  pplfsr_stage1 #(.N(N), .J(J), .TOPO(S1_TOPO)) u_stage1 (
    .state(state), .poly(poly), .msg(msg), .fn(fn)
  );

  pplfsr_stage2 #(.N(N), .J(J), .TOPO(S2_TOPO)) u_stage2 (
    .fn(fn), .poly(poly), .sum(sum)
  );

  pplfsr_postproc #(.N(N), .J(J)) u_post (
    .sum(sum), .state(state), .msg(msg), .next_state(next_state)
  );

endmodule
