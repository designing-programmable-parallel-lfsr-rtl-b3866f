// pplfsr_stage2: second stage of the parallel LFSR, the state equations.
//
// For every state bit i = 1..N it forms the polynomial-dependent part of the
// state after J serial steps,
//     s_i = sum_{t=1..min(J,i)} D_{i-t} F_n^{J-t}                  (GF(2))
// from the feedback-bit values F_n^0..F_n^{J-1} of stage 1. Each of the N sums
// is one LOO prefix problem solved by its own ax_loo_tree with a zero free
// term; the old-state/input term that completes F_i^J is added afterwards by
// pplfsr_postproc, which does not depend on the generating sequence.
//
// Interface: fn[k] = F_n^k, sum[i-1] = s_i. TOPO[i-1] picks the tree of
// equation i (Brent-Kung by default). Purely combinational.
// The equations and the one-tree-per-bit structure follow the source method.
module pplfsr_stage2
  import pplfsr_pkg::*;
#(
  parameter int unsigned      N    = 8,
  parameter int unsigned      J    = 5,
  parameter ppt_topo_e [N-1:0] TOPO = {N{PPT_BRENT_KUNG}}
) (
  input  logic [J-1:0] fn,      // fn[k]    = F_n^k, k = 0..J-1
  input  logic [N-1:0] poly,    // poly[i]  = D_i
  output logic [N-1:0] sum      // sum[i-1] = s_i
);

  for (genvar i = 1; i <= N; i++) begin : g_eq
    localparam int unsigned KT = (i < J) ? i : J;
    logic [KT:1] dv, fv;

    for (genvar t = 1; t <= KT; t++) begin : g_term
      assign dv[t] = poly[i-t];
      assign fv[t] = fn[J-t];
    end

    ax_loo_tree #(.M(KT), .TOPO(TOPO[i-1])) u_tree (
      .c(1'b0), .d(dv), .f(fv), .y(sum[i-1])
    );
  end

endmodule
