// pplfsr_stage1: first stage of the parallel LFSR, the feedback-bit equations.
//
// For k = 1..J-1 it computes the bit on the feedback loop after k serial steps,
//     F_n^k = F_{n-k}^0 + sum_{t=1..k} D_{n-t} F_n^{k-t}            (GF(2))
// where F_{n-k}^0 is the old state bit, or the input bit M_{k-n} once n-k <= 0,
// and terms with n-t < 0 vanish. Each equation is one LOO prefix problem
// solved by its own ax_loo_tree: the old-state/input bit is the tree's free
// term, the products D_{n-t} F_n^{k-t} its elements. Equation k uses the
// results of equations 1..k-1, so the trees are cascaded. F_n^j itself is not
// computed here: the last equation of stage 2 yields it.
//
// Interface: fn[k] = F_n^k for k = 0..J-1 (fn[0] is the old F_n). TOPO[k]
// picks the tree of equation k (Brent-Kung by default); TOPO[0] is unused.
// Purely combinational.
// The equations follow the source method; stopping at k = J-1 and making the
// old-state bit the tree's free term are this design's choices.
module pplfsr_stage1
  import pplfsr_pkg::*;
#(
  parameter int unsigned     N      = 8,     // LFSR degree n
  parameter int unsigned     J      = 5,     // parallelism j (bits per step)
  parameter ppt_topo_e [J-1:0] TOPO   = {J{PPT_BRENT_KUNG}}
) (
  input  logic [N-1:0] state,   // state[i-1] = F_i^0
  input  logic [N-1:0] poly,    // poly[i]    = D_i
  input  logic [J-1:0] msg,     // msg[k]     = M_k
  output logic [J-1:0] fn       // fn[k]      = F_n^k
);

  assign fn[0] = state[N-1];

  for (genvar k = 1; k < J; k++) begin : g_eq
    localparam int unsigned KT = (k < N) ? k : N;   // non-vanishing terms
    logic          free_term;
    logic [KT:1]   dv, fv;

    if (N > k) begin : g_state_term
      assign free_term = state[N-k-1];
    end else begin : g_msg_term
      assign free_term = msg[k-N];
    end

    for (genvar t = 1; t <= KT; t++) begin : g_term
      assign dv[t] = poly[N-t];
      assign fv[t] = fn[k-t];
    end

    ax_loo_tree #(.M(KT), .TOPO(TOPO[k])) u_tree (
      .c(free_term), .d(dv), .f(fv), .y(fn[k])
    );
  end

endmodule
