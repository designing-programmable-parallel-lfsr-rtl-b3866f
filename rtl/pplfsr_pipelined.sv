// pplfsr_pipelined: pipelined programmable N-bit J-parallel Galois LFSR, built
// as a ring of E = J/F cascaded F-parallel sections (default 32-bit,
// 32-parallel, 8 sections of 4 bits).
//
// Each section advances a state by F serial steps and registers it, so a word
// of J input bits is absorbed in E clocks, F bits per section. The E pipeline
// registers form a ring: the state leaving the last section re-enters the
// first one, where it meets the next word of the same stream. The ring thus
// holds E independent LFSR contexts ("slots") that take turns; each clock one
// slot completes a J-bit word and the next slot can start one. Aggregate rate
// is J bits per clock; one slot absorbs J bits every E clocks. With F = J
// (E = 1) this is the plain, unpipelined J-parallel LFSR with its state register.
//
// Per clock, for the slot numbered `slot`:
//   out_valid/out_state  that slot's state after its previous word (out_valid = 1
//                        if a word was absorbed, 0 for a bubble or a bare load)
//   in_load, in_seed     replace the state by in_seed before this word
//   in_valid, in_msg     absorb in_msg (in_msg[0] first); in_valid = 0 is a bubble
//   in_poly              generating sequence D_0..D_{N-1} used for this word
// in_msg bit k is used by section k/F, so it is delayed k/F clocks inside.
// rst_n is an active-low synchronous reset: all slots start at zero state.
//
// Every LOO tree of every section can be given its own topology, so the
// pipelined form offers e*(n+f) independent choices against n+j for a single
// j-parallel core. The default is Brent-Kung everywhere.
// The 32 = 8 x 4 split and Brent-Kung trees follow the source method; closing
// the cascade into a ring of interleaved slots, the load/bubble interface,
// the input skew and the reset are this design's own.
module pplfsr_pipelined
  import pplfsr_pkg::*;
#(
  parameter int unsigned  N       = 32,   // LFSR degree n
  parameter int unsigned  J       = 32,   // bits absorbed per word (j)
  parameter int unsigned  F       = 4,    // bits per section (f), J = E*F
  localparam int unsigned E  = J / F,    // number of sections (e)
  // tree per equation; section p owns S1_TOPO[p*F +: F] (its F stage-1
  // equations) and S2_TOPO[p*N +: N] (its N stage-2 equations)
  parameter ppt_topo_e [E*F-1:0] S1_TOPO = {(E*F){PPT_BRENT_KUNG}},
  parameter ppt_topo_e [E*N-1:0] S2_TOPO = {(E*N){PPT_BRENT_KUNG}},
  localparam int unsigned SW = (E > 1) ? $clog2(E) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_load,
  input  logic [N-1:0]  in_seed,
  input  logic [N-1:0]  in_poly,
  input  logic [J-1:0]  in_msg,
  output logic [SW-1:0] slot,
  output logic          out_valid,
  output logic [N-1:0]  out_state
);

  if (J % F != 0) begin : g_bad_split
    $error("pplfsr_pipelined: J must be a multiple of F");
  end

  // sec_*[p] is the input of section p; sec_*[p+1] its registered output.
  logic         sec_valid [E+1];
  logic [N-1:0] sec_state [E+1];
  logic [N-1:0] sec_poly  [E+1];
  logic [J-1:0] msg_pipe  [E];     // in_msg delayed by p clocks

  assign sec_valid[0] = in_valid;
  assign sec_state[0] = in_load ? in_seed : sec_state[E];
  assign sec_poly[0]  = in_poly;
  assign msg_pipe[0]  = in_msg;

  for (genvar p = 0; p < E; p++) begin : g_sec
    pplfsr_section #(.N(N), .F(F), .S1_TOPO(S1_TOPO[p*F +: F]),
                     .S2_TOPO(S2_TOPO[p*N +: N])) u_sec (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (sec_valid[p]),
      .in_state (sec_state[p]),
      .in_poly  (sec_poly[p]),
      .in_msg   (msg_pipe[p][p*F +: F]),
      .out_valid(sec_valid[p+1]),
      .out_state(sec_state[p+1]),
      .out_poly (sec_poly[p+1])
    );
  end

  for (genvar p = 1; p < E; p++) begin : g_skew
    always_ff @(posedge clk) begin
      if (!rst_n) msg_pipe[p] <= '0;
      else        msg_pipe[p] <= msg_pipe[p-1];
    end
  end

  // The slot at the ring output is also the one entering it, so one counter
  // names both.
  logic [SW-1:0] slot_q;
  always_ff @(posedge clk) begin
    if (!rst_n)                 slot_q <= '0;
    else if (slot_q == SW'(E - 1)) slot_q <= '0;
    else                        slot_q <= slot_q + 1'b1;
  end

  assign slot      = slot_q;
  assign out_valid = sec_valid[E];
  assign out_state = sec_state[E];

endmodule
