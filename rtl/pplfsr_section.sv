// pplfsr_section: one F-parallel programmable LFSR of the pipelined cascade,
// with the pipeline register (latch row L) that stores its result.
//
// On every rising clock edge it registers the state advanced by F serial steps
// (pplfsr_core), together with the generating sequence and a valid flag that
// travel with the word. A slot that carries no word (in_valid = 0, a bubble)
// passes its state through unchanged, so a stream can pause without losing
// its state. Latency is one clock; a new state can enter every clock.
//
// Interface: in_* are sampled at the clock edge, out_* are the registers.
// rst_n is an active-low synchronous reset that clears all registers.
// A cascade of f-parallel sections with storage between them follows the
// source method, which calls that storage latches; edge-triggered registers,
// the valid flag, bubbles and the forwarded polynomial are this design's own.
module pplfsr_section
  import pplfsr_pkg::*;
#(
  parameter int unsigned       N       = 32,
  parameter int unsigned       F       = 4,
  parameter ppt_topo_e [F-1:0] S1_TOPO = {F{PPT_BRENT_KUNG}},  // tree per stage-1 equation
  parameter ppt_topo_e [N-1:0] S2_TOPO = {N{PPT_BRENT_KUNG}}   // tree per stage-2 equation
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,    // slot carries F input bits to absorb
  input  logic [N-1:0] in_state,    // state[i-1] = F_i before the F steps
  input  logic [N-1:0] in_poly,     // poly[i] = D_i
  input  logic [F-1:0] in_msg,      // msg[k] = k-th of the F input bits, [0] first
  output logic         out_valid,
  output logic [N-1:0] out_state,   // state after the F steps (or unchanged)
  output logic [N-1:0] out_poly
);

  logic [N-1:0] next_state;

  pplfsr_core #(.N(N), .J(F), .S1_TOPO(S1_TOPO), .S2_TOPO(S2_TOPO)) u_core (
    .state(in_state), .poly(in_poly), .msg(in_msg), .next_state(next_state)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_state <= '0;
      out_poly  <= '0;
    end else begin
      out_valid <= in_valid;
      out_state <= in_valid ? next_state : in_state;
      out_poly  <= in_poly;
    end
  end

endmodule
