// pplfsr_postproc: third (post-processing) stage of the parallel LFSR.
//
// Completes every next-state bit by adding the term that carries no
// generating-sequence bit:
//     F_i^J = s_i + F_{i-J}^0     if i - J >= 1  (the old state, shifted by J)
//     F_i^J = s_i + M_{J-i}       if i - J <= 0  (an input bit)
// It is a row of N XOR gates with fixed wiring and does not depend on the
// polynomial. Purely combinational. A separate polynomial-free third stage
// follows the source method; its exact content is this design's reading.
module pplfsr_postproc #(
  parameter int unsigned N = 8,
  parameter int unsigned J = 5
) (
  input  logic [N-1:0] sum,        // sum[i-1]  = s_i from stage 2
  input  logic [N-1:0] state,      // state[i-1] = F_i^0
  input  logic [J-1:0] msg,        // msg[k]     = M_k
  output logic [N-1:0] next_state  // next_state[i-1] = F_i^J
);

  for (genvar i = 1; i <= N; i++) begin : g_bit
    if (i > J) begin : g_shift
      assign next_state[i-1] = sum[i-1] ^ state[i-J-1];
    end else begin : g_input
      assign next_state[i-1] = sum[i-1] ^ msg[J-i];
    end
  end

endmodule
