// tb_pplfsr_configs: runs the pipelined LFSR in sizes other than its default:
//   8-bit 5-parallel in one section (the unpipelined worked example),
//   16-bit 12-parallel as 4 sections of 3 bits with a mix of serial,
//     Brent-Kung and Kogge-Stone trees that differs from section to section,
//   4-bit 8-parallel as 2 sections of 4 bits (more parallel bits than state
//     bits, so input bits reach the feedback equations).
// Each instance is checked against the serial reference LFSR.
module tb_pplfsr_configs;
  import pplfsr_pkg::*;

  // a fixed, irregular mix of the three topologies
  function automatic ppt_topo_e [63:0] topo_mix(int seed);
    for (int i = 0; i < 64; i++) topo_mix[i] = ppt_topo_e'((i * seed + i / 5) % 3);
  endfunction
  localparam ppt_topo_e [63:0] MIX_S1 = topo_mix(7);
  localparam ppt_topo_e [63:0] MIX_S2 = topo_mix(11);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c;
  int ch_a, fa_a, w_a, b_a, l_a, p_a;
  int ch_b, fa_b, w_b, b_b, l_b, p_b;
  int ch_c, fa_c, w_c, b_c, l_c, p_c;

  tb_pplfsr_pipe_env #(.N(8), .J(5), .F(5)) env_a (
    .clk(clk), .done(done_a), .checks(ch_a), .failures(fa_a),
    .n_words(w_a), .n_bubbles(b_a), .n_loads(l_a), .n_poly_switch(p_a));

  tb_pplfsr_pipe_env #(.N(16), .J(12), .F(3), .S1_TOPO(MIX_S1[11:0]),
                       .S2_TOPO(MIX_S2)) env_b (
    .clk(clk), .done(done_b), .checks(ch_b), .failures(fa_b),
    .n_words(w_b), .n_bubbles(b_b), .n_loads(l_b), .n_poly_switch(p_b));

  tb_pplfsr_pipe_env #(.N(4), .J(8), .F(4)) env_c (
    .clk(clk), .done(done_c), .checks(ch_c), .failures(fa_c),
    .n_words(w_c), .n_bubbles(b_c), .n_loads(l_c), .n_poly_switch(p_c));

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ch_a + ch_b + ch_c, fa_a + fa_b + fa_c + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (done_a && done_b && done_c);
    checks   = ch_a + ch_b + ch_c;
    failures = fa_a + fa_b + fa_c;
    $display("8/5/5:  words=%0d bubbles=%0d loads=%0d poly_switch=%0d", w_a, b_a, l_a, p_a);
    $display("16/12/3: words=%0d bubbles=%0d loads=%0d poly_switch=%0d", w_b, b_b, l_b, p_b);
    $display("4/8/4:  words=%0d bubbles=%0d loads=%0d poly_switch=%0d", w_c, b_c, l_c, p_c);
    if (w_a == 0 || b_a == 0 || l_a == 0 || p_a == 0 ||
        w_b == 0 || b_b == 0 || l_b == 0 || p_b == 0 ||
        w_c == 0 || b_c == 0 || l_c == 0 || p_c == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
