// tb_pplfsr_postproc: checks that the post-processing stage adds the old state
// shifted up by j places and the input bits in reverse order below it. The
// expected value is formed as ((state << j) | reversed msg) ^ sum, for the
// 8/5 and the 4/7 sizes.
module tb_pplfsr_postproc;
  int checks = 0, failures = 0;

  logic [7:0] s_a, st_a, o_a; logic [4:0] m_a;
  logic [3:0] s_b, st_b, o_b; logic [6:0] m_b;

  pplfsr_postproc #(.N(8), .J(5)) u_a (.sum(s_a), .state(st_a), .msg(m_a), .next_state(o_a));
  pplfsr_postproc #(.N(4), .J(7)) u_b (.sum(s_b), .state(st_b), .msg(m_b), .next_state(o_b));

  function automatic logic [63:0] exp_out(logic [63:0] s, logic [63:0] st, logic [63:0] m, int n, int j);
    logic [63:0] rev, mask;
    rev = '0;
    for (int k = 0; k < j; k++) rev[j-1-k] = m[k];   // M_0 ends highest, M_{j-1} in bit 0
    mask = (64'd1 << n) - 64'd1;
    return (((st << j) | rev) ^ s) & mask;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      s_a = 8'($urandom()); st_a = 8'($urandom()); m_a = 5'($urandom());
      s_b = 4'($urandom()); st_b = 4'($urandom()); m_b = 7'($urandom());
      #1;
      checks += 2;
      if (64'(o_a) !== exp_out(64'(s_a), 64'(st_a), 64'(m_a), 8, 5)) begin
        failures++;
        $display("FAIL n8j5 sum=%h st=%h msg=%h out=%h", s_a, st_a, m_a, o_a);
      end
      if (64'(o_b) !== exp_out(64'(s_b), 64'(st_b), 64'(m_b), 4, 7)) begin
        failures++;
        $display("FAIL n4j7 sum=%h st=%h msg=%h out=%h", s_b, st_b, m_b, o_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
