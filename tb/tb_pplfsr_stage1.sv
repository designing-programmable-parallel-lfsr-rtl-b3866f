// tb_pplfsr_stage1: checks the feedback-bit equations. The expected F_n^k is
// the top state bit of the serial reference LFSR after k steps. Three sizes:
// the 8-bit 5-parallel example, a case with more parallel bits than state bits
// (4-bit, 7-parallel, so input bits appear as free terms), and a 32-bit
// 4-parallel section mixing serial, Brent-Kung and Kogge-Stone trees.
module tb_pplfsr_stage1;
  import pplfsr_pkg::*;
  import tb_lfsr_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  st_a, po_a;  logic [4:0] m_a; logic [4:0] fn_a;
  logic [3:0]  st_b, po_b;  logic [6:0] m_b; logic [6:0] fn_b;
  logic [31:0] st_c, po_c;  logic [3:0] m_c; logic [3:0] fn_c;

  pplfsr_stage1 #(.N(8), .J(5))  u_a (.state(st_a), .poly(po_a), .msg(m_a), .fn(fn_a));
  pplfsr_stage1 #(.N(4), .J(7))  u_b (.state(st_b), .poly(po_b), .msg(m_b), .fn(fn_b));
  pplfsr_stage1 #(.N(32), .J(4), .TOPO({PPT_KOGGE_STONE, PPT_SERIAL, PPT_BRENT_KUNG, PPT_SERIAL})) u_c (.state(st_c), .poly(po_c), .msg(m_c), .fn(fn_c));

  // expected F_n^k for k = 0..j-1 from the serial model
  function automatic logic [63:0] exp_fn(logic [63:0] st, logic [63:0] po, logic [63:0] m, int n, int j);
    logic [63:0] s, r;
    s = st; r = '0;
    for (int k = 0; k < j; k++) begin
      r[k] = s[n-1];
      s = ref_step(s, po, m[k], n);
    end
    return r;
  endfunction

  task automatic cmp(string tag, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", tag, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      st_a = 8'(rand64());  po_a = 8'(rand64()) | 8'h01; m_a = 5'(rand64());
      st_b = 4'(rand64());  po_b = 4'(rand64()) | 4'h1;  m_b = 7'(rand64());
      st_c = 32'(rand64()); po_c = 32'(rand64()) | 32'h1; m_c = 4'(rand64());
      #1;
      cmp("n8j5",  64'(fn_a), exp_fn(64'(st_a), 64'(po_a), 64'(m_a), 8, 5));
      cmp("n4j7",  64'(fn_b), exp_fn(64'(st_b), 64'(po_b), 64'(m_b), 4, 7));
      cmp("n32j4", 64'(fn_c), exp_fn(64'(st_c), 64'(po_c), 64'(m_c), 32, 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
