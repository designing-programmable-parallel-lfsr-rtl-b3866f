// tb_pplfsr_core: checks the j-parallel next-state function against j steps
// of the serial reference LFSR, for the 8-bit 5-parallel example, an
// unpipelined 32-bit 32-parallel instance, a 4-bit 7-parallel instance and a
// 16-bit 8-parallel instance mixing serial, Brent-Kung and Kogge-Stone trees. Random states,
// random generating sequences (D_0 = 1), and both random and all-zero input.
module tb_pplfsr_core;
  import pplfsr_pkg::*;
  import tb_lfsr_ref_pkg::*;

  int checks = 0, failures = 0;

  // a fixed, irregular mix of the three topologies
  function automatic ppt_topo_e [15:0] topo_mix(int seed);
    for (int i = 0; i < 16; i++) topo_mix[i] = ppt_topo_e'((i * seed + i / 3) % 3);
  endfunction

  localparam ppt_topo_e [15:0] MIX_A = topo_mix(3);
  localparam ppt_topo_e [15:0] MIX_B = topo_mix(5);

  logic [7:0]  st_a, po_a, nx_a; logic [4:0]  m_a;
  logic [31:0] st_b, po_b, nx_b; logic [31:0] m_b;
  logic [3:0]  st_c, po_c, nx_c; logic [6:0]  m_c;
  logic [15:0] st_d, po_d, nx_d; logic [7:0]  m_d;

  pplfsr_core #(.N(8),  .J(5))  u_a (.state(st_a), .poly(po_a), .msg(m_a), .next_state(nx_a));
  pplfsr_core #(.N(32), .J(32)) u_b (.state(st_b), .poly(po_b), .msg(m_b), .next_state(nx_b));
  pplfsr_core #(.N(4),  .J(7))  u_c (.state(st_c), .poly(po_c), .msg(m_c), .next_state(nx_c));
  pplfsr_core #(.N(16), .J(8), .S1_TOPO(MIX_A[7:0]), .S2_TOPO(MIX_B))
              u_d (.state(st_d), .poly(po_d), .msg(m_d), .next_state(nx_d));

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
    for (int it = 0; it < 1000; it++) begin
      st_a = 8'(rand64());  po_a = 8'(rand64())  | 8'h01;  m_a = 5'(rand64());
      st_b = 32'(rand64()); po_b = 32'(rand64()) | 32'h1;  m_b = 32'(rand64());
      st_c = 4'(rand64());  po_c = 4'(rand64())  | 4'h1;   m_c = 7'(rand64());
      st_d = 16'(rand64()); po_d = 16'(rand64()) | 16'h1;  m_d = 8'(rand64());
      if (it % 4 == 0) begin  // pure sequence generation, no input data
        m_a = '0; m_b = '0; m_c = '0; m_d = '0;
      end
      if (it == 1) po_b = 32'h04C1_1DB7;  // CRC-32 generating polynomial
      #1;
      cmp("n8j5",   64'(nx_a), ref_run(64'(st_a), 64'(po_a), 64'(m_a), 8, 5));
      cmp("n32j32", 64'(nx_b), ref_run(64'(st_b), 64'(po_b), 64'(m_b), 32, 32));
      cmp("n4j7",   64'(nx_c), ref_run(64'(st_c), 64'(po_c), 64'(m_c), 4, 7));
      cmp("n16j8",  64'(nx_d), ref_run(64'(st_d), 64'(po_d), 64'(m_d), 16, 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
