// tb_pplfsr_stage2: checks the polynomial sums of stage 2. The feedback values
// F_n^k are driven at random (stage 2 must be correct for any of them) and the
// expected sum for bit i is accumulated term by term from its definition
// sum_{t=1..min(j,i)} D_{i-t} F_n^{j-t}. Sizes 8/5 and 4/7.
module tb_pplfsr_stage2;
  import pplfsr_pkg::*;
  int checks = 0, failures = 0;

  logic [4:0] fn_a; logic [7:0] po_a, s_a;
  logic [6:0] fn_b; logic [3:0] po_b, s_b;

  pplfsr_stage2 #(.N(8), .J(5)) u_a (.fn(fn_a), .poly(po_a), .sum(s_a));
  pplfsr_stage2 #(.N(4), .J(7), .TOPO({PPT_KOGGE_STONE, PPT_SERIAL, PPT_BRENT_KUNG, PPT_KOGGE_STONE})) u_b (.fn(fn_b), .poly(po_b), .sum(s_b));

  function automatic logic [63:0] exp_sum(logic [63:0] fn, logic [63:0] po, int n, int j);
    logic [63:0] r;
    r = '0;
    for (int i = 1; i <= n; i++)
      for (int t = 1; t <= j; t++)
        if (i - t >= 0) r[i-1] ^= po[i-t] & fn[j-t];
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      fn_a = 5'($urandom()); po_a = 8'($urandom());
      fn_b = 7'($urandom()); po_b = 4'($urandom());
      #1;
      checks += 2;
      if (64'(s_a) !== exp_sum(64'(fn_a), 64'(po_a), 8, 5)) begin
        failures++;
        $display("FAIL n8j5 fn=%h poly=%h sum=%h", fn_a, po_a, s_a);
      end
      if (64'(s_b) !== exp_sum(64'(fn_b), 64'(po_b), 4, 7)) begin
        failures++;
        $display("FAIL n4j7 fn=%h poly=%h sum=%h", fn_b, po_b, s_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
