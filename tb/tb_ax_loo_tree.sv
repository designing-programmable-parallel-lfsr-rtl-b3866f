// tb_ax_loo_tree: checks the LOO AX tree against a direct GF(2) sum of
// products for several term counts (even and odd element counts), in all
// three topologies, with random inputs and with single-term patterns.
module tb_ax_loo_tree;
  import pplfsr_pkg::*;

  localparam int NS = 9;
  localparam int unsigned SIZES [NS] = '{1, 2, 3, 4, 5, 6, 8, 10, 13};
  localparam int MAXM = 13;

  logic            c;
  logic [MAXM:1]   d, f;
  logic [NS-1:0]   y_bk, y_ser, y_ks;
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NS; s++) begin : g_dut
    localparam int unsigned M = SIZES[s];
    ax_loo_tree #(.M(M), .TOPO(PPT_BRENT_KUNG)) u_bk  (.c(c), .d(d[M:1]), .f(f[M:1]), .y(y_bk[s]));
    ax_loo_tree #(.M(M), .TOPO(PPT_SERIAL))     u_ser (.c(c), .d(d[M:1]), .f(f[M:1]), .y(y_ser[s]));
    ax_loo_tree #(.M(M), .TOPO(PPT_KOGGE_STONE)) u_ks (.c(c), .d(d[M:1]), .f(f[M:1]), .y(y_ks[s]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      c = 1'($urandom());
      d = MAXM'($urandom());
      f = MAXM'($urandom());
      if (it < 16) begin  // single-term patterns: each product alone must reach y
        d = '0; f = '0;
        c = (it == 15);
        if (it < 15) begin
          d[(it % MAXM) + 1] = 1'b1;
          f[(it % MAXM) + 1] = 1'b1;
        end
      end
      #1;
      for (int s = 0; s < NS; s++) begin
        logic exp_y;
        exp_y = c;
        for (int t = 1; t <= int'(SIZES[s]); t++) exp_y ^= d[t] & f[t];
        checks += 3;
        if (y_ks[s] !== exp_y) begin
          failures++;
          $display("FAIL KS M=%0d c=%0b d=%h f=%h y=%0b exp=%0b", SIZES[s], c, d, f, y_ks[s], exp_y);
        end
        if (y_bk[s] !== exp_y) begin
          failures++;
          $display("FAIL BK M=%0d c=%0b d=%h f=%h y=%0b exp=%0b", SIZES[s], c, d, f, y_bk[s], exp_y);
        end
        if (y_ser[s] !== exp_y) begin
          failures++;
          $display("FAIL serial M=%0d c=%0b d=%h f=%h y=%0b exp=%0b", SIZES[s], c, d, f, y_ser[s], exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
