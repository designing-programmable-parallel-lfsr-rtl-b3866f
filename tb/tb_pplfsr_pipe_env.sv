// tb_pplfsr_pipe_env: reusable stimulus and checker for one pplfsr_pipelined
// instance of any size (N <= 64, J <= 64). It runs E interleaved streams with
// random words, bubbles, seed loads and polynomial changes for OPS clocks and
// compares every slot's state, as it leaves the ring, with the serial
// reference LFSR. Results come out on ports once `done` is set.
module tb_pplfsr_pipe_env
  import tb_lfsr_ref_pkg::*;
  import pplfsr_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned J   = 5,
  parameter int unsigned F   = 5,
  parameter ppt_topo_e [J-1:0]       S1_TOPO = {J{PPT_BRENT_KUNG}},
  parameter ppt_topo_e [(J/F)*N-1:0] S2_TOPO = {((J/F)*N){PPT_BRENT_KUNG}},
  parameter int          OPS = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_words,
  output int   n_bubbles,
  output int   n_loads,
  output int   n_poly_switch
);
  localparam int unsigned E  = J / F;
  localparam int unsigned SW = (E > 1) ? $clog2(E) : 1;

  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_load = 1'b0;
  logic [N-1:0] in_seed = '0, in_poly = '0;
  logic [J-1:0] in_msg = '0;
  logic [SW-1:0] slot;
  logic out_valid;
  logic [N-1:0] out_state;

  pplfsr_pipelined #(.N(N), .J(J), .F(F), .S1_TOPO(S1_TOPO), .S2_TOPO(S2_TOPO)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_load(in_load),
    .in_seed(in_seed), .in_poly(in_poly), .in_msg(in_msg),
    .slot(slot), .out_valid(out_valid), .out_state(out_state)
  );

  logic [N-1:0] model_state [E];
  logic [N-1:0] model_poly  [E];
  logic         model_valid [E];

  task automatic cmp(string tag, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d J=%0d F=%0d %s got=%h exp=%h", N, J, F, tag, got, exp);
    end
  endtask

  initial begin
    int s;
    logic [N-1:0] pol;
    done = 1'b0; checks = 0; failures = 0;
    n_words = 0; n_bubbles = 0; n_loads = 0; n_poly_switch = 0;
    for (int i = 0; i < int'(E); i++) begin
      model_state[i] = '0; model_poly[i] = '0; model_valid[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < OPS; cyc++) begin
      if (cyc > 0) @(negedge clk);
      s = int'(slot);
      cmp("slot",      64'(slot),      64'(cyc % int'(E)));
      cmp("out_valid", 64'(out_valid), 64'(model_valid[s]));
      cmp("out_state", 64'(out_state), 64'(model_state[s]));

      in_load  = ($urandom_range(0, 9) == 0) || (cyc < int'(E));
      in_valid = ($urandom_range(0, 4) != 0);
      in_seed  = N'(rand64());
      in_msg   = ($urandom_range(0, 4) == 0) ? '0 : J'(rand64());
      pol      = ($urandom_range(0, 3) == 0) ? (N'(rand64()) | N'(1)) : model_poly[s];
      in_poly  = pol;
      if (in_load) begin
        model_state[s] = in_seed;
        n_loads++;
      end
      if (in_valid) begin
        if (pol != model_poly[s]) n_poly_switch++;
        model_poly[s]  = pol;
        model_state[s] = N'(ref_run(64'(model_state[s]), 64'(pol), 64'(in_msg), N, J));
        n_words++;
      end else begin
        n_bubbles++;
      end
      model_valid[s] = in_valid;
    end
    done = 1'b1;
  end
endmodule
