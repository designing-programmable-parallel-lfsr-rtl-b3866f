// tb_pplfsr_section: checks one registered 32-bit 4-parallel section. Each
// clock a random state, generating sequence and 4 input bits are applied;
// one clock later the registers must hold the state advanced by 4 serial
// steps (or the unchanged state for a bubble) and the forwarded sequence and
// valid flag. Also checks that the reset clears the registers and that the
// result does not appear before the clock edge.
module tb_pplfsr_section;
  import tb_lfsr_ref_pkg::*;

  localparam int N = 32, F = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [N-1:0] in_state, in_poly, out_state, out_poly;
  logic [F-1:0] in_msg;
  int checks = 0, failures = 0, bubbles = 0, words = 0;

  pplfsr_section #(.N(N), .F(F)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_state(in_state),
    .in_poly(in_poly), .in_msg(in_msg), .out_valid(out_valid),
    .out_state(out_state), .out_poly(out_poly)
  );

  always #5 clk = ~clk;

  task automatic cmp(string tag, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", tag, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_state, exp_poly, prev_out;
    logic         exp_valid;
    in_valid = 1'b1; in_state = 32'hFFFF_FFFF; in_poly = '1; in_msg = '1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    cmp("reset valid", 64'(out_valid), 64'd0);
    cmp("reset state", 64'(out_state), 64'd0);
    cmp("reset poly",  64'(out_poly),  64'd0);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_state = 32'(rand64());
      in_poly  = 32'(rand64()) | 32'h1;
      in_msg   = F'(rand64());
      exp_valid = in_valid;
      exp_poly  = in_poly;
      exp_state = in_valid ? N'(ref_run(64'(in_state), 64'(in_poly), 64'(in_msg), N, F)) : in_state;
      if (in_valid) words++; else bubbles++;
      prev_out = out_state;
      #1;  // inputs changed, no edge yet: registers must hold
      cmp("hold", 64'(out_state), 64'(prev_out));
      @(negedge clk);
      cmp("valid", 64'(out_valid), 64'(exp_valid));
      cmp("state", 64'(out_state), 64'(exp_state));
      cmp("poly",  64'(out_poly),  64'(exp_poly));
    end
    if (bubbles == 0 || words == 0) begin
      failures++;
      $display("FAIL coverage bubbles=%0d words=%0d", bubbles, words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
