// tb_pplfsr_pipelined: end-to-end test of the pipelined LFSR at its default
// size (32-bit state, 32 input bits per word, 8 sections of 4 bits).
//
// Eight independent streams share the ring, one per slot. Every clock the test
// reads the state leaving the ring for the current slot, compares it with a
// serial reference LFSR kept per slot, and then issues that slot's next
// operation: a word (random or all-zero data), a bubble, a seed load, or a
// load together with a word, with generating sequences that change between
// words (one of them the CRC-32 polynomial). Because the ring is E clocks
// long, each comparison also checks that a word's result appears exactly E
// clocks after it was issued. Every mechanism must occur at least once.
module tb_pplfsr_pipelined;
  import tb_lfsr_ref_pkg::*;

  localparam int N = 32, J = 32, F = 4, E = J / F;
  localparam int OPS = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_load = 1'b0;
  logic [N-1:0] in_seed = '0, in_poly = '0;
  logic [J-1:0] in_msg = '0;
  logic [$clog2(E)-1:0] slot;
  logic out_valid;
  logic [N-1:0] out_state;

  pplfsr_pipelined dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_load(in_load),
    .in_seed(in_seed), .in_poly(in_poly), .in_msg(in_msg),
    .slot(slot), .out_valid(out_valid), .out_state(out_state)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_words = 0, n_bubbles = 0, n_loads = 0, n_load_words = 0;
  int n_poly_switch = 0, n_zero_msg = 0, n_crc32 = 0, n_wrap = 0;

  logic [N-1:0] model_state [E];
  logic [N-1:0] model_poly  [E];
  logic         model_valid [E];

  task automatic cmp(string tag, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", tag, got, exp);
    end
  endtask

  initial begin
    repeat (OPS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    logic [N-1:0] pol;
    for (int i = 0; i < E; i++) begin
      model_state[i] = '0; model_poly[i] = 32'h04C1_1DB7; model_valid[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < OPS; cyc++) begin
      if (cyc > 0) @(negedge clk);
      s = int'(slot);
      cmp("slot", 64'(slot), 64'(cyc % E));
      if (s == E - 1) n_wrap++;
      cmp("out_valid", 64'(out_valid), 64'(model_valid[s]));
      cmp("out_state", 64'(out_state), 64'(model_state[s]));

      // next operation for slot s
      in_load  = ($urandom_range(0, 9) == 0) || (cyc < E);
      in_valid = ($urandom_range(0, 4) != 0) && (cyc >= E || cyc % 2 == 0);
      in_seed  = 32'(rand64());
      in_msg   = ($urandom_range(0, 4) == 0) ? '0 : 32'(rand64());
      case ($urandom_range(0, 5))
        0:       pol = 32'h04C1_1DB7;               // CRC-32
        1:       pol = 32'(rand64()) | 32'h1;
        default: pol = model_poly[s];               // keep this stream's sequence
      endcase
      in_poly = pol;

      if (in_load) begin
        model_state[s] = in_seed;
        if (in_valid) n_load_words++; else n_loads++;
      end
      if (in_valid) begin
        if (pol != model_poly[s]) n_poly_switch++;
        if (pol == 32'h04C1_1DB7) n_crc32++;
        if (in_msg == '0) n_zero_msg++;
        model_poly[s]  = pol;
        model_state[s] = N'(ref_run(64'(model_state[s]), 64'(pol), 64'(in_msg), N, J));
        n_words++;
      end else begin
        n_bubbles++;
      end
      model_valid[s] = in_valid;
    end

    $display("mechanisms: words=%0d bubbles=%0d loads=%0d load+word=%0d poly_switch=%0d zero_msg=%0d crc32=%0d slot_wraps=%0d",
             n_words, n_bubbles, n_loads, n_load_words, n_poly_switch, n_zero_msg, n_crc32, n_wrap);
    if (n_words == 0)       begin failures++; $display("FAIL no word absorbed"); end
    if (n_bubbles == 0)     begin failures++; $display("FAIL no bubble"); end
    if (n_loads == 0)       begin failures++; $display("FAIL no bare seed load"); end
    if (n_load_words == 0)  begin failures++; $display("FAIL no load with word"); end
    if (n_poly_switch == 0) begin failures++; $display("FAIL no polynomial switch"); end
    if (n_zero_msg == 0)    begin failures++; $display("FAIL no zero-input word"); end
    if (n_crc32 == 0)       begin failures++; $display("FAIL no CRC-32 word"); end
    if (n_wrap == 0)        begin failures++; $display("FAIL slot counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
