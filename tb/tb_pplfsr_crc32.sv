// tb_pplfsr_crc32: CRC-32 workload on the default pipelined LFSR (32-bit,
// 32 bits per word, 8 sections).
//
// All 8 slots compute CRC-32/MPEG-2 (polynomial 0x04C11DB7, initial value
// 0xFFFFFFFF, bits taken MSB first, no final XOR) of the ASCII string
// "123456789", whose check value is 0x0376E6E7. The LFSR divides with the input
// entering at the bottom, so the message is framed as for an augmented
// division: the initial value is XORed into the first 32 message bits, 32 zero
// bits are appended, and 24 leading zero bits (which leave a zero state
// unchanged) pad the stream to four 32-bit words. All slots get the same
// words, issued back to back, so 32 words enter in 32 consecutive clocks. The test checks
// every slot's result and that the 1024 bits took 32 issue clocks plus the
// 8-clock ring latency.
module tb_pplfsr_crc32;
  localparam int N = 32, J = 32, E = 8, WORDS = 4;
  localparam logic [31:0] POLY  = 32'h04C1_1DB7;
  localparam logic [31:0] INIT  = 32'hFFFF_FFFF;
  localparam logic [31:0] CHECK = 32'h0376_E6E7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_load = 1'b0;
  logic [N-1:0] in_seed = '0, in_poly = '0;
  logic [J-1:0] in_msg = '0;
  logic [2:0] slot;
  logic out_valid;
  logic [N-1:0] out_state;

  pplfsr_pipelined dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_load(in_load),
    .in_seed(in_seed), .in_poly(in_poly), .in_msg(in_msg),
    .slot(slot), .out_valid(out_valid), .out_state(out_state)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  text [9];
    logic        stream [WORDS*J];
    logic [J-1:0] word [WORDS];
    int issue_start, issue_end, done_cycle, cyc, pos;

    // "123456789"
    for (int i = 0; i < 9; i++) text[i] = 8'h31 + 8'(i);
    // 24 leading zeros, 72 message bits (MSB first) with INIT XORed into the
    // first 32, then 32 zeros
    for (int b = 0; b < WORDS * J; b++) stream[b] = 1'b0;
    for (int b = 0; b < 72; b++) begin
      pos = 24 + b;
      stream[pos] = text[b / 8][7 - (b % 8)] ^ ((b < 32) ? INIT[31 - b] : 1'b0);
    end
    for (int w = 0; w < WORDS; w++)
      for (int b = 0; b < J; b++) word[w][b] = stream[w * J + b];

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    issue_start = -1;
    // word w of every slot is issued in clocks w*E .. w*E+E-1
    for (int w = 0; w < WORDS; w++) begin
      for (int s = 0; s < E; s++) begin
        checks++;
        if (int'(slot) != s) begin
          failures++;
          $display("FAIL slot order: got %0d expected %0d", slot, s);
        end
        if (issue_start < 0) issue_start = cyc;
        in_valid = 1'b1;
        in_load  = (w == 0);
        in_seed  = '0;
        in_poly  = POLY;
        in_msg   = word[w];
        issue_end = cyc;
        @(negedge clk);
        cyc++;
      end
    end
    in_valid = 1'b0; in_load = 1'b0;
    // results leave the ring in slot order during the next E clocks
    for (int s = 0; s < E; s++) begin
      checks += 2;
      if (!out_valid) begin
        failures++;
        $display("FAIL slot %0d: out_valid low", s);
      end
      if (out_state !== CHECK) begin
        failures++;
        $display("FAIL slot %0d: CRC %h, expected %h", s, out_state, CHECK);
      end
      done_cycle = cyc;
      @(negedge clk);
      cyc++;
    end
    // 1024 bits in 32 consecutive issue clocks: 32 bits per clock
    checks++;
    if (issue_end - issue_start + 1 != WORDS * E) begin
      failures++;
      $display("FAIL issue took %0d clocks", issue_end - issue_start + 1);
    end
    // last result available E clocks after the last issue
    checks++;
    if (done_cycle - issue_end != E) begin
      failures++;
      $display("FAIL latency %0d clocks, expected %0d", done_cycle - issue_end, E);
    end
    $display("CRC-32/MPEG-2(\"123456789\") = %h in all %0d slots, %0d bits in %0d clocks",
             out_state, E, WORDS * J * E, issue_end - issue_start + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
