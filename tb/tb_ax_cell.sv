// tb_ax_cell: exhaustive check of the AND-XOR node y = a ^ (d & b).
module tb_ax_cell;
  logic a, d, b, y;
  int checks = 0, failures = 0;

  ax_cell dut (.a(a), .d(d), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, d, b} = 3'(v);
      #1;
      checks++;
      // truth table written out: output differs from a only when d and b are both 1
      if (y !== (((v & 3) == 3) ? ~a : a)) begin
        failures++;
        $display("FAIL a=%0b d=%0b b=%0b y=%0b", a, d, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
