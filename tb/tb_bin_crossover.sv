// tb_bin_crossover: exhaustive check of the binary crossover routing.
// All eight combinations of A, B and switch are applied; C must follow A and
// D follow B when switch is low, and the other way round when it is high.
module tb_bin_crossover;
  logic a, b, s, c, d;
  int checks = 0, failures = 0;

  bin_crossover dut (.a, .b, .switch_bit(s), .c, .d);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {s, a, b} = 3'(i);
      #1;
      checks++;
      if (c !== (s ? b : a) || d !== (s ? a : b)) begin
        failures++;
        $display("FAIL s=%0b a=%0b b=%0b -> c=%0b d=%0b", s, a, b, c, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
