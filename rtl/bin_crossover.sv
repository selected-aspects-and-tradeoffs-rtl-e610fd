// bin_crossover: Binary Crossover Module (BCM).
// Parents arrive as two bit streams A and B, one gene per clock. With the
// switch bit low A goes to child C and B to child D; with it high the streams
// are crossed (B to C, A to D). Which crossover algorithm results (one-point,
// k-point, uniform) depends only on how the randomization module drives
// 'switch_bit'. Purely combinational, as in the original design.
module bin_crossover (
  input  logic a,
  input  logic b,
  input  logic switch_bit,
  output logic c,
  output logic d
);
  assign c = switch_bit ? b : a;
  assign d = switch_bit ? a : b;
endmodule
