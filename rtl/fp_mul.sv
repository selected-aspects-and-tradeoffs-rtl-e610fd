// fp_mul: combinational IEEE-754 single-precision multiplier (reduced).
// Normal numbers and zero are handled; subnormal inputs count as zero, results
// below the normal range flush to zero and results above it become infinity.
// The product mantissa is truncated (round toward zero). Infinity and NaN
// inputs are not given special treatment. Used by the float crossover module.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    logic        s;
    logic [23:0] ma, mb;
    logic [47:0] p;
    logic signed [10:0] e;
    s  = a[31] ^ b[31];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    p  = ma * mb;
    e  = 11'(a[30:23]) + 11'(b[30:23]) - 11'sd127;
    if (p[47]) begin
      e = e + 1'b1;
      p = p >> 1;
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0 || e <= 0)
      y = {s, 31'b0};
    else if (e >= 255)
      y = {s, 8'hFF, 23'b0};
    else
      y = {s, e[7:0], p[45:23]};
  end
endmodule
