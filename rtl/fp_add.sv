// fp_add: combinational IEEE-754 single-precision adder (reduced).
// The operand of smaller magnitude is aligned to the larger with three extra
// guard bits, the mantissas are added or subtracted, and the result is
// normalised with a leading-zero count and truncated (round toward zero).
// Subnormal inputs count as zero, underflow flushes to zero, overflow gives
// infinity; infinity and NaN inputs are not given special treatment.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    logic [31:0] x, z;
    logic [26:0] mx, mz;
    logic [27:0] m;
    logic [7:0]  sh;
    logic signed [9:0] e;
    int          lz;
    // x has the larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end
    mx = (x[30:23] == 0) ? 27'd0 : {1'b1, x[22:0], 3'b000};
    mz = (z[30:23] == 0) ? 27'd0 : {1'b1, z[22:0], 3'b000};
    sh = x[30:23] - z[30:23];
    mz = (sh > 8'd26) ? 27'd0 : (mz >> sh);
    e  = 10'(x[30:23]);
    if (x[31] == z[31]) m = 28'(mx) + 28'(mz);
    else                m = 28'(mx) - 28'(mz);
    lz = 0;
    for (int i = 0; i <= 27; i++)
      if (m[27-i] && lz == 0) lz = i + 1;   // lz-1 = leading zeros, 0 = no one
    if (mx == 27'd0) begin
      y = (mz == 27'd0) ? 32'd0 : z;
    end else if (lz == 0) begin
      y = 32'd0;
    end else begin
      // the hidden bit belongs at position 26
      if (lz == 1) begin
        m = m >> 1;
        e = e + 1'b1;
      end else begin
        m = m << (lz - 2);
        e = e - 10'(lz - 2);
      end
      if (e <= 0)        y = 32'd0;
      else if (e >= 255) y = {x[31], 8'hFF, 23'b0};
      else               y = {x[31], e[7:0], m[25:3]};
    end
  end
endmodule
