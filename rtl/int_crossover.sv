// int_crossover: Integer Crossover Module (ICM), combinational.
// Genes are signed 32-bit integers; alpha is an unsigned Q0.16 fraction.
//   AR_EXCHANGE: C/D = A/B, or B/A when 'cross_bit' is high (discrete crossover)
//   AR_MEAN:     C = D = floor((A+B)/2)                          eq. (1)
//   AR_BLEND:    C = floor((a*A + (1-a)*B)), D with A and B swapped   eq. (2)
//   AR_DIFF:     C = A + floor(a*(B-A)),   D = B + floor(a*(A-B))     eq. (3)
// Intermediates are wide enough that nothing overflows; every result lies
// between A and B so it fits in 32 bits. The three formulas follow the
// original design; the second child, the exchange mode, the fixed-point alpha
// and rounding toward minus infinity are this design's choices.
module int_crossover
  import ga_pkg::*;
(
  input  arith_algo_e         algo,
  input  logic [WORD_W-1:0]   a,
  input  logic [WORD_W-1:0]   b,
  input  logic                cross_bit,
  input  logic [RAND_W-1:0]   alpha,
  output logic [WORD_W-1:0]   c,
  output logic [WORD_W-1:0]   d
);
  logic signed [32:0] sa, sb, sum, dba, dab;
  logic signed [17:0] wa, wb;          // alpha and 1-alpha, Q1.16, positive
  logic signed [51:0] blc, bld, dfc, dfd;

  always_comb begin
    sa  = 33'(signed'(a));
    sb  = 33'(signed'(b));
    sum = sa + sb;
    dba = sb - sa;
    dab = sa - sb;
    wa  = 18'(alpha);
    wb  = 18'sd65536 - 18'(alpha);
    blc = (52'(wa) * 52'(sa) + 52'(wb) * 52'(sb)) >>> 16;
    bld = (52'(wa) * 52'(sb) + 52'(wb) * 52'(sa)) >>> 16;
    dfc = 52'(sa) + ((52'(wa) * 52'(dba)) >>> 16);
    dfd = 52'(sb) + ((52'(wa) * 52'(dab)) >>> 16);
    unique case (algo)
      AR_EXCHANGE: begin c = cross_bit ? b : a; d = cross_bit ? a : b; end
      AR_MEAN:     begin c = 32'(sum >>> 1); d = 32'(sum >>> 1); end
      AR_BLEND:    begin c = 32'(blc); d = 32'(bld); end
      default:     begin c = 32'(dfc); d = 32'(dfd); end
    endcase
  end
endmodule
