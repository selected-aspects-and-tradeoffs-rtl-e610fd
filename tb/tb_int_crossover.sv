// tb_int_crossover: random check of the four integer crossover modes.
// Reference results are computed in double precision (exact for these
// magnitudes) with floor rounding: mean, blend a*A+(1-a)*B, difference
// A+a*(B-A), and exchange by the cross bit, for both children.
module tb_int_crossover;
  import ga_pkg::*;
  arith_algo_e algo;
  logic [31:0] a, b, c, d;
  logic        x;
  logic [15:0] alpha;
  int checks = 0, failures = 0;

  int_crossover dut (.algo, .a, .b, .cross_bit(x), .alpha, .c, .d);

  function automatic longint fl(real v);
    return longint'($floor(v));
  endfunction

  task automatic check(string what, logic [31:0] got, longint exp);
    checks++;
    if (got !== 32'(exp)) begin
      failures++;
      $display("FAIL %s algo=%0d a=%0d b=%0d alpha=%0d got=%0d exp=%0d",
               what, algo, $signed(a), $signed(b), alpha, $signed(got), exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      real ra, rb, al;
      algo  = arith_algo_e'(i % 4);
      a     = (i % 7 == 0) ? 32'h8000_0000 + $urandom_range(0, 3) : $urandom;
      b     = (i % 11 == 0) ? 32'h7FFF_FFFF - $urandom_range(0, 3) : $urandom;
      if (i % 3 == 0) b = a + $urandom_range(0, 1000) - 500;
      alpha = (i % 13 == 0) ? 16'd0 : 16'($urandom);
      x     = 1'($urandom);
      #1;
      ra = real'($signed(a));
      rb = real'($signed(b));
      al = real'(alpha) / 65536.0;
      case (algo)
        AR_EXCHANGE: begin
          check("exC", c, x ? longint'($signed(b)) : longint'($signed(a)));
          check("exD", d, x ? longint'($signed(a)) : longint'($signed(b)));
        end
        AR_MEAN: begin
          check("meanC", c, fl((ra + rb) / 2.0));
          check("meanD", d, fl((ra + rb) / 2.0));
        end
        AR_BLEND: begin
          check("blC", c, fl((real'(alpha) * ra + real'(65536 - int'(alpha)) * rb) / 65536.0));
          check("blD", d, fl((real'(alpha) * rb + real'(65536 - int'(alpha)) * ra) / 65536.0));
        end
        default: begin
          check("dfC", c, longint'($signed(a)) + fl(real'(alpha) * (rb - ra) / 65536.0));
          check("dfD", d, longint'($signed(b)) + fl(real'(alpha) * (ra - rb) / 65536.0));
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
