// tb_float_crossover: checks the float crossover module against double
// precision arithmetic. Random normal operands (and some zeros and equal
// values) are sent with all four modes and random alpha. Exchange must be bit
// exact; mean, blend and difference must agree with the real-valued formula to
// within a few units in the last place of the largest operand (the module
// truncates). It also checks the latency from accepting the operands to
// out_valid: exchange 1, mean 2, blend 7, difference 6 cycles, and that
// out_valid holds while out_ready is low.
module tb_float_crossover;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  arith_algo_e algo;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, x;
  logic [31:0] a, b, c, d;
  logic [15:0] alpha;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  float_crossover dut (.clk, .rst_n, .algo, .in_valid, .in_ready, .a, .b, .cross_bit(x),
                       .alpha, .out_valid, .out_ready, .c, .d);

  function automatic real f2r(logic [31:0] f);
    if (f[30:23] == 0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0});
  endfunction

  function automatic logic [31:0] rndf();
    logic [31:0] f;
    f = {1'($urandom), 8'($urandom_range(110, 140)), 23'($urandom)};
    if ($urandom_range(0, 15) == 0) f = 32'd0;
    return f;
  endfunction

  task automatic near(string what, logic [31:0] got, real exp, real scale);
    real err;
    checks++;
    err = f2r(got) - exp;
    if (err < 0) err = -err;
    if (err > scale * 1.0e-6 + 1.0e-30) begin
      failures++;
      $display("FAIL %s got=%g exp=%g scale=%g", what, f2r(got), exp, scale);
    end
  endtask

  initial begin
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 800; i++) begin
      int lat, exp_lat;
      real ra, rb, al, sc;
      algo  = arith_algo_e'(i % 4);
      a     = rndf();
      b     = (i % 9 == 0) ? a : rndf();
      alpha = 16'($urandom);
      x     = 1'($urandom);
      @(negedge clk);
      in_valid = 1;
      checks++;
      if (!in_ready) begin failures++; $display("FAIL not ready when idle"); end
      @(posedge clk);
      #1 in_valid = 0;
      lat = 1;
      while (!out_valid) begin @(posedge clk); #1; lat++; end
      exp_lat = (algo == AR_EXCHANGE) ? 1 : (algo == AR_MEAN) ? 2 : (algo == AR_BLEND) ? 7 : 6;
      checks++;
      if (lat != exp_lat) begin failures++; $display("FAIL latency algo=%0d %0d", algo, lat); end
      // hold a few cycles without out_ready
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk); #1;
        checks++;
        if (!out_valid) begin failures++; $display("FAIL out_valid dropped"); end
      end
      ra = f2r(a); rb = f2r(b); al = real'(alpha) / 65536.0;
      sc = (ra < 0 ? -ra : ra) + (rb < 0 ? -rb : rb);
      case (algo)
        AR_EXCHANGE: begin
          checks++;
          if (c !== (x ? b : a) || d !== (x ? a : b)) begin failures++; $display("FAIL exchange"); end
        end
        AR_MEAN: begin
          near("meanC", c, (ra + rb) / 2.0, sc);
          near("meanD", d, (ra + rb) / 2.0, sc);
        end
        AR_BLEND: begin
          near("blendC", c, al * ra + (1.0 - al) * rb, sc);
          near("blendD", d, al * rb + (1.0 - al) * ra, sc);
        end
        default: begin
          near("diffC", c, al * (rb - ra) + ra, sc);
          near("diffD", d, al * (ra - rb) + rb, sc);
        end
      endcase
      out_ready = 1;
      @(posedge clk); #1;
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
