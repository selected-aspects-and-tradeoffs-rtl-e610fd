// tb_crossover_module: mixed streams of binary, integer and float gene pairs
// go through the crossover module with random switch bits and alpha, random
// input gaps and random output back-pressure. Every child pair is compared with
// a reference (routing for binary genes, floor arithmetic for integers,
// double precision with a small tolerance for floats) and must keep the gene
// type and flags of its input. It also checks that binary and integer genes
// pass at one per clock when the output is always ready, and that float genes
// in the blend mode hold the input for several cycles (stall). Runs with
// pair_cross low must copy A to C and B to D for every gene type.
module tb_crossover_module;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  xover_cfg_t xcfg;
  logic in_valid, in_ready, last_in_set, last_in_chrom, switch_bit, pair_cross;
  logic [31:0] a, b, c, d;
  logic [15:0] alpha;
  gene_type_e gt, out_gt;
  logic out_valid, out_ready, out_last_in_set, out_last_in_chrom;
  int checks = 0, failures = 0, stalls = 0;
  bit full_rate;

  always #5 clk = ~clk;

  crossover_module dut (.*);

  typedef struct { logic [31:0] a, b; logic sw; logic [15:0] al; gene_type_e gt; logic ls, lc; } item_t;
  item_t sent[$];

  function automatic real f2r(logic [31:0] f);
    if (f[30:23] == 0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0});
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  task automatic chk_near(string what, logic [31:0] got, real exp, real sc);
    real e;
    checks++;
    e = f2r(got) - exp;
    if (e < 0) e = -e;
    if (e > sc * 1e-6 + 1e-30) begin failures++; $display("FAIL %s got=%g exp=%g", what, f2r(got), exp); end
  endtask

  function automatic longint imean(logic [31:0] x, logic [31:0] y);
    return longint'($floor((real'($signed(x)) + real'($signed(y))) / 2.0));
  endfunction

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    item_t it;
    it = sent.pop_front();
    chk("gt", out_gt, it.gt);
    chk("ls", out_last_in_set, it.ls);
    chk("lc", out_last_in_chrom, it.lc);
    if (!pair_cross) begin
      chk("copy c", c, it.gt == GT_BIN ? it.a[0] : it.a);
      chk("copy d", d, it.gt == GT_BIN ? it.b[0] : it.b);
    end else case (it.gt)
      GT_BIN: begin
        chk("bin c", c, it.sw ? it.b[0] : it.a[0]);
        chk("bin d", d, it.sw ? it.a[0] : it.b[0]);
      end
      GT_INT: begin
        if (xcfg.int_algo == AR_MEAN) begin
          chk("int c", c, longint'(unsigned'(32'(imean(it.a, it.b)))));
          chk("int d", d, longint'(unsigned'(32'(imean(it.a, it.b)))));
        end else begin
          chk("int c", c, it.sw ? it.b : it.a);
          chk("int d", d, it.sw ? it.a : it.b);
        end
      end
      default: begin
        real ra, rb, al, sc;
        ra = f2r(it.a); rb = f2r(it.b); al = real'(it.al) / 65536.0;
        sc = (ra < 0 ? -ra : ra) + (rb < 0 ? -rb : rb);
        if (xcfg.flt_algo == AR_BLEND) begin
          chk_near("flt c", c, al * ra + (1.0 - al) * rb, sc);
          chk_near("flt d", d, al * rb + (1.0 - al) * ra, sc);
        end else begin
          chk("flt c", c, it.sw ? it.b : it.a);
          chk("flt d", d, it.sw ? it.a : it.b);
        end
      end
    endcase
  end
  always @(negedge clk) out_ready = full_rate ? 1'b1 : 1'($urandom_range(0, 3) != 0);

  initial begin
    xcfg = '0; in_valid = 0; a = 0; b = 0; gt = GT_BIN; switch_bit = 0; alpha = 0;
    last_in_set = 0; last_in_chrom = 0; full_rate = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      int cycles, n;
      full_rate     = (run % 4 == 0);
      pair_cross    = (run % 5 != 3);
      xcfg.int_algo = (run % 2) ? AR_MEAN : AR_EXCHANGE;
      xcfg.flt_algo = (run % 3 == 0) ? AR_EXCHANGE : AR_BLEND;
      cycles = 0;
      n = 200;
      for (int i = 0; i < n; ) begin
        item_t it;
        @(negedge clk);
        cycles++;
        it.gt = gene_type_e'(full_rate ? $urandom_range(0, 1) : $urandom_range(0, 2));
        it.a  = (it.gt == GT_FLT) ? {1'($urandom), 8'($urandom_range(110, 140)), 23'($urandom)} : $urandom;
        it.b  = (it.gt == GT_FLT) ? {1'($urandom), 8'($urandom_range(110, 140)), 23'($urandom)} : $urandom;
        it.sw = pair_cross ? 1'($urandom) : 1'b0; it.al = 16'($urandom); it.ls = 1'($urandom); it.lc = 1'($urandom);
        if (i == 0 && !full_rate) it.gt = GT_FLT;
        in_valid = full_rate ? 1'b1 : 1'($urandom_range(0, 3) != 0);
        a = it.a; b = it.b; switch_bit = it.sw; alpha = it.al; gt = it.gt;
        last_in_set = it.ls; last_in_chrom = it.lc;
        // hold this item until accepted
        forever begin
          #1;
          if (in_valid && in_ready) begin sent.push_back(it); i++; break; end
          if (in_valid && gt == GT_FLT) stalls++;
          @(negedge clk);
          cycles++;
          in_valid = 1;
        end
      end
      @(negedge clk); in_valid = 0;
      repeat (12) @(negedge clk);
      chk("drained", sent.size(), 0);
      if (full_rate) chk("one gene per clock", cycles, n);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL float genes never stalled the input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
