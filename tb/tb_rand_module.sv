// tb_rand_module: checks the randomization module against a software model of
// its 16-bit Galois LFSR (taps 0xB400, 16 shifts per draw). Per pair it checks
// the crossover decision against the probability register and that 'ready'
// rises after the right number of draws (k for k-point, 1 for shuffle, 0 for
// uniform). Per gene it checks the switch bit: the parity of the cut points at
// or below the gene index (k-point) or at or below the count of differing genes
// so far (reduced surrogate, with a random pattern of differing genes and the
// points drawn over their total), three random bits below the threshold
// (uniform), or the sequential-sampling decision, with exactly c swaps in the
// chromosome (shuffle); and always 0 for a pair that is not crossed. alpha
// must follow the LFSR or the configured value.
module tb_rand_module;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0, seed_load = 0, start = 0, advance = 0, alpha_rand = 0;
  logic [15:0] seed, alpha_cfg, alpha;
  logic [GIDX_W-1:0] total_genes, gene_idx, diff_total, diff_idx;
  logic [3:0] k;
  bin_algo_e bin_algo;
  logic [2:0] swap_thr;
  logic [16:0] p_cross;
  logic ready, switch_bit, pair_cross;
  int checks = 0, failures = 0;
  logic [15:0] st;

  always #5 clk = ~clk;

  rand_module #(.K_MAX(8)) dut (.*);

  function automatic logic [15:0] nx(logic [15:0] s);
    for (int i = 0; i < 16; i++) s = s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
    return s;
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  initial begin
    gene_idx = 0; total_genes = 100; k = 1; bin_algo = BIN_KPOINT; alpha_cfg = 16'h4000; seed = 1;
    swap_thr = 4; p_cross = 17'h10000; diff_total = 0; diff_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int pts[$];
      int cyc, kk, keff, left, nswaps, span, dseen;
      bit xc;
      seed        = 16'($urandom) | 16'd1;
      total_genes = GIDX_W'($urandom_range(1, 1008));
      kk          = $urandom_range(0, 8);
      k           = 4'(kk);
      bin_algo    = bin_algo_e'(it % 4);
      diff_total  = GIDX_W'($urandom_range(0, int'(total_genes)));
      diff_idx    = 0;
      span        = (bin_algo == BIN_RSURR) ? int'(diff_total) : int'(total_genes);
      swap_thr    = 3'($urandom);
      p_cross     = (it % 5 == 0) ? 17'h10000 : 17'($urandom_range(0, 65536));
      alpha_rand  = 1'($urandom);
      alpha_cfg   = 16'($urandom);
      @(negedge clk); seed_load = 1; @(negedge clk); seed_load = 0;
      st = seed;
      pts.delete();
      @(negedge clk); start = 1;
      @(posedge clk); #1 start = 0;
      xc = 17'(st) < p_cross;
      st = nx(st);
      chk("pair_cross", pair_cross, xc);
      keff = (bin_algo == BIN_KPOINT || bin_algo == BIN_RSURR) ? kk : (bin_algo == BIN_SHUFFLE) ? 1 : 0;
      cyc = 0;
      while (!ready) begin @(posedge clk); #1; cyc++; end
      chk("ready cycles", cyc, keff);
      for (int j = 0; j < keff; j++) begin
        logic [31:0] p;
        p = 32'(st) * 32'(span > 0 ? span - 1 : 0);
        pts.push_back(int'(p >> 16) + 1);
        st = nx(st);
      end
      left = (total_genes > 1 && bin_algo == BIN_SHUFFLE) ? pts[0] : 0;
      nswaps = 0;
      dseen = 0;
      for (int g = 0; g < total_genes && (g < 200 || bin_algo == BIN_SHUFFLE); g++) begin
        int par, exp_sw;
        gene_idx = GIDX_W'(g);
        diff_idx = GIDX_W'(dseen);
        #1;
        par = 0;
        if (span > 1) foreach (pts[j]) if ((bin_algo == BIN_RSURR ? dseen : g) >= pts[j]) par ^= 1;
        case (bin_algo)
          BIN_UNIFORM: exp_sw = (st[2:0] < swap_thr);
          BIN_SHUFFLE: begin
            exp_sw = (longint'(st) * (total_genes - g)) < (longint'(left) << 16);
            if (exp_sw) left--;
          end
          default:     exp_sw = par;
        endcase
        if (!xc) exp_sw = 0;
        nswaps += exp_sw;
        chk("switch", switch_bit, exp_sw);
        chk("alpha", alpha, alpha_rand ? st : alpha_cfg);
        @(negedge clk); advance = 1; @(negedge clk); advance = 0;
        st = nx(st);
        // the next gene is preceded by one more differing gene, some of the time
        if (dseen < int'(diff_total) && $urandom_range(0, 1)) dseen++;
      end
      if (bin_algo == BIN_SHUFFLE && xc && total_genes > 1) chk("shuffle swap count", nswaps, pts[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
