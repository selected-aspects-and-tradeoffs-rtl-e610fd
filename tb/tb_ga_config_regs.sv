// tb_ga_config_regs: writes random chromosome configurations and other
// registers, then checks read-back, the decoded genesets and fields, and the
// derived totals (genes and memory words up to the first terminator), which
// the testbench recomputes on its own.
module tb_ga_config_regs;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [3:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  geneset_t sets [N_SETS];
  xover_cfg_t xcfg;
  logic [15:0] alpha, mut_thr, rm_seed, mut_seed;
  logic [31:0] pop_size, parent_base, child_base, sel_seed;
  logic [16:0] p_cross;
  logic [GIDX_W-1:0] total_genes;
  logic [CWORDS_W-1:0] chrom_words;
  int checks = 0, failures = 0;
  logic [31:0] shadow [12];

  always #5 clk = ~clk;

  ga_config_regs dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  task automatic wr(int adr, logic [31:0] v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 4'(adr); cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
    if (adr < 12) shadow[adr] = v;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_addr = REG_XOVER; #1;
    chk("reset xover", cfg_rdata, 32'h40100);
    cfg_addr = REG_PCROSS; #1;
    chk("reset pcross", cfg_rdata, 32'h10000);
    for (int it = 0; it < 200; it++) begin
      int tg, tw;
      bit ended;
      for (int r = 0; r < 4; r++) begin
        logic [31:0] v;
        v = $urandom;
        // make terminators rarer
        for (int j = 0; j < 4; j++) if (v[8*j+7 -: 2] == 2'b11 && $urandom_range(0, 3) != 0) v[8*j+7] = 1'b0;
        wr(r, v);
      end
      for (int r = 4; r < 12; r++) wr(r, $urandom);
      wr(12, 32'hDEAD_BEEF);      // outside the map: ignored
      wr(15, 32'hDEAD_BEEF);
      for (int r = 0; r < 13; r++) begin
        cfg_addr = 4'(r); #1;
        chk("readback", cfg_rdata, r < 12 ? shadow[r] : 0);
      end
      tg = 0; tw = 0; ended = 0;
      for (int s = 0; s < 16; s++) begin
        logic [7:0] byt;
        byt = shadow[s / 4][8 * (s % 4) +: 8];
        chk("set", {sets[s].gt, sets[s].count}, byt);
        if (byt[7:6] == 2'b11) ended = 1;
        if (!ended) begin
          tg += byt[5:0];
          tw += (byt[7:6] == 2'b00) ? (byt[5:0] + 31) / 32 : byt[5:0];
        end
      end
      chk("total_genes", total_genes, tg);
      chk("chrom_words", chrom_words, tw);
      chk("k", xcfg.k, shadow[4][11:8]);
      chk("int_algo", xcfg.int_algo, shadow[4][3:2]);
      chk("flt_algo", xcfg.flt_algo, shadow[4][5:4]);
      chk("bin_algo", xcfg.bin_algo, shadow[4][1:0]);
      chk("swap_thr", xcfg.swap_thr, shadow[4][18:16]);
      chk("p_cross", p_cross, shadow[11][16:0]);
      chk("alpha_rand", xcfg.alpha_rand, shadow[4][12]);
      chk("sel_rand", xcfg.sel_rand, shadow[4][13]);
      chk("alpha", alpha, shadow[5][15:0]);
      chk("mut", mut_thr, shadow[5][31:16]);
      chk("pop", pop_size, shadow[6]);
      chk("pbase", parent_base, shadow[7]);
      chk("cbase", child_base, shadow[8]);
      chk("seed", {mut_seed, rm_seed}, shadow[9]);
      chk("selseed", sel_seed, shadow[10]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
