// tb_gene_set_tracker: drives the tracker through random chromosome
// configurations (with empty genesets and terminators) and compares every
// gene's current gene, geneset, type, index and last flags with a list the
// testbench builds from the configuration. Advances are applied with random
// gaps; the tracker must end (active low) exactly after the last gene.
module tb_gene_set_tracker;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0, restart = 0, advance = 0;
  geneset_t sets [N_SETS];
  logic active, last_in_set, last_in_chrom;
  logic [CNT_W-1:0] cg;
  logic [3:0] cgs;
  gene_type_e gt;
  logic [GIDX_W-1:0] gene_idx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gene_set_tracker dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  initial begin
    for (int s = 0; s < 16; s++) sets[s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      int ecg[$], ecgs[$], egt[$];
      bit ended;
      ecg.delete(); ecgs.delete(); egt.delete();
      for (int s = 0; s < 16; s++) begin
        sets[s].gt    = gene_type_e'($urandom_range(0, 2));
        sets[s].count = ($urandom_range(0, 4) == 0) ? 6'd0 : 6'($urandom_range(1, 63));
        if (it % 3 == 1 && $urandom_range(0, 10) == 0) sets[s].gt = GT_TERM;
      end
      if (it == 0) for (int s = 0; s < 16; s++) sets[s] = '{GT_BIN, 6'd63};
      ended = 0;
      for (int s = 0; s < 16; s++) begin
        if (sets[s].gt == GT_TERM) ended = 1;
        if (!ended) for (int g = 0; g < sets[s].count; g++) begin
          ecg.push_back(g); ecgs.push_back(s); egt.push_back(sets[s].gt);
        end
      end
      @(negedge clk); restart = 1; @(negedge clk); restart = 0;
      for (int i = 0; i < ecg.size(); i++) begin
        chk("active", active, 1);
        chk("cg", cg, ecg[i]);
        chk("cgs", cgs, ecgs[i]);
        chk("gt", gt, egt[i]);
        chk("idx", gene_idx, i);
        chk("last_set", last_in_set, (i == ecg.size() - 1) || ecgs[i + 1] != ecgs[i]);
        chk("last_chrom", last_in_chrom, i == ecg.size() - 1);
        repeat ($urandom_range(0, 1)) @(negedge clk);
        advance = 1; @(negedge clk); advance = 0;
      end
      chk("ended", active, 0);
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
