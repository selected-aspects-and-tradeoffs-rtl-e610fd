// tb_gene_deserializer: random chromosomes of binary, integer and float
// genesets are packed into words by the testbench (binary genes bit 0 first,
// each geneset starting on a new word) and fed with random gaps. The gene
// type and last-in-geneset flag are driven from the testbench's gene list,
// genes are taken at random, and each must equal the expected gene; every
// word must be popped exactly once.
module tb_gene_deserializer;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0, restart = 0;
  gene_type_e gt;
  logic last_in_set, word_valid, word_pop, gene_valid, take;
  logic [31:0] word, gene;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gene_deserializer dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  logic [31:0] words[$], genes[$];
  int types[$], lasts[$];

  initial begin
    take = 0; word_valid = 0; word = 0; gt = GT_BIN; last_in_set = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      int wi;
      words.delete(); genes.delete(); types.delete(); lasts.delete();
      for (int s = 0; s < $urandom_range(1, 6); s++) begin
        int t, n;
        t = $urandom_range(0, 2);
        n = $urandom_range(1, 63);
        if (t == 0) begin
          logic [31:0] w;
          w = 0;
          for (int g = 0; g < n; g++) begin
            logic bt;
            bt = 1'($urandom);
            w[g % 32] = bt;
            genes.push_back(32'(bt)); types.push_back(t); lasts.push_back(g == n - 1);
            if (g % 32 == 31 || g == n - 1) begin words.push_back(w); w = 0; end
          end
        end else begin
          for (int g = 0; g < n; g++) begin
            logic [31:0] v;
            v = $urandom;
            words.push_back(v);
            genes.push_back(v); types.push_back(t); lasts.push_back(g == n - 1);
          end
        end
      end
      @(negedge clk); restart = 1; @(negedge clk); restart = 0;
      wi = 0;
      for (int g = 0; g < genes.size(); ) begin
        gt          = gene_type_e'(types[g]);
        last_in_set = 1'(lasts[g]);
        word_valid  = (wi < words.size()) && 1'($urandom_range(0, 3) != 0);
        word        = (wi < words.size()) ? words[wi] : 32'hX;
        #1;
        chk("gene_valid", gene_valid, word_valid);
        take = gene_valid && 1'($urandom);
        #1;
        if (take) begin
          chk("gene", gene, genes[g]);
          g++;
        end
        if (word_pop) wi++;
        @(negedge clk);
        take = 0;
      end
      chk("all words popped", wi, words.size());
    end
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
