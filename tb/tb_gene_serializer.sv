// tb_gene_serializer: random gene streams of binary, integer and float
// genesets are offered with random gaps while the output is accepted at
// random. The emitted words must equal the testbench's own packing (binary
// genes bit 0 first, a new word per geneset, one word per integer or float
// gene), and only the word holding the chromosome's last gene carries 'last'.
// With the output always ready one gene must be accepted per clock.
module tb_gene_serializer;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, last_in_set, last_in_chrom, last;
  gene_type_e gt;
  logic [31:0] gene, word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gene_serializer dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  logic [31:0] words[$], genes[$];
  int types[$], lasts[$];
  int got_words;
  bit full_rate;

  // output side
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    chk("word", word, words[got_words]);
    chk("last", last, got_words == words.size() - 1);
    got_words++;
  end
  always @(negedge clk) out_ready = full_rate ? 1'b1 : 1'($urandom_range(0, 2) != 0);

  initial begin
    in_valid = 0; gene = 0; gt = GT_BIN; last_in_set = 0; last_in_chrom = 0; full_rate = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      int stalls;
      full_rate = (it % 4 == 0);
      words.delete(); genes.delete(); types.delete(); lasts.delete();
      got_words = 0;
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
      stalls = 0;
      for (int g = 0; g < genes.size(); ) begin
        @(negedge clk);
        in_valid      = full_rate ? 1'b1 : 1'($urandom);
        gene          = genes[g] | (types[g] == 0 ? 32'hFFFF_FFFE & $urandom : 0);
        gt            = gene_type_e'(types[g]);
        last_in_set   = 1'(lasts[g]);
        last_in_chrom = (g == genes.size() - 1);
        #1;
        if (in_valid && in_ready) g++;
        else if (full_rate) stalls++;
      end
      @(negedge clk); in_valid = 0;
      repeat (5) @(negedge clk);
      if (full_rate) chk("full rate stalls", stalls, 0);
      chk("word count", got_words, words.size());
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
