// tb_data_read_module: the read module against a memory model whose word at
// address n is a hash of n. Grants are random and responses come back in
// order after one to three cycles; the consumer pops at random. For
// consecutive and random parent selection the testbench checks the chosen
// parent indices (2p, 2p+1, or inside the population) and that both streams
// deliver exactly the words parent_base + idx*chrom_words + 0 .. chrom_words-1.
// Every other pair is streamed a second time with 'reread' (and a different
// pair_idx on the input), which must keep both parents.
module tb_data_read_module;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0, seed_load = 0, start = 0, sel_rand = 0, reread = 0;
  logic [31:0] sel_seed = 32'h1234_5678, pair_idx, pop_size, parent_base;
  logic [CWORDS_W-1:0] chrom_words;
  logic rda_req, rda_gnt, rda_rvalid, rdb_req, rdb_gnt, rdb_rvalid;
  logic [31:0] rda_addr, rdb_addr, rda_rdata, rdb_rdata;
  logic a_valid, b_valid, a_pop, b_pop;
  logic [31:0] a_word, b_word, idx_a, idx_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_read_module #(.ADDR_W(32), .FIFO_DEPTH(4)) dut (.*);

  function automatic logic [31:0] memval(logic [31:0] adr);
    return (adr * 32'h9E37_79B1) ^ 32'h5bd1_e995;
  endfunction

  // memory model: one queue per port, each entry due at a cycle
  int cyc = 0;
  logic [31:0] qa_adr[$], qb_adr[$];
  int qa_due[$], qb_due[$];
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    rda_gnt = 1'($urandom_range(0, 3) != 0);
    rdb_gnt = 1'($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) begin
    if (rda_req && rda_gnt) begin qa_adr.push_back(rda_addr); qa_due.push_back(cyc + $urandom_range(1, 3)); end
    if (rdb_req && rdb_gnt) begin qb_adr.push_back(rdb_addr); qb_due.push_back(cyc + $urandom_range(1, 3)); end
  end
  always @(negedge clk) begin
    rda_rvalid = 0; rdb_rvalid = 0;
    if (qa_due.size() > 0 && qa_due[0] <= cyc) begin
      rda_rvalid = 1; rda_rdata = memval(qa_adr.pop_front()); void'(qa_due.pop_front());
    end
    if (qb_due.size() > 0 && qb_due[0] <= cyc) begin
      rdb_rvalid = 1; rdb_rdata = memval(qb_adr.pop_front()); void'(qb_due.pop_front());
    end
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  initial begin
    a_pop = 0; b_pop = 0; pair_idx = 0; pop_size = 100; parent_base = 32'h1000; chrom_words = 5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_load = 1; @(negedge clk); seed_load = 0;
    for (int it = 0; it < 80; it++) begin
      int na, nb;
      logic [31:0] ka, kb;
      sel_rand    = (it >= 40);
      pop_size    = $urandom_range(2, 2000000);
      pair_idx    = $urandom_range(0, pop_size / 2 - 1);
      parent_base = $urandom;
      chrom_words = CWORDS_W'($urandom_range(1, 40));
      for (int pass = 0; pass < 1 + (it % 2); pass++) begin
      reread = (pass == 1);
      if (reread) pair_idx = pair_idx ^ 32'd1;
      @(negedge clk); start = 1; @(negedge clk); start = 0; reread = 0;
      if (pass == 1) begin
        chk("reread idx_a", idx_a, ka);
        chk("reread idx_b", idx_b, kb);
      end else if (!sel_rand) begin
        chk("idx_a", idx_a, 2 * pair_idx);
        chk("idx_b", idx_b, 2 * pair_idx + 1);
      end else begin
        chk("idx_a range", idx_a < pop_size, 1);
        chk("idx_b range", idx_b < pop_size, 1);
      end
      ka = idx_a; kb = idx_b;
      na = 0; nb = 0;
      while (na < chrom_words || nb < chrom_words) begin
        @(negedge clk);
        a_pop = a_valid && 1'($urandom);
        b_pop = b_valid && 1'($urandom);
        if (a_pop) begin chk("word a", a_word, memval(parent_base + idx_a * chrom_words + na)); na++; end
        if (b_pop) begin chk("word b", b_word, memval(parent_base + idx_b * chrom_words + nb)); nb++; end
        @(posedge clk); #1; a_pop = 0; b_pop = 0;
      end
      repeat (6) @(negedge clk);
      chk("no extra a", a_valid, 0);
      chk("no extra b", b_valid, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
