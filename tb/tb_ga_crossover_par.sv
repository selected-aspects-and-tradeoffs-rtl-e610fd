// tb_ga_crossover_par: the crossover engine with three crossover modules in
// parallel (N_CM = 3) against the engine with its default single module. Both
// get the same registers, the same parent population and the same start, so
// their random draws are identical; every child word the parallel engine
// writes must equal the one written by the single-module engine, which
// tb_ga_crossover_top checks against the crossover rules. The memory model
// grants every request and answers one clock later. Runs: float blend with
// random alpha on a float-heavy chromosome with mutation, float difference
// with shuffle crossover, and reduced surrogate crossover with integer blend.
// For the float-heavy runs the parallel engine must need clearly fewer clocks,
// and float genes must be seen overlapping in two modules.
module tb_ga_crossover_par;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [3:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic start = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---------------- the two engines ----------------
  logic [31:0] r_cfg_rdata, p_cfg_rdata;
  logic r_busy, r_done, p_busy, p_done;
  logic r_rda_req, r_rda_gnt, r_rda_rvalid, r_rdb_req, r_rdb_gnt, r_rdb_rvalid;
  logic p_rda_req, p_rda_gnt, p_rda_rvalid, p_rdb_req, p_rdb_gnt, p_rdb_rvalid;
  logic [31:0] r_rda_addr, r_rdb_addr, r_rda_rdata, r_rdb_rdata;
  logic [31:0] p_rda_addr, p_rdb_addr, p_rda_rdata, p_rdb_rdata;
  logic r_wrc_valid, r_wrd_valid, p_wrc_valid, p_wrd_valid;
  logic [31:0] r_wrc_addr, r_wrc_data, r_wrd_addr, r_wrd_data;
  logic [31:0] p_wrc_addr, p_wrc_data, p_wrd_addr, p_wrd_data;
  logic [CNT_W-1:0] r_cur_gene, p_cur_gene;
  logic [3:0] r_cur_set, p_cur_set;
  gene_type_e r_cur_type, p_cur_type;
  logic [31:0] r_cur_pair, r_parent_a, r_parent_b, r_mut_count;
  logic [31:0] p_cur_pair, p_parent_a, p_parent_b, p_mut_count;

  assign r_rda_gnt = 1'b1; assign r_rdb_gnt = 1'b1;
  assign p_rda_gnt = 1'b1; assign p_rdb_gnt = 1'b1;

  ga_crossover_top u_ref (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata(r_cfg_rdata),
    .start, .busy(r_busy), .done(r_done),
    .rda_req(r_rda_req), .rda_addr(r_rda_addr), .rda_gnt(r_rda_gnt), .rda_rvalid(r_rda_rvalid), .rda_rdata(r_rda_rdata),
    .rdb_req(r_rdb_req), .rdb_addr(r_rdb_addr), .rdb_gnt(r_rdb_gnt), .rdb_rvalid(r_rdb_rvalid), .rdb_rdata(r_rdb_rdata),
    .wrc_valid(r_wrc_valid), .wrc_addr(r_wrc_addr), .wrc_data(r_wrc_data), .wrc_ready(1'b1),
    .wrd_valid(r_wrd_valid), .wrd_addr(r_wrd_addr), .wrd_data(r_wrd_data), .wrd_ready(1'b1),
    .cur_gene(r_cur_gene), .cur_set(r_cur_set), .cur_type(r_cur_type), .cur_pair(r_cur_pair),
    .parent_a(r_parent_a), .parent_b(r_parent_b), .mut_count(r_mut_count)
  );

  ga_crossover_top #(.N_CM(3)) u_par (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata(p_cfg_rdata),
    .start, .busy(p_busy), .done(p_done),
    .rda_req(p_rda_req), .rda_addr(p_rda_addr), .rda_gnt(p_rda_gnt), .rda_rvalid(p_rda_rvalid), .rda_rdata(p_rda_rdata),
    .rdb_req(p_rdb_req), .rdb_addr(p_rdb_addr), .rdb_gnt(p_rdb_gnt), .rdb_rvalid(p_rdb_rvalid), .rdb_rdata(p_rdb_rdata),
    .wrc_valid(p_wrc_valid), .wrc_addr(p_wrc_addr), .wrc_data(p_wrc_data), .wrc_ready(1'b1),
    .wrd_valid(p_wrd_valid), .wrd_addr(p_wrd_addr), .wrd_data(p_wrd_data), .wrd_ready(1'b1),
    .cur_gene(p_cur_gene), .cur_set(p_cur_set), .cur_type(p_cur_type), .cur_pair(p_cur_pair),
    .parent_a(p_parent_a), .parent_b(p_parent_b), .mut_count(p_mut_count)
  );

  // ---------------- memory: shared parents, separate children ----------------
  logic [31:0] pmem [int unsigned];
  logic [31:0] rmem [int unsigned];
  logic [31:0] qmem [int unsigned];

  function automatic logic [31:0] rd(logic [31:0] adr);
    return pmem.exists(adr) ? pmem[adr] : 32'h0;
  endfunction

  always @(posedge clk) begin
    r_rda_rvalid <= r_rda_req; r_rda_rdata <= rd(r_rda_addr);
    r_rdb_rvalid <= r_rdb_req; r_rdb_rdata <= rd(r_rdb_addr);
    p_rda_rvalid <= p_rda_req; p_rda_rdata <= rd(p_rda_addr);
    p_rdb_rvalid <= p_rdb_req; p_rdb_rdata <= rd(p_rdb_addr);
    if (r_wrc_valid) rmem[r_wrc_addr] = r_wrc_data;
    if (r_wrd_valid) rmem[r_wrd_addr] = r_wrd_data;
    if (p_wrc_valid) qmem[p_wrc_addr] = p_wrc_data;
    if (p_wrd_valid) qmem[p_wrd_addr] = p_wrd_data;
  end

  // float gene handed to a module while an earlier gene is still in another one
  int n_overlap = 0;
  always @(posedge clk)
    if (u_par.cm_in_valid && u_par.cm_in_ready && u_par.gt == GT_FLT && u_par.cm_disp != u_par.cm_coll)
      n_overlap++;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  task automatic wr(int adr, logic [31:0] v);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(adr); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  localparam logic [31:0] PBASE = 32'h0001_0000, CBASE = 32'h0040_0000;

  // one run; returns the clocks of the single-module and the parallel engine
  task automatic run(string name, logic [31:0] chrom [4], logic [31:0] xover, logic [31:0] alpha_mut,
                     int pop, int words, output int cyc_r, output int cyc_p);
    int t, tr, tp;
    bit dr, dp;
    for (int r = 0; r < 4; r++) wr(REG_CHROM0 + r, chrom[r]);
    wr(REG_XOVER, xover);
    wr(REG_ALPHA_MUT, alpha_mut);
    wr(REG_POP, pop);
    wr(REG_PBASE, PBASE);
    wr(REG_CBASE, CBASE);
    wr(REG_SEED, $urandom | 32'h0001_0001);
    wr(REG_SELSEED, $urandom | 1);
    chk({name, " words per chromosome"}, 32'(u_ref.chrom_words), words);
    pmem.delete(); rmem.delete(); qmem.delete();
    // random words; float-typed words get a moderate exponent so the arithmetic stays normal
    for (int i = 0; i < pop * words; i++)
      pmem[PBASE + i] = {1'($urandom), 8'($urandom_range(118, 134)), 23'($urandom)};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t = 0; dr = 0; dp = 0; tr = 0; tp = 0;
    while (!(dr && dp) && t < 500000) begin
      @(negedge clk); t++;
      if (r_done && !dr) begin dr = 1; tr = t; end
      if (p_done && !dp) begin dp = 1; tp = t; end
    end
    chk({name, " single-module engine done"}, dr, 1);
    chk({name, " parallel engine done"}, dp, 1);
    chk({name, " child words written"}, qmem.size(), pop * words);
    chk({name, " reference words written"}, rmem.size(), pop * words);
    for (int i = 0; i < pop * words; i++) begin
      logic [31:0] a, b;
      a = rmem.exists(CBASE + i) ? rmem[CBASE + i] : 32'hDEAD_BEEF;
      b = qmem.exists(CBASE + i) ? qmem[CBASE + i] : 32'hBAD0_BAD0;
      checks++;
      if (a != b) begin
        failures++;
        $display("FAIL %s child word %0d: parallel %h, single %h", name, i, b, a);
      end
    end
    chk({name, " same mutation count"}, p_mut_count, r_mut_count);
    cyc_r = tr; cyc_p = tp;
    $display("%s: single module %0d clocks, %0d modules %0d clocks", name, tr, 3, tp);
  endtask

  initial begin
    int cr, cp;
    logic [31:0] ch [4];
    repeat (3) @(posedge clk);
    rst_n = 1;

    // float-heavy: 20 float, 5 integer, 10 binary, 30 float genes (66 words);
    // float blend with random alpha, integer blend, 1-point, 2 % mutation
    ch = '{32'h9E_0A_45_94, 32'hC0_00_00_00, 32'h0, 32'h0};
    run("F1 float blend", ch, 32'h0000_1100 | (AR_BLEND << 2) | (AR_BLEND << 4), 32'h0520_0000, 6, 56, cr, cp);
    checks++;
    if (cp * 10 > cr * 6) begin failures++; $display("FAIL F1 parallel engine not faster: %0d vs %0d", cp, cr); end

    // float difference (flat crossover) with shuffle crossover of the binary genes
    run("F2 float flat/shuffle", ch, 32'h0000_1002 | (AR_DIFF << 2) | (AR_DIFF << 4), 32'h0000_0000, 4, 56, cr, cp);
    checks++;
    if (cp * 10 > cr * 6) begin failures++; $display("FAIL F2 parallel engine not faster: %0d vs %0d", cp, cr); end

    // reduced surrogate 3-point crossover, integer blend, float mean
    run("F3 reduced surrogate", ch, 32'h0000_0303 | (AR_BLEND << 2) | (AR_MEAN << 4), 32'h0000_5000, 4, 56, cr, cp);

    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL mechanism never seen: float overlap"); end
    else $display("mechanism float genes overlapping in two modules %0d", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
