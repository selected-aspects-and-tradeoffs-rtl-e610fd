// tb_ga_crossover_top: end-to-end test of the crossover engine with its
// default parameters. A memory model serves the two parent read ports (random
// grants, in-order responses after 1-3 cycles in the stressed runs) and
// accepts the two child write ports (random ready). For each run the
// testbench programs the registers, generates a parent population in the
// engine's memory layout, pulses start, waits for done and then decodes every
// child from the written memory and checks it against its two parents:
//  - exchange (binary genes, integer/float exchange mode): the child pair is
//    the parent pair, straight or crossed, up to one flipped bit per gene when
//    mutation is on; for k-point crossover the crossing pattern may change at
//    most k times along the chromosome;
//  - integer mean/blend: exact floor arithmetic; float mean/blend: double
//    precision within a small tolerance;
//  - difference mode with random alpha (flat crossover): C + D = A + B (to
//    rounding) and C lies between A and B.
// Parent indices are taken from the addresses the engine reads. The runs
// cover empty genesets, terminators, k-point, uniform, shuffle and reduced
// surrogate crossover (where each pair is read twice and, with one cut point,
// the children must change parent exactly once among the differing genes;
// these runs use parent pairs that differ in only a few genes),
// pairs left uncrossed by the crossover probability (copied unchanged), all
// integer and float modes, random parent selection, mutation, memory
// back-pressure and float stalls, a chromosome of the maximum size (16 x 63
// genes), and the one-gene-per-clock rate of binary and integer genes.
module tb_ga_crossover_top;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [3:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic start = 0, busy, done;
  logic rda_req, rda_gnt, rda_rvalid, rdb_req, rdb_gnt, rdb_rvalid;
  logic [31:0] rda_addr, rdb_addr, rda_rdata, rdb_rdata;
  logic wrc_valid, wrc_ready, wrd_valid, wrd_ready;
  logic [31:0] wrc_addr, wrc_data, wrd_addr, wrd_data;
  logic [CNT_W-1:0] cur_gene;
  logic [3:0] cur_set;
  gene_type_e cur_type;
  logic [31:0] cur_pair, parent_a, parent_b, mut_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ga_crossover_top dut (.*);

  // ---------------- memory model ----------------
  logic [31:0] mem [int unsigned];
  bit stress, similar = 0;
  int cyc = 0;
  logic [31:0] qa_adr[$], qb_adr[$], reads_a[$];
  int qa_due[$], qb_due[$];
  int n_gnt_stall = 0, n_wr_stall = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    rda_gnt   = stress ? 1'($urandom_range(0, 2) != 0) : 1'b1;
    rdb_gnt   = stress ? 1'($urandom_range(0, 2) != 0) : 1'b1;
    wrc_ready = stress ? 1'($urandom_range(0, 3) != 0) : 1'b1;
    wrd_ready = stress ? 1'($urandom_range(0, 3) != 0) : 1'b1;
  end
  always @(posedge clk) begin
    if (rda_req && rda_gnt) begin
      qa_adr.push_back(rda_addr); reads_a.push_back(rda_addr);
      qa_due.push_back(cyc + (stress ? $urandom_range(1, 3) : 1));
    end
    if (rdb_req && rdb_gnt) begin
      qb_adr.push_back(rdb_addr); qb_due.push_back(cyc + (stress ? $urandom_range(1, 3) : 1));
    end
    if (rda_req && !rda_gnt) n_gnt_stall++;
    if (wrc_valid && wrc_ready) mem[wrc_addr] = wrc_data;
    if (wrd_valid && wrd_ready) mem[wrd_addr] = wrd_data;
    if ((wrc_valid && !wrc_ready) || (wrd_valid && !wrd_ready)) n_wr_stall++;
  end
  always @(negedge clk) begin
    rda_rvalid = 0; rdb_rvalid = 0;
    if (qa_due.size() > 0 && qa_due[0] <= cyc) begin
      rda_rvalid = 1; rda_rdata = mem.exists(qa_adr[0]) ? mem[qa_adr[0]] : 32'h0;
      void'(qa_adr.pop_front()); void'(qa_due.pop_front());
    end
    if (qb_due.size() > 0 && qb_due[0] <= cyc) begin
      rdb_rvalid = 1; rdb_rdata = mem.exists(qb_adr[0]) ? mem[qb_adr[0]] : 32'h0;
      void'(qb_adr.pop_front()); void'(qb_due.pop_front());
    end
  end

  // ---------------- mechanism counters ----------------
  int n_empty_set = 0, n_term = 0, n_kpoint_cross = 0, n_uniform = 0, n_mut = 0;
  int n_flt_stall = 0, n_rand_sel = 0, n_partial_word = 0;
  int n_shuffle = 0, n_crossed = 0, n_not_crossed = 0, n_rsurr = 0;
  int n_alg [3][4];   // [int/flt/bin][algo] genes checked
  always @(posedge clk) if (dut.cm_in_valid && !dut.cm_in_ready && dut.gt == GT_FLT) n_flt_stall++;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  function automatic real f2r(logic [31:0] f);
    if (f[30:23] == 0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0});
  endfunction

  function automatic real absr(real v);
    return v < 0 ? -v : v;
  endfunction

  // ---------------- configuration and layout ----------------
  logic [7:0]  cfgset [16];
  int          g_type[$], g_word[$], g_bit[$];
  int          W, G;
  logic [31:0] PBASE = 32'h0001_0000, CBASE = 32'h0800_0000;

  task automatic wr(int adr, logic [31:0] v);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(adr); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic build_layout();
    bit ended;
    g_type.delete(); g_word.delete(); g_bit.delete();
    W = 0; ended = 0;
    for (int s = 0; s < 16; s++) begin
      int t, n;
      t = cfgset[s][7:6]; n = cfgset[s][5:0];
      if (t == 3) begin ended = 1; n_term++; end
      if (ended) continue;
      if (n == 0) n_empty_set++;
      for (int g = 0; g < n; g++) begin
        g_type.push_back(t);
        if (t == 0) begin g_word.push_back(W + g / 32); g_bit.push_back(g % 32); end
        else begin g_word.push_back(W + g); g_bit.push_back(0); end
      end
      if (t == 0 && n % 32 != 0) n_partial_word++;
      W += (t == 0) ? (n + 31) / 32 : n;
    end
    G = g_type.size();
  endtask

  function automatic logic [31:0] gene_of(logic [31:0] base, int g);
    logic [31:0] w;
    w = mem.exists(base + g_word[g]) ? mem[base + g_word[g]] : 32'hDEAD_0000;
    return (g_type[g] == 0) ? 32'(w[g_bit[g]]) : w;
  endfunction

  task automatic gen_parents(int pop);
    for (int i = 0; i < pop; i++)
      for (int w = 0; w < W; w++) mem[PBASE + i * W + w] = 32'h0;
    for (int i = 0; i < pop; i++)
      for (int g = 0; g < G; g++) begin
        int unsigned adr;
        adr = PBASE + i * W + g_word[g];
        case (g_type[g])
          0: mem[adr] = mem[adr] | (32'($urandom_range(0, 1)) << g_bit[g]);
          1: mem[adr] = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 200)) - 100 : $urandom;
          default: mem[adr] = {1'($urandom), 8'($urandom_range(115, 135)), 23'($urandom)};
        endcase
      end
    // 'similar': each odd individual repeats its even neighbour in about 15 of
    // 16 genes, so consecutive parents differ in only a few genes
    if (similar)
      for (int i = 1; i < pop; i += 2)
        for (int g = 0; g < G; g++)
          if ($urandom_range(0, 15) != 0) begin
            int unsigned adr, src;
            adr = PBASE + i * W + g_word[g];
            src = adr - W;
            if (g_type[g] == 0) mem[adr][g_bit[g]] = mem[src][g_bit[g]];
            else mem[adr] = mem[src];
          end
  endtask

  // ---------------- one run ----------------
  task automatic run(string name, int pop, logic [31:0] xover, logic [15:0] alpha,
                     logic [15:0] mthr, bit str, int max_cycles, logic [16:0] pcross = 17'h10000);
    int t0, cycles, pairs;
    bit kpoint, uni, shuf, srand, rs;
    int k, ialg, falg, passes;
    stress = str;
    build_layout();
    for (int r = 0; r < 4; r++) wr(r, {cfgset[4*r+3], cfgset[4*r+2], cfgset[4*r+1], cfgset[4*r]});
    wr(REG_XOVER, xover);
    wr(REG_ALPHA_MUT, {mthr, alpha});
    wr(REG_POP, pop);
    wr(REG_PBASE, PBASE);
    wr(REG_CBASE, CBASE);
    wr(REG_SEED, $urandom | 32'h0001_0001);
    wr(REG_SELSEED, $urandom | 1);
    wr(REG_PCROSS, 32'(pcross));
    cfg_addr = REG_CHROM0 + 4'd0; #1;
    chk({name, " cfg readback"}, cfg_rdata, {cfgset[3], cfgset[2], cfgset[1], cfgset[0]});
    gen_parents(pop);
    reads_a.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = cyc;
    while (!done && cyc - t0 < 2000000) @(negedge clk);
    cycles = cyc - t0;
    chk({name, " finished"}, done, 1);
    chk({name, " last pair"}, cur_pair, pop / 2 - 1);
    if (!xover[13]) chk({name, " last parent B"}, parent_b, pop - 1);
    if (mthr == 0) chk({name, " no mutation count"}, mut_count, 0);
    else chk({name, " mutation count"}, mut_count > 0, 1);
    if (max_cycles > 0) begin
      checks++;
      if (cycles > max_cycles) begin
        failures++; $display("FAIL %s took %0d cycles, limit %0d", name, cycles, max_cycles);
      end
    end
    $display("%s: %0d genes/chromosome, %0d words, pop %0d, %0d cycles", name, G, W, pop, cycles);
    rs = (xover[1:0] == 3); passes = rs ? 2 : 1;
    kpoint = (xover[1:0] == 0) || rs; uni = (xover[1:0] == 1); shuf = (xover[1:0] == 2); k = xover[11:8];
    ialg = xover[3:2]; falg = xover[5:4]; srand = xover[13];
    pairs = pop / 2;
    chk({name, " reads"}, reads_a.size(), pairs * W * passes);
    for (int p = 0; p < pairs; p++) begin
      int ia, ib, toggles, last_sw, swaps, ndiff;
      logic [31:0] ba, bb, bc, bd;
      ia = int'((reads_a[p * W * passes] - PBASE) / W);
      // reduced surrogate: the compare pass and the crossover pass read the same words
      if (rs) for (int w = 0; w < W; w++)
        chk({name, " reread"}, reads_a[(2 * p + 1) * W + w], reads_a[2 * p * W + w]);
      if (srand) begin
        // parent B is not observable on port A; take it from the data
        ib = -1;
        n_rand_sel++;
      end else begin
        chk({name, " seq parent"}, ia, 2 * p);
        ib = 2 * p + 1;
      end
      ba = PBASE + ia * W;
      bc = CBASE + 2 * p * W;
      bd = bc + W;
      // random selection: find B among the population (first one whose exchange/derived genes fit)
      if (ib < 0) begin
        for (int cand = 0; cand < pop && ib < 0; cand++) begin
          bit ok;
          ok = 1;
          for (int g = 0; g < G && ok; g++)
            if (g_type[g] == 1 && ialg == AR_EXCHANGE || g_type[g] == 0) begin
              logic [31:0] A, B, C, D;
              A = gene_of(ba, g); B = gene_of(PBASE + cand * W, g); C = gene_of(bc, g); D = gene_of(bd, g);
              if (!((C == A && D == B) || (C == B && D == A))) ok = 0;
            end
          if (ok) ib = cand;
        end
        if (ib < 0) begin failures++; checks++; $display("FAIL %s pair %0d: no parent B fits", name, p); ib = 0; end
      end
      bb = PBASE + ib * W;
      toggles = 0; last_sw = -1;
      if (pcross != 17'h10000) begin
        bit copied;
        copied = 1;
        for (int g = 0; g < G; g++)
          if (gene_of(bc, g) != gene_of(ba, g) || gene_of(bd, g) != gene_of(bb, g)) copied = 0;
        if (copied) begin n_not_crossed++; continue; end
        n_crossed++;
      end
      swaps = 0; ndiff = 0;
      for (int g = 0; g < G; g++) begin
        logic [31:0] A, B, C, D;
        int t, alg;
        A = gene_of(ba, g); B = gene_of(bb, g); C = gene_of(bc, g); D = gene_of(bd, g);
        t = g_type[g];
        alg = (t == 0) ? AR_EXCHANGE : (t == 1) ? ialg : falg;
        n_alg[t == 0 ? 2 : t - 1][alg]++;
        if (alg == AR_EXCHANGE) begin
          int sw, dcs, dcx, dds, ddx;
          dcs = $countones(C ^ A); dds = $countones(D ^ B);
          dcx = $countones(C ^ B); ddx = $countones(D ^ A);
          if (mthr == 0) begin
            checks++;
            if (!((dcs == 0 && dds == 0) || (dcx == 0 && ddx == 0))) begin
              failures++; $display("FAIL %s pair %0d gene %0d exchange A=%h B=%h C=%h D=%h", name, p, g, A, B, C, D);
            end
          end else begin
            checks++;
            if (!((dcs <= 1 && dds <= 1) || (dcx <= 1 && ddx <= 1))) begin
              failures++; $display("FAIL %s pair %0d gene %0d mutated exchange", name, p, g);
            end
            if (t != 0 && (dcs <= 1 && dds <= 1)) n_mut += dcs + dds;
            else if (t != 0) n_mut += dcx + ddx;
          end
          if (A != B) ndiff++;
          if (A != B && mthr == 0) begin
            sw = (C == B) ? 1 : 0;
            swaps += sw;
            if (last_sw >= 0 && sw != last_sw) toggles++;
            last_sw = sw;
          end
        end else if (t == 1) begin
          real ra, rb, al;
          ra = real'($signed(A)); rb = real'($signed(B)); al = real'(alpha);
          case (alg)
            AR_MEAN: begin
              chk({name, " int mean c"}, C, longint'(unsigned'(32'(longint'($floor((ra + rb) / 2.0))))));
              chk({name, " int mean d"}, D, C);
            end
            AR_BLEND: begin
              chk({name, " int blend c"}, C,
                  longint'(unsigned'(32'(longint'($floor((al * ra + (65536.0 - al) * rb) / 65536.0))))));
              chk({name, " int blend d"}, D,
                  longint'(unsigned'(32'(longint'($floor((al * rb + (65536.0 - al) * ra) / 65536.0))))));
            end
            default: begin
              longint s;
              real rc;
              s = longint'($signed(C)) + longint'($signed(D)) - longint'($signed(A)) - longint'($signed(B));
              chk({name, " int diff sum"}, (s == 0 || s == -1), 1);
              rc = real'($signed(C));
              chk({name, " int diff between"}, (rc >= (ra < rb ? ra : rb)) && (rc <= (ra < rb ? rb : ra)), 1);
            end
          endcase
        end else begin
          real ra, rb, rc, rd, al, sc;
          ra = f2r(A); rb = f2r(B); rc = f2r(C); rd = f2r(D); al = real'(alpha) / 65536.0;
          sc = (absr(ra) + absr(rb)) * 1e-6 + 1e-30;
          checks++;
          case (alg)
            AR_MEAN:  if (absr(rc - (ra + rb) / 2) > sc || D != C) begin
                        failures++; $display("FAIL %s float mean", name); end
            AR_BLEND: if (absr(rc - (al * ra + (1 - al) * rb)) > sc || absr(rd - (al * rb + (1 - al) * ra)) > sc) begin
                        failures++; $display("FAIL %s float blend %g %g -> %g %g", name, ra, rb, rc, rd); end
            default:  if (absr(rc + rd - ra - rb) > 2 * sc ||
                          rc < (ra < rb ? ra : rb) - sc || rc > (ra < rb ? rb : ra) + sc) begin
                        failures++; $display("FAIL %s float diff %g %g -> %g %g", name, ra, rb, rc, rd); end
          endcase
        end
      end
      if (kpoint && mthr == 0) begin
        chk({name, " k-point toggles <= k"}, toggles <= k, 1);
        if (toggles > 0) n_kpoint_cross++;
      end
      if (uni && toggles > 0) n_uniform++;
      // reduced surrogate with one point and all genes exchanged: the cut always
      // falls between two differing genes, so the children always change parent
      if (rs && k == 1 && mthr == 0 && ialg == AR_EXCHANGE && falg == AR_EXCHANGE && ndiff >= 2) begin
        chk({name, " surrogate cut effective"}, toggles, 1);
        n_rsurr++;
      end
      if (shuf) begin
        chk({name, " shuffle swaps < genes"}, swaps < G, 1);
        if (swaps > 0) n_shuffle++;
      end
    end
  endtask

  task automatic mech(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    stress = 0;
    foreach (n_alg[i, j]) n_alg[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // R1: mixed chromosome with an empty set and a terminator; 3-point crossover,
    //     integer mean, float blend with alpha 0.25
    cfgset = '{8'h00 | 40, 8'h40 | 10, 8'h00, 8'h80 | 5, 8'h00 | 33, 8'h40 | 0, 8'h80 | 3, 8'hC0,
               8'h40 | 7, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    run("R1 k-point/mean/blend", 6, 32'h0000_0300 | (AR_MEAN << 2) | (AR_BLEND << 4), 16'h4000, 16'h0, 0, 0);

    // R2: uniform crossover, integer and float difference with random alpha,
    //     random parents, memory back-pressure
    run("R2 uniform/flat/random", 8, 32'h0004_3001 | (AR_DIFF << 2) | (AR_DIFF << 4), 16'h0, 16'h0, 1, 0);

    // R3: exchange everywhere, 1-point crossover, 5% mutation, back-pressure
    run("R3 exchange/mutation", 10, 32'h0000_0100 | (AR_EXCHANGE << 2) | (AR_EXCHANGE << 4), 16'h0, 16'h0CCD, 1, 0);

    // R7: shuffle crossover with exchange of integer and float genes
    run("R7 shuffle", 8, 32'h0000_0002 | (AR_EXCHANGE << 2) | (AR_EXCHANGE << 4), 16'h0, 16'h0, 0, 0);

    // R9: reduced surrogate 1-point crossover, exchange everywhere, back-pressure;
    // R10: reduced surrogate 4-point with integer mean and float difference
    similar = 1;
    run("R9 reduced surrogate", 30, 32'h0000_0103 | (AR_EXCHANGE << 2) | (AR_EXCHANGE << 4), 16'h0, 16'h0, 1, 0);
    run("R10 reduced surrogate k=4", 6, 32'h0000_0403 | (AR_MEAN << 2) | (AR_DIFF << 4), 16'h3000, 16'h0, 0, 0);
    similar = 0;

    // R8: crossover probability 0.5, integer mean and float mean
    run("R8 crossover probability", 24, 32'h0000_0100 | (AR_MEAN << 2) | (AR_MEAN << 4), 16'h0, 16'h0, 1, 0,
        17'h08000);

    // R4: maximum chromosome, 16 genesets of 63 genes, 8-point crossover,
    //     integer blend, float mean
    for (int s = 0; s < 16; s++) cfgset[s] = 8'((s % 3) << 6 | 63);
    run("R4 full-size chromosome", 4, 32'h0000_0800 | (AR_BLEND << 2) | (AR_MEAN << 4), 16'h6000, 16'h0, 0, 0);

    // R5: rate: 1008 binary genes per pair, then 1008 integer genes per pair
    for (int s = 0; s < 16; s++) cfgset[s] = 8'd63;
    run("R5 binary rate", 2, 32'h0000_0200, 16'h8000, 16'h0, 0, 1008 + 40);
    for (int s = 0; s < 16; s++) cfgset[s] = 8'h40 | 8'd63;
    run("R6 integer rate", 2, 32'h0000_0200 | (AR_BLEND << 2), 16'h8000, 16'h0, 0, 1008 + 40);

    mech("empty geneset skipped", n_empty_set);
    mech("terminator geneset", n_term);
    mech("partial binary word", n_partial_word);
    mech("k-point crossing", n_kpoint_cross);
    mech("uniform crossing", n_uniform);
    mech("shuffle crossing", n_shuffle);
    mech("reduced surrogate crossing", n_rsurr);
    mech("pair crossed (probability < 1)", n_crossed);
    mech("pair copied (probability < 1)", n_not_crossed);
    mech("binary genes", n_alg[2][0]);
    mech("integer exchange", n_alg[0][0]);
    mech("integer mean", n_alg[0][1]);
    mech("integer blend", n_alg[0][2]);
    mech("integer difference", n_alg[0][3]);
    mech("float exchange", n_alg[1][0]);
    mech("float mean", n_alg[1][1]);
    mech("float blend", n_alg[1][2]);
    mech("float difference", n_alg[1][3]);
    mech("float stall", n_flt_stall);
    mech("random parent selection", n_rand_sel);
    mech("mutation", n_mut);
    mech("read grant stall", n_gnt_stall);
    mech("write back-pressure", n_wr_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
