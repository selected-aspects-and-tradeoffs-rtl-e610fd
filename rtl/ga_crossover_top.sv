// ga_crossover_top: stream-based bi-parent crossover engine for genetic
// algorithms. For every pair of parents it reads both chromosomes from external
// memory (data_read_module), splits them into genes (two gene_deserializers)
// walked by the gene set tracker, crosses each gene pair in the crossover
// module (binary, integer or float path by gene type, steered by the
// randomization module), mutates the children (mutation_module), packs them
// into words again (two gene_serializers) and writes them to external memory
// (data_write_module). The chromosome layout and the algorithms come from the
// configuration registers.
// Operation: program the registers through the cfg_* port, pulse 'start'.
// The controller processes pairs 0 .. pop_size/2-1 one after the other: at the
// start of a pair it starts the read and write modules, restarts the tracker and
// lets the randomization module decide whether the pair is crossed and draw
// its cut points (one clock each); for reduced surrogate crossover a compare
// pass over both parents, which costs one extra read of the pair, comes
// first. Genes then
// flow at one per clock (binary and integer genes, memory permitting) or at
// the float module's pace; the pair ends when both children's last words have
// been written. 'done' pulses once when the whole population is processed and
// 'busy' is high in between. Status outputs show the tracker position, the
// pair and parents being processed and the number of mutated child genes.
// N_CM (default 1) sets how many crossover modules work in parallel: genes are
// dealt to them in turn and collected in the same order, so float genes,
// which occupy a module for several clocks, overlap. Memory ports: two read ports (parents A, B) with
// request/grant and in-order responses, two write ports (children C, D) with
// valid/ready. The data flow follows the original design; the controller, the
// pair-by-pair sequencing and the port protocols are this design's choice.
module ga_crossover_top
  import ga_pkg::*;
#(
  parameter int ADDR_W     = 32,
  parameter int K_MAX      = 8,
  parameter int FIFO_DEPTH = 4,
  parameter int N_CM       = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic               cfg_we,
  input  logic [3:0]         cfg_addr,
  input  logic [31:0]        cfg_wdata,
  output logic [31:0]        cfg_rdata,
  // control
  input  logic               start,
  output logic               busy,
  output logic               done,
  // status: tracker position, current parents, mutated genes since start
  output logic [CNT_W-1:0]   cur_gene,
  output logic [3:0]         cur_set,
  output gene_type_e         cur_type,
  output logic [31:0]        cur_pair,
  output logic [31:0]        parent_a,
  output logic [31:0]        parent_b,
  output logic [31:0]        mut_count,
  // parent read ports
  output logic               rda_req,
  output logic [ADDR_W-1:0]  rda_addr,
  input  logic               rda_gnt,
  input  logic               rda_rvalid,
  input  logic [WORD_W-1:0]  rda_rdata,
  output logic               rdb_req,
  output logic [ADDR_W-1:0]  rdb_addr,
  input  logic               rdb_gnt,
  input  logic               rdb_rvalid,
  input  logic [WORD_W-1:0]  rdb_rdata,
  // child write ports
  output logic               wrc_valid,
  output logic [ADDR_W-1:0]  wrc_addr,
  output logic [WORD_W-1:0]  wrc_data,
  input  logic               wrc_ready,
  output logic               wrd_valid,
  output logic [ADDR_W-1:0]  wrd_addr,
  output logic [WORD_W-1:0]  wrd_data,
  input  logic               wrd_ready
);
  // ---------------- configuration ----------------
  geneset_t            sets [N_SETS];
  xover_cfg_t          xcfg;
  logic [RAND_W-1:0]   alpha_cfg, mut_thr;
  logic [31:0]         pop_size, sel_seed;
  logic [16:0]         p_cross;
  logic [ADDR_W-1:0]   parent_base, child_base;
  logic [15:0]         rm_seed, mut_seed;
  logic [GIDX_W-1:0]   total_genes;
  logic [CWORDS_W-1:0] chrom_words;

  ga_config_regs #(.ADDR_W(ADDR_W)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .sets, .xcfg, .alpha(alpha_cfg), .mut_thr, .pop_size, .parent_base, .child_base,
    .rm_seed, .mut_seed, .sel_seed, .p_cross, .total_genes, .chrom_words
  );

  // ---------------- controller ----------------
  // C_PAIR starts a pair. For reduced surrogate crossover a compare pass
  // (C_SCAN) first streams both parents and counts the genes where they
  // differ; C_REREAD then starts the same parents again for the crossover
  // pass (C_RUN).
  typedef enum logic [2:0] {C_IDLE, C_PAIR, C_SCAN, C_REREAD, C_RUN} ctrl_e;
  ctrl_e       cstate;
  logic [31:0] pair, n_pairs;
  logic        pair_start, stream_start, rm_start, seed_load, c_done, d_done;
  logic        rsurr, scan_adv, genes_differ;
  logic [GIDX_W-1:0] diff_total, diff_idx;
  logic        gst_active, gst_last_set, gst_last_chrom, advance;

  assign n_pairs      = pop_size >> 1;
  assign rsurr        = (xcfg.bin_algo == BIN_RSURR);
  assign pair_start   = (cstate == C_PAIR);
  assign stream_start = (cstate == C_PAIR) || (cstate == C_REREAD);
  assign rm_start     = (cstate == C_PAIR && !rsurr) || (cstate == C_REREAD);
  assign seed_load    = (cstate == C_IDLE) && start;
  assign busy         = (cstate != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate <= C_IDLE; pair <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (cstate)
        C_IDLE: if (start) begin
          pair <= '0;
          if (n_pairs == 0 || total_genes == 0) done <= 1'b1;
          else cstate <= C_PAIR;
        end
        C_PAIR:   cstate <= rsurr ? C_SCAN : C_RUN;
        C_SCAN:   if (!gst_active) cstate <= C_REREAD;
        C_REREAD: cstate <= C_RUN;
        default: if (c_done && d_done) begin
          if (pair + 1 >= n_pairs) begin
            cstate <= C_IDLE;
            done   <= 1'b1;
          end else begin
            pair   <= pair + 1'b1;
            cstate <= C_PAIR;
          end
        end
      endcase
    end
  end

  // genes where the parents differ: total (compare pass) and seen so far
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_total <= '0; diff_idx <= '0;
    end else begin
      if (pair_start)                        diff_total <= '0;
      else if (scan_adv && genes_differ)     diff_total <= diff_total + 1'b1;
      if (rm_start)                          diff_idx <= '0;
      else if (cstate == C_RUN && advance && genes_differ) diff_idx <= diff_idx + 1'b1;
    end
  end

  // ---------------- gene set tracker ----------------
  logic [CNT_W-1:0]   cg;
  logic [3:0]         cgs;
  gene_type_e         gt;
  logic [GIDX_W-1:0]  gene_idx;

  gene_set_tracker u_gst (
    .clk, .rst_n, .sets, .restart(stream_start), .advance, .active(gst_active),
    .cg, .cgs, .gt, .gene_idx, .last_in_set(gst_last_set), .last_in_chrom(gst_last_chrom)
  );

  // ---------------- randomization module ----------------
  logic              rm_ready, switch_bit, pair_cross;
  logic [RAND_W-1:0] alpha;

  rand_module #(.K_MAX(K_MAX)) u_rm (
    .clk, .rst_n, .seed_load, .seed(rm_seed), .start(rm_start), .total_genes,
    .k(xcfg.k), .bin_algo(xcfg.bin_algo), .swap_thr(xcfg.swap_thr), .p_cross, .alpha_rand(xcfg.alpha_rand), .alpha_cfg,
    .gene_idx, .diff_total, .diff_idx, .advance, .ready(rm_ready), .pair_cross, .switch_bit, .alpha
  );

  // ---------------- data read module ----------------
  logic              a_valid, b_valid, a_pop, b_pop;
  logic [WORD_W-1:0] a_word, b_word;
  logic [31:0]       idx_a, idx_b;

  data_read_module #(.ADDR_W(ADDR_W), .FIFO_DEPTH(FIFO_DEPTH)) u_drm (
    .clk, .rst_n, .seed_load, .sel_seed, .start(stream_start), .reread(cstate == C_REREAD),
    .pair_idx(pair),
    .sel_rand(xcfg.sel_rand), .pop_size, .parent_base, .chrom_words,
    .rda_req, .rda_addr, .rda_gnt, .rda_rvalid, .rda_rdata,
    .rdb_req, .rdb_addr, .rdb_gnt, .rdb_rvalid, .rdb_rdata,
    .a_valid, .a_word, .a_pop, .b_valid, .b_word, .b_pop, .idx_a, .idx_b
  );

  // ---------------- de-serializers ----------------
  logic              ga_valid, gb_valid;
  logic [WORD_W-1:0] gene_a, gene_b;
  logic              cm_in_valid, cm_in_ready;

  gene_deserializer u_des_a (
    .clk, .rst_n, .restart(stream_start), .gt, .last_in_set(gst_last_set),
    .word_valid(a_valid), .word(a_word), .word_pop(a_pop),
    .gene_valid(ga_valid), .gene(gene_a), .take(advance)
  );
  gene_deserializer u_des_b (
    .clk, .rst_n, .restart(stream_start), .gt, .last_in_set(gst_last_set),
    .word_valid(b_valid), .word(b_word), .word_pop(b_pop),
    .gene_valid(gb_valid), .gene(gene_b), .take(advance)
  );

  assign cm_in_valid = (cstate == C_RUN) && gst_active && rm_ready && ga_valid && gb_valid;
  assign scan_adv     = (cstate == C_SCAN) && gst_active && ga_valid && gb_valid;
  assign advance      = scan_adv || (cm_in_valid && cm_in_ready);
  assign genes_differ = (gene_a != gene_b);

  // ---------------- crossover modules ----------------
  // N_CM crossover modules in parallel: gene pairs are handed out in
  // round-robin order and collected in the same order, so the child stream
  // keeps the gene order while float genes of consecutive positions are
  // computed at the same time.
  localparam int CMW = (N_CM > 1) ? $clog2(N_CM) : 1;

  logic              cm_out_valid, cm_out_ready, cm_last_set, cm_last_chrom;
  logic [WORD_W-1:0] cm_c, cm_d;
  gene_type_e        cm_gt;
  logic [CMW-1:0]    cm_disp, cm_coll;
  logic [N_CM-1:0]   cmi_ready, cmo_valid, cmo_last_set, cmo_last_chrom;
  logic [WORD_W-1:0] cmo_c [N_CM];
  logic [WORD_W-1:0] cmo_d [N_CM];
  gene_type_e        cmo_gt [N_CM];

  for (genvar i = 0; i < N_CM; i++) begin : g_cm
    crossover_module u_cm (
      .clk, .rst_n, .xcfg,
      .in_valid(cm_in_valid && 32'(cm_disp) == i), .in_ready(cmi_ready[i]), .a(gene_a), .b(gene_b), .gt,
      .last_in_set(gst_last_set), .last_in_chrom(gst_last_chrom), .switch_bit, .alpha, .pair_cross,
      .out_valid(cmo_valid[i]), .out_ready(cm_out_ready && 32'(cm_coll) == i), .c(cmo_c[i]), .d(cmo_d[i]),
      .out_gt(cmo_gt[i]), .out_last_in_set(cmo_last_set[i]), .out_last_in_chrom(cmo_last_chrom[i])
    );
  end

  assign cm_in_ready   = cmi_ready[cm_disp];
  assign cm_out_valid  = cmo_valid[cm_coll];
  assign cm_c          = cmo_c[cm_coll];
  assign cm_d          = cmo_d[cm_coll];
  assign cm_gt         = cmo_gt[cm_coll];
  assign cm_last_set   = cmo_last_set[cm_coll];
  assign cm_last_chrom = cmo_last_chrom[cm_coll];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cm_disp <= '0; cm_coll <= '0;
    end else begin
      if (cm_in_valid && cm_in_ready)
        cm_disp <= (32'(cm_disp) == N_CM - 1) ? '0 : cm_disp + 1'b1;
      if (cm_out_valid && cm_out_ready)
        cm_coll <= (32'(cm_coll) == N_CM - 1) ? '0 : cm_coll + 1'b1;
    end
  end

  assign cur_gene = cg;
  assign cur_set  = cgs;
  assign cur_type = gt;
  assign cur_pair = pair;
  assign parent_a = idx_a;
  assign parent_b = idx_b;

  // ---------------- mutation ----------------
  logic              mu_valid, mu_ready, mu_last_set, mu_last_chrom;
  logic [WORD_W-1:0] mu_c, mu_d;
  gene_type_e        mu_gt;
  logic [1:0]        mutated;

  mutation_module u_mut (
    .clk, .rst_n, .seed_load, .seed(mut_seed), .mut_thr,
    .in_valid(cm_out_valid), .in_ready(cm_out_ready), .c_in(cm_c), .d_in(cm_d), .gt_in(cm_gt),
    .last_in_set_in(cm_last_set), .last_in_chrom_in(cm_last_chrom),
    .out_valid(mu_valid), .out_ready(mu_ready), .c_out(mu_c), .d_out(mu_d), .gt_out(mu_gt),
    .last_in_set_out(mu_last_set), .last_in_chrom_out(mu_last_chrom), .mutated
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  mut_count <= '0;
    else if (seed_load)          mut_count <= '0;
    else if (mu_valid && mu_ready)
      mut_count <= mut_count + 32'(mutated[0]) + 32'(mutated[1]);
  end

  // ---------------- serializers ----------------
  logic              sc_in_ready, sd_in_ready;
  logic              sc_valid, sd_valid, sc_ready, sd_ready, sc_last, sd_last;
  logic [WORD_W-1:0] sc_word, sd_word;

  assign mu_ready = sc_in_ready && sd_in_ready;

  gene_serializer u_ser_c (
    .clk, .rst_n, .in_valid(mu_valid && sd_in_ready), .in_ready(sc_in_ready),
    .gene(mu_c), .gt(mu_gt), .last_in_set(mu_last_set), .last_in_chrom(mu_last_chrom),
    .out_valid(sc_valid), .out_ready(sc_ready), .word(sc_word), .last(sc_last)
  );
  gene_serializer u_ser_d (
    .clk, .rst_n, .in_valid(mu_valid && sc_in_ready), .in_ready(sd_in_ready),
    .gene(mu_d), .gt(mu_gt), .last_in_set(mu_last_set), .last_in_chrom(mu_last_chrom),
    .out_valid(sd_valid), .out_ready(sd_ready), .word(sd_word), .last(sd_last)
  );

  // ---------------- data write module ----------------
  data_write_module #(.ADDR_W(ADDR_W)) u_dwm (
    .clk, .rst_n, .start(pair_start), .pair_idx(pair), .child_base, .chrom_words,
    .c_valid(sc_valid), .c_ready(sc_ready), .c_word(sc_word), .c_last(sc_last),
    .d_valid(sd_valid), .d_ready(sd_ready), .d_word(sd_word), .d_last(sd_last),
    .wrc_valid, .wrc_addr, .wrc_data, .wrc_ready,
    .wrd_valid, .wrd_addr, .wrd_data, .wrd_ready,
    .c_done, .d_done
  );
endmodule
