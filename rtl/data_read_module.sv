// data_read_module: Data Read Module (DRM) of the crossover engine.
// On 'start' (one cycle) it selects the two parents of pair 'pair_idx' and
// streams both chromosomes, 'chrom_words' words each, from external memory.
// Selection: consecutive individuals 2p and 2p+1 of an already selected mating
// pool, or (sel_rand) two individuals drawn uniformly from the population with a
// 32-bit LFSR. Parent i starts at word address parent_base + i*chrom_words.
// Each parent has its own read port: request (req/addr, accepted when gnt is
// high) and in-order response (rvalid/rdata, at any latency, never stalled).
// Requests are issued only while the parent's FIFO has room for all words in
// flight, so responses always fit. The FIFO heads go to the de-serializers
// (a_valid/a_word, popped by a_pop; same for B). 'start' together with
// 'reread' streams the same two parents once more (used when a compare pass
// precedes the crossover pass).
// That the DRM selects and reads the parents follows the original design; the
// selection methods, the port protocol and the FIFOs are this design's choice.
module data_read_module
  import ga_pkg::*;
#(
  parameter int ADDR_W     = 32,
  parameter int FIFO_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 seed_load,
  input  logic [31:0]          sel_seed,
  input  logic                 start,
  input  logic                 reread,
  input  logic [31:0]          pair_idx,
  input  logic                 sel_rand,
  input  logic [31:0]          pop_size,
  input  logic [ADDR_W-1:0]    parent_base,
  input  logic [CWORDS_W-1:0]  chrom_words,
  // parent A read port
  output logic                 rda_req,
  output logic [ADDR_W-1:0]    rda_addr,
  input  logic                 rda_gnt,
  input  logic                 rda_rvalid,
  input  logic [WORD_W-1:0]    rda_rdata,
  // parent B read port
  output logic                 rdb_req,
  output logic [ADDR_W-1:0]    rdb_addr,
  input  logic                 rdb_gnt,
  input  logic                 rdb_rvalid,
  input  logic [WORD_W-1:0]    rdb_rdata,
  // word streams to the de-serializers
  output logic                 a_valid,
  output logic [WORD_W-1:0]    a_word,
  input  logic                 a_pop,
  output logic                 b_valid,
  output logic [WORD_W-1:0]    b_word,
  input  logic                 b_pop,
  output logic [31:0]          idx_a,
  output logic [31:0]          idx_b
);
  localparam int CW = $clog2(FIFO_DEPTH+1);

  // ---- parent selection ----
  logic [31:0] rnd;
  lfsr #(.WIDTH(32), .TAPS(64'h8020_0003), .STEPS(32)) u_sel_lfsr (
    .clk, .rst_n, .load(seed_load), .seed(sel_seed), .step(start && !reread && sel_rand), .state(rnd)
  );

  logic [31:0] rnd_b;
  assign rnd_b = {rnd[15:0], rnd[31:16]} ^ 32'h9E37_79B9;

  logic [31:0] sel_a, sel_b;
  always_comb begin
    logic [63:0] pa, pb;
    pa = 64'(rnd)   * 64'(pop_size);
    pb = 64'(rnd_b) * 64'(pop_size);
    if (reread) begin
      sel_a = idx_a;
      sel_b = idx_b;
    end else if (sel_rand) begin
      sel_a = pa[63:32];
      sel_b = pb[63:32];
    end else begin
      sel_a = {pair_idx[30:0], 1'b0};
      sel_b = {pair_idx[30:0], 1'b1};
    end
  end

  // ---- per-parent fetch ----
  logic [ADDR_W-1:0]   next_a, next_b;
  logic [CWORDS_W-1:0] left_a, left_b;
  logic [CW-1:0]       infl_a, infl_b, cnt_a, cnt_b;
  logic                fire_a, fire_b;

  assign rda_req  = (left_a != '0) && (32'(infl_a) + 32'(cnt_a) < FIFO_DEPTH);
  assign rdb_req  = (left_b != '0) && (32'(infl_b) + 32'(cnt_b) < FIFO_DEPTH);
  assign rda_addr = next_a;
  assign rdb_addr = next_b;
  assign fire_a   = rda_req && rda_gnt;
  assign fire_b   = rdb_req && rdb_gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_a <= '0; next_b <= '0; left_a <= '0; left_b <= '0;
      infl_a <= '0; infl_b <= '0; idx_a <= '0; idx_b <= '0;
    end else begin
      if (start) begin
        idx_a  <= sel_a;
        idx_b  <= sel_b;
        next_a <= parent_base + ADDR_W'(64'(sel_a) * 64'(chrom_words));
        next_b <= parent_base + ADDR_W'(64'(sel_b) * 64'(chrom_words));
        left_a <= chrom_words;
        left_b <= chrom_words;
      end else begin
        if (fire_a) begin next_a <= next_a + 1'b1; left_a <= left_a - 1'b1; end
        if (fire_b) begin next_b <= next_b + 1'b1; left_b <= left_b - 1'b1; end
      end
      infl_a <= infl_a + (fire_a ? CW'(1) : '0) - (rda_rvalid ? CW'(1) : '0);
      infl_b <= infl_b + (fire_b ? CW'(1) : '0) - (rdb_rvalid ? CW'(1) : '0);
    end
  end

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_a (
    .clk, .rst_n, .flush(start), .push(rda_rvalid), .din(rda_rdata),
    .pop(a_pop), .dout(a_word), .count(cnt_a)
  );
  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_b (
    .clk, .rst_n, .flush(start), .push(rdb_rvalid), .din(rdb_rdata),
    .pop(b_pop), .dout(b_word), .count(cnt_b)
  );

  assign a_valid = (cnt_a != '0);
  assign b_valid = (cnt_b != '0);

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n) rda_rvalid |-> infl_a != '0);
endmodule
