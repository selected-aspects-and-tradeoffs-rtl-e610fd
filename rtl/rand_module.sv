// rand_module: Randomization Module (RM) of the crossover engine.
// A 16-bit LFSR is the random source; every draw advances it by 16 bit
// positions. On 'start' (one cycle, at the beginning of a parent pair) the
// module first decides whether the pair is crossed at all (random16 < p_cross,
// p_cross = probability * 2^16, 2^16 meaning always), then draws the cut points
// one per clock, each uniform in 1..total_genes-1 (random16 * (total_genes-1)
// / 2^16 + 1); 'ready' rises when all are drawn. Per gene it then produces:
//  - k-point crossover: the switch bit is the parity of the number of cut
//    points <= the gene index, so the children change parent at every point
//    and no sorting is needed (k points, k <= K_MAX; k = 1 is one-point);
//  - uniform crossover: the switch bit is 1 when three random bits, read as an
//    integer, are below swap_thr (swap probability swap_thr/8; 4 gives the
//    "alpha > 0.5" coin toss);
//  - reduced surrogate crossover: as k-point, but the cut points are drawn
//    among and counted over only the genes where the two parents differ
//    (diff_total of them; diff_idx of them precede the current gene), so
//    every cut falls where it changes the children. The top level finds
//    diff_total in a compare pass before 'start';
//  - shuffle crossover: one point c is drawn and exactly c genes, a uniformly
//    random subset, are swapped, which is what one-point crossover of randomly
//    permuted parents does. Gene g is swapped with probability
//    left/(total_genes-g) (sequential sampling, tested as random16*(total-g)
//    < left*2^16), where 'left' counts the swaps still to make.
// The switch bit is also the cross bit of the integer/float units. alpha is
// the configured value or 16 fresh random bits per gene. 'pair_cross' low
// means the pair is copied without crossing. 'advance' (one gene consumed)
// draws the next random word. Outputs for the current gene are combinational
// from registers.
// The 16-bit shift register, the k configured points, the single random bits
// and the three-bit comparison follow the original design; the way points and
// subsets are drawn and K_MAX are this design's choice.
module rand_module
  import ga_pkg::*;
#(
  parameter int K_MAX = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               seed_load,
  input  logic [15:0]        seed,
  input  logic               start,
  input  logic [GIDX_W-1:0]  total_genes,
  input  logic [3:0]         k,
  input  bin_algo_e          bin_algo,
  input  logic [2:0]         swap_thr,
  input  logic [16:0]        p_cross,
  input  logic               alpha_rand,
  input  logic [RAND_W-1:0]  alpha_cfg,
  input  logic [GIDX_W-1:0]  gene_idx,
  input  logic [GIDX_W-1:0]  diff_total,
  input  logic [GIDX_W-1:0]  diff_idx,
  input  logic               advance,
  output logic               ready,
  output logic               pair_cross,
  output logic               switch_bit,
  output logic [RAND_W-1:0]  alpha
);
  localparam int PW = $clog2(K_MAX);

  logic [RAND_W-1:0] rnd;
  logic [GIDX_W-1:0] points [K_MAX];
  logic [K_MAX-1:0]  pvalid;
  logic [3:0]        drawn;
  logic [3:0]        k_eff;
  logic              drawing;
  logic [GIDX_W-1:0] shuf_left;

  always_comb begin
    unique case (bin_algo)
      BIN_KPOINT,
      BIN_RSURR:   k_eff = (32'(k) > K_MAX) ? 4'(K_MAX) : k;
      BIN_SHUFFLE: k_eff = 4'd1;
      default:     k_eff = 4'd0;
    endcase
  end

  lfsr #(.WIDTH(16), .TAPS(64'hB400), .STEPS(16)) u_lfsr (
    .clk, .rst_n, .load(seed_load), .seed,
    .step(start || (drawing && drawn < k_eff) || (ready && advance)),
    .state(rnd)
  );

  // Scaled random point in 1..span-1; span and position count all genes, or
  // for reduced surrogate only the genes where the parents differ
  logic [GIDX_W-1:0]        span, pos;
  logic [GIDX_W+RAND_W-1:0] scaled;
  logic [GIDX_W-1:0]        new_point;
  assign span      = (bin_algo == BIN_RSURR) ? diff_total : total_genes;
  assign pos       = (bin_algo == BIN_RSURR) ? diff_idx : gene_idx;
  assign scaled    = rnd * (GIDX_W+RAND_W)'(span - 1'b1);
  assign new_point = scaled[GIDX_W+RAND_W-1:RAND_W] + 1'b1;

  // Shuffle: swap this gene with probability shuf_left / (genes remaining)
  logic [GIDX_W+RAND_W-1:0] shuf_lhs, shuf_rhs;
  logic                     shuf_sw;
  assign shuf_lhs = rnd * (GIDX_W+RAND_W)'(total_genes - gene_idx);
  assign shuf_rhs = (GIDX_W+RAND_W)'(shuf_left) << RAND_W;
  assign shuf_sw  = shuf_lhs < shuf_rhs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drawing    <= 1'b0;
      drawn      <= '0;
      pvalid     <= '0;
      pair_cross <= 1'b1;
      shuf_left  <= '0;
      for (int i = 0; i < K_MAX; i++) points[i] <= '0;
    end else begin
      if (start) begin
        drawing    <= 1'b1;
        drawn      <= '0;
        pvalid     <= '0;
        shuf_left  <= '0;
        pair_cross <= 17'(rnd) < p_cross;
      end else if (drawing) begin
        if (drawn < k_eff) begin
          points[drawn[PW-1:0]] <= new_point;
          pvalid[drawn[PW-1:0]] <= (span > 1);
          if (drawn == 0) shuf_left <= (total_genes > 1) ? new_point : '0;
          drawn <= drawn + 1'b1;
        end else begin
          drawing <= 1'b0;
        end
      end
      // a shuffle swap used up (cannot coincide with drawing the count)
      if (!start && ready && advance && bin_algo == BIN_SHUFFLE && shuf_sw)
        shuf_left <= shuf_left - 1'b1;
    end
  end

  // Drawing lasts k_eff cycles; a pair is ready once no draw remains
  assign ready = !drawing || (drawn >= k_eff);

  always_comb begin
    logic par;
    par = 1'b0;
    for (int i = 0; i < K_MAX; i++)
      if (pvalid[i] && pos >= points[i]) par = ~par;
    unique case (bin_algo)
      BIN_UNIFORM: switch_bit = rnd[2:0] < swap_thr;
      BIN_SHUFFLE: switch_bit = shuf_sw;
      default:     switch_bit = par;
    endcase
    if (!pair_cross) switch_bit = 1'b0;
  end

  assign alpha = alpha_rand ? rnd : alpha_cfg;
endmodule
