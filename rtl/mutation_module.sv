// mutation_module: Mutation module, one pipeline stage on the child stream.
// Each child gene is mutated with probability mut_thr/2^16: its only bit is
// inverted for a binary gene, and one bit, chosen at random, for an integer or
// float gene. Each child has its own 32-bit LFSR, stepped once per gene:
// bits [15:0] are compared with the threshold and bits [20:16] choose the bit.
// mut_thr = 0 switches mutation off. Valid/ready on both sides; the result is
// registered (one cycle of latency, one gene pair per clock). 'mutated' flags
// tell which child was changed.
// The document only names this module and describes mutation as a rare
// random change of selected features; everything else here is this design's
// choice.
module mutation_module
  import ga_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               seed_load,
  input  logic [15:0]        seed,
  input  logic [RAND_W-1:0]  mut_thr,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [WORD_W-1:0]  c_in,
  input  logic [WORD_W-1:0]  d_in,
  input  gene_type_e         gt_in,
  input  logic               last_in_set_in,
  input  logic               last_in_chrom_in,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [WORD_W-1:0]  c_out,
  output logic [WORD_W-1:0]  d_out,
  output gene_type_e         gt_out,
  output logic               last_in_set_out,
  output logic               last_in_chrom_out,
  output logic [1:0]         mutated
);
  logic [31:0] rc, rd;
  logic        fire;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;

  lfsr #(.WIDTH(32), .TAPS(64'h8020_0003), .STEPS(32)) u_lfsr_c (
    .clk, .rst_n, .load(seed_load), .seed({seed, 16'hACE1}), .step(fire), .state(rc));
  lfsr #(.WIDTH(32), .TAPS(64'h8020_0003), .STEPS(32)) u_lfsr_d (
    .clk, .rst_n, .load(seed_load), .seed({16'h1D0F, ~seed}), .step(fire), .state(rd));

  function automatic logic [WORD_W-1:0] flip_mask(gene_type_e t, logic [4:0] pos);
    return (t == GT_BIN) ? 32'd1 : (32'd1 << pos);
  endfunction

  logic hit_c, hit_d;
  assign hit_c = rc[15:0] < mut_thr;
  assign hit_d = rd[15:0] < mut_thr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; c_out <= '0; d_out <= '0; gt_out <= GT_BIN;
      last_in_set_out <= 1'b0; last_in_chrom_out <= 1'b0; mutated <= '0;
    end else if (fire) begin
      out_valid         <= 1'b1;
      c_out             <= c_in ^ (hit_c ? flip_mask(gt_in, rc[20:16]) : '0);
      d_out             <= d_in ^ (hit_d ? flip_mask(gt_in, rd[20:16]) : '0);
      gt_out            <= gt_in;
      last_in_set_out   <= last_in_set_in;
      last_in_chrom_out <= last_in_chrom_in;
      mutated           <= {hit_d, hit_c};
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end
endmodule
