// crossover_module: Crossover Module (CM) with its output multiplexer.
// One gene pair (A, B) with its gene type enters per handshake. Binary genes go
// through the binary crossover (BCM) and integer genes through the integer
// crossover (ICM); both are combinational and their result is registered, so
// these genes pass at one per clock with one cycle of latency. Float genes are
// handed to the float crossover (FCM), which takes several clocks: the input
// handshake completes when the FCM takes the operands, and the next gene is
// taken only after the FCM result has moved into the output register, which
// stalls the stream (a top level with several crossover modules overlaps
// them). The multiplexer picks the child pair of the gene's type. The
// gene type and the last-in-geneset/last-in-chromosome flags travel with the
// children. When 'pair_cross' is low (the pair was drawn not to be crossed)
// integer and float genes are copied like binary genes with the switch low.
// Handshakes are valid/ready on both sides.
// The split into BCM, ICM and FCM enabled by the gene type and the output
// multiplexer follow the original design; the handshakes and the single
// output register are this design's choice.
module crossover_module
  import ga_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  xover_cfg_t         xcfg,
  // gene pair in
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [WORD_W-1:0]  a,
  input  logic [WORD_W-1:0]  b,
  input  gene_type_e         gt,
  input  logic               last_in_set,
  input  logic               last_in_chrom,
  input  logic               switch_bit,
  input  logic [RAND_W-1:0]  alpha,
  input  logic               pair_cross,
  // children out
  output logic               out_valid,
  input  logic               out_ready,
  output logic [WORD_W-1:0]  c,
  output logic [WORD_W-1:0]  d,
  output gene_type_e         out_gt,
  output logic               out_last_in_set,
  output logic               out_last_in_chrom
);
  logic              bc, bd;
  logic [WORD_W-1:0] ic, id, fc, fd, mc, md;
  logic              f_in_valid, f_in_ready, f_out_valid, f_out_ready;
  logic              launched, slot_free, fire;
  arith_algo_e       int_algo, flt_algo;

  // a pair that is not crossed is copied: exchange mode with the switch low
  assign int_algo = pair_cross ? xcfg.int_algo : AR_EXCHANGE;
  assign flt_algo = pair_cross ? xcfg.flt_algo : AR_EXCHANGE;

  bin_crossover u_bcm (.a(a[0]), .b(b[0]), .switch_bit, .c(bc), .d(bd));

  int_crossover u_icm (.algo(int_algo), .a, .b, .cross_bit(switch_bit), .alpha, .c(ic), .d(id));

  float_crossover u_fcm (
    .clk, .rst_n, .algo(flt_algo),
    .in_valid(f_in_valid), .in_ready(f_in_ready), .a, .b, .cross_bit(switch_bit), .alpha,
    .out_valid(f_out_valid), .out_ready(f_out_ready), .c(fc), .d(fd)
  );

  // A float gene is taken as soon as the FCM is idle (the FCM keeps its own
  // copy of the operands); its flags wait in f_last_*, and its result moves
  // into the output register when ready. Until then no further gene is taken,
  // so children leave in gene order.
  logic f_last_set, f_last_chrom, f_done;
  assign slot_free   = !out_valid || out_ready;
  assign f_in_valid  = in_valid && gt == GT_FLT && !launched;
  assign in_ready    = !launched && ((gt == GT_FLT) ? f_in_ready : slot_free);
  assign f_done      = launched && f_out_valid && slot_free;
  assign f_out_ready = f_done;
  assign fire        = in_valid && in_ready && gt != GT_FLT;

  // output multiplexer by gene type
  always_comb begin
    unique case (gt)
      GT_BIN:  begin mc = {31'b0, bc}; md = {31'b0, bd}; end
      default: begin mc = ic; md = id; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; launched <= 1'b0; f_last_set <= 1'b0; f_last_chrom <= 1'b0;
      c <= '0; d <= '0; out_gt <= GT_BIN; out_last_in_set <= 1'b0; out_last_in_chrom <= 1'b0;
    end else begin
      if (f_in_valid && f_in_ready) begin
        launched     <= 1'b1;
        f_last_set   <= last_in_set;
        f_last_chrom <= last_in_chrom;
      end
      if (f_done) begin
        launched          <= 1'b0;
        out_valid         <= 1'b1;
        c                 <= fc;
        d                 <= fd;
        out_gt            <= GT_FLT;
        out_last_in_set   <= f_last_set;
        out_last_in_chrom <= f_last_chrom;
      end else if (fire) begin
        out_valid         <= 1'b1;
        c                 <= mc;
        d                 <= md;
        out_gt            <= gt;
        out_last_in_set   <= last_in_set;
        out_last_in_chrom <= last_in_chrom;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(c) && $stable(d));
endmodule
