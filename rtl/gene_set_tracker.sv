// gene_set_tracker: Gene Set Tracker (GST) of the crossover engine.
// Three counters walk a chromosome gene by gene: the current gene inside its
// geneset (CG), the current geneset (CGS) and the gene index in the chromosome.
// The gene type (GT) is that of the current geneset. 'restart' (one cycle)
// places the tracker on the first gene of the first non-empty geneset; each
// 'advance' moves to the next gene, skipping empty genesets, and the walk ends
// at a terminator geneset or after the 16th set ('active' falls). Flags tell
// whether the current gene is the last of its geneset and of the chromosome.
// Outputs are registered counters plus combinational decode of the config.
// The counters and their outputs follow the original design; skipping empty
// genesets in the same cycle is this design's choice.
module gene_set_tracker
  import ga_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  geneset_t           sets [N_SETS],
  input  logic               restart,
  input  logic               advance,
  output logic               active,
  output logic [CNT_W-1:0]   cg,
  output logic [3:0]         cgs,
  output gene_type_e         gt,
  output logic [GIDX_W-1:0]  gene_idx,
  output logic               last_in_set,
  output logic               last_in_chrom
);
  // First usable geneset at or after 'from' (stops at a terminator)
  function automatic logic [4:0] next_set(geneset_t st [N_SETS], int from);
    logic [4:0] r;
    logic       stop;
    r    = 5'd16;
    stop = 1'b0;
    for (int i = 0; i < N_SETS; i++) begin
      if (i >= from && !stop) begin
        if (st[i].gt == GT_TERM) stop = 1'b1;
        else if (st[i].count != '0) begin
          r    = 5'(i);
          stop = 1'b1;
        end
      end
    end
    return r;
  endfunction

  logic [4:0] first_set, following_set;

  always_comb begin
    first_set     = next_set(sets, 0);
    following_set = next_set(sets, int'(cgs) + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      cg       <= '0;
      cgs      <= '0;
      gene_idx <= '0;
    end else if (restart) begin
      active   <= !first_set[4];
      cg       <= '0;
      cgs      <= first_set[3:0];
      gene_idx <= '0;
    end else if (advance && active) begin
      gene_idx <= gene_idx + 1'b1;
      if (!last_in_set) begin
        cg <= cg + 1'b1;
      end else begin
        cg     <= '0;
        cgs    <= following_set[3:0];
        active <= !following_set[4];
      end
    end
  end

  assign gt            = active ? sets[cgs].gt : GT_TERM;
  assign last_in_set   = (cg == sets[cgs].count - 1'b1);
  assign last_in_chrom = last_in_set && following_set[4];
endmodule
