// ga_config_regs: configuration register file of the crossover engine.
// Registers 0..3 form the chromosome configuration: each 32-bit register holds
// four genesets, one per byte (byte j of register r is geneset 4r+j), with the
// gene type in bits [7:6] and the gene count in bits [5:0]. A terminator
// geneset (type 11) ends the chromosome; without one all 16 sets are used.
// Further registers select the crossover algorithm per gene type, the number of
// cut points k, the uniform swap threshold, alpha, the mutation threshold, the
// crossover probability, the population and the memory base addresses (see
// ga_pkg for the map). From the chromosome configuration the
// block derives, combinationally, the number of genes and of memory words per
// chromosome. Writes take effect on the clock edge; reads are combinational.
// The chromosome register format follows the original design; the other
// registers and their reset values are this design's choice.
module ga_config_regs
  import ga_pkg::*;
#(
  parameter int ADDR_W = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [3:0]            cfg_addr,
  input  logic [31:0]           cfg_wdata,
  output logic [31:0]           cfg_rdata,
  output geneset_t              sets [N_SETS],
  output xover_cfg_t            xcfg,
  output logic [RAND_W-1:0]     alpha,
  output logic [RAND_W-1:0]     mut_thr,
  output logic [31:0]           pop_size,
  output logic [ADDR_W-1:0]     parent_base,
  output logic [ADDR_W-1:0]     child_base,
  output logic [15:0]           rm_seed,
  output logic [15:0]           mut_seed,
  output logic [31:0]           sel_seed,
  output logic [16:0]           p_cross,
  output logic [GIDX_W-1:0]     total_genes,
  output logic [CWORDS_W-1:0]   chrom_words
);
  logic [31:0] regs [N_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_REGS; i++) regs[i] <= '0;
      regs[REG_XOVER]     <= 32'h0004_0100;   // 1-point crossover, uniform swap 4/8
      regs[REG_ALPHA_MUT] <= 32'h0000_8000;   // alpha 0.5, no mutation
      regs[REG_SEED]      <= 32'h1D0F_ACE1;
      regs[REG_SELSEED]   <= 32'h2545_F491;
      regs[REG_PCROSS]    <= 32'h0001_0000;   // always cross
    end else if (cfg_we && 32'(cfg_addr) < N_REGS) begin
      regs[cfg_addr] <= cfg_wdata;
    end
  end

  assign cfg_rdata = (32'(cfg_addr) < N_REGS) ? regs[cfg_addr] : 32'h0;

  always_comb begin
    for (int s = 0; s < N_SETS; s++)
      sets[s] = geneset_t'(regs[s/4][8*(s%4) +: 8]);
  end

  assign xcfg.bin_algo   = bin_algo_e'(regs[REG_XOVER][1:0]);
  assign xcfg.int_algo   = arith_algo_e'(regs[REG_XOVER][3:2]);
  assign xcfg.flt_algo   = arith_algo_e'(regs[REG_XOVER][5:4]);
  assign xcfg.k          = regs[REG_XOVER][11:8];
  assign xcfg.alpha_rand = regs[REG_XOVER][12];
  assign xcfg.sel_rand   = regs[REG_XOVER][13];
  assign xcfg.swap_thr   = regs[REG_XOVER][18:16];
  assign alpha       = regs[REG_ALPHA_MUT][15:0];
  assign mut_thr     = regs[REG_ALPHA_MUT][31:16];
  assign pop_size    = regs[REG_POP];
  assign parent_base = ADDR_W'(regs[REG_PBASE]);
  assign child_base  = ADDR_W'(regs[REG_CBASE]);
  assign rm_seed     = regs[REG_SEED][15:0];
  assign mut_seed    = regs[REG_SEED][31:16];
  assign sel_seed    = regs[REG_SELSEED];
  assign p_cross     = regs[REG_PCROSS][16:0];

  // Totals up to the first terminator
  always_comb begin
    logic ended;
    ended       = 1'b0;
    total_genes = '0;
    chrom_words = '0;
    for (int s = 0; s < N_SETS; s++) begin
      if (sets[s].gt == GT_TERM) ended = 1'b1;
      if (!ended) begin
        total_genes = total_genes + GIDX_W'(sets[s].count);
        chrom_words = chrom_words + set_words(sets[s]);
      end
    end
  end
endmodule
