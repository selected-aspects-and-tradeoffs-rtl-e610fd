// ga_pkg: types and constants shared by the stream-based genetic crossover engine.
// A chromosome is described by 16 genesets. Each geneset is one byte of the
// chromosome configuration registers: bits [7:6] give the gene type and bits
// [5:0] the number of genes (0..63) in the set. The type codes follow the
// original design (00 binary, 01 integer, 10 float, 11 terminator); the memory
// layout of genes, the register map and the algorithm codes are this design's own.
package ga_pkg;

  localparam int WORD_W      = 32;  // memory word and integer/float gene width
  localparam int N_SETS      = 16;  // 4 registers x 4 genesets
  localparam int CNT_W       = 6;   // genes per geneset, up to 63
  localparam int GIDX_W      = 10;  // gene index in a chromosome, up to 2^10-1 genes
  localparam int CWORDS_W    = 11;  // words per chromosome, up to 1024 (2^12 bytes)
  localparam int RAND_W      = 16;  // width of random numbers and of alpha (Q0.16)

  typedef enum logic [1:0] {
    GT_BIN  = 2'b00,
    GT_INT  = 2'b01,
    GT_FLT  = 2'b10,
    GT_TERM = 2'b11
  } gene_type_e;

  typedef struct packed {
    gene_type_e         gt;
    logic [CNT_W-1:0]   count;
  } geneset_t;

  // Binary crossover selection (configuration register XOVER bits 1:0)
  typedef enum logic [1:0] {
    BIN_KPOINT  = 2'd0,   // k random cut points, k = 1 gives one-point crossover
    BIN_UNIFORM = 2'd1,   // a fresh random switch decision per gene
    BIN_SHUFFLE = 2'd2,   // a random subset of c genes swapped, c drawn like a cut point
    BIN_RSURR   = 2'd3    // reduced surrogate: k cut points among the genes where the parents differ
  } bin_algo_e;

  // Integer / float crossover selection
  typedef enum logic [1:0] {
    AR_EXCHANGE = 2'd0,   // C/D take A/B or B/A by the cross bit (discrete crossover)
    AR_MEAN     = 2'd1,   // C = D = (A+B)/2                       eq. (1)
    AR_BLEND    = 2'd2,   // C = aA+(1-a)B, D = aB+(1-a)A          eq. (2)
    AR_DIFF     = 2'd3    // C = a(B-A)+A,  D = a(A-B)+B           eq. (3)
  } arith_algo_e;

  typedef struct packed {
    bin_algo_e    bin_algo;
    arith_algo_e  int_algo;
    arith_algo_e  flt_algo;
    logic [3:0]   k;          // number of cut points for k-point crossover
    logic         alpha_rand; // 1: alpha is drawn per gene, 0: alpha from register
    logic         sel_rand;   // 1: parents drawn at random, 0: consecutive pairs
    logic [2:0]   swap_thr;   // uniform crossover swaps when 3 random bits < swap_thr
  } xover_cfg_t;

  // Register map (word addresses of the configuration port)
  localparam logic [3:0] REG_CHROM0    = 4'd0;  // .. REG_CHROM0+3
  localparam logic [3:0] REG_XOVER     = 4'd4;
  localparam logic [3:0] REG_ALPHA_MUT = 4'd5;  // [15:0] alpha, [31:16] mutation threshold
  localparam logic [3:0] REG_POP       = 4'd6;
  localparam logic [3:0] REG_PBASE     = 4'd7;
  localparam logic [3:0] REG_CBASE     = 4'd8;
  localparam logic [3:0] REG_SEED      = 4'd9;  // [15:0] RM seed, [31:16] mutation seed
  localparam logic [3:0] REG_SELSEED   = 4'd10; // parent selection seed
  localparam logic [3:0] REG_PCROSS    = 4'd11; // [16:0] crossover probability * 2^16
  localparam int         N_REGS        = 12;

  // Words a geneset takes in memory: binary genes are packed 32 per word,
  // integer and float genes take one word each; each geneset starts on a word.
  function automatic logic [CWORDS_W-1:0] set_words(geneset_t s);
    if (s.gt == GT_BIN) return CWORDS_W'((32'(s.count) + 31) >> 5);
    else                return CWORDS_W'(s.count);
  endfunction

endpackage
