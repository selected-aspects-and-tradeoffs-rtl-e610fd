// gene_deserializer: turns a parent's stream of 32-bit memory words into genes.
// For a binary geneset the word is consumed one bit per gene, bit 0 first, and
// is popped after bit 31 or after the last gene of the geneset (each geneset
// starts on a new word). Integer and float genes take a whole word each.
// The gene type and the last-in-geneset flag come from the gene set tracker.
// 'gene' is combinational from the word at the head of the input stream;
// 'take' (the crossover stage accepting the gene) updates the bit position and
// pops the word when it is used up. One gene per clock.
// The role of the block follows the original design; the bit order and the
// word alignment of genesets are this design's choice.
module gene_deserializer
  import ga_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart,
  input  gene_type_e         gt,
  input  logic               last_in_set,
  input  logic               word_valid,
  input  logic [WORD_W-1:0]  word,
  output logic               word_pop,
  output logic               gene_valid,
  output logic [WORD_W-1:0]  gene,
  input  logic               take
);
  logic [4:0] bitpos;

  assign gene_valid = word_valid;
  assign gene       = (gt == GT_BIN) ? {31'b0, word[bitpos]} : word;
  assign word_pop   = take && (gt != GT_BIN || bitpos == 5'd31 || last_in_set);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        bitpos <= '0;
    else if (restart)  bitpos <= '0;
    else if (take)     bitpos <= word_pop ? 5'd0 : bitpos + 1'b1;
  end

  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) take |-> word_valid);
endmodule
