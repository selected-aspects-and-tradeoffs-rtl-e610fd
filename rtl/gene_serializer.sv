// gene_serializer: packs a child's gene stream back into 32-bit memory words,
// the inverse of gene_deserializer. Binary genes are collected bit 0 first; a
// word is emitted after 32 bits or after the last gene of a geneset (unused
// upper bits are zero). An integer or float gene is emitted as one word.
// The emitted word carries 'last' when it holds the chromosome's last gene.
// Valid/ready on both sides; a gene that completes a word is accepted only
// when the output register is free. One gene per clock when the output flows.
// The role follows the original design; the packing order is this design's
// choice and matches the de-serializer.
module gene_serializer
  import ga_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [WORD_W-1:0]  gene,
  input  gene_type_e         gt,
  input  logic               last_in_set,
  input  logic               last_in_chrom,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [WORD_W-1:0]  word,
  output logic               last
);
  logic [WORD_W-1:0] acc;
  logic [4:0]        bitpos;
  logic              emit, fire;
  logic [WORD_W-1:0] acc_next;

  assign emit     = (gt != GT_BIN) || bitpos == 5'd31 || last_in_set;
  assign in_ready = !emit || !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign acc_next = acc | (WORD_W'(gene[0]) << bitpos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; bitpos <= '0; out_valid <= 1'b0; word <= '0; last <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        if (emit) begin
          out_valid <= 1'b1;
          word      <= (gt == GT_BIN) ? acc_next : gene;
          last      <= last_in_chrom;
          acc       <= '0;
          bitpos    <= '0;
        end else begin
          acc    <= acc_next;
          bitpos <= bitpos + 1'b1;
        end
      end
    end
  end
endmodule
