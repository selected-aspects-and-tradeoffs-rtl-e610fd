// data_write_module: Data Write Module (DWM) of the crossover engine.
// Writes the two children of the current parent pair to external memory. On
// 'start' (one cycle) it sets the write addresses of child 2p (C) and child
// 2p+1 (D) of pair p: child_base + (2p)*chrom_words and the next chromosome
// slot. Each child word stream is forwarded to its own write port (valid/
// addr/data, accepted when ready) and the address advances per accepted
// word. c_done/d_done rise after the word marked 'last' has been written and
// stay high until the next 'start'. Combinational pass-through of the data,
// registered addresses and flags.
// That the DWM writes the children follows the original design; the child
// placement and the port protocol are this design's choice.
module data_write_module
  import ga_pkg::*;
#(
  parameter int ADDR_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [31:0]          pair_idx,
  input  logic [ADDR_W-1:0]    child_base,
  input  logic [CWORDS_W-1:0]  chrom_words,
  // child word streams
  input  logic                 c_valid,
  output logic                 c_ready,
  input  logic [WORD_W-1:0]    c_word,
  input  logic                 c_last,
  input  logic                 d_valid,
  output logic                 d_ready,
  input  logic [WORD_W-1:0]    d_word,
  input  logic                 d_last,
  // write ports
  output logic                 wrc_valid,
  output logic [ADDR_W-1:0]    wrc_addr,
  output logic [WORD_W-1:0]    wrc_data,
  input  logic                 wrc_ready,
  output logic                 wrd_valid,
  output logic [ADDR_W-1:0]    wrd_addr,
  output logic [WORD_W-1:0]    wrd_data,
  input  logic                 wrd_ready,
  output logic                 c_done,
  output logic                 d_done
);
  logic [ADDR_W-1:0] slot;
  assign slot = child_base + ADDR_W'(64'({pair_idx[30:0], 1'b0}) * 64'(chrom_words));

  assign wrc_valid = c_valid;
  assign wrc_data  = c_word;
  assign c_ready   = wrc_ready;
  assign wrd_valid = d_valid;
  assign wrd_data  = d_word;
  assign d_ready   = wrd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wrc_addr <= '0; wrd_addr <= '0; c_done <= 1'b0; d_done <= 1'b0;
    end else if (start) begin
      wrc_addr <= slot;
      wrd_addr <= slot + ADDR_W'(chrom_words);
      c_done   <= 1'b0;
      d_done   <= 1'b0;
    end else begin
      if (c_valid && wrc_ready) begin
        wrc_addr <= wrc_addr + 1'b1;
        if (c_last) c_done <= 1'b1;
      end
      if (d_valid && wrd_ready) begin
        wrd_addr <= wrd_addr + 1'b1;
        if (d_last) d_done <= 1'b1;
      end
    end
  end
endmodule
