// tb_data_write_module: sends two child word streams of random length per
// pair, with random gaps and random write-port back-pressure, and checks that
// every accepted write goes to child_base + 2p*chrom_words + i (child C) or
// the next chromosome slot (child D) with the sent data, and that the done
// flags rise only after the word marked last and stay until the next start.
module tb_data_write_module;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] pair_idx, child_base;
  logic [CWORDS_W-1:0] chrom_words;
  logic c_valid, c_ready, c_last, d_valid, d_ready, d_last;
  logic [31:0] c_word, d_word;
  logic wrc_valid, wrc_ready, wrd_valid, wrd_ready, c_done, d_done;
  logic [31:0] wrc_addr, wrc_data, wrd_addr, wrd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_write_module dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  function automatic logic [31:0] val(int ch, int i);
    return 32'(ch * 32'h0100_0000 + i * 32'h9E37_79B1 + pair_idx);
  endfunction

  always @(negedge clk) begin wrc_ready = 1'($urandom); wrd_ready = 1'($urandom); end

  initial begin
    c_valid = 0; d_valid = 0; c_last = 0; d_last = 0; c_word = 0; d_word = 0;
    pair_idx = 0; child_base = 0; chrom_words = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      int ic, id;
      logic [31:0] slot;
      pair_idx    = $urandom_range(0, 100000);
      child_base  = $urandom;
      chrom_words = CWORDS_W'($urandom_range(1, 30));
      slot        = child_base + 2 * pair_idx * chrom_words;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      chk("c_done cleared", c_done, 0);
      chk("d_done cleared", d_done, 0);
      ic = 0; id = 0;
      while (ic < chrom_words || id < chrom_words) begin
        @(negedge clk);
        chk("c_done early", c_done, 0 || ic == chrom_words);
        chk("d_done early", d_done, 0 || id == chrom_words);
        c_valid = (ic < chrom_words) && 1'($urandom);
        d_valid = (id < chrom_words) && 1'($urandom);
        c_word = val(1, ic); c_last = (ic == chrom_words - 1);
        d_word = val(2, id); d_last = (id == chrom_words - 1);
        #1;
        if (c_valid && wrc_ready) begin
          chk("c addr", wrc_addr, 32'(slot + ic)); chk("c data", wrc_data, val(1, ic)); ic++;
        end
        if (d_valid && wrd_ready) begin
          chk("d addr", wrd_addr, 32'(slot + chrom_words + id)); chk("d data", wrd_data, val(2, id)); id++;
        end
        chk("c ready", c_ready, wrc_ready);
        chk("d ready", d_ready, wrd_ready);
      end
      @(negedge clk); c_valid = 0; d_valid = 0;
      chk("c_done", c_done, 1);
      chk("d_done", d_done, 1);
      @(negedge clk);
      chk("c_done held", c_done, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
