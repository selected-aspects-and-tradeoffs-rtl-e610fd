// tb_mutation_module: passes random child pairs through the mutation stage at
// three thresholds. With threshold 0 nothing may change. Otherwise each child
// must either be unchanged (flag low) or differ in exactly one bit (flag
// high): bit 0 for a binary gene, any bit for integer and float genes. The
// observed mutation rate must match the threshold (about 5 % and nearly
// 100 %) and the flipped bit positions must spread over the word. Flags and
// gene types must travel with the data; back-pressure is random.
module tb_mutation_module;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0, seed_load = 0;
  logic [15:0] seed = 16'h5A5A, mut_thr;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] c_in, d_in, c_out, d_out;
  gene_type_e gt_in, gt_out;
  logic last_in_set_in, last_in_chrom_in, last_in_set_out, last_in_chrom_out;
  logic [1:0] mutated;
  int checks = 0, failures = 0;
  int n_out, n_mut;
  bit [31:0] positions;

  always #5 clk = ~clk;

  mutation_module dut (.*);

  typedef struct { logic [31:0] c, d; gene_type_e gt; logic ls, lc; } item_t;
  item_t sent[$];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  task automatic chk_one(string what, logic [31:0] got, logic [31:0] orig, logic flag, gene_type_e t);
    logic [31:0] diff;
    diff = got ^ orig;
    if (flag) begin
      chk({what, " one bit"}, $countones(diff), 1);
      if (t == GT_BIN) chk({what, " bit0"}, diff, 1);
      else for (int i = 0; i < 32; i++) if (diff[i]) positions[i] = 1'b1;
      n_mut++;
    end else chk({what, " unchanged"}, diff, 0);
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    item_t it;
    it = sent.pop_front();
    chk("gt", gt_out, it.gt);
    chk("ls", last_in_set_out, it.ls);
    chk("lc", last_in_chrom_out, it.lc);
    chk_one("c", c_out, it.c, mutated[0], it.gt);
    chk_one("d", d_out, it.d, mutated[1], it.gt);
    n_out += 2;
  end
  always @(negedge clk) out_ready = 1'($urandom_range(0, 3) != 0);

  initial begin
    in_valid = 0; mut_thr = 0; c_in = 0; d_in = 0; gt_in = GT_BIN; last_in_set_in = 0; last_in_chrom_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_load = 1; @(negedge clk); seed_load = 0;
    for (int run = 0; run < 3; run++) begin
      n_out = 0; n_mut = 0; positions = 0;
      mut_thr = (run == 0) ? 16'd0 : (run == 1) ? 16'd3277 : 16'hFFFF;
      for (int i = 0; i < 4000; ) begin
        item_t it;
        @(negedge clk);
        it.c = $urandom; it.d = $urandom; it.gt = gene_type_e'($urandom_range(0, 2));
        if (it.gt == GT_BIN) begin it.c &= 1; it.d &= 1; end
        it.ls = 1'($urandom); it.lc = 1'($urandom);
        in_valid = 1'($urandom);
        c_in = it.c; d_in = it.d; gt_in = it.gt; last_in_set_in = it.ls; last_in_chrom_in = it.lc;
        #1;
        if (in_valid && in_ready) begin sent.push_back(it); i++; end
      end
      @(negedge clk); in_valid = 0;
      repeat (10) @(negedge clk);
      chk("all out", n_out, 8000);
      case (run)
        0: chk("no mutation", n_mut, 0);
        1: chk("rate about 5%", n_mut > 280 && n_mut < 520, 1);
        default: begin
          chk("rate about 100%", n_mut > 7950, 1);
          chk("bit positions spread", positions, 32'hFFFF_FFFF);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
