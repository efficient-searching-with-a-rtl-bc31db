// tb_tcam_array: self-checking test of tcam_array.
// Fills a 64-word chip with random ternary words, moves the area border and
// checks every search (hit, lowest matching index inside the searched area,
// triggered blocks) against a model computed here from the same words.
module tb_tcam_array;
  import tcam_pkg::*;
  localparam int DEPTH = 64, BLOCKS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0; idx_t wr_idx = 0; tcam_entry_t wr_entry = '0;
  logic srch_en = 0; ip_t srch_key = 0; area_e srch_area = AREA_ROUTE; idx_t boundary = 0;
  logic res_valid, res_hit; idx_t res_idx; logic [BLOCKS-1:0] blk_en;

  tcam_array #(.DEPTH(DEPTH), .BLOCKS(BLOCKS)) dut (.*);

  tcam_entry_t model [DEPTH];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    // write words: short random prefixes so that several words match
    for (int i = 0; i < DEPTH; i++) begin
      automatic int len = $urandom_range(0, 6);
      automatic tcam_entry_t e;
      e.valid = ($urandom_range(0, 9) != 0);
      e.mask  = prefix_mask(PLEN_W'(len));
      e.value = $urandom() & e.mask;
      model[i] = e;
      @(negedge clk); wr_en = 1; wr_idx = idx_t'(i); wr_entry = e;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 600; n++) begin
      automatic int exp_idx = -1;
      automatic logic [BLOCKS-1:0] exp_blk;
      @(negedge clk);
      srch_en = 1; srch_key = $urandom(); srch_area = area_e'($urandom_range(0, 1));
      boundary = idx_t'($urandom_range(0, DEPTH));
      for (int i = 0; i < DEPTH; i++)
        if (exp_idx < 0 && model[i].valid && (((srch_key ^ model[i].value) & model[i].mask) == 0) &&
            ((srch_area == AREA_ROUTE) == (i < int'(boundary)))) exp_idx = i;
      for (int b = 0; b < BLOCKS; b++)
        exp_blk[b] = (srch_area == AREA_ROUTE) ? (b * 8 < int'(boundary)) : ((b + 1) * 8 > int'(boundary));
      @(posedge clk); #1;
      check(res_valid, "valid");
      check(res_hit == (exp_idx >= 0), $sformatf("hit key=%h area=%0d b=%0d", srch_key, srch_area, boundary));
      if (exp_idx >= 0) check(int'(res_idx) == exp_idx, $sformatf("idx %0d exp %0d", res_idx, exp_idx));
      check(blk_en == exp_blk, "blk_en");
    end
    @(negedge clk); srch_en = 0;
    @(posedge clk); #1; check(!res_valid && blk_en == 0, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
