// tb_chip_indicators: self-checking test of chip_indicators.
// Drives random route writes, cache allocations and indicator sets on a
// 32-word chip with 4 fixed cache words and checks both indicators, the
// refusal of route writes into the fixed part, the wrap of the cache
// indicator and the full flag against a model kept here.
module tb_chip_indicators;
  import tcam_pkg::*;
  localparam int DEPTH = 32, FIXED = 4, MAXR = DEPTH - FIXED;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, wraps = 0, fulls = 0, rejects = 0;
  logic route_wr = 0, set_ind = 0, alloc = 0;
  idx_t route_idx = 0, set_val = 0;
  logic route_reject, full; idx_t alloc_idx, entry_ind, cache_ind;
  chip_indicators #(.DEPTH(DEPTH), .FIXED(FIXED)) dut (.*);
  int e = 0, c = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      automatic int op = $urandom_range(0, 19);
      @(negedge clk);
      route_wr = 0; set_ind = 0; alloc = 0;
      if (op == 0) begin set_ind = 1; set_val = idx_t'($urandom_range(0, DEPTH)); end
      else if (op < 4) begin route_wr = 1; route_idx = idx_t'($urandom_range(0, DEPTH - 1)); end
      else alloc = 1;
      #1;
      check(alloc_idx == idx_t'(c), "alloc_idx");
      check(route_reject == (route_wr && int'(route_idx) >= MAXR), "reject");
      if (route_reject) rejects++;
      if (set_ind) begin e = (int'(set_val) > MAXR) ? MAXR : int'(set_val); c = e; end
      else begin
        if (route_wr && int'(route_idx) < MAXR && int'(route_idx) >= e) e = int'(route_idx) + 1;
        if (alloc) begin c++; if (c >= DEPTH) begin c = e; wraps++; end end
        if (e > c) c = e;
      end
      @(posedge clk); #1;
      check(int'(entry_ind) == e && int'(cache_ind) == c, $sformatf("ind %0d/%0d exp %0d/%0d", entry_ind, cache_ind, e, c));
      check(full == (e >= MAXR), "full");
      if (full) fulls++;
    end
    check(wraps > 0 && fulls > 0 && rejects > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
