// tb_tcam_chip: self-checking test of tcam_chip (32 words, 4 fixed cache
// words, 4 blocks). Random route, cache, allocating and indicator-setting
// writes are applied to the chip and to a model kept here; between writes,
// random home and cache searches check hit, index and the next hop read
// from the SRAM, and the refusal of route writes into the fixed part.
module tb_tcam_chip;
  import tcam_pkg::*;
  localparam int D = 32, F = 4, B = 4, MAXR = D - F;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_rej = 0, n_hit_r = 0, n_hit_c = 0;
  logic wr_en = 0, wr_reject; chip_wr_t wr = '0;
  logic srch_en = 0, res_valid, res_hit; ip_t srch_key = 0; area_e srch_area = AREA_ROUTE; idx_t res_idx;
  logic [B-1:0] blk_en;
  logic rda_en = 0, rdb_en = 0; idx_t rda_idx = 0, rdb_idx = 0; sram_entry_t rda_data, rdb_data;
  idx_t entry_ind, cache_ind; logic full;
  tcam_chip #(.DEPTH(D), .FIXED(F), .BLOCKS(B)) dut (.*);
  tcam_entry_t mt[D]; sram_entry_t ms[D]; int e = 0, c = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < D; i++) begin mt[i] = '0; ms[i] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      wr_en = 0; srch_en = 0; rda_en = 0;
      if ($urandom_range(0, 2) == 0) begin
        automatic int len = $urandom_range(0, 4);
        automatic int op = $urandom_range(0, 9);
        automatic int at;
        wr_en = 1;
        wr.op = (op < 4) ? WR_ROUTE : (op < 6) ? WR_CACHE : (op < 9) ? WR_ALLOC : WR_SETIND;
        wr.idx = idx_t'((wr.op == WR_SETIND) ? $urandom_range(0, 12) : $urandom_range(0, D - 1));
        wr.tentry = '{valid: 1'b1, value: $urandom() & prefix_mask(PLEN_W'(len)), mask: prefix_mask(PLEN_W'(len))};
        wr.sentry = '{valid: 1'b1, prefix: wr.tentry.value, plen: PLEN_W'(len), parent: 1'b0, nh: nh_t'($urandom())};
        #1;
        check(wr_reject == (wr.op == WR_ROUTE && int'(wr.idx) >= MAXR), "reject");
        at = -1;
        case (wr.op)
          WR_ROUTE: if (int'(wr.idx) < MAXR) begin at = int'(wr.idx); if (at >= e) e = at + 1; end else n_rej++;
          WR_CACHE: at = int'(wr.idx);
          WR_ALLOC: begin at = c; c++; if (c >= D) c = e; end
          default: begin e = int'(wr.idx); c = e; end
        endcase
        if (e > c) c = e;
        if (at >= 0) begin mt[at] = wr.tentry; ms[at] = wr.sentry; end
        @(posedge clk); #1;
        check(int'(entry_ind) == e && int'(cache_ind) == c && full == (e >= MAXR), "indicators");
      end else begin
        automatic int x = -1;
        srch_en = 1; srch_key = $urandom(); srch_area = area_e'($urandom_range(0, 1));
        for (int i = 0; i < D; i++)
          if (x < 0 && mt[i].valid && ((srch_key ^ mt[i].value) & mt[i].mask) == 0 &&
              ((srch_area == AREA_ROUTE) == (i < e))) x = i;
        @(posedge clk); #1;
        check(res_valid && res_hit == (x >= 0) && (x < 0 || int'(res_idx) == x), "search");
        if (x >= 0) begin
          if (srch_area == AREA_ROUTE) n_hit_r++; else n_hit_c++;
          @(negedge clk); srch_en = 0; rda_en = 1; rda_idx = res_idx; rdb_en = 1; rdb_idx = res_idx;
          @(posedge clk); #1;
          check(rda_data.nh == ms[x].nh && rdb_data.nh == ms[x].nh && rda_data.valid, "sram");
        end
      end
    end
    check(n_rej > 0 && n_hit_r > 0 && n_hit_c > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
