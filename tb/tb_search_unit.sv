// tb_search_unit: self-checking test of search_unit (chip 2, limit 3).
// The TCAM and SRAM are modelled here: a search hits when bit 0 of the key
// is set, at index key[15:1]; the SRAM returns next hop idx[7:0]^8'h5A.
// Random packages (home or not, various miss counts) are offered with
// random busy cycles; the test checks pops, the search area, the outcome
// (result, feedback or cache-update request), its contents and the
// two-cycle latency.
module tb_search_unit;
  import tcam_pkg::*;
  localparam int ME = 2, LIM = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  logic in_valid = 0, pop, busy = 0; pkt_t in_pkt = '0;
  logic srch_en; ip_t srch_key; area_e srch_area;
  logic res_valid = 0, res_hit = 0; idx_t res_idx = 0;
  logic rda_en; idx_t rda_idx; sram_entry_t rda_data = '0;
  logic out_valid, fb_valid, upd_valid, cache_hit, home_search; result_t out_res; pkt_t fb_pkt;
  idx_t upd_idx; ip_t upd_ip;
  search_unit #(.CHIP_ID(ME), .MISS_LIMIT(LIM)) dut (.*);
  // chip model
  always @(posedge clk) begin
    res_valid <= srch_en;
    res_hit   <= srch_en && srch_key[0];
    res_idx   <= idx_t'(srch_key[15:1]);
    if (rda_en) rda_data <= '{valid: 1'b1, prefix: '0, plen: '0, parent: 1'b0, nh: nh_t'(rda_idx[7:0] ^ 8'h5A)};
  end
  typedef struct { pkt_t p; int t; } exp_t;
  exp_t q[$];
  int n_res = 0, n_fb = 0, n_upd = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // outcome checker
  always @(negedge clk) if (rst_n) begin
    if (out_valid || fb_valid) begin
      exp_t e; bit home, hit; idx_t ix;
      check(q.size() != 0, "unexpected outcome");
      if (q.size() != 0) begin
        e = q.pop_front();
        home = int'(e.p.home) == ME; hit = e.p.ip[0]; ix = idx_t'(e.p.ip[15:1]);
        check(cyc - e.t == 2, "latency");
        if (home || hit) begin
          check(out_valid && !fb_valid && out_res.ts == e.p.ts && out_res.ip == e.p.ip &&
                out_res.found == hit && (!hit || out_res.nh == nh_t'(ix[7:0] ^ 8'h5A)) && !out_res.dropped, "result");
          check(cache_hit == (!home && hit) && home_search == home, "events");
          check(upd_valid == (home && hit && int'(e.p.miss) > LIM), "update request");
          if (upd_valid) check(upd_idx == ix && upd_ip == e.p.ip, "update contents");
          n_res++; if (upd_valid) n_upd++;
        end else begin
          check(fb_valid && !out_valid && fb_pkt == e.p && !upd_valid, "feedback");
          n_fb++;
        end
      end
    end else check(!upd_valid, "stray update");
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk); #2;
      in_valid = $urandom_range(0, 3) != 0;
      busy = $urandom_range(0, 4) == 0;
      in_pkt = '{ip: $urandom(), home: chip_t'($urandom_range(0, 3)), miss: miss_t'($urandom_range(0, 5)), ts: ts_t'(n)};
      #1;
      check(pop == (in_valid && !busy), "pop");
      if (pop) begin
        check(srch_en && srch_key == in_pkt.ip && srch_area == ((int'(in_pkt.home) == ME) ? AREA_ROUTE : AREA_CACHE), "search");
        q.push_back('{p: in_pkt, t: cyc});
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    check(q.size() == 0 && n_res > 0 && n_fb > 0 && n_upd > 0, "all outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
