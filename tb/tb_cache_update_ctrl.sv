// tb_cache_update_ctrl: self-checking test of cache_update_ctrl.
// Four chips with SRAM contents modelled here (random prefixes, some parent
// prefixes, some empty words). Random refill requests, including ones at the
// edges of the Route Entry Part and on parent prefixes, are issued; the test
// derives the expected cache entries itself (matched word plus neighbours,
// parents skipped, a parent match cached as /32) and checks the writes: only
// to non-home chips, one chip at a time, in chip order, one entry per cycle,
// holding off while the host stalls a chip, and that requests arriving while
// busy are reported as ignored.
module tb_cache_update_ctrl;
  import tcam_pkg::*;
  localparam int NC = 4, ADJ = 10, SD = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req_valid[NC]; idx_t req_idx[NC]; ip_t req_ip[NC]; idx_t entry_ind[NC];
  logic rdb_en[NC]; idx_t rdb_idx; sram_entry_t rdb_data[NC];
  logic wr_en[NC]; chip_wr_t wr; logic wr_stall[NC];
  logic busy, req_ignored, chip_done;
  cache_update_ctrl #(.N_CHIPS(NC), .ADJ(ADJ)) dut (.*);
  sram_entry_t mem[NC][SD];
  always @(posedge clk) for (int c = 0; c < NC; c++) if (rdb_en[c]) rdb_data[c] <= mem[c][rdb_idx];
  typedef struct { int chip; tcam_entry_t t; sram_entry_t s; } wexp_t;
  wexp_t exp_q[$];
  int n_parent = 0, n_stall = 0, n_ign = 0, n_req = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // write checker
  always @(negedge clk) if (rst_n) begin
    automatic int nw = 0;
    for (int c = 0; c < NC; c++) if (wr_en[c]) begin
      nw++;
      check(!wr_stall[c], "write while stalled");
      check(exp_q.size() != 0, "unexpected write");
      if (exp_q.size() != 0) begin
        automatic wexp_t e = exp_q.pop_front();
        check(e.chip == c && wr.op == WR_ALLOC && wr.tentry == e.t && wr.sentry == e.s,
              $sformatf("write chip %0d exp %0d", c, e.chip));
      end
    end
    check(nw <= 1, "one chip at a time");
  end
  initial begin
    for (int c = 0; c < NC; c++) begin
      req_valid[c] = 0; req_idx[c] = 0; req_ip[c] = 0; wr_stall[c] = 0; rdb_data[c] = '0;
      entry_ind[c] = idx_t'($urandom_range(20, SD));
      for (int i = 0; i < SD; i++) begin
        automatic int len = $urandom_range(8, 28);
        mem[c][i] = '{valid: ($urandom_range(0, 7) != 0), prefix: $urandom() & prefix_mask(PLEN_W'(len)),
                      plen: PLEN_W'(len), parent: ($urandom_range(0, 3) == 0), nh: nh_t'($urandom())};
      end
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      automatic int h = $urandom_range(0, NC - 1);
      automatic int ix = (n % 5 == 0) ? 0 : (n % 5 == 1) ? int'(entry_ind[h]) - 1 : $urandom_range(0, int'(entry_ind[h]) - 1);
      automatic ip_t a = mem[h][ix].prefix | ($urandom() & ~prefix_mask(mem[h][ix].plen));
      automatic int lo = (ix - ADJ / 2 < 0) ? 0 : ix - ADJ / 2;
      automatic int hi = (ix + ADJ - ADJ / 2 > int'(entry_ind[h]) - 1) ? int'(entry_ind[h]) - 1 : ix + ADJ - ADJ / 2;
      automatic wexp_t ents[$];
      mem[h][ix].valid = 1;
      for (int j = lo; j <= hi; j++) begin
        automatic sram_entry_t d = mem[h][j];
        automatic wexp_t w;
        if (j == ix) begin
          w.t = '{valid: 1'b1, value: d.parent ? a : d.prefix, mask: d.parent ? '1 : prefix_mask(d.plen)};
          w.s = d; w.s.valid = 1; w.s.parent = 0;
          if (d.parent) begin w.s.prefix = a; w.s.plen = 32; n_parent++; end
          ents.push_back(w);
        end else if (d.valid && !d.parent) begin
          w.t = '{valid: 1'b1, value: d.prefix, mask: prefix_mask(d.plen)};
          w.s = d; w.s.valid = 1; w.s.parent = 0;
          ents.push_back(w);
        end
      end
      for (int c = 0; c < NC; c++) if (c != h) foreach (ents[k]) begin
        automatic wexp_t w = ents[k]; w.chip = c; exp_q.push_back(w);
      end
      @(negedge clk);
      req_valid[h] = 1; req_idx[h] = idx_t'(ix); req_ip[h] = a; n_req++;
      @(negedge clk); req_valid[h] = 0;
      // while busy: random host stalls and stray requests that must be ignored
      while (busy) begin
        automatic int s = $urandom_range(0, 5);
        for (int c = 0; c < NC; c++) wr_stall[c] = (c == s);
        if ($urandom_range(0, 9) == 0) begin
          automatic int r = (h + 1) % NC;
          req_valid[r] = 1; req_idx[r] = 0; #1;
          check(req_ignored, "ignored flag"); n_ign++;
        end
        if (s < NC) n_stall++;
        @(negedge clk);
        for (int c = 0; c < NC; c++) begin req_valid[c] = 0; wr_stall[c] = 0; end
      end
      check(exp_q.size() == 0, $sformatf("missing writes %0d", exp_q.size()));
      exp_q.delete();
    end
    check(n_parent > 0 && n_stall > 0 && n_ign > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
