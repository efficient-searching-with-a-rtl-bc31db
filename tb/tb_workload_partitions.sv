// tb_workload_partitions: the two evaluated table sizes on the default
// engine (4 chips x 32768 words, 3276 fixed cache words).
//
// Phase "initial state": partitions of 16745, 16745, 16745 and 16747 routes
// with the range boundaries of that experiment; about half of every chip is
// cache, and each cache is pre-filled with 4000 routes of other partitions.
// Phase "TCAM full state" (after a reset): partitions of 29491, 29491, 29491
// and 29492 routes with that experiment's boundaries. Chip 3 then reaches
// its largest allowed partition and must raise reconstruct_req; the others
// must not.
//
// The real route tables are not available, so each partition is a set of
// disjoint /24 routes spread evenly over its range: route k of chip c is
// low_c + k*stride_c*256. Next hops are a hash of (c, k). Traffic is 85 %
// from 32 hot routes and 15 % from any route. Every result is checked
// against the arithmetic reference; the cache hit rate and the results per
// cycle of the last third of each phase are printed. The random 15 % can
// almost never hit a cache, so the cache hit rate of this mix stays near
// 0.8; the checks ask for a cache hit rate of at least 0.7 and a search
// success rate (home searches plus cache hits over all searches) of 0.85.
module tb_workload_partitions;
  import tcam_pkg::*;
  localparam int NC = 4, L = 4;
  localparam int CYCLES = 6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic in_valid[L]; ip_t in_ip[L]; logic in_ready;
  logic out_valid[L]; result_t out_res[L];
  logic host_we = 0, host_reject; chip_t host_chip = 0; chip_wr_t host_wr = '0;
  logic cfg_we = 0; chip_t cfg_range = 0, cfg_chip = 0; ip_t cfg_low = 0, cfg_high = 0;
  idx_t entry_ind[NC], cache_ind[NC]; logic reconstruct_req; logic [7:0] blk_en[NC];
  logic chip_active[NC]; logic upd_busy;

  lookup_engine dut (.*);

  ip_t lo[NC], hi[NC]; int sz[NC], stride[NC];

  function automatic ip_t ip4(int a, int b, int c, int d); return {8'(a), 8'(b), 8'(c), 8'(d)}; endfunction
  function automatic nh_t nh_of(int c, int k); return nh_t'((c * 37 + k * 13 + (k >> 8)) % 251 + 1); endfunction
  function automatic ip_t route_ip(int c, int k); return lo[c] + ip_t'(k * stride[c]) * 256; endfunction
  // reference lookup: {found, nh}
  function automatic logic [NH_W:0] ref_lookup(ip_t a);
    for (int c = 0; c < NC; c++) if (a >= lo[c] && a <= hi[c]) begin
      longint off = (longint'(a) - longint'(lo[c])) >> 8;
      if (off % stride[c] == 0 && off / stride[c] < sz[c]) return {1'b1, nh_of(c, int'(off / stride[c]))};
      return '0;
    end
    return '0;
  endfunction

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  task automatic wr(int chip, wr_op_e op, int idx, int c, int k);
    @(negedge clk);
    host_we = 1; host_chip = chip_t'(chip); host_wr.op = op; host_wr.idx = idx_t'(idx);
    host_wr.tentry = '{valid: 1'b1, value: route_ip(c, k), mask: prefix_mask(6'd24)};
    host_wr.sentry = '{valid: 1'b1, prefix: route_ip(c, k), plen: 6'd24, parent: 1'b0, nh: nh_of(c, k)};
    @(posedge clk); #1 host_we = 0;
  endtask

  // result checking
  ip_t sent[$];
  int n_drop = 0, n_found = 0, n_res = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    for (int l = 0; l < L; l++) if (out_valid[l]) begin
      automatic ip_t a;
      automatic logic [NH_W:0] r;
      check(sent.size() != 0, "result without request");
      if (sent.size() != 0) begin
        a = sent.pop_front();
        r = ref_lookup(a);
        check(out_res[l].ip == a, "order");
        if (out_res[l].dropped) n_drop++;
        else begin
          check(out_res[l].found == r[NH_W] && (!r[NH_W] || out_res[l].nh == r[NH_W-1:0]),
                $sformatf("lookup %h: got %0d/%0d exp %0d/%0d", a, out_res[l].found, out_res[l].nh, r[NH_W], r[NH_W-1:0]));
          if (r[NH_W]) n_found++;
        end
        n_res++;
      end
    end
  end

  // search statistics
  bit meas = 0; int m_ok = 0, m_all = 0, m_cache_hit = 0, m_cache_all = 0, m_res0 = 0;
  always @(posedge clk) if (rst_n && meas) begin
    for (int c = 0; c < NC; c++) begin
      if (dut.su_home[c] || dut.su_cache_hit[c]) m_ok++;
      if (dut.su_home[c] || dut.su_cache_hit[c] || dut.fb_in_valid[c]) m_all++;
      if (dut.su_cache_hit[c]) m_cache_hit++;
      if (dut.su_cache_hit[c] || dut.fb_in_valid[c]) m_cache_all++;
    end
  end

  task automatic load(string name);
    for (int c = 0; c < NC; c++) begin
      @(negedge clk); cfg_we = 1; cfg_range = chip_t'(c); cfg_low = lo[c]; cfg_high = hi[c]; cfg_chip = chip_t'(c);
      stride[c] = int'(((longint'(hi[c]) - longint'(lo[c]) + 1) >> 8) / sz[c]);
    end
    @(negedge clk); cfg_we = 0;
    for (int c = 0; c < NC; c++) begin
      for (int k = 0; k < sz[c]; k++) wr(c, WR_ROUTE, k, c, k);
      check(int'(entry_ind[c]) == sz[c], $sformatf("%s: entry indicator of chip %0d", name, c));
    end
  endtask

  task automatic traffic(string name);
    int hc[32], hk[32];
    int t0, r0;
    for (int h = 0; h < 32; h++) begin hc[h] = $urandom_range(0, NC - 1); hk[h] = $urandom_range(0, sz[hc[h]] - 1); end
    for (int n = 0; n < CYCLES; n++) begin
      if (n == CYCLES * 2 / 3) begin meas = 1; m_ok = 0; m_all = 0; m_cache_hit = 0; m_cache_all = 0; r0 = n_res; t0 = cyc; end
      @(negedge clk);
      for (int l = 0; l < L; l++) begin
        automatic int c, k;
        if ($urandom_range(0, 99) < 85) begin automatic int h = $urandom_range(0, 31); c = hc[h]; k = hk[h]; end
        else begin c = $urandom_range(0, NC - 1); k = $urandom_range(0, sz[c] - 1); end
        in_valid[l] = 1; in_ip[l] = route_ip(c, k) | ip_t'($urandom_range(0, 255));
      end
      #1;
      if (in_ready) for (int l = 0; l < L; l++) sent.push_back(in_ip[l]);
      @(posedge clk); #1;
      for (int l = 0; l < L; l++) in_valid[l] = 0;
    end
    meas = 0;
    repeat (200) @(negedge clk);
    check(sent.size() == 0, "all results delivered");
    $display("EV %s: cache hit rate %0.3f, search success %0.3f, %0.2f results per cycle, %0d dropped",
             name, real'(m_cache_hit) / real'(m_cache_all), real'(m_ok) / real'(m_all),
             real'(n_res - r0) / real'(cyc - t0), n_drop);
    check(real'(m_cache_hit) / real'(m_cache_all) >= 0.7, $sformatf("%s: cache hit rate", name));
    check(real'(m_ok) / real'(m_all) >= 0.85, $sformatf("%s: search success rate", name));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) begin in_valid[l] = 0; in_ip[l] = 0; end
    // ---------------- initial state ----------------
    lo[0] = ip4(0, 0, 0, 0);       hi[0] = ip4(70, 89, 255, 255);     sz[0] = 16745;
    lo[1] = ip4(70, 90, 0, 0);     hi[1] = ip4(128, 56, 78, 255);     sz[1] = 16745;
    lo[2] = ip4(128, 56, 79, 0);   hi[2] = ip4(192, 65, 132, 255);    sz[2] = 16745;
    lo[3] = ip4(192, 65, 133, 0);  hi[3] = ip4(255, 255, 255, 255);   sz[3] = 16747;
    repeat (3) @(posedge clk); rst_n = 1;
    load("initial state");
    check(!reconstruct_req, "initial state: no chip full");
    // pre-fill each cache with routes of the other partitions
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < 4000; i++) begin
        automatic int oc = (c + 1 + i % 3) % NC;
        wr(c, WR_CACHE, sz[c] + i, oc, (i / 3) * 4);
      end
    traffic("initial state");
    // ---------------- TCAM full state ----------------
    @(negedge clk); rst_n = 0; repeat (3) @(negedge clk); rst_n = 1;
    lo[0] = ip4(0, 0, 0, 0);         hi[0] = ip4(65, 156, 220, 255);    sz[0] = 29491;
    lo[1] = ip4(65, 156, 221, 0);    hi[1] = ip4(112, 114, 255, 255);   sz[1] = 29491;
    lo[2] = ip4(112, 115, 0, 0);     hi[2] = ip4(145, 186, 158, 255);   sz[2] = 29491;
    lo[3] = ip4(145, 186, 159, 0);   hi[3] = ip4(255, 255, 255, 255);   sz[3] = 29492;
    load("TCAM full state");
    @(posedge clk); #1;
    check(reconstruct_req && dut.chip_full[3] && !dut.chip_full[0] && !dut.chip_full[1] && !dut.chip_full[2],
          "TCAM full state: only chip 3 is full");
    traffic("TCAM full state");
    $display("results=%0d found=%0d dropped=%0d", n_res, n_found, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
