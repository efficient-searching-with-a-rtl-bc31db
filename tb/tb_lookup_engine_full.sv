// tb_lookup_engine_full: the end-to-end test of tb_lookup_engine run on the
// engine with all its default parameters (4 chips of 32768 words, 3276 fixed
// cache words, FIFOs of 10, miss limit 3, 10 neighbours per refill), with a
// shorter bursty phase. The cache-indicator wrap is not expected here: the
// refills of this run do not fill a 29K-word cache area.
module tb_lookup_engine_full;
  import tcam_pkg::*;
  localparam int NC = 4, L = 4, D = 32768, F = 3276, BK = 8, FD = 10, LIM = 3, ADJ = 10;
  localparam int NPFX = 18;          // base prefixes per range
  localparam int BURST_CYCLES = 1500;
  localparam int MAXR = D - F;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic in_valid[L]; ip_t in_ip[L]; logic in_ready;
  logic out_valid[L]; result_t out_res[L];
  logic host_we = 0, host_reject; chip_t host_chip = 0; chip_wr_t host_wr = '0;
  logic cfg_we = 0; chip_t cfg_range = 0, cfg_chip = 0; ip_t cfg_low = 0, cfg_high = 0;
  idx_t entry_ind[NC], cache_ind[NC]; logic reconstruct_req; logic [BK-1:0] blk_en[NC];
  logic chip_active[NC]; logic upd_busy;

  lookup_engine dut (.*);

  // ---------------- route table model ----------------
  typedef struct { ip_t p; int len; nh_t nh; } route_t;
  route_t rt[$];
  ip_t rlo[NC], rhi[NC];

  function automatic ip_t msk(int len); return prefix_mask(PLEN_W'(len)); endfunction
  function automatic bit covers(route_t r, ip_t a); return ((a ^ r.p) & msk(r.len)) == 0; endfunction
  function automatic bit is_parent(int i);
    foreach (rt[j]) if (j != i && rt[j].len > rt[i].len && covers(rt[i], rt[j].p)) return 1;
    return 0;
  endfunction
  function automatic int lpm(ip_t a);
    int best = -1;
    foreach (rt[j]) if (covers(rt[j], a) && (best < 0 || rt[j].len > rt[best].len)) best = j;
    return best;
  endfunction
  function automatic bit overlaps(route_t r, int c);
    ip_t last = r.p | ~msk(r.len);
    return !(last < rlo[c] || r.p > rhi[c]);
  endfunction

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // ---------------- host access ----------------
  task automatic host_write(int chip, wr_op_e op, int idx, int r, bit valid);
    @(negedge clk);
    host_we = 1; host_chip = chip_t'(chip);
    host_wr.op = op; host_wr.idx = idx_t'(idx);
    if (r >= 0) begin
      host_wr.tentry = '{valid: valid, value: rt[r].p, mask: msk(rt[r].len)};
      host_wr.sentry = '{valid: valid, prefix: rt[r].p, plen: PLEN_W'(rt[r].len),
                         parent: is_parent(r), nh: rt[r].nh};
    end else begin
      host_wr.tentry = '0; host_wr.sentry = '0;
    end
    #1 last_reject = host_reject;
    @(posedge clk); #1;
    host_we = 0;
  endtask

  int part_n[NC];
  logic last_reject = 0;
  task automatic load_partitions();
    for (int c = 0; c < NC; c++) begin
      int ids[$];
      foreach (rt[j]) if (overlaps(rt[j], c)) ids.push_back(j);
      ids.sort() with (-rt[item].len);
      part_n[c] = ids.size();
      check(part_n[c] <= MAXR, "partition fits");
      foreach (ids[k]) host_write(c, WR_ROUTE, k, ids[k], 1);
      check(int'(entry_ind[c]) == part_n[c] && int'(cache_ind[c]) == part_n[c], "entry indicator after load");
    end
    // initial cache fill: non-parent routes of other partitions
    for (int c = 0; c < NC; c++) begin
      int k = 0;
      foreach (rt[j]) if (k < 6 && !overlaps(rt[j], c) && !is_parent(j)) begin
        host_write(c, WR_CACHE, part_n[c] + k, j, 1); k++;
      end
    end
  endtask

  // ---------------- traffic and result checking ----------------
  ip_t sent[$];
  int n_out = 0, n_drop = 0, n_found = 0;
  int win_start = 0, win_results = 0; bit win_on = 0;
  bit stall_in = 0;
  int win_srch = 0, win_ok = 0; bit win_cnt = 0;

  always @(posedge clk) if (rst_n) begin
    #1;
    for (int l = 0; l < L; l++) if (out_valid[l]) begin
      ip_t a;
      int b;
      check(sent.size() != 0, "result without request");
      if (sent.size() != 0) begin
        a = sent.pop_front();
        check(out_res[l].ip == a, $sformatf("order: got %h exp %h", out_res[l].ip, a));
        if (out_res[l].dropped) n_drop++;
        else begin
          b = lpm(a);
          check(out_res[l].found == (b >= 0) && (b < 0 || out_res[l].nh == rt[b].nh),
                $sformatf("lookup %h found %0d nh %0d exp %0d", a, out_res[l].found, out_res[l].nh, b));
          if (b >= 0) n_found++;
        end
      end
      n_out++;
      if (win_on) win_results++;
    end
  end

  // mechanism counters
  int ev_cache_hit = 0, ev_feedback = 0, ev_forced = 0, ev_home_tie = 0, ev_random = 0,
      ev_drop = 0, ev_refill = 0, ev_wrap = 0, ev_backpressure = 0, ev_reorder = 0,
      ev_cache_raise = 0, ev_full = 0, ev_pd_route = 0, ev_pd_cache = 0, ev_paused = 0,
      ev_req_ignored = 0;
  idx_t prev_cind[NC];
  logic paused[NC], wrapev[NC];
  for (genvar c = 0; c < NC; c++) begin : g_mon
    assign paused[c] = dut.g_chip[c].busy && dut.g_chip[c].f_valid;
    assign wrapev[c] = dut.g_chip[c].u_chip.alloc && (int'(cache_ind[c]) + 1 >= D);
  end
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      if (dut.su_cache_hit[c]) ev_cache_hit++;
      if (win_cnt && (dut.su_cache_hit[c] || dut.su_home[c])) win_ok++;
      if (win_cnt && (dut.su_cache_hit[c] || dut.su_home[c] || dut.fb_in_valid[c])) win_srch++;
      if (dut.fb_in_valid[c]) ev_feedback++;
      if (wrapev[c]) ev_wrap++;
      prev_cind[c] = cache_ind[c];
      if (paused[c]) ev_paused++;
      if (chip_active[c] && blk_en[c] != '1) begin
        if (blk_en[c][0]) ev_pd_route++; else ev_pd_cache++;
      end
      if (dut.su_out_valid[c] && dut.su_out_res[c].ts != dut.rob_head) ev_reorder++;
    end
    for (int p = 0; p < NC + L; p++) if (dut.lb_valid[p]) begin
      if (dut.lb_forced[p]) ev_forced++;
      else if (dut.lb_rand[p]) ev_random++;
      else if (dut.lb_pkt[p].home == dut.lb_dest[p]) ev_home_tie++;
      if (dut.drop_valid[p]) ev_drop++;
    end
    if (dut.cu_chip_done) ev_refill++;
    if (dut.cu_ignored) ev_req_ignored++;
    if (reconstruct_req) ev_full++;
  end

  // drive one cycle of lanes; returns the number accepted
  task automatic drive(input ip_t a[L], input bit v[L]);
    @(negedge clk);
    for (int l = 0; l < L; l++) begin in_valid[l] = v[l]; in_ip[l] = a[l]; end
    #1;
    if (!in_ready) begin
      if (v[0] || v[1] || v[2] || v[3]) ev_backpressure++;
    end else for (int l = 0; l < L; l++) if (v[l]) sent.push_back(a[l]);
    @(posedge clk);
    #1;
    for (int l = 0; l < L; l++) in_valid[l] = 0;
  endtask

  task automatic idle(int n);
    @(negedge clk); for (int l = 0; l < L; l++) in_valid[l] = 0;
    repeat (n) @(negedge clk);
  endtask

  function automatic ip_t rand_in_range(int c);
    longint span = longint'(rhi[c]) - longint'(rlo[c]) + 1;
    return ip_t'(longint'(rlo[c]) + (longint'($urandom()) % span));
  endfunction

  // pick an address matched by route r (random host part)
  function automatic ip_t addr_of(int r);
    return rt[r].p | ($urandom() & ~msk(rt[r].len));
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ip_t a[L]; bit v[L];
    int t0, hot[4], new_r;
    for (int l = 0; l < L; l++) begin in_valid[l] = 0; in_ip[l] = 0; end
    for (int c = 0; c < NC; c++) prev_cind[c] = 0;
    // ranges: the TCAM-full partition boundaries, mapped to chips in reverse
    rlo[0] = 32'h00000000;                     rhi[0] = {8'd65, 8'd156, 8'd220, 8'd255};
    rlo[1] = {8'd65, 8'd156, 8'd221, 8'd0};    rhi[1] = {8'd112, 8'd114, 8'd255, 8'd255};
    rlo[2] = {8'd112, 8'd115, 8'd0, 8'd0};     rhi[2] = {8'd145, 8'd186, 8'd158, 8'd255};
    rlo[3] = {8'd145, 8'd186, 8'd159, 8'd0};   rhi[3] = 32'hFFFFFFFF;
    // route table: NPFX per range, a third of them with a nested route
    for (int c = 0; c < NC; c++) begin
      for (int k = 0; k < NPFX; k++) begin
        automatic int len = $urandom_range(10, 22);
        automatic route_t r = '{p: rand_in_range(c) & msk(len), len: len, nh: nh_t'($urandom_range(1, 255))};
        rt.push_back(r);
        if (k % 3 == 0) begin
          automatic int l2 = len + $urandom_range(2, 8);
          rt.push_back('{p: addr_of(rt.size() - 1) & msk(l2), len: l2, nh: nh_t'($urandom_range(1, 255))});
        end
      end
    end
    // one boundary-crossing route
    rt.push_back('{p: {8'd64, 24'd0}, len: 6, nh: 8'd200});

    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      @(negedge clk); cfg_we = 1; cfg_range = chip_t'(c); cfg_low = rlo[c]; cfg_high = rhi[c]; cfg_chip = chip_t'(c);
    end
    @(negedge clk); cfg_we = 0;
    load_partitions();

    // 1. idle single lookup: 7-cycle latency
    idle(5);
    for (int l = 0; l < L; l++) begin v[l] = (l == 0); a[l] = addr_of(3); end
    drive(a, v);
    t0 = cyc;
    for (int l = 0; l < L; l++) v[l] = 0;
    while (!out_valid[0]) begin @(posedge clk); #1; end
    check(cyc - t0 == 7, $sformatf("idle latency %0d", cyc - t0));
    idle(5);

    // 2. uniform traffic, 4 lanes per cycle: throughput
    win_on = 1; win_results = 0; win_start = cyc;
    for (int n = 0; n < 600; n++) begin
      for (int l = 0; l < L; l++) begin v[l] = 1; a[l] = addr_of($urandom_range(0, rt.size() - 1)); end
      drive(a, v);
    end
    win_on = 0;
    $display("EV uniform traffic: %0d results in 600 cycles (%0.2f per cycle)", win_results, real'(win_results) / 600.0);
    idle(60);

    // 2b. a small hot set from every partition: once cached everywhere, each
    // chip serves one lookup per cycle; results per cycle must reach
    // N_CHIPS times the fraction of searches that succeed.
    begin
      ip_t hs[16];
      foreach (hs[i]) hs[i] = addr_of($urandom_range(0, rt.size() - 1));
      for (int n = 0; n < 300; n++) begin
        for (int l = 0; l < L; l++) begin v[l] = 1; a[l] = hs[$urandom_range(0, 15)]; end
        drive(a, v);
      end
      win_on = 1; win_results = 0; win_srch = 0; win_ok = 0; win_cnt = 1;
      for (int n = 0; n < 600; n++) begin
        for (int l = 0; l < L; l++) begin v[l] = 1; a[l] = hs[$urandom_range(0, 15)]; end
        drive(a, v);
      end
      win_on = 0; win_cnt = 0;
      $display("EV hot traffic: %0.2f results per cycle, search success rate %0.3f",
               real'(win_results) / 600.0, real'(win_ok) / real'(win_srch));
      check(real'(win_results) / 600.0 >= 0.9 * NC * real'(win_ok) / real'(win_srch), "throughput N*P");
      check(real'(win_ok) / real'(win_srch) >= 0.9, "hot set hit rate");
    end
    idle(60);

    // 3. bursty traffic from hot flows with one home chip; a route is added midway
    for (int n = 0; n < BURST_CYCLES; n++) begin
      if (n % 300 == 0) begin
        automatic int hc = $urandom_range(0, NC - 1);
        for (int h = 0; h < 4; h++) begin
          do hot[h] = $urandom_range(0, rt.size() - 1); while (!overlaps(rt[hot[h]], hc) || rt[hot[h]].len < 8);
        end
      end
      if (n == BURST_CYCLES / 2) begin
        // new route in an empty /24 of range 1, appended to chip 1's partition
        automatic route_t r;
        do r = '{p: rand_in_range(1) & msk(24), len: 24, nh: 8'd77}; while (lpm(r.p) >= 0 || lpm(r.p | 32'hFF) >= 0 || !overlaps(r, 1) || overlaps(r, 0) || overlaps(r, 2));
        rt.push_back(r); new_r = rt.size() - 1;
        begin
          automatic int before_e = int'(entry_ind[1]);
          host_write(1, WR_ROUTE, before_e, new_r, 1);
          check(int'(entry_ind[1]) == before_e + 1 && cache_ind[1] >= entry_ind[1], "route append grows entry indicator");
          if (int'(cache_ind[1]) == before_e + 1) ev_cache_raise++;
        end
        hot[0] = new_r;
      end
      for (int l = 0; l < L; l++) begin
        v[l] = $urandom_range(0, 9) != 0;
        a[l] = ($urandom_range(0, 9) < 8) ? addr_of(hot[$urandom_range(0, 3)]) : addr_of($urandom_range(0, rt.size() - 1));
      end
      drive(a, v);
    end
    idle(200);
    check(sent.size() == 0, $sformatf("results missing: %0d", sent.size()));

    // 4. fill chip 0's route part with empty words up to the fixed cache part
    host_write(0, WR_SETIND, part_n[0], -1, 0);
    for (int i = part_n[0]; i < MAXR; i++) begin
      automatic int ci = int'(cache_ind[0]);
      host_write(0, WR_ROUTE, i, -1, 0);
      if (ci == i && int'(cache_ind[0]) == i + 1) ev_cache_raise++;
    end
    @(posedge clk); #1;
    check(reconstruct_req && int'(entry_ind[0]) == MAXR && cache_ind[0] == entry_ind[0], "full chip raises reconstruct_req");
    host_write(0, WR_ROUTE, MAXR, 0, 1);
    check(last_reject && int'(entry_ind[0]) == MAXR, "write into fixed part refused");
    host_write(0, WR_SETIND, part_n[0], -1, 0);
    check(!reconstruct_req && int'(entry_ind[0]) == part_n[0], "indicators set after rebuild");
    // a short check that lookups still work
    for (int n = 0; n < 50; n++) begin
      for (int l = 0; l < L; l++) begin v[l] = 1; a[l] = addr_of($urandom_range(0, rt.size() - 1)); end
      drive(a, v);
    end
    idle(100);
    check(sent.size() == 0, "results missing at end");

    $display("results=%0d found=%0d dropped=%0d", n_out, n_found, n_drop);
    $display("EV cache_hit=%0d feedback=%0d forced_home=%0d home_tie=%0d random=%0d drop=%0d refill_chip=%0d",
             ev_cache_hit, ev_feedback, ev_forced, ev_home_tie, ev_random, ev_drop, ev_refill);
    $display("EV cache_wrap=%0d backpressure=%0d reorder=%0d cache_raise=%0d full=%0d pd_route=%0d pd_cache=%0d paused=%0d ignored=%0d",
             ev_wrap, ev_backpressure, ev_reorder, ev_cache_raise, ev_full, ev_pd_route, ev_pd_cache, ev_paused, ev_req_ignored);
    check(ev_cache_hit > 0, "mechanism: cache hit");
    check(ev_feedback > 0, "mechanism: cache miss feedback");
    check(ev_forced > 0, "mechanism: miss limit sends home");
    check(ev_home_tie > 0, "mechanism: home priority on tie");
    check(ev_random > 0, "mechanism: random idlest pick");
    check(ev_drop > 0, "mechanism: drop at full FIFO");
    check(ev_refill > 0, "mechanism: pipelined cache refill");
    if (D <= 1024) check(ev_wrap > 0, "mechanism: cache indicator wrap");
    check(ev_backpressure > 0, "mechanism: re-order window backpressure");
    check(ev_reorder > 0, "mechanism: out-of-order completion");
    check(ev_cache_raise > 0, "mechanism: cache indicator raised by route update");
    check(ev_full > 0, "mechanism: reconstruct request");
    check(ev_pd_route > 0, "mechanism: partition-disable blocks");
    check(ev_paused > 0, "mechanism: search paused by write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
