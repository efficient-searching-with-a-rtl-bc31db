// tb_load_balancer: self-checking test of load_balancer.
// Random packages and FIFO fill levels. For every package the test works out
// the rule on its own: forced home above the miss limit, home if the home
// FIFO is among the idlest, otherwise any idlest FIFO (the random pick is
// checked to be one of them, and over the run to vary), drop when the
// chosen FIFO is full. Same-cycle placements are accounted as the test
// walks the packages in order.
module tb_load_balancer;
  import tcam_pkg::*;
  localparam int NC = 4, NP = 8, FD = 10, LIM = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid[NP]; pkt_t in_pkt[NP]; logic [7:0] fifo_cnt[NC];
  logic [NP-1:0] push_valid[NC]; logic drop_valid[NP]; chip_t dest[NP];
  logic forced_home[NP], rand_pick[NP];
  load_balancer #(.N_CHIPS(NC), .N_PKT(NP), .FIFO_DEPTH(FD), .MISS_LIMIT(LIM)) dut (.*);
  int n_forced = 0, n_home_tie = 0, n_rand = 0, n_drop = 0;
  int rand_hist[NC];
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int cnt[NC];
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        fifo_cnt[c] = 8'($urandom_range(0, (n % 3 == 0) ? FD : 4));
        cnt[c] = int'(fifo_cnt[c]);
      end
      for (int p = 0; p < NP; p++) begin
        in_valid[p] = $urandom_range(0, 2) != 0;
        in_pkt[p] = '{ip: $urandom(), home: chip_t'($urandom_range(0, NC - 1)),
                      miss: miss_t'($urandom_range(0, 5)), ts: ts_t'(p)};
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        int minc, t, h, pushes;
        if (!in_valid[p]) begin
          pushes = 0; for (int c = 0; c < NC; c++) pushes += push_valid[c][p];
          check(pushes == 0 && !drop_valid[p], "idle input acted");
          continue;
        end
        h = int'(in_pkt[p].home);
        minc = cnt[0]; for (int c = 1; c < NC; c++) if (cnt[c] < minc) minc = cnt[c];
        t = int'(dest[p]);
        if (int'(in_pkt[p].miss) > LIM) begin
          check(t == h && forced_home[p], "forced home"); n_forced++;
        end else if (cnt[h] == minc) begin
          check(t == h && !forced_home[p] && !rand_pick[p], "home tie"); n_home_tie++;
        end else begin
          check(cnt[t] == minc && t != h && rand_pick[p], "idlest pick"); n_rand++; rand_hist[t]++;
        end
        if (cnt[t] >= FD) begin
          check(drop_valid[p] && push_valid[t][p] == 0, "drop"); n_drop++;
        end else begin
          check(!drop_valid[p] && push_valid[t][p] == 1, "push");
          cnt[t]++;
        end
        pushes = 0; for (int c = 0; c < NC; c++) pushes += push_valid[c][p];
        check(pushes <= 1, "one destination");
      end
    end
    check(n_forced > 0 && n_home_tie > 0 && n_rand > 0 && n_drop > 0, "coverage");
    for (int c = 0; c < NC; c++) check(rand_hist[c] > 0, "random pick reaches every chip");
    $display("forced=%0d home_tie=%0d random=%0d drop=%0d", n_forced, n_home_tie, n_rand, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
