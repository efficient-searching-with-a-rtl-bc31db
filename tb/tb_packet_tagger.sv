// tb_packet_tagger: self-checking test of packet_tagger.
// Random valid lanes; checks that stamps are consecutive in lane order
// (wrapping at 2**TS_W), the miss counter starts at 0, the address and home
// pass through, and next_ts tracks the stamps handed out.
module tb_packet_tagger;
  import tcam_pkg::*;
  localparam int LANES = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid[LANES]; ip_t in_ip[LANES]; chip_t in_home[LANES];
  logic out_valid[LANES]; pkt_t out_pkt[LANES]; ts_t next_ts;
  packet_tagger #(.LANES(LANES)) dut (.*);
  int exp_ts = 0;
  logic pv[LANES]; ip_t pip[LANES]; chip_t ph[LANES];
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int l = 0; l < LANES; l++) begin in_valid[l] = 0; in_ip[l] = 0; in_home[l] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        in_valid[l] = $urandom_range(0, 1); in_ip[l] = $urandom(); in_home[l] = chip_t'($urandom_range(0, 3));
        pv[l] = in_valid[l]; pip[l] = in_ip[l]; ph[l] = in_home[l];
      end
      @(posedge clk); #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (out_valid[l] != pv[l]) begin failures++; $display("FAIL valid"); end
        else if (pv[l]) begin
          if (out_pkt[l].ts != ts_t'(exp_ts) || out_pkt[l].miss != 0 || out_pkt[l].ip != pip[l] || out_pkt[l].home != ph[l]) begin
            failures++; $display("FAIL lane %0d ts %0d exp %0d", l, out_pkt[l].ts, exp_ts);
          end
          exp_ts++;
        end
      end
      checks++; if (next_ts != ts_t'(exp_ts)) begin failures++; $display("FAIL next_ts"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
