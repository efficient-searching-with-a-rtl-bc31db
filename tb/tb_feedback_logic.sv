// tb_feedback_logic: self-checking test of feedback_logic.
// Random missed packages on all chips; checks the one-cycle delay, that the
// miss counter is raised by one and saturates, and that nothing else
// changes.
module tb_feedback_logic;
  import tcam_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid[NC], out_valid[NC]; pkt_t in_pkt[NC], out_pkt[NC];
  feedback_logic #(.N_CHIPS(NC)) dut (.*);
  logic pv[NC]; pkt_t pp[NC];
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int c = 0; c < NC; c++) begin in_valid[c] = 0; in_pkt[c] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        in_valid[c] = $urandom_range(0, 1);
        in_pkt[c] = '{ip: $urandom(), home: chip_t'($urandom()), miss: miss_t'($urandom()), ts: ts_t'($urandom())};
        pv[c] = in_valid[c]; pp[c] = in_pkt[c];
      end
      @(posedge clk); #1;
      for (int c = 0; c < NC; c++) begin
        automatic pkt_t e = pp[c];
        e.miss = (pp[c].miss == '1) ? pp[c].miss : pp[c].miss + 1'b1;
        checks++;
        if (out_valid[c] != pv[c] || (pv[c] && out_pkt[c] != e)) begin failures++; $display("FAIL chip %0d", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
