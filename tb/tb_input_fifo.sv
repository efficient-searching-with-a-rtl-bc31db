// tb_input_fifo: self-checking test of input_fifo.
// Random multi-port pushes (never beyond the free space) and random pops
// against a queue model; checks order, head, count, full and empty.
module tb_input_fifo;
  import tcam_pkg::*;
  localparam int D = 10, NP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fulls = 0;
  logic [NP-1:0] push_valid = '0; pkt_t push_pkt[NP]; logic pop = 0;
  logic out_valid; pkt_t out_pkt; logic [7:0] count;
  input_fifo #(.DEPTH(D), .N_PUSH(NP)) dut (.*);
  pkt_t q[$];
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int room, npush;
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || out_valid != (q.size() != 0) || (q.size() != 0 && out_pkt != q[0])) begin
        failures++; $display("FAIL count %0d exp %0d", count, q.size());
      end
      if (q.size() == D) fulls++;
      pop = $urandom_range(0, 2) != 0;
      room = D - q.size();
      npush = 0;
      for (int p = 0; p < NP; p++) begin
        push_pkt[p] = '{ip: $urandom(), home: chip_t'(p), miss: '0, ts: ts_t'(n)};
        push_valid[p] = (npush < room) && ($urandom_range(0, 5) == 0);
        if (push_valid[p]) npush++;
      end
      if (pop && q.size() != 0) void'(q.pop_front());
      for (int p = 0; p < NP; p++) if (push_valid[p]) q.push_back(push_pkt[p]);
    end
    checks++; if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
