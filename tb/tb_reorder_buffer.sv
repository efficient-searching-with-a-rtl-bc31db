// tb_reorder_buffer: self-checking test of reorder_buffer.
// Issues 3000 time stamps (keeping fewer than 120 in flight), writes their
// results in a random order on random write ports, some marked dropped,
// and checks that results leave strictly in stamp order, intact, at most
// N_OUT per cycle, and that the buffer sometimes releases N_OUT at once.
module tb_reorder_buffer;
  import tcam_pkg::*;
  localparam int NW = 12, NO = 4, TOTAL = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_valid[NW]; result_t wr_res[NW]; logic out_valid[NO]; result_t out_res[NO]; ts_t head;
  reorder_buffer #(.DEPTH(128), .N_WR(NW), .N_OUT(NO)) dut (.*);
  int issued = 0, retired = 0, full_bursts = 0;
  int pend[$];          // issued, not yet written
  result_t sent[int];   // by sequence number
  function automatic result_t mk(int s);
    return '{ts: ts_t'(s), ip: ip_t'(s * 7919), found: s[0], nh: nh_t'(s * 13), dropped: (s % 17 == 0)};
  endfunction
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n) begin
    #1;
    begin
      automatic int nv = 0;
      automatic bit gap = 0;
      for (int k = 0; k < NO; k++) begin
        if (out_valid[k]) begin
          checks++;
          if (gap || out_res[k] != mk(retired)) begin failures++; $display("FAIL out %0d exp seq %0d", out_res[k].ts, retired); end
          retired++; nv++;
        end else gap = 1;
      end
      if (nv == NO) full_bursts++;
    end
  end
  initial begin
    for (int w = 0; w < NW; w++) begin wr_valid[w] = 0; wr_res[w] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    while (retired < TOTAL) begin
      @(negedge clk);
      while (issued < TOTAL && issued - retired < 120 && $urandom_range(0, 3) != 0) begin pend.push_back(issued); issued++; end
      pend.shuffle();
      for (int w = 0; w < NW; w++) begin
        wr_valid[w] = 0;
        if (pend.size() != 0 && $urandom_range(0, 2) == 0) begin
          automatic int s = pend.pop_front();
          wr_valid[w] = 1; wr_res[w] = mk(s);
        end
      end
    end
    @(negedge clk); for (int w = 0; w < NW; w++) wr_valid[w] = 0;
    checks++; if (full_bursts == 0) begin failures++; $display("FAIL no full burst"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
