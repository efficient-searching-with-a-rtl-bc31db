// tb_indexing_logic: self-checking test of indexing_logic.
// Programs the four partition ranges of the TCAM-full experiment (ranges
// mapped to chips in reverse order to exercise the index table), streams
// random and boundary addresses on all lanes and checks the home chip and
// the two-cycle latency against a range search done here. Also checks the
// reset split of the address space.
module tb_indexing_logic;
  import tcam_pkg::*;
  localparam int LANES = 4, NR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid[LANES]; ip_t in_ip[LANES];
  logic out_valid[LANES]; ip_t out_ip[LANES]; chip_t out_home[LANES];
  logic cfg_we = 0; chip_t cfg_range = 0, cfg_chip = 0; ip_t cfg_low = 0, cfg_high = 0;
  indexing_logic #(.LANES(LANES), .N_RANGES(NR)) dut (.*);
  ip_t lo[NR], hi[NR]; int tab[NR];
  ip_t q_ip[$]; chip_t q_home[$]; int q_t[$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  function automatic chip_t ref_home(ip_t a);
    for (int r = 0; r < NR; r++) if (a >= lo[r] && a <= hi[r]) return chip_t'(tab[r]);
    return chip_t'(tab[0]);
  endfunction
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // output checker
  always @(posedge clk) if (rst_n) begin
    #1;
    for (int l = 0; l < LANES; l++) if (out_valid[l]) begin
      checks++;
      if (q_ip.size() == 0 || out_ip[l] != q_ip[0] || out_home[l] != q_home[0] || cyc - q_t[0] != 2) begin
        failures++; $display("FAIL lane %0d ip %h home %0d", l, out_ip[l], out_home[l]);
      end
      if (q_ip.size() != 0) begin void'(q_ip.pop_front()); void'(q_home.pop_front()); void'(q_t.pop_front()); end
    end
  end
  initial begin
    for (int l = 0; l < LANES; l++) begin in_valid[l] = 0; in_ip[l] = 0; end
    // reset values: even split, identity table
    for (int r = 0; r < NR; r++) begin lo[r] = ip_t'(r) << 30; hi[r] = (ip_t'(r) << 30) | 32'h3FFF_FFFF; tab[r] = r; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) begin
        lo[0] = 32'h00000000; hi[0] = {8'd65, 8'd156, 8'd220, 8'd255};
        lo[1] = {8'd65, 8'd156, 8'd221, 8'd0}; hi[1] = {8'd112, 8'd114, 8'd255, 8'd255};
        lo[2] = {8'd112, 8'd115, 8'd0, 8'd0}; hi[2] = {8'd145, 8'd186, 8'd158, 8'd255};
        lo[3] = {8'd145, 8'd186, 8'd159, 8'd0}; hi[3] = 32'hFFFFFFFF;
        for (int r = 0; r < NR; r++) begin
          tab[r] = NR - 1 - r;
          @(negedge clk); cfg_we = 1; cfg_range = chip_t'(r); cfg_low = lo[r]; cfg_high = hi[r]; cfg_chip = chip_t'(tab[r]);
        end
        @(negedge clk); cfg_we = 0;
        repeat (3) @(negedge clk);
      end
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        for (int l = 0; l < LANES; l++) begin
          in_valid[l] = $urandom_range(0, 3) != 0;
          case ($urandom_range(0, 2))
            0: in_ip[l] = $urandom();
            1: in_ip[l] = lo[$urandom_range(0, NR - 1)];
            default: in_ip[l] = hi[$urandom_range(0, NR - 1)];
          endcase
          if (in_valid[l]) begin q_ip.push_back(in_ip[l]); q_home.push_back(ref_home(in_ip[l])); q_t.push_back(cyc); end
        end
      end
      @(negedge clk); for (int l = 0; l < LANES; l++) in_valid[l] = 0;
      repeat (4) @(negedge clk);
    end
    checks++; if (q_ip.size() != 0) begin failures++; $display("FAIL leftover %0d", q_ip.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
