// tb_assoc_sram: self-checking test of assoc_sram.
// Random writes and reads on both ports against a model array; checks the
// one-cycle read latency and that unwritten words read as invalid.
module tb_assoc_sram;
  import tcam_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, rda_en = 0, rdb_en = 0;
  idx_t wr_idx = 0, rda_idx = 0, rdb_idx = 0;
  sram_entry_t wr_data = '0, rda_data, rdb_data;
  assoc_sram #(.DEPTH(DEPTH)) dut (.*);
  sram_entry_t model [DEPTH];
  bit written [DEPTH];
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      automatic sram_entry_t ea, eb;
      automatic bit va, vb;
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_idx = idx_t'($urandom_range(0, DEPTH - 1));
      wr_data = {$urandom(), $urandom()}; wr_data.valid = ($urandom_range(0, 3) != 0);
      rda_en = 1; rda_idx = idx_t'($urandom_range(0, DEPTH - 1));
      rdb_en = 1; rdb_idx = idx_t'($urandom_range(0, DEPTH - 1));
      ea = model[rda_idx]; va = written[rda_idx] && model[rda_idx].valid;
      eb = model[rdb_idx]; vb = written[rdb_idx] && model[rdb_idx].valid;
      if (wr_en) begin model[wr_idx] = wr_data; written[wr_idx] = 1; end
      @(posedge clk); #1;
      checks++; if (rda_data.valid !== va || (va && rda_data[$bits(sram_entry_t)-2:0] !== ea[$bits(sram_entry_t)-2:0])) begin failures++; $display("FAIL A %0d", rda_idx); end
      checks++; if (rdb_data.valid !== vb || (vb && rdb_data[$bits(sram_entry_t)-2:0] !== eb[$bits(sram_entry_t)-2:0])) begin failures++; $display("FAIL B %0d", rdb_idx); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
