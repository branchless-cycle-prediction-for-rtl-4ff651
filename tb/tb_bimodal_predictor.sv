// tb_bimodal_predictor: self-checking test of the bimodal direction
// predictor.
//
// Applies random resolved branches (biased per PC, so counters drift to both
// ends and saturate) and random reads, comparing rd_taken with a model table
// of 2-bit counters kept here that starts at weakly not taken.
module tb_bimodal_predictor;
  import blcp_pkg::*;

  localparam int unsigned E = DEF_BIM_ENTRIES;
  localparam int unsigned P = DEF_PC_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] rd_pc, upd_pc;
  logic rd_taken, upd_en, upd_taken;

  int checks = 0, failures = 0, n_taken = 0, n_not = 0, n_sat_hi = 0, n_sat_lo = 0;
  int m [E];
  int unsigned ui, ri;

  bimodal_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_en = 0; upd_pc = '0; upd_taken = 0; rd_pc = '0;
    for (int i = 0; i < E; i++) m[i] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      rd_pc  = P'($urandom);
      upd_en = ($urandom_range(0, 1) == 0);
      upd_pc = P'($urandom);
      ui = 32'(upd_pc[2 +: $clog2(E)]);
      // PCs with an even index lean taken, odd ones not taken
      upd_taken = (ui % 2 == 0) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      #1;
      ri = 32'(rd_pc[2 +: $clog2(E)]);
      checks++;
      if (rd_taken !== (m[ri] >= 2)) begin
        failures++;
        if (failures < 10) $display("t=%0d idx=%0d got=%0b ctr=%0d", t, ri, rd_taken, m[ri]);
      end
      if (rd_taken) n_taken++; else n_not++;
      if (m[ri] == 3) n_sat_hi++;
      if (m[ri] == 0) n_sat_lo++;
      @(posedge clk);
      if (upd_en) begin
        if (upd_taken && m[ui] < 3) m[ui]++;
        else if (!upd_taken && m[ui] > 0) m[ui]--;
      end
    end
    checks++;
    if (n_taken == 0 || n_not == 0 || n_sat_hi == 0 || n_sat_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
