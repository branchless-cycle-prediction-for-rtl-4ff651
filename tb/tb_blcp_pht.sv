// tb_blcp_pht: self-checking test of the BLC-filter pattern table.
//
// Drives random updates (mostly branchless, so counters reach saturation,
// with occasional branch cycles that clear them) and random lookups, and
// compares look_cnt/look_sat every cycle with a table of counters kept in the
// testbench, including the same-cycle write-through to the lookup port.
// Counts how often saturation and write-through were seen.
module tb_blcp_pht;
  import blcp_pkg::*;

  localparam int unsigned C = DEF_GHR_SIZE;
  localparam int unsigned W = DEF_CNT_W;
  localparam int unsigned N = 1 << C;
  localparam int unsigned SATV = (1 << W) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic upd_en;
  logic [C-1:0] upd_idx, look_idx;
  cycle_kind_e upd_kind;
  logic look_sat;
  logic [W-1:0] look_cnt;

  int checks = 0, failures = 0;
  int n_sat = 0, n_fwd = 0, n_clear = 0;
  int model [N];
  int exp_cnt;

  blcp_pht dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_en = 0; upd_idx = '0; look_idx = '0; upd_kind = BLC;
    for (int i = 0; i < N; i++) model[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      upd_en   = ($urandom_range(0, 9) != 0);
      upd_idx  = C'($urandom_range(0, N-1));
      upd_kind = ($urandom_range(0, 199) == 0) ? BC : BLC;
      look_idx = ($urandom_range(0, 3) == 0) ? upd_idx : C'($urandom_range(0, N-1));
      #1;
      exp_cnt = model[look_idx];
      if (upd_en && upd_idx == look_idx) begin
        exp_cnt = (upd_kind == BC) ? 0 : ((exp_cnt >= SATV) ? SATV : exp_cnt + 1);
        n_fwd++;
      end
      checks++;
      if (int'(look_cnt) != exp_cnt || look_sat != (exp_cnt == SATV)) begin
        failures++;
        if (failures < 10)
          $display("t=%0d idx=%0d cnt=%0d exp=%0d sat=%0b", t, look_idx, look_cnt, exp_cnt, look_sat);
      end
      if (exp_cnt == SATV) n_sat++;
      @(posedge clk);
      if (upd_en) begin
        if (upd_kind == BC) begin
          model[upd_idx] = 0;
          n_clear++;
        end else if (model[upd_idx] < SATV) model[upd_idx]++;
      end
    end
    $display("saturated lookups=%0d write-through=%0d clears=%0d", n_sat, n_fwd, n_clear);
    checks++;
    if (n_sat == 0 || n_fwd == 0 || n_clear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
