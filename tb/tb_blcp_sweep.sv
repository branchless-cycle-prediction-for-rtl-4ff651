// tb_blcp_sweep: the BLC-filter in the 30 configurations of the design-space
// study, GHR_SIZE 1 to 6 with 2- to 6-bit saturating counters, all fed the
// same fetch stream side by side.
//
// The stream is phase-structured like embedded code: a loop body of random
// length (3 to 20 instructions, one branch at its end) is repeated a random
// number of times, then another phase starts; now and then a long branch-free
// stretch appears. About one instruction in ten is a branch. One instruction is
// fetched per cycle and reaches decode FETCH_LAT cycles later.
//
// Checks, every cycle and for every configuration: pred_blc and blc_miss
// against a cycle-level model of the filter kept here. Checks the property
// that makes coverage fall as counters widen at a fixed history length: a
// wider counter only predicts branchless where the next narrower one does.
// Reports accuracy (predicted branchless cycles that were branchless) and
// coverage (branchless cycles that were predicted) per configuration.
module tb_blcp_sweep;
  import blcp_pkg::*;

  localparam int unsigned LAT = DEF_FETCH_LAT;
  localparam int unsigned NG = 6, NW = 5;    // GHR 1..6, counters 2..6 bits
  localparam int unsigned NC = NG * NW;
  localparam int unsigned CYCLES = 40000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hold = 1'b0;
  logic [0:0] dec_branch;
  logic pred [NC];
  logic miss [NC];

  for (genvar g = 0; g < NG; g++) begin : g_ghr
    for (genvar w = 0; w < NW; w++) begin : g_cnt
      blc_filter #(
        .GHR_SIZE (g + 1),
        .CNT_W    (w + 2),
        .FETCH_LAT(LAT),
        .FETCH_W  (1)
      ) dut (
        .clk(clk), .rst_n(rst_n), .hold(hold), .dec_branch(dec_branch),
        .pred_blc(pred[g*NW + w]), .blc_miss(miss[g*NW + w])
      );
    end
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned m_hist [NC];
  int m_cnt [NC][64];
  logic m_pred [NC];
  logic m_pipe [NC][LAT+1];
  int n_pred [NC], n_ok [NC], n_miss [NC];
  int n_blc = 0, n_cyc = 0;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fetch stream
  int body = 6, reps = 10, pos = 0;
  bit fetched_br;
  bit br_pipe [LAT+1];

  task automatic next_fetch(output bit is_br);
    pos++;
    if (pos >= body) begin
      pos = 0;
      is_br = 1;
      reps--;
      if (reps <= 0) begin
        body = ($urandom_range(0, 9) == 0) ? $urandom_range(60, 120) : $urandom_range(3, 20);
        reps = (body > 40) ? 1 : $urandom_range(5, 50);
      end
    end else is_br = 0;
  endtask

  bit dec_bc;
  int unsigned ui, li, gs, sv;

  initial begin
    dec_branch = '0;
    for (int k = 0; k < NC; k++) begin
      m_hist[k] = 0; m_pred[k] = 0; n_pred[k] = 0; n_ok[k] = 0; n_miss[k] = 0;
      for (int i = 0; i < 64; i++) m_cnt[k][i] = 0;
      for (int i = 0; i <= LAT; i++) m_pipe[k][i] = 0;
    end
    for (int i = 0; i <= LAT; i++) br_pipe[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    next_fetch(fetched_br);
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      dec_bc = (LAT == 0) ? fetched_br : br_pipe[LAT-1];
      dec_branch[0] = dec_bc;
      #1;
      n_cyc++;
      if (!fetched_br) n_blc++;
      for (int k = 0; k < NC; k++) begin
        checks++;
        if (pred[k] !== m_pred[k] ||
            miss[k] !== (dec_bc && (LAT == 0 ? m_pred[k] : m_pipe[k][LAT-1]))) begin
          failures++;
          if (failures < 10) $display("t=%0d cfg=%0d pred=%0b/%0b", t, k, pred[k], m_pred[k]);
        end
        if (pred[k]) begin
          n_pred[k]++;
          if (!fetched_br) n_ok[k]++;
        end
        if (miss[k]) n_miss[k]++;
        // a wider counter predicts branchless only where the narrower one does
        if (k % NW != 0) begin
          checks++;
          if (pred[k] && !pred[k-1]) begin
            failures++;
            if (failures < 10) $display("t=%0d cfg=%0d predicts where cfg=%0d does not", t, k, k-1);
          end
        end
      end
      @(posedge clk);
      for (int k = 0; k < NC; k++) begin
        gs = k / NW + 1;
        sv = (1 << (k % NW + 2)) - 1;
        ui = (m_hist[k] >> LAT) & ((1 << gs) - 1);
        if (dec_bc) m_cnt[k][ui] = 0;
        else if (m_cnt[k][ui] < int'(sv)) m_cnt[k][ui]++;
        m_hist[k] = ((m_hist[k] << 1) | 32'(dec_bc)) & ((1 << (gs + LAT)) - 1);
        for (int i = LAT; i > 0; i--) m_pipe[k][i] = m_pipe[k][i-1];
        m_pipe[k][0] = m_pred[k];
        li = m_hist[k] & ((1 << gs) - 1);
        m_pred[k] = (m_cnt[k][li] == int'(sv));
      end
      for (int i = LAT; i > 0; i--) br_pipe[i] = br_pipe[i-1];
      br_pipe[0] = fetched_br;
      next_fetch(fetched_br);
    end

    $display("cycles=%0d branchless=%0d (%0d%%)", n_cyc, n_blc, n_blc * 100 / n_cyc);
    $display("GHR cnt  accuracy%%  coverage%%  misses");
    for (int k = 0; k < NC; k++)
      $display("%3d %3d  %8d  %9d  %6d", k / NW + 1, k % NW + 2,
               (n_pred[k] != 0) ? n_ok[k] * 100 / n_pred[k] : 0, n_ok[k] * 100 / n_blc, n_miss[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
