// tb_blc_filter: self-checking test of the branchless-cycle predictor.
//
// Part 1 (latency): from reset, with only branchless cycles at decode, the
// counter of history 000 must reach its saturation value SAT after SAT
// updates, and pred_blc must rise in the cycle after that clock edge, one
// cycle ahead of the fetch it refers to.
// Part 2 (random): a loop-like branch stream (a branch every few cycles, with
// noise) and random stalls. Every cycle pred_blc and blc_miss are compared
// with a cycle-level model kept here: a history of GHR_SIZE+FETCH_LAT bits,
// the counter table, the registered prediction and its delay to decode.
// Counts predicted branchless cycles, misses and stalls; each must occur.
module tb_blc_filter;
  import blcp_pkg::*;

  localparam int unsigned C    = DEF_GHR_SIZE;
  localparam int unsigned W    = DEF_CNT_W;
  localparam int unsigned LAT  = DEF_FETCH_LAT;
  localparam int unsigned FW   = DEF_FETCH_W;
  localparam int unsigned N    = 1 << C;
  localparam int unsigned SATV = (1 << W) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hold;
  logic [FW-1:0] dec_branch;
  logic pred_blc, blc_miss;

  int checks = 0, failures = 0;
  int n_pred = 0, n_miss = 0, n_hold = 0, n_bc = 0;

  // model state
  int unsigned m_hist;
  int m_cnt [N];
  logic m_pred;
  logic m_pipe [LAT+1];

  blc_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%t %s got=%0b exp=%0b", $time, what, got, exp);
    end
  endtask

  task automatic model_reset();
    m_hist = 0; m_pred = 0;
    for (int i = 0; i < N; i++) m_cnt[i] = 0;
    for (int i = 0; i <= LAT; i++) m_pipe[i] = 0;
  endtask

  // One clock edge of the model, called after the edge with that cycle's inputs.
  task automatic model_step(logic h, logic bc);
    int unsigned ui, li;
    if (h) return;
    ui = (m_hist >> LAT) & (N - 1);
    if (bc) m_cnt[ui] = 0;
    else if (m_cnt[ui] < SATV) m_cnt[ui]++;
    m_hist = ((m_hist << 1) | 32'(bc)) & ((1 << (C + LAT)) - 1);
    for (int i = LAT; i > 0; i--) m_pipe[i] = m_pipe[i-1];
    m_pipe[0] = m_pred;
    li = m_hist & (N - 1);
    m_pred = (m_cnt[li] == SATV);
  endtask

  logic bc;
  int period, phase, cyc;

  initial begin
    hold = 0; dec_branch = '0;
    model_reset();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Part 1: exact training latency
    cyc = 0;
    while (!pred_blc && cyc < 1000) begin
      @(negedge clk);
      hold = 0; dec_branch = '0;
      @(posedge clk);
      model_step(1'b0, 1'b0);
      cyc++;
      #1;
    end
    checks++;
    if (cyc != SATV) begin
      failures++;
      $display("pred_blc rose after %0d updates, expected %0d", cyc, SATV);
    end

    // Part 2: random loop-like stream against the model
    period = 5; phase = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (t % 2000 == 0) period = $urandom_range(3, 12);
      hold = ($urandom_range(0, 19) == 0);
      if (!hold) phase++;
      bc = (phase % period == 0) || ($urandom_range(0, 99) < 3);
      dec_branch = '0;
      dec_branch[$urandom_range(0, FW-1)] = bc;
      #1;
      // m_pipe[LAT-1] is the prediction made for the group now at decode
      check("pred_blc", pred_blc, m_pred);
      check("blc_miss", blc_miss, !hold && (LAT == 0 ? m_pred : m_pipe[LAT-1]) && bc);
      if (pred_blc && !hold) n_pred++;
      if (blc_miss) n_miss++;
      if (hold) n_hold++;
      if (bc && !hold) n_bc++;
      @(posedge clk);
      model_step(hold, bc);
    end
    $display("predicted BLC=%0d misses=%0d stalls=%0d branch cycles=%0d", n_pred, n_miss, n_hold, n_bc);
    checks++;
    if (n_pred == 0 || n_miss == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
