// tb_blcp_bpu: end-to-end test of the branch prediction unit with
// branchless-cycle prediction, at its default sizes.
//
// A synthetic loop-nest program supplies the fetch stream: a straight-line
// prologue, an inner loop with a variable trip count, a data-dependent forward
// branch, a jump to a subroutine and back, and the backward outer-loop
// branch. The subroutine is a long branch-free stretch (80 instructions),
// so that branch cycles after it are sometimes predicted branchless. The program is followed along
// its real path (no wrong-path fetch); each fetched instruction reaches decode
// FETCH_LAT advancing cycles later, where its branch flag trains the filter and
// its outcome trains the bimodal table and the BTB. Random stall cycles
// freeze the front end.
//
// Every cycle the outputs are compared with a model kept here of the filter
// (history, counters, registered prediction), the BTB and the bimodal table.
// The run counts each mechanism: BTB reads suppressed on predicted branchless
// cycles, branch cycles predicted branchless (blc_miss), BTB targets
// installed, taken predictions from a BTB hit, and stalls; each must occur.
// It also reports the prediction accuracy (predicted branchless cycles that
// were branchless), the coverage (branchless cycles that were predicted) and
// the fraction of BTB reads saved.
module tb_blcp_bpu;
  import blcp_pkg::*;

  localparam int unsigned C    = DEF_GHR_SIZE;
  localparam int unsigned W    = DEF_CNT_W;
  localparam int unsigned LAT  = DEF_FETCH_LAT;
  localparam int unsigned FW   = DEF_FETCH_W;
  localparam int unsigned P    = DEF_PC_W;
  localparam int unsigned BE   = DEF_BTB_ENTRIES;
  localparam int unsigned IE   = DEF_BIM_ENTRIES;
  localparam int unsigned N    = 1 << C;
  localparam int unsigned SATV = (1 << W) - 1;
  localparam int unsigned CYCLES = 30000;
  localparam logic [P-1:0] BASE = 32'h0000_1000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hold, fetch_valid, pred_blc, btb_access, pred_taken, blc_miss;
  logic res_valid, res_taken;
  logic [P-1:0] fetch_pc, pred_target, res_pc, res_target;
  logic [FW-1:0] dec_branch;

  blcp_bpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- program ----------------
  typedef struct {
    logic [P-1:0] pc;
    bit           is_br;
    bit           taken;
    logic [P-1:0] target;
  } insn_t;

  int unsigned cur_w = 0, inner_iter = 0, inner_trip = 4;

  function automatic logic [P-1:0] wpc(int unsigned w);
    return BASE + P'(w * 4);
  endfunction

  // Next instruction on the program's path.
  task automatic next_insn(output insn_t ins);
    int unsigned w = cur_w, nw;
    ins.pc = wpc(w); ins.is_br = 0; ins.taken = 0; nw = w + 1;
    case (w)
      15: begin                            // inner loop back edge
        ins.is_br = 1;
        inner_iter++;
        ins.taken = (inner_iter < inner_trip);
        if (ins.taken) nw = 10;
        else begin inner_trip = $urandom_range(3, 8); inner_iter = 0; end
      end
      22: begin                            // data-dependent forward branch
        ins.is_br = 1;
        ins.taken = ($urandom_range(0, 9) < 3);
        if (ins.taken) nw = 26;
      end
      40: begin ins.is_br = 1; ins.taken = 1; nw = 100; end  // call
      179: begin ins.is_br = 1; ins.taken = 1; nw = 41; end  // return
      50: begin ins.is_br = 1; ins.taken = 1; nw = 0; end    // outer loop
      default: ;
    endcase
    ins.target = wpc(nw);
    cur_w = nw;
  endtask

  // ---------------- reference model ----------------
  int unsigned m_hist;
  int m_cnt [N];
  logic m_pred;
  logic m_ppipe [LAT+1];
  bit m_bv [BE];
  logic [P-1:0] m_bpc [BE];
  logic [P-1:0] m_btgt [BE];
  int m_bim [IE];

  insn_t fpipe [LAT+1];   // fetched instructions on their way to decode
  bit    fval  [LAT+1];

  function automatic int unsigned bidx(logic [P-1:0] pc);
    return 32'(pc[2 +: $clog2(BE)]);
  endfunction
  function automatic int unsigned iidx(logic [P-1:0] pc);
    return 32'(pc[2 +: $clog2(IE)]);
  endfunction

  task automatic chk(string what, logic [P-1:0] got, logic [P-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%t %s got=%h exp=%h", $time, what, got, exp);
    end
  endtask

  // counters
  int n_suppr = 0, n_miss = 0, n_install = 0, n_taken_pred = 0, n_hold = 0;
  int n_fetch = 0, n_blc = 0, n_blc_pred_ok = 0, n_pred = 0, n_btb = 0;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  insn_t fi, di;
  bit    dv, exp_bc, exp_hit, exp_taken;
  int unsigned ui, li, bi;

  initial begin
    hold = 0; fetch_valid = 0; fetch_pc = '0; dec_branch = '0;
    res_valid = 0; res_pc = '0; res_taken = 0; res_target = '0;
    m_hist = 0; m_pred = 0;
    for (int i = 0; i < N; i++) m_cnt[i] = 0;
    for (int i = 0; i <= LAT; i++) begin m_ppipe[i] = 0; fval[i] = 0; end
    for (int i = 0; i < BE; i++) m_bv[i] = 0;
    for (int i = 0; i < IE; i++) m_bim[i] = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    next_insn(fi);

    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      hold = (t > 100) && ($urandom_range(0, 29) == 0);
      fetch_valid = !hold;
      fetch_pc = fi.pc;
      // group at decode: the one fetched LAT advancing cycles ago
      if (LAT == 0) begin dv = 1; di = fi; end
      else begin dv = fval[LAT-1]; di = fpipe[LAT-1]; end
      exp_bc = dv && di.is_br;
      dec_branch = '0;
      dec_branch[0] = exp_bc;
      res_valid  = !hold && exp_bc;
      res_pc     = di.pc;
      res_taken  = di.taken;
      res_target = di.target;
      #1;
      // expected outputs
      bi = bidx(fi.pc);
      exp_hit   = fetch_valid && !m_pred && m_bv[bi] && m_bpc[bi] == fi.pc;
      exp_taken = exp_hit && (m_bim[iidx(fi.pc)] >= 2);
      chk("pred_blc",   P'(pred_blc),   P'(m_pred));
      chk("btb_access", P'(btb_access), P'(fetch_valid && !m_pred));
      chk("pred_taken", P'(pred_taken), P'(exp_taken));
      if (exp_hit) chk("pred_target", pred_target, m_btgt[bi]);
      chk("blc_miss",   P'(blc_miss),
          P'(!hold && exp_bc && (LAT == 0 ? m_pred : m_ppipe[LAT-1])));
      if (exp_taken && fi.taken) chk("target_correct", pred_target, fi.target);
      // statistics
      if (hold) n_hold++;
      if (fetch_valid) begin
        n_fetch++;
        if (btb_access) n_btb++;
        else n_suppr++;
        if (!fi.is_br) n_blc++;
        if (m_pred) begin
          n_pred++;
          if (!fi.is_br) n_blc_pred_ok++;
        end
      end
      if (blc_miss) n_miss++;
      if (res_valid && res_taken) n_install++;
      if (pred_taken) n_taken_pred++;
      @(posedge clk);
      // model edge
      if (!hold) begin
        ui = (m_hist >> LAT) & (N - 1);
        if (exp_bc) m_cnt[ui] = 0;
        else if (m_cnt[ui] < SATV) m_cnt[ui]++;
        m_hist = ((m_hist << 1) | 32'(exp_bc)) & ((1 << (C + LAT)) - 1);
        for (int i = LAT; i > 0; i--) m_ppipe[i] = m_ppipe[i-1];
        m_ppipe[0] = m_pred;
        li = m_hist & (N - 1);
        m_pred = (m_cnt[li] == SATV);
        for (int i = LAT; i > 0; i--) begin fpipe[i] = fpipe[i-1]; fval[i] = fval[i-1]; end
        fpipe[0] = fi; fval[0] = 1;
        next_insn(fi);
      end
      if (res_valid) begin
        if (res_taken) begin
          m_bv[bidx(res_pc)] = 1; m_bpc[bidx(res_pc)] = res_pc; m_btgt[bidx(res_pc)] = res_target;
        end
        if (res_taken && m_bim[iidx(res_pc)] < 3) m_bim[iidx(res_pc)]++;
        else if (!res_taken && m_bim[iidx(res_pc)] > 0) m_bim[iidx(res_pc)]--;
      end
    end

    $display("fetch cycles=%0d branchless=%0d predicted branchless=%0d (correct %0d)",
             n_fetch, n_blc, n_pred, n_blc_pred_ok);
    $display("BTB reads=%0d suppressed=%0d  misses(BC predicted BLC)=%0d  installs=%0d  taken predictions=%0d  stalls=%0d",
             n_btb, n_suppr, n_miss, n_install, n_taken_pred, n_hold);
    if (n_pred > 0 && n_blc > 0)
      $display("accuracy=%0d.%0d%%  coverage=%0d.%0d%%  BTB reads saved=%0d.%0d%%",
               n_blc_pred_ok * 100 / n_pred, (n_blc_pred_ok * 1000 / n_pred) % 10,
               n_blc_pred_ok * 100 / n_blc, (n_blc_pred_ok * 1000 / n_blc) % 10,
               n_suppr * 100 / n_fetch, (n_suppr * 1000 / n_fetch) % 10);
    checks++; if (n_suppr == 0)      begin failures++; $display("no BTB read suppressed"); end
    checks++; if (n_miss == 0)       begin failures++; $display("no blc_miss"); end
    checks++; if (n_install == 0)    begin failures++; $display("no BTB install"); end
    checks++; if (n_taken_pred == 0) begin failures++; $display("no taken prediction"); end
    checks++; if (n_hold == 0)       begin failures++; $display("no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
