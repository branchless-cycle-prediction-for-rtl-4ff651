// blc_filter: branchless-cycle predictor (BLC-filter).
//
// A global history register (blcp_ghr) records, one bit per fetch cycle,
// whether the cycle fetched at least one branch (BC, 1) or none (BLC, 0). The
// newest GHR_SIZE bits select a saturating counter in the pattern table
// (blcp_pht). A saturated counter predicts that the next fetch cycle is
// branchless, in which case the BTB need not be read in that cycle.
//
// Timing. The prediction is made one cycle ahead: pred_blc is a flip-flop
// output, valid for the whole fetch cycle it refers to and computed at the
// previous clock edge from the newest history. Whether a fetch group really
// held a branch is known at decode, FETCH_LAT cycles after fetch. In that
// cycle dec_branch carries one flag per fetched slot; their OR is shifted into
// the history and updates the counter that was used to predict that group
// (increment on BLC, clear on BC). A cycle with nothing at decode is recorded
// as branchless. blc_miss flags, in the decode cycle, a group that held a branch
// although it had been predicted branchless, the case that costs the
// pipeline one cycle. hold = 1 freezes the whole filter, for front-end stalls.
//
// From the predictor description: history coding, the table of 2^GHR_SIZE
// counters, reset-on-branch/increment-on-branchless, predicting BLC on a
// saturated counter, updating every cycle at decode with the history of the
// fetch time. This design's own choices: the flip-flop holding the prediction,
// the hold input, treating empty decode cycles as branchless, and the
// blc_miss output.
module blc_filter
  import blcp_pkg::*;
#(
  parameter int unsigned GHR_SIZE  = blcp_pkg::DEF_GHR_SIZE,
  parameter int unsigned CNT_W     = blcp_pkg::DEF_CNT_W,
  parameter int unsigned SAT       = (1 << CNT_W) - 1,
  parameter int unsigned FETCH_LAT = blcp_pkg::DEF_FETCH_LAT,
  parameter int unsigned FETCH_W   = blcp_pkg::DEF_FETCH_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hold,        // stall: keep all state
  input  logic [FETCH_W-1:0] dec_branch,  // per-slot branch flags at decode
  output logic               pred_blc,    // this fetch cycle predicted branchless
  output logic               blc_miss     // group at decode was a BC predicted BLC
);

  cycle_kind_e         dec_kind;
  logic [GHR_SIZE-1:0] look_idx, upd_idx;
  logic                look_sat;
  logic [CNT_W-1:0]    look_cnt;
  logic                pred_q;
  logic                pred_at_dec;

  assign dec_kind = (|dec_branch) ? BC : BLC;

  blcp_ghr #(
    .GHR_SIZE (GHR_SIZE),
    .FETCH_LAT(FETCH_LAT)
  ) u_ghr (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (!hold),
    .kind_in (dec_kind),
    .look_idx(look_idx),
    .upd_idx (upd_idx)
  );

  blcp_pht #(
    .GHR_SIZE(GHR_SIZE),
    .CNT_W   (CNT_W),
    .SAT     (SAT)
  ) u_pht (
    .clk     (clk),
    .rst_n   (rst_n),
    .upd_en  (!hold),
    .upd_idx (upd_idx),
    .upd_kind(dec_kind),
    .look_idx(look_idx),
    .look_sat(look_sat),
    .look_cnt(look_cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pred_q <= 1'b0;   // access the BTB until trained
    else if (!hold) pred_q <= look_sat;
  end

  assign pred_blc = pred_q;

  // Carry each fetch cycle's prediction down to decode.
  generate
    if (FETCH_LAT == 0) begin : g_nolat
      assign pred_at_dec = pred_q;
    end else begin : g_lat
      logic pred_pipe_q [FETCH_LAT];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < FETCH_LAT; i++) pred_pipe_q[i] <= 1'b0;
        end else if (!hold) begin
          pred_pipe_q[0] <= pred_q;
          for (int i = 1; i < FETCH_LAT; i++) pred_pipe_q[i] <= pred_pipe_q[i-1];
        end
      end
      assign pred_at_dec = pred_pipe_q[FETCH_LAT-1];
    end
  endgenerate

  assign blc_miss = !hold && pred_at_dec && (dec_kind == BC);

endmodule
