// blcp_bpu: branch prediction unit of a single-issue embedded core with
// branchless-cycle prediction (BLCP).
//
// A conventional front end reads the BTB every fetch cycle, yet most cycles
// fetch no branch at all. Here a small BLC-filter (blc_filter) predicts, one
// cycle in advance, that the coming fetch cycle is branchless; in such a
// cycle the BTB read is suppressed (btb_access low) and the fetch continues
// sequentially. The bimodal direction predictor is read every cycle as
// usual. A taken prediction needs both a BTB hit and a taken bimodal counter;
// the predicted target is the BTB's.
//
// Interface and timing:
//   fetch     fetch_valid/fetch_pc in a cycle; btb_access, pred_taken and
//             pred_target answer combinationally in the same cycle. pred_blc
//             is the filter's registered prediction for this cycle.
//   decode    FETCH_LAT cycles after fetch, dec_branch gives a branch flag per
//             fetched slot of that group (all zero if nothing reached
//             decode). It trains the filter. blc_miss is raised in that cycle
//             if the group held a branch whose BTB read had been suppressed:
//             the front end then pays the one-cycle penalty of a late target.
//   resolve   res_valid with the branch PC, its direction and its target
//             trains the bimodal counters and, for taken branches, installs
//             the target in the BTB.
//   hold      freezes the filter while the front end is stalled.
//
// The gating of the BTB by the filter, the 128-entry direct-mapped BTB and
// the 128-entry bimodal table follow the described design and its simulated
// core. How the target and direction are combined, the resolve port and the
// signalling of the penalty are this design's choices.
module blcp_bpu
  import blcp_pkg::*;
#(
  parameter int unsigned GHR_SIZE    = blcp_pkg::DEF_GHR_SIZE,
  parameter int unsigned CNT_W       = blcp_pkg::DEF_CNT_W,
  parameter int unsigned SAT         = (1 << CNT_W) - 1,
  parameter int unsigned FETCH_LAT   = blcp_pkg::DEF_FETCH_LAT,
  parameter int unsigned FETCH_W     = blcp_pkg::DEF_FETCH_W,
  parameter int unsigned BTB_ENTRIES = blcp_pkg::DEF_BTB_ENTRIES,
  parameter int unsigned BIM_ENTRIES = blcp_pkg::DEF_BIM_ENTRIES,
  parameter int unsigned PC_W        = blcp_pkg::DEF_PC_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hold,
  // fetch
  input  logic               fetch_valid,
  input  logic [PC_W-1:0]    fetch_pc,
  output logic               pred_blc,
  output logic               btb_access,
  output logic               pred_taken,
  output logic [PC_W-1:0]    pred_target,
  // decode
  input  logic [FETCH_W-1:0] dec_branch,
  output logic               blc_miss,
  // resolve
  input  logic               res_valid,
  input  logic [PC_W-1:0]    res_pc,
  input  logic               res_taken,
  input  logic [PC_W-1:0]    res_target
);

  logic            btb_hit;
  logic [PC_W-1:0] btb_target;
  logic            bim_taken;

  blc_filter #(
    .GHR_SIZE (GHR_SIZE),
    .CNT_W    (CNT_W),
    .SAT      (SAT),
    .FETCH_LAT(FETCH_LAT),
    .FETCH_W  (FETCH_W)
  ) u_filter (
    .clk       (clk),
    .rst_n     (rst_n),
    .hold      (hold),
    .dec_branch(dec_branch),
    .pred_blc  (pred_blc),
    .blc_miss  (blc_miss)
  );

  assign btb_access = fetch_valid && !pred_blc;

  btb #(
    .ENTRIES(BTB_ENTRIES),
    .PC_W   (PC_W)
  ) u_btb (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (btb_access),
    .rd_pc    (fetch_pc),
    .rd_hit   (btb_hit),
    .rd_target(btb_target),
    .wr_en    (res_valid && res_taken),
    .wr_pc    (res_pc),
    .wr_target(res_target)
  );

  bimodal_predictor #(
    .ENTRIES(BIM_ENTRIES),
    .PC_W   (PC_W)
  ) u_bim (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_pc    (fetch_pc),
    .rd_taken (bim_taken),
    .upd_en   (res_valid),
    .upd_pc   (res_pc),
    .upd_taken(res_taken)
  );

  assign pred_taken  = btb_hit && bim_taken;
  assign pred_target = btb_target;

endmodule
