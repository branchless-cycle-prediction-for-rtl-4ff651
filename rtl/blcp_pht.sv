// blcp_pht: prediction history table of the BLC-filter, 2^GHR_SIZE saturating
// counters of CNT_W bits indexed by the global history.
//
// Update port: when upd_en is high the counter at upd_idx is cleared if the
// cycle held a branch (BC) and incremented, stopping at SAT, if it did not
// (BLC). Counters never count down in any other way.
// Lookup port: look_sat is high when the counter at look_idx equals SAT once
// this cycle's update is taken into account, so a prediction registered at
// the clock edge already sees the write made at that same edge.
// look_cnt is that same counter value, for observation.
//
// Reset on branch, increment on branchless and predict-on-saturation follow
// the predictor description; the write-through forwarding to the lookup port
// and clearing every counter on reset are this design's choices. SAT defaults
// to the counter's largest value.
module blcp_pht
  import blcp_pkg::*;
#(
  parameter int unsigned GHR_SIZE = blcp_pkg::DEF_GHR_SIZE,
  parameter int unsigned CNT_W    = blcp_pkg::DEF_CNT_W,
  parameter int unsigned SAT      = (1 << CNT_W) - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                upd_en,
  input  logic [GHR_SIZE-1:0] upd_idx,
  input  cycle_kind_e         upd_kind,
  input  logic [GHR_SIZE-1:0] look_idx,
  output logic                look_sat,
  output logic [CNT_W-1:0]    look_cnt
);

  localparam int unsigned ENTRIES = 1 << GHR_SIZE;

  // The saturation value must be reachable by the counter.
  if (SAT == 0 || SAT >= (1 << CNT_W)) begin : g_bad_sat
    $error("blcp_pht: SAT=%0d does not fit a %0d-bit counter", SAT, CNT_W);
  end
  localparam logic [CNT_W-1:0] SAT_V = CNT_W'(SAT);

  logic [CNT_W-1:0] cnt_q [ENTRIES];
  logic [CNT_W-1:0] upd_val;

  // New value of the entry being updated.
  always_comb begin
    if (upd_kind == BC)           upd_val = '0;
    else if (cnt_q[upd_idx] >= SAT_V) upd_val = SAT_V;
    else                          upd_val = cnt_q[upd_idx] + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) cnt_q[i] <= '0;
    end else if (upd_en) begin
      cnt_q[upd_idx] <= upd_val;
    end
  end

  always_comb begin
    look_cnt = (upd_en && upd_idx == look_idx) ? upd_val : cnt_q[look_idx];
    look_sat = (look_cnt == SAT_V);
  end

endmodule
