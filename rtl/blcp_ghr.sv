// blcp_ghr: global history shift register of branch (1) and branchless (0)
// fetch cycles.
//
// Every cycle in which the front end advances (en = 1), the outcome of the
// fetch group that reaches decode is shifted in at bit 0, so bit 0 is always
// the most recent cycle. Two windows of GHR_SIZE bits are read out:
//   look_idx  the newest GHR_SIZE bits of the value the register takes at the
//             next clock edge, including the outcome shifted in this cycle.
//             The filter registers its prediction for the next fetch cycle
//             from this index.
//   upd_idx   the history as it stood when the group now at decode was looked
//             up. The outcome of a group is known FETCH_LAT cycles after it was
//             fetched, by which time FETCH_LAT newer bits have entered, so the
//             register keeps FETCH_LAT bits beyond GHR_SIZE and the update
//             window is the lookup window shifted left by FETCH_LAT.
// With FETCH_LAT = 0 the update index is the current register value, and the
// outcome entering at the same edge points at the entry it updates.
//
// The shift discipline, the 0/1 coding and the left shift by the fetch
// latency follow the predictor description; keeping the shifted-out bits in
// FETCH_LAT extra flip-flops, and freezing on en = 0, are this design's
// choices. Reset clears the history to all branchless.
module blcp_ghr
  import blcp_pkg::*;
#(
  parameter int unsigned GHR_SIZE  = blcp_pkg::DEF_GHR_SIZE,
  parameter int unsigned FETCH_LAT = blcp_pkg::DEF_FETCH_LAT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,        // advance by one cycle
  input  cycle_kind_e         kind_in,   // outcome of the group at decode
  output logic [GHR_SIZE-1:0] look_idx,  // index for the next prediction
  output logic [GHR_SIZE-1:0] upd_idx    // index of the entry to update now
);

  localparam int unsigned HW = GHR_SIZE + FETCH_LAT;

  if (GHR_SIZE == 0) begin : g_bad_size
    $error("blcp_ghr: GHR_SIZE must be at least 1");
  end

  logic [HW-1:0] hist_q, hist_d;

  always_comb begin
    hist_d = en ? HW'({hist_q, logic'(kind_in)}) : hist_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist_q <= '0;
    else        hist_q <= hist_d;
  end

  assign look_idx = hist_d[GHR_SIZE-1:0];
  assign upd_idx  = hist_q[HW-1:FETCH_LAT];

endmodule
