// bimodal_predictor: direction predictor of ENTRIES 2-bit saturating
// counters indexed by the word address bits of the PC.
//
// rd_pc selects a counter combinationally; rd_taken is its upper bit. At
// branch resolution (upd_en) the counter of upd_pc moves one step towards
// the outcome upd_taken, saturating at 0 and 3. Counters reset to 1, weakly
// not taken.
//
// The size (128 entries of 2 bits) is that of the simulated core; the index
// bits and the reset value are this design's choices. The unit is read every
// fetch cycle: only the BTB is gated by the branchless-cycle predictor.
module bimodal_predictor
  import blcp_pkg::*;
#(
  parameter int unsigned ENTRIES = blcp_pkg::DEF_BIM_ENTRIES,
  parameter int unsigned PC_W    = blcp_pkg::DEF_PC_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] rd_pc,
  output logic            rd_taken,
  input  logic            upd_en,
  input  logic [PC_W-1:0] upd_pc,
  input  logic            upd_taken
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [1:0]       ctr_q [ENTRIES];
  logic [IDX_W-1:0] upd_idx;

  assign upd_idx = upd_pc[2 +: IDX_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr_q[i] <= 2'd1;
    end else if (upd_en) begin
      if (upd_taken && ctr_q[upd_idx] != 2'd3)       ctr_q[upd_idx] <= ctr_q[upd_idx] + 2'd1;
      else if (!upd_taken && ctr_q[upd_idx] != 2'd0) ctr_q[upd_idx] <= ctr_q[upd_idx] - 2'd1;
    end
  end

  assign rd_taken = ctr_q[rd_pc[2 +: IDX_W]][1];

endmodule
