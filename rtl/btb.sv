// btb: direct-mapped branch target buffer, BTB_ENTRIES entries of
// {valid, tag, target}.
//
// The read port is used at fetch. It is only active when rd_en is high; a
// cycle with rd_en low is a BTB access avoided, and then rd_hit is low. The
// entry is selected by the word address bits of rd_pc just above the 2-bit
// byte offset, and the remaining upper bits are compared with the stored tag.
// The read is combinational: rd_hit and rd_target are valid in the cycle of
// the request. The write port installs {tag, target} for a resolved taken
// branch at the following clock edge; a write and a read of the same entry in
// one cycle return the old contents.
//
// The size (128 entries, one way) is that of the simulated XScale-like core.
// Its organisation is otherwise not described: the 4-byte instruction
// alignment, the PC bit split, allocation on taken branches only and clearing
// the valid bits on reset are this design's choices.
module btb
  import blcp_pkg::*;
#(
  parameter int unsigned ENTRIES = blcp_pkg::DEF_BTB_ENTRIES,
  parameter int unsigned PC_W    = blcp_pkg::DEF_PC_W
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup at fetch
  input  logic            rd_en,
  input  logic [PC_W-1:0] rd_pc,
  output logic            rd_hit,
  output logic [PC_W-1:0] rd_target,
  // install at branch resolution
  input  logic            wr_en,
  input  logic [PC_W-1:0] wr_pc,
  input  logic [PC_W-1:0] wr_target
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = PC_W - IDX_W - 2;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [PC_W-1:0]  target;
  } btb_entry_t;

  logic             valid_q [ENTRIES];
  btb_entry_t       mem_q   [ENTRIES];

  logic [IDX_W-1:0] rd_idx, wr_idx;
  logic [TAG_W-1:0] rd_tag, wr_tag;

  assign rd_idx = rd_pc[2 +: IDX_W];
  assign rd_tag = rd_pc[PC_W-1 -: TAG_W];
  assign wr_idx = wr_pc[2 +: IDX_W];
  assign wr_tag = wr_pc[PC_W-1 -: TAG_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid_q[i] <= 1'b0;
    end else if (wr_en) begin
      valid_q[wr_idx] <= 1'b1;
    end
  end

  // Tag and target storage needs no reset: the valid bit guards it.
  always_ff @(posedge clk) begin
    if (wr_en) mem_q[wr_idx] <= '{tag: wr_tag, target: wr_target};
  end

  always_comb begin
    rd_hit    = rd_en && valid_q[rd_idx] && (mem_q[rd_idx].tag == rd_tag);
    rd_target = rd_en ? mem_q[rd_idx].target : '0;
  end

endmodule
