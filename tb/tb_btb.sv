// tb_btb: self-checking test of the direct-mapped branch target buffer.
//
// Installs random branches, drawn from a small set of PCs so that entries
// are both reused and replaced by a different tag, and reads random PCs from
// the same set with the read port enabled or not. Hit and target are checked
// against a model array of {valid, pc, target} per index kept here. A
// disabled read must never hit. Counts hits, misses, conflicts and gated reads.
module tb_btb;
  import blcp_pkg::*;

  localparam int unsigned E = DEF_BTB_ENTRIES;
  localparam int unsigned P = DEF_PC_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_en, rd_hit, wr_en;
  logic [P-1:0] rd_pc, rd_target, wr_pc, wr_target;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_gated = 0, n_conflict = 0;
  bit          m_valid [E];
  logic [P-1:0] m_pc   [E];
  logic [P-1:0] m_tgt  [E];
  logic [P-1:0] pcs    [256];
  int unsigned ri, wi;
  logic exp_hit;

  btb dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_pc = '0; wr_pc = '0; wr_target = '0;
    for (int i = 0; i < E; i++) m_valid[i] = 0;
    for (int i = 0; i < 256; i++) pcs[i] = {14'($urandom_range(0, 3)), 9'($urandom), 7'($urandom), 2'b00};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      rd_en     = ($urandom_range(0, 3) != 0);
      rd_pc     = pcs[$urandom_range(0, 255)];
      wr_en     = ($urandom_range(0, 2) == 0);
      wr_pc     = pcs[$urandom_range(0, 255)];
      wr_target = P'($urandom) & ~P'(3);
      #1;
      ri = 32'(rd_pc[2 +: $clog2(E)]);
      exp_hit = rd_en && m_valid[ri] && m_pc[ri][P-1:2+$clog2(E)] == rd_pc[P-1:2+$clog2(E)];
      checks++;
      if (rd_hit !== exp_hit || (exp_hit && rd_target !== m_tgt[ri])) begin
        failures++;
        if (failures < 10) $display("t=%0d pc=%h hit=%0b/%0b tgt=%h/%h", t, rd_pc, rd_hit, exp_hit, rd_target, m_tgt[ri]);
      end
      if (!rd_en) n_gated++;
      else if (exp_hit) n_hit++;
      else n_miss++;
      @(posedge clk);
      if (wr_en) begin
        wi = 32'(wr_pc[2 +: $clog2(E)]);
        if (m_valid[wi] && m_pc[wi][P-1:2+$clog2(E)] != wr_pc[P-1:2+$clog2(E)]) n_conflict++;
        m_valid[wi] = 1; m_pc[wi] = wr_pc; m_tgt[wi] = wr_target;
      end
    end
    $display("hits=%0d misses=%0d gated=%0d conflicts=%0d", n_hit, n_miss, n_gated, n_conflict);
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_gated == 0 || n_conflict == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
