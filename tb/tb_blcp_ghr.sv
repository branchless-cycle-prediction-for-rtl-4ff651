// tb_blcp_ghr: self-checking test of the global history register.
//
// Shifts random branch/branchless outcomes in, with random stall cycles, and
// keeps its own record of all outcomes. Each cycle it checks that look_idx
// is the newest GHR_SIZE outcomes including the one entering now, and that
// upd_idx is the window FETCH_LAT outcomes older, i.e. the lookup index of
// FETCH_LAT advancing cycles ago.
module tb_blcp_ghr;
  import blcp_pkg::*;

  localparam int unsigned C   = DEF_GHR_SIZE;
  localparam int unsigned LAT = DEF_FETCH_LAT;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en;
  cycle_kind_e kind_in;
  logic [C-1:0] look_idx, upd_idx;

  int checks = 0, failures = 0, n_hold = 0;
  logic hist [$];          // newest outcome at index 0
  logic [C-1:0] exp_look, exp_upd;

  blcp_ghr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [C-1:0] window(int unsigned skip);
    logic [C-1:0] v = '0;
    for (int i = 0; i < C; i++) v[i] = hist[skip + i];
    return v;
  endfunction

  initial begin
    en = 0; kind_in = BLC;
    for (int i = 0; i < C + LAT + 1; i++) hist.push_front(1'b0);   // reset value
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en      = ($urandom_range(0, 5) != 0);
      kind_in = ($urandom_range(0, 2) == 0) ? BC : BLC;
      #1;
      exp_upd = window(0 + LAT);
      if (en) hist.push_front(logic'(kind_in));
      exp_look = window(0);
      if (!en) n_hold++;
      checks++;
      if (look_idx != exp_look || upd_idx != exp_upd) begin
        failures++;
        if (failures < 10) $display("t=%0d look=%b/%b upd=%b/%b", t, look_idx, exp_look, upd_idx, exp_upd);
      end
      if (hist.size() > 64) void'(hist.pop_back());
    end
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
