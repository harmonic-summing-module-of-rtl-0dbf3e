// tb_candidate_detector: checks threshold detection and the candidate rings.
// Random beats (N_PWI points x N_HP sums, random row and column) are compared
// by a reference with per-plane, per-row thresholds; the reference keeps the
// last N_CAND candidates of each plane. After the last beat the read-out,
// taken with random backpressure, must equal the reference lists in order,
// and the totals must match. Pass 1 overflows the rings (many candidates,
// including several per plane in one beat), pass 2 has few candidates, with
// negative values, zeros and equal-to-threshold values that must not count.
// No ports; driven and sampled on the falling clock edge, watchdog-limited.
// Keeping the last N_CAND per plane follows the original; record format,
// strict comparison and read-out order are this design's choices.
module tb_candidate_detector;
  import hs_pkg::*;

  localparam int NC = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic in_valid = 0, in_ready;
  hp_beat_t in_beat;
  logic [ROW_W-1:0] th_row;
  fp32_t [N_HP-1:0] th;
  logic cand_valid, cand_ready = 1;
  cand_t cand;
  logic [N_HP-1:0][31:0] total;
  logic done;

  candidate_detector #(.N_CAND(NC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_multi = 0;
  fp32_t ta [N_HP][N_ROWS];
  cand_t ref_list [N_HP][$];
  int    ref_total [N_HP];

  // threshold table model: combinational lookup of the requested row
  always_comb for (int k = 0; k < N_HP; k++) th[k] = ta[k][th_row];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // values: thresholds are 2.0 (0x40000000); sums drawn around it
  function automatic fp32_t val(int mode);
    case ($urandom_range(mode == 0 ? 3 : 9))
      0: return {1'b0, 8'd128, 23'($urandom)};          // > 2: hit
      1: return 32'h4000_0000;                          // == 2: no hit
      2: return {1'b1, 8'd128, 23'($urandom)};          // negative
      3: return 32'h0000_0000;
      default: return {1'b0, 8'd127, 23'($urandom)};    // in [1,2): no hit
    endcase
  endfunction

  task automatic run(int nbeats, int mode);
    cand_t got [N_HP][$];
    for (int k = 0; k < N_HP; k++) begin ref_list[k].delete(); ref_total[k] = 0; end
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    for (int b = 0; b < nbeats; b++) begin
      in_beat.row  = ROW_W'($urandom_range(N_ROWS - 1));
      in_beat.col0 = COL_W'($urandom);
      in_beat.last = (b == nbeats - 1);
      for (int p = 0; p < N_PWI; p++)
        for (int k = 0; k < N_HP; k++) in_beat.hp[p][k] = val(mode);
      for (int k = 0; k < N_HP; k++) begin
        automatic int nh = 0;
        for (int p = 0; p < N_PWI; p++)
          if (in_beat.hp[p][k][31] == 0 && in_beat.hp[p][k][30:0] > ta[k][in_beat.row][30:0]) begin
            nh++;
            ref_total[k]++;
            ref_list[k].push_back('{hp: HP_W'(k), row: in_beat.row, col: in_beat.col0 + COL_W'(p), value: in_beat.hp[p][k]});
            if (ref_list[k].size() > NC) void'(ref_list[k].pop_front());
          end
        if (nh > 1) n_multi++;
      end
      in_valid = ($urandom_range(4) != 0) || in_beat.last;
      while (!in_valid) begin
        @(negedge clk);
        in_valid = 1;
      end
      check(in_ready, "not ready while running");
      @(negedge clk);
      in_valid = 0;
    end
    while (!done) begin
      check(!in_ready, "ready while reading out");
      cand_ready = ($urandom_range(2) != 0);
      if (cand_valid && cand_ready) got[cand.hp].push_back(cand);
      @(negedge clk);
    end
    cand_ready = 1;
    for (int k = 0; k < N_HP; k++) begin
      check(total[k] == 32'(ref_total[k]), $sformatf("HP%0d total %0d expected %0d", k + 1, total[k], ref_total[k]));
      check(got[k].size() == ref_list[k].size(), $sformatf("HP%0d length %0d expected %0d", k + 1, got[k].size(), ref_list[k].size()));
      for (int n = 0; n < got[k].size() && n < ref_list[k].size(); n++)
        check(got[k][n] == ref_list[k][n], $sformatf("HP%0d entry %0d", k + 1, n));
    end
  endtask

  initial begin
    for (int k = 0; k < N_HP; k++)
      for (int i = 0; i < N_ROWS; i++) ta[k][i] = 32'h4000_0000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(200, 0);
    check(n_multi > 0, "never several candidates of one plane in a beat");
    for (int k = 0; k < N_HP; k++) check(ref_total[k] > NC, "ring did not overflow");
    run(6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
