// tb_hs_full: full-size run of the harmonic-summing module.
//
// The top is used with its default parameters: one half plane of 42 rows x
// 2^21 columns, 8 harmonic planes, last 200 candidates per plane, channel
// depth 1. The host-reordered plane is streamed in at full rate, one beat of
// N_LPCC words per cycle, and the candidate lists are read out without
// backpressure. Checked:
//   - every beat leaving the compute stage (4 points x 8 sums) against the
//     reference sums, in the expected order (work group, row, work item);
//   - per-plane candidate totals and the last-200 lists, entry by entry;
//   - the cycle count: one work group per S_WG cycles once loading overlaps
//     computing, i.e. about 2^21/16 x 168 = 22.0 million cycles.
// Thresholds give a low hit rate (a few per cent on every third row), so
// every ring is overwritten many times.
// No ports and no parameter overrides on the top; driven and sampled on the
// falling clock edge. Takes a few minutes of simulation.
module tb_hs_full;
  import hs_pkg::*;
  import tb_fp_pkg::*;
  import tb_hs_ref_pkg::*;

  localparam int  NCH  = 2 ** COL_W;
  localparam int  NWG  = NCH / N_COL;
  localparam int  NC   = 200;
  localparam real RATE = 1.5;

  logic clk = 0, rst_n = 0;
  logic ta_we = 0;
  logic [HP_W-1:0] ta_hp;
  logic [ROW_W-1:0] ta_row;
  fp32_t ta_data;
  logic start = 0, busy, done;
  logic s_valid = 0, s_ready;
  fp32_t [N_LPCC-1:0] s_data;
  logic cand_valid, cand_ready = 1;
  cand_t cand;
  logic [N_HP-1:0][31:0] total;
  logic starve;

  hs_multiplehp_r dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  fp32_t th_tab [N_HP][N_ROWS];
  cand_t ref_list [N_HP][$];
  longint ref_total [N_HP];

  // beat monitor at the channel input: reference sums and reference lists
  int bw = 0, bi = 0, bq = 0;
  longint t0 = 0, t_last = 0, n_beats = 0;
  always @(negedge clk) if (rst_n && dut.hv && dut.hr) begin
    automatic int col0 = bw * N_COL + bq * N_PWI;
    automatic bit ok = (int'(dut.hbeat.row) == bi) && (int'(dut.hbeat.col0) == col0) &&
                       (dut.hbeat.last == (bw == NWG - 1 && bi == N_ROWS - 1 && bq == N_COL / N_PWI - 1));
    for (int p = 0; p < N_PWI; p++) begin
      automatic fp32_t [N_HP-1:0] h = hp_ref(bi, col0 + p);
      if (dut.hbeat.hp[p] != h) ok = 0;
      for (int k = 0; k < N_HP; k++)
        if (fp32_gt(h[k], th_tab[k][bi])) begin
          ref_total[k]++;
          ref_list[k].push_back('{hp: HP_W'(k), row: ROW_W'(bi), col: COL_W'(col0 + p), value: h[k]});
          if (ref_list[k].size() > NC) void'(ref_list[k].pop_front());
        end
    end
    if (ok) checks++;
    else check(0, $sformatf("beat wg %0d row %0d item %0d", bw, bi, bq));
    n_beats++;
    if (dut.hbeat.last) t_last = cycle;
    if (++bq == N_COL / N_PWI) begin
      bq = 0;
      if (++bi == N_ROWS) begin
        bi = 0;
        bw++;
        if (bw % 16384 == 0) $display("%0d of %0d work groups at cycle %0d", bw, NWG, cycle);
      end
    end
  end

  initial begin
    cand_t got [N_HP][$];
    longint lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 1; k <= N_HP; k++)
      for (int i = 0; i < N_ROWS; i++) begin
        @(negedge clk);
        ta_we = 1; ta_hp = HP_W'(k - 1); ta_row = ROW_W'(i);
        ta_data = ta(k, i, RATE);
        th_tab[k-1][i] = ta_data;
      end
    @(negedge clk);
    ta_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cycle;
    fork
      begin : feed
        for (int w = 0; w < NWG; w++)
          for (int b = 0; b < S_WG; b++) begin
            for (int l = 0; l < N_LPCC; l++) s_data[l] = rfop_word(w, b * N_LPCC + l, NCH);
            s_valid = 1;
            while (!s_ready) @(negedge clk);
            @(negedge clk);
          end
        s_valid = 0;
      end
      begin : drain
        while (!done) begin
          @(negedge clk);
          if (cand_valid && cand_ready) got[cand.hp].push_back(cand);
        end
      end
    join
    check(n_beats == longint'(NWG) * N_ROWS * (N_COL / N_PWI), $sformatf("%0d beats", n_beats));
    for (int k = 0; k < N_HP; k++) begin
      $display("HP%0d: %0d candidates, %0d kept", k + 1, ref_total[k], ref_list[k].size());
      check(longint'(total[k]) == ref_total[k], $sformatf("HP%0d total %0d expected %0d", k + 1, total[k], ref_total[k]));
      check(ref_total[k] > NC, $sformatf("HP%0d ring not overwritten", k + 1));
      check(got[k].size() == ref_list[k].size(), $sformatf("HP%0d list length %0d", k + 1, got[k].size()));
      for (int n = 0; n < ref_list[k].size() && n < got[k].size(); n++)
        check(got[k][n] == ref_list[k][n], $sformatf("HP%0d entry %0d", k + 1, n));
    end
    lat = t_last - t0;
    $display("last beat after %0d cycles for %0d work groups (%0.1f ms at 263 MHz)", lat, NWG, real'(lat) / 263.0e3);
    check(lat >= longint'(NWG) * S_WG && lat <= longint'(NWG + 1) * S_WG + 16, $sformatf("cycle count %0d", lat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
