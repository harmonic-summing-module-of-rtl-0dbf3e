// tb_hs_multiplehp_r: end-to-end test of the harmonic-summing module.
//
// A reduced plane (N_CHAN columns, full 42 rows, 8 planes) is streamed in as
// the host-reordered plane; the candidate lists read out at the end are
// compared, entry by entry and in order, with a reference that forms every
// harmonic sum in software and keeps the last N_CAND candidates per plane.
// The per-plane candidate totals are compared too. Three passes:
//   1. full-rate stream, no read-out backpressure: checks the cycle count of
//      one work group per S_WG cycles (loading overlapped with computing);
//   2. stream with random gaps and read-out backpressure: compute starves;
//   3. a second threshold set with few candidates (lists not full).
// Each mechanism is counted and must occur: load/compute overlap, compute
// starving, padding words dropped, ring overwrite, read-out backpressure,
// the channel holding a beat, and restarting a pass.
// No ports; driven and sampled on the falling clock edge, watchdog-limited.
// Parameters are reduced (160 columns, 24 candidates) to keep it short.
module tb_hs_multiplehp_r;
  import hs_pkg::*;
  import tb_fp_pkg::*;
  import tb_hs_ref_pkg::*;

  localparam int N_CHAN_T = 16 * 10;
  localparam int N_CAND_T = 24;
  localparam int N_WG_T   = N_CHAN_T / N_COL;

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

  hs_multiplehp_r #(.N_CHAN(N_CHAN_T), .N_CAND(N_CAND_T), .CH_DEPTH(1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_overlap = 0, n_starve = 0, n_pad = 0, n_wrap = 0, n_bp = 0, n_chan_hold = 0, n_restart = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_load.wr_en && dut.u_calc.issue) n_overlap++;
    if (starve) n_starve++;
    if (dut.u_load.wr_en && int'(dut.u_load.wr_beat) * N_LPCC + N_LPCC - 1 >= WG_NEEDED) n_pad++;
    if (cand_valid && !cand_ready) n_bp++;
    if (dut.cv && dut.hv && dut.hr) n_chan_hold++;
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic load_ta(real rate);
    for (int k = 1; k <= N_HP; k++)
      for (int i = 0; i < N_ROWS; i++) begin
        @(negedge clk);
        ta_we = 1; ta_hp = HP_W'(k - 1); ta_row = ROW_W'(i); ta_data = ta(k, i, rate);
      end
    @(negedge clk);
    ta_we = 0;
  endtask

  // reference candidate lists
  cand_t ref_list [N_HP][$];
  int    ref_total [N_HP];

  task automatic build_ref(real rate);
    fp32_t [N_HP-1:0] h;
    for (int k = 0; k < N_HP; k++) begin ref_list[k].delete(); ref_total[k] = 0; end
    for (int w = 0; w < N_WG_T; w++)
      for (int i = 0; i < N_ROWS; i++)
        for (int c = 0; c < N_COL; c++) begin
          h = hp_ref(i, w * N_COL + c);
          for (int k = 0; k < N_HP; k++)
            if (fp32_gt(h[k], ta(k + 1, i, rate))) begin
              ref_total[k]++;
              ref_list[k].push_back('{hp: HP_W'(k), row: ROW_W'(i), col: COL_W'(w * N_COL + c), value: h[k]});
              if (ref_list[k].size() > N_CAND_T) void'(ref_list[k].pop_front());
            end
        end
  endtask

  task automatic run_pass(real rate, bit gaps, bit bp, bit timed);
    cand_t got [N_HP][$];
    longint t0, t_last;
    build_ref(rate);
    load_ta(rate);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cycle;
    t_last = 0;
    fork
      begin : feed
        for (int w = 0; w < N_WG_T; w++)
          for (int b = 0; b < S_WG; b++) begin
            for (int l = 0; l < N_LPCC; l++) s_data[l] = rfop_word(w, b * N_LPCC + l, N_CHAN_T);
            while (gaps && $urandom_range(4) == 0) begin
              s_valid = 0;
              @(negedge clk);
            end
            s_valid = 1;
            while (!s_ready) @(negedge clk);
            @(negedge clk);   // the beat moved on the rising edge in between
          end
        s_valid = 0;
      end
      begin : drain
        while (!done) begin
          @(negedge clk);
          cand_ready = !(bp && $urandom_range(3) == 0);
          if (dut.cv && dut.cr && dut.cbeat.last && t_last == 0) t_last = cycle;
          if (cand_valid && cand_ready) got[cand.hp].push_back(cand);
        end
        cand_ready = 1;
      end
    join
    for (int k = 0; k < N_HP; k++) begin
      check(total[k] == 32'(ref_total[k]), $sformatf("HP%0d total %0d expected %0d", k + 1, total[k], ref_total[k]));
      check(got[k].size() == ref_list[k].size(), $sformatf("HP%0d list length %0d expected %0d", k + 1, got[k].size(), ref_list[k].size()));
      for (int n = 0; n < ref_list[k].size() && n < got[k].size(); n++)
        check(got[k][n] == ref_list[k][n], $sformatf("HP%0d entry %0d: %h expected %h", k + 1, n, got[k][n], ref_list[k][n]));
      if (ref_total[k] > N_CAND_T) n_wrap++;
    end
    if (timed) begin
      // one work group per S_WG cycles, one extra group time for the first load
      longint lat = t_last - t0;
      $display("pass: last beat after %0d cycles for %0d work groups of %0d cycles", lat, N_WG_T, S_WG);
      check(lat >= longint'(N_WG_T * S_WG) && lat <= longint'((N_WG_T + 1) * S_WG + N_HP + 4),
            $sformatf("cycle count %0d", lat));
    end
    @(negedge clk);
    check(!busy, "busy after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_pass(0.0, 0, 0, 1);
    n_restart++;
    run_pass(0.0, 1, 1, 0);
    n_restart++;
    run_pass(3.0, 0, 1, 0);
    $display("mechanisms: overlap=%0d starve=%0d pad=%0d wrap=%0d readout_bp=%0d chan_hold=%0d restart=%0d",
             n_overlap, n_starve, n_pad, n_wrap, n_bp, n_chan_hold, n_restart);
    check(n_overlap > 0, "load/compute overlap never happened");
    check(n_starve > 0, "compute never starved");
    check(n_pad > 0, "no padding words");
    check(n_wrap > 0, "no candidate ring overwrite");
    check(n_bp > 0, "no read-out backpressure");
    check(n_chan_hold > 0, "channel never held a beat while passing one on");
    check(n_restart > 0, "no restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
