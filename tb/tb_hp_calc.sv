// tb_hp_calc: checks the harmonic-plane calculation stage.
// The test writes each work group of a synthetic plane, laid out as the host
// would reorder it, into a wg_buffer half and raises that half's full flag;
// hp_calc reads it and sends beats. Every beat (row, first column, 4 points
// x 8 harmonic sums) is compared with sums formed by the reference model,
// in the expected order. Also checked: each half is released once after its
// last work item, the last beat is flagged, busy falls at the end, and with
// data ready and no backpressure one work group takes S_WG cycles. A second
// pass adds random backpressure and late data (starve).
// No ports; driven on the falling clock edge, beats checked on rising edges.
// Work-group and work-item sizes follow the original; the work-item shape
// and pipeline timing under test are this design's.
module tb_hp_calc;
  import hs_pkg::*;
  import tb_fp_pkg::*;
  import tb_hs_ref_pkg::*;

  localparam int NWG = 7;
  localparam int NCH = NWG * N_COL;

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] full = 2'b00;
  logic rel, rel_buf, rd_en, rd_buf;
  logic [N_PWI-1:0][N_HP-1:0][BADDR_W-1:0] rd_addr;
  fp32_t [N_PWI-1:0][N_HP-1:0] rd_data;
  logic out_valid, out_ready = 1;
  hp_beat_t out_beat;
  logic busy, starve;

  logic wr_en = 0, wr_buf = 0;
  logic [$clog2(S_WG)-1:0] wr_beat = '0;
  fp32_t [N_LPCC-1:0] wr_data;

  hp_calc #(.N_WG(NWG)) dut (.*);
  wg_buffer u_buf (.clk, .wr_en, .wr_buf, .wr_beat, .wr_data, .rd_en, .rd_buf, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_rel = 0, n_starve = 0, n_bp = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  // expected beat order: work group, row, work item within the row
  int bw, bi, bq;
  longint t_first, t_last;
  always @(posedge clk) if (rst_n) begin
    if (starve) n_starve++;
    if (out_valid && !out_ready) n_bp++;
    if (rel) begin
      n_rel++;
      full[rel_buf] <= 1'b0;
    end
    if (out_valid && out_ready) begin
      automatic int col0 = bw * N_COL + bq * N_PWI;
      automatic bit ok = (int'(out_beat.row) == bi) && (int'(out_beat.col0) == col0);
      automatic bit lst = (bw == NWG - 1) && (bi == N_ROWS - 1) && (bq == N_COL / N_PWI - 1);
      for (int p = 0; p < N_PWI; p++)
        if (out_beat.hp[p] != hp_ref(bi, col0 + p)) ok = 0;
      check(ok, $sformatf("beat wg %0d row %0d item %0d: row %0d col %0d", bw, bi, bq, out_beat.row, out_beat.col0));
      check(out_beat.last == lst, "last flag");
      if (bw == 0 && bi == 0 && bq == 0) t_first = cycle;
      if (lst) t_last = cycle;
      if (++bq == N_COL / N_PWI) begin
        bq = 0;
        if (++bi == N_ROWS) begin bi = 0; bw++; end
      end
    end
  end

  task automatic fill(int w, bit b);
    for (int t = 0; t < S_WG; t++) begin
      @(negedge clk);
      wr_en = 1; wr_buf = b; wr_beat = 8'(t);
      for (int l = 0; l < N_LPCC; l++) wr_data[l] = rfop_word(w, t * N_LPCC + l, NCH);
    end
    @(negedge clk);
    wr_en = 0;
    full[b] <= 1'b1;
  endtask

  task automatic run(bit slow);
    bw = 0; bi = 0; bq = 0; n_rel = 0;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    for (int w = 0; w < NWG; w++) begin
      while (full[w % 2]) @(negedge clk);
      if (slow) repeat ($urandom_range(200)) @(negedge clk);
      fill(w, w[0]);
    end
    while (busy) @(negedge clk);
    check(bw == NWG, $sformatf("%0d work groups seen", bw));
    check(n_rel == NWG, $sformatf("%0d releases", n_rel));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // pass 1: no backpressure, each group written as soon as its half is free
    fork
      run(0);
      begin
        @(negedge clk);
        out_ready = 1;
      end
    join
    // each group is written while the previous one is computed, so beats
    // come at one per cycle, S_WG per work group (plus the writer's gap cycle)
    check(t_last - t_first >= longint'(NWG * S_WG - 1) && t_last - t_first <= longint'(NWG * (S_WG + 3)),
          $sformatf("beats spread over %0d cycles", t_last - t_first));
    // pass 2: late data and random backpressure
    fork
      run(1);
      begin
        while (bw < NWG) begin
          @(negedge clk);
          out_ready = ($urandom_range(3) != 0);
        end
        out_ready = 1;
      end
    join
    check(n_starve > 0, "never starved");
    check(n_bp > 0, "never back-pressured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
