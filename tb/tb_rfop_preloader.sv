// tb_rfop_preloader: checks the work-group preloader.
// A stream with random gaps feeds N_WG work groups; a model of the compute
// side releases each full half after a random delay. The test checks every
// write (half, beat number, data), that a half is marked full exactly after
// its last beat, that the stream is held off while the half to fill is still
// full, that halves alternate, and that busy ends after N_WG groups. With no
// gaps and immediate release, it checks one beat per cycle.
// No ports; driven and sampled on the falling clock edge, watchdog-limited.
// Streaming consecutive work-group data follows the original; the
// handshake and flag hand-over under test are this design's.
module tb_rfop_preloader;
  import hs_pkg::*;

  localparam int NWG = 6;

  logic clk = 0, rst_n = 0, start = 0;
  logic s_valid = 0, s_ready;
  fp32_t [N_LPCC-1:0] s_data;
  logic wr_en, wr_buf;
  logic [$clog2(S_WG)-1:0] wr_beat;
  fp32_t [N_LPCC-1:0] wr_data;
  logic [1:0] full;
  logic rel = 0, rel_buf = 0;
  logic busy;

  rfop_preloader #(.N_WG(NWG)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_beat = 0, exp_buf = 0, n_writes = 0, n_held = 0;
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
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write-port and flag checker
  always @(posedge clk) if (rst_n && busy) begin
    if (s_valid && !s_ready) n_held++;
    if (!s_ready && busy) check(full[exp_buf] == 1'b1, "s_ready low while the half to fill is free");
    if (wr_en) begin
      n_writes++;
      check(s_valid && s_ready, "write without a stream beat");
      check(int'(wr_beat) == exp_beat && int'(wr_buf) == exp_buf, $sformatf("beat %0d/%0d half %0d/%0d", wr_beat, exp_beat, wr_buf, exp_buf));
      check(wr_data == s_data, "data");
      check(!full[wr_buf], "write into a full half");
      if (exp_beat == S_WG - 1) begin exp_beat = 0; exp_buf ^= 1; end
      else exp_beat++;
    end
  end

  // compute-side model: releases a full half after a delay
  bit fast = 0;
  int ptr = 0;
  initial begin
    forever begin
      @(negedge clk);
      rel = 0;
      if (rst_n && full[ptr]) begin
        if (!fast) repeat ($urandom_range(400)) @(negedge clk);
        rel = 1; rel_buf = ptr[0];
        ptr ^= 1;
      end
    end
  end

  task automatic stream(bit gaps);
    for (int w = 0; w < NWG; w++)
      for (int b = 0; b < S_WG; b++) begin
        for (int l = 0; l < N_LPCC; l++) s_data[l] = $urandom;
        while (gaps && $urandom_range(3) == 0) begin
          s_valid = 0;
          @(negedge clk);
        end
        s_valid = 1;
        while (!s_ready) @(negedge clk);
        @(negedge clk);
      end
    s_valid = 0;
  endtask

  initial begin
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    stream(1);
    repeat (3) @(negedge clk);
    check(!busy, "busy after all groups");
    check(n_writes == NWG * S_WG, $sformatf("writes %0d", n_writes));
    check(n_held > 0, "stream never held off");
    // full rate with immediate release
    wait (full == 2'b00);
    @(negedge clk);
    fast = 1; exp_beat = 0; exp_buf = 0; n_writes = 0;
    start = 1; @(negedge clk); start = 0;
    t0 = cycle;
    stream(0);
    check(cycle - t0 <= longint'(NWG * S_WG + NWG * 2 + 2), $sformatf("full-rate load took %0d cycles", cycle - t0));
    check(n_writes == NWG * S_WG, $sformatf("writes %0d", n_writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
