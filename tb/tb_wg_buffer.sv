// tb_wg_buffer: checks the double-buffered work-group memory.
// Fills both halves with random work groups through the N_LPCC-lane write port
// (padding words included), then reads random addresses of every bank and
// port from either half, one cycle latency, while the other half is being
// rewritten; also checks that rd_en low holds the read data.
// No ports; driven and sampled on the falling clock edge, watchdog-limited.
// Overlapping a load with the reads of the other half follows the original;
// banking and port counts are this design's.
module tb_wg_buffer;
  import hs_pkg::*;

  logic clk = 0;
  logic wr_en = 0, wr_buf = 0;
  logic [$clog2(S_WG)-1:0] wr_beat = '0;
  fp32_t [N_LPCC-1:0] wr_data;
  logic rd_en = 0, rd_buf = 0;
  logic [N_PWI-1:0][N_HP-1:0][BADDR_W-1:0] rd_addr = '0;
  fp32_t [N_PWI-1:0][N_HP-1:0] rd_data;

  wg_buffer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  fp32_t model [2][WG_WORDS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_wg(bit b);
    for (int t = 0; t < S_WG; t++) begin
      @(negedge clk);
      wr_en = 1; wr_buf = b; wr_beat = 8'(t);
      for (int l = 0; l < N_LPCC; l++) begin
        wr_data[l] = $urandom;
        model[b][t * N_LPCC + l] = wr_data[l];
      end
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic random_reads(int n, bit b, bit also_write);
    fp32_t [N_PWI-1:0][N_HP-1:0] expv, held;
    for (int r = 0; r < n; r++) begin
      @(negedge clk);
      rd_en = 1; rd_buf = b;
      for (int p = 0; p < N_PWI; p++)
        for (int k = 1; k <= N_HP; k++) begin
          rd_addr[p][k-1] = BADDR_W'($urandom_range(size_k(k) - 1));
          expv[p][k-1] = model[b][offset_k(k) + int'(rd_addr[p][k-1])];
        end
      if (also_write) begin
        wr_en = 1; wr_buf = ~b; wr_beat = 8'($urandom_range(S_WG - 1));
        for (int l = 0; l < N_LPCC; l++) begin
          wr_data[l] = $urandom;
          model[~b][int'(wr_beat) * N_LPCC + l] = wr_data[l];
        end
      end
      @(negedge clk);
      wr_en = 0;
      checks++;
      if (rd_data !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL read half %0d", b);
      end
      // hold
      rd_en = 0;
      held = rd_data;
      for (int p = 0; p < N_PWI; p++) rd_addr[p] = '0;
      @(negedge clk);
      checks++;
      if (rd_data !== held) begin
        failures++;
        $display("FAIL hold");
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    write_wg(0);
    write_wg(1);
    random_reads(300, 0, 0);
    random_reads(300, 1, 0);
    random_reads(300, 0, 1);
    random_reads(300, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
