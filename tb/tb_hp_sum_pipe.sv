// tb_hp_sum_pipe: self-checking test of the harmonic summation pipeline.
// Feeds random stretch-plane vectors (values like the FOP's, in [1,2), plus a
// few of both signs and wide range), with the stage enable dropped at random,
// and compares every output vector and tag with running sums formed by the
// reference adder. With the enable held high it also checks the latency of
// N_HP-1 cycles.
// No ports; stimulus is driven and outputs sampled on the falling clock edge.
// The summation rule HP_k = HP_{k-1} + SP_k is the original's; the stall
// enable and latency being checked are this design's.
module tb_hp_sum_pipe;
  import hs_pkg::*;
  import tb_fp_pkg::*;

  localparam int TAG_W = 16;

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  fp32_t [N_HP-1:0] in_sp;
  logic [TAG_W-1:0] in_tag;
  logic out_valid;
  fp32_t [N_HP-1:0] out_hp;
  logic [TAG_W-1:0] out_tag;

  int checks = 0, failures = 0, cycle = 0;
  fp32_t [N_HP-1:0] exp_q [$];
  int               tag_q [$];
  int               t_in  [$];

  hp_sum_pipe #(.TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t [N_HP-1:0] ref_sum(fp32_t [N_HP-1:0] sp);
    fp32_t [N_HP-1:0] r;
    r[0] = sp[0];
    for (int k = 1; k < N_HP; k++) r[k] = fp_add_ref(r[k-1], sp[k]);
    return r;
  endfunction

  // checker
  always @(posedge clk) begin
    if (rst_n && en && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        if (out_hp !== exp_q[0] || out_tag !== TAG_W'(tag_q[0])) begin
          failures++;
          if (failures < 10) $display("FAIL tag %0d: got %h expected %h", tag_q[0], out_hp, exp_q[0]);
        end
        void'(exp_q.pop_front());
        void'(tag_q.pop_front());
      end
    end
  end

  initial begin
    int lat;
    fp32_t [N_HP-1:0] sp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency test: one vector, enable held
    @(negedge clk);
    for (int k = 0; k < N_HP; k++) sp[k] = fop_value(k, 1, 7);
    in_sp = sp; in_tag = 16'hABCD; in_valid = 1;
    exp_q.push_back(ref_sum(sp)); tag_q.push_back(16'hABCD);
    lat = cycle;
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (cycle - lat != N_HP - 1) begin
      failures++;
      $display("latency %0d, expected %0d", cycle - lat, N_HP - 1);
    end
    @(negedge clk);
    // random stream with random stalls
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < N_HP; k++)
        sp[k] = (n % 10 == 9) ? {1'($urandom_range(1)), 8'(110 + $urandom_range(30)), 23'($urandom)}
                              : fop_value(n, k, 3);
      in_sp = sp; in_tag = TAG_W'(n); in_valid = 1;
      en = ($urandom_range(3) != 0);
      if (en) begin
        exp_q.push_back(ref_sum(sp));
        tag_q.push_back(n);
      end else begin
        n--;   // held: present the same index again
      end
      @(negedge clk);
    end
    in_valid = 0; en = 1;
    repeat (N_HP + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
