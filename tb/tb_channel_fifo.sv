// tb_channel_fifo: checks the inter-stage channel FIFO.
// Random valid and ready on both sides, at the document's depth of 1 and at
// depth 4, with the received sequence compared with the sent one. Also checks
// that at depth 1 a continuous stream passes at one beat per cycle, that the
// FIFO never accepts more than DEPTH beats while the reader is stalled, and
// the one-cycle latency.
// No ports; driven and sampled on the falling clock edge, watchdog-limited.
// Depth 1 is the original's; the same-cycle pass-through it relies on for
// full rate is this design's choice.
module tb_channel_fifo;
  typedef logic [15:0] word_t;

  logic clk = 0, rst_n = 0;
  logic iv1 = 0, ir1, ov1, or1 = 0, iv4 = 0, ir4, ov4, or4 = 0;
  word_t id1, od1, id4, od4;

  channel_fifo #(.T(word_t), .DEPTH(1)) dut1 (.clk, .rst_n, .in_valid(iv1), .in_ready(ir1), .in_data(id1),
                                             .out_valid(ov1), .out_ready(or1), .out_data(od1));
  channel_fifo #(.T(word_t), .DEPTH(4)) dut4 (.clk, .rst_n, .in_valid(iv4), .in_ready(ir4), .in_data(id4),
                                             .out_valid(ov4), .out_ready(or4), .out_data(od4));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sent1 = 0, got1 = 0, sent4 = 0, got4 = 0, stall_cycles = 0, occ4 = 0, max_occ4 = 0;
  bit  cont = 0;

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

  // monitors on the rising edge (values before the edge)
  always @(posedge clk) if (rst_n) begin
    if (ov1 && or1) begin check(od1 == word_t'(got1), $sformatf("d1 got %0d exp %0d", od1, got1)); got1++; end
    if (iv1 && ir1) sent1++;
    if (ov4 && or4) begin check(od4 == word_t'(got4), $sformatf("d4 got %0d exp %0d", od4, got4)); got4++; end
    if (iv4 && ir4) sent4++;
    occ4 = sent4 - got4;
    if (occ4 > max_occ4) max_occ4 = occ4;
    if (cont && iv1 && !ir1) stall_cycles++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency: one beat, reader ready
    @(negedge clk);
    iv1 = 1; id1 = 0; or1 = 1;
    @(negedge clk);
    iv1 = 0;
    check(ov1 && od1 == 0, "beat not visible one cycle after it was written");
    @(negedge clk);
    // continuous stream at depth 1
    cont = 1;
    for (int n = 1; n < 201; n++) begin
      iv1 = 1; id1 = word_t'(n);
      @(negedge clk);
    end
    iv1 = 0; cont = 0;
    @(negedge clk);
    check(stall_cycles == 0, $sformatf("depth-1 stream stalled %0d cycles", stall_cycles));
    check(got1 == 201, $sformatf("got %0d", got1));
    // random traffic on both
    for (int n = 0; n < 4000; n++) begin
      // the data of a beat is its sequence number, so an unaccepted beat is
      // simply offered again
      iv1 = 1'($urandom_range(1)); id1 = word_t'(sent1);
      iv4 = 1'($urandom_range(1)); id4 = word_t'(sent4);
      or1 = ($urandom_range(2) != 0);
      or4 = (n % 300 < 100) ? 1'b0 : ($urandom_range(2) != 0);
      @(negedge clk);
    end
    iv1 = 0; iv4 = 0; or1 = 1; or4 = 1;
    repeat (10) @(negedge clk);
    check(got1 == sent1 && got4 == sent4, $sformatf("lost beats %0d/%0d %0d/%0d", got1, sent1, got4, sent4));
    check(max_occ4 == 4, $sformatf("depth-4 occupancy peaked at %0d", max_occ4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
