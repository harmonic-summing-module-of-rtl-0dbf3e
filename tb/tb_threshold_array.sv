// tb_threshold_array: checks the threshold table.
// Loads random thresholds for every plane and row, then reads every row in
// random order and compares all N_HP outputs; overwrites random entries and
// re-checks; checks that rows beyond the table read as +infinity (no
// candidate can exceed it).
// No ports; writes are set up on falling edges and land on rising edges;
// combinational reads are checked 1 ns after the row changes. One threshold
// per plane and row is the original's scheme;
// the +infinity for unused rows is this design's choice.
module tb_threshold_array;
  import hs_pkg::*;

  logic clk = 0, we = 0;
  logic [HP_W-1:0] wk;
  logic [ROW_W-1:0] wrow, rrow;
  fp32_t wdata;
  fp32_t [N_HP-1:0] th;

  threshold_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  fp32_t model [N_HP][N_ROWS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int k, int i, fp32_t v);
    @(negedge clk);
    we = 1; wk = HP_W'(k); wrow = ROW_W'(i); wdata = v;
    model[k][i] = v;
    @(negedge clk);
    we = 0;
  endtask

  task automatic read_all();
    for (int n = 0; n < 3 * N_ROWS; n++) begin
      automatic int i = $urandom_range(N_ROWS - 1);
      rrow = ROW_W'(i);
      #1;
      for (int k = 0; k < N_HP; k++) begin
        checks++;
        if (th[k] !== model[k][i]) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d row=%0d: %h expected %h", k, i, th[k], model[k][i]);
        end
      end
    end
  endtask

  initial begin
    for (int k = 0; k < N_HP; k++)
      for (int i = 0; i < N_ROWS; i++) write(k, i, $urandom);
    read_all();
    for (int n = 0; n < 50; n++) write($urandom_range(N_HP - 1), $urandom_range(N_ROWS - 1), $urandom);
    read_all();
    rrow = ROW_W'(N_ROWS + 3);
    #1;
    checks++;
    if (th[0] !== 32'h7F80_0000) begin failures++; $display("FAIL out-of-range row"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
