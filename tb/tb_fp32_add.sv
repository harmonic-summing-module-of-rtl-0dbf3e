// tb_fp32_add: self-checking test of the single-precision adder.
// Random operands of both signs over a range of exponents (including large
// exponent gaps and near-cancellation), plus directed cases (zeros, infinities,
// NaN, exact cancellation, overflow), compared with a reference sum computed in
// double precision and rounded to nearest even.
// No ports; the adder is combinational, so each case is applied and checked
// after a 1 ns delay. Round-to-nearest-even with flush-to-zero is this
// design's convention; the original names only floating-point additions.
module tb_fp32_add;
  import tb_fp_pkg::*;

  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .sum(s));

  task automatic check(logic [31:0] x, logic [31:0] y, logic [31:0] exp_s);
    a = x; b = y;
    #1;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h = %h, expected %h", x, y, s, exp_s);
    end
  endtask

  function automatic logic [31:0] rnd_fp(int emin, int emax);
    logic [31:0] r;
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(emax - emin)));
    r = {1'($urandom_range(1)), e, 23'($urandom)};
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, y;
    // directed cases
    check(32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000);   // 1 + 1 = 2
    check(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);   // 1 - 1 = +0
    check(32'h0000_0000, 32'h4040_0000, 32'h4040_0000);   // 0 + 3
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);   // -0 + -0
    check(32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000);   // inf + 1
    check(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);   // inf - inf
    check(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);   // NaN
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);   // overflow
    check(32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000);   // 1 + 2^-24: tie, stays even
    check(32'h3F80_0001, 32'h3380_0000, 32'h3F80_0002);   // tie rounds up to even
    check(32'h4B7F_FFFF, 32'h3F80_0000, 32'h4B80_0000);   // carry into exponent
    // random, moderate exponent gaps
    for (int n = 0; n < 20000; n++) begin
      x = rnd_fp(100, 154);
      y = rnd_fp(100, 154);
      check(x, y, fp_add_ref(x, y));
    end
    // random, near cancellation
    for (int n = 0; n < 5000; n++) begin
      x = rnd_fp(120, 130);
      y = {~x[31], x[30:23], x[22:0] ^ 23'($urandom_range(255))};
      check(x, y, fp_add_ref(x, y));
    end
    // random, equal signs, the harmonic-sum case
    for (int n = 0; n < 5000; n++) begin
      x = rnd_fp(126, 131);
      y = rnd_fp(126, 128);
      x[31] = 0; y[31] = 0;
      check(x, y, fp_add_ref(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
