// tb_fp_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are converted to SystemVerilog real (double), added there, and rounded
// back to single precision to nearest, ties to even. Subnormal results are
// flushed to zero, matching the datapath's convention. The double sum of two
// singles is exact or rounds in a way that cannot change the single result, so
// this gives the correctly rounded single-precision sum independently of the
// RTL adder.
// fop_value(row, col, seed) also lives here: a hash of its arguments mapped
// to [1, 2), standing in for real filter outputs (the test data are this
// design's own).
package tb_fp_pkg;

  function automatic real fp_to_real(logic [31:0] f);
    real m;
    int  e;
    e = int'(f[30:23]);
    if (e == 0) return 0.0;
    m = real'({1'b1, f[22:0]});
    return (f[31] ? -1.0 : 1.0) * m * (2.0 ** (e - 150));
  endfunction

  function automatic logic [31:0] real_to_fp(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [24:0] keep;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:0] == 0) return {s, 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    keep = {1'b0, m[52:29]};
    g    = m[28];
    st   = |m[27:0];
    if (g && (st || keep[0])) keep = keep + 1;
    if (keep[24]) begin
      keep = keep >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), keep[22:0]};
  endfunction

  function automatic logic [31:0] fp_add_ref(logic [31:0] a, logic [31:0] b);
    return real_to_fp(fp_to_real(a) + fp_to_real(b));
  endfunction

  // Deterministic pseudo-random FOP value in [1, 2) for point (row, col),
  // so a test can regenerate any point without storing the plane.
  function automatic logic [31:0] fop_value(int row, int col, int seed);
    logic [31:0] h;
    h = 32'(row) * 32'h9E37_79B1 ^ 32'(col) * 32'h85EB_CA77 ^ 32'(seed) * 32'hC2B2_AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return {1'b0, 8'd127, h[22:0]};
  endfunction

endpackage
