// fp32_add: single-precision floating-point adder (combinational).
//
// The harmonic sums HP_k = HP_{k-1} + SP_k are single-precision additions; this
// is the adder used for each of them. The operand with the larger magnitude is
// selected, the other is aligned with guard/round/sticky bits, the mantissas are
// added or subtracted, the result is normalised and rounded to nearest, ties to
// even. Choices of this design (the document only says "floating-point
// additions"): subnormal inputs and outputs are flushed to zero, an exact zero
// difference gives +0, overflow gives infinity, and any NaN or Inf+(-Inf)
// gives the quiet NaN 0x7FC00000.
//
// Interface: a, b in, sum out, no clock. Timing: purely combinational; the
// caller registers the result.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] sum
);

  logic        sa, sb, big_s;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic        swap;
  logic [7:0]  e_big, e_sml;
  logic [23:0] m_big, m_sml;
  logic        s_big, s_sml;
  logic [7:0]  d;
  logic [27:0] x_big, x_sml, x_shift, acc;
  logic [26:0] norm;
  logic        sticky;
  logic [4:0]  lz;
  logic signed [9:0] e_res;
  logic [24:0] rounded;
  logic        rnd_up;

  always_comb begin
    sa = a[31];  sb = b[31];
    ea = a[30:23]; eb = b[30:23];
    a_nan  = (ea == 8'hFF) && (a[22:0] != 0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 0);
    a_zero = (ea == 8'h00);              // zero or subnormal: flushed
    b_zero = (eb == 8'h00);
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};

    swap  = (b[30:0] > a[30:0]);
    e_big = swap ? eb : ea;  e_sml = swap ? ea : eb;
    m_big = swap ? mb : ma;  m_sml = swap ? ma : mb;
    s_big = swap ? sb : sa;  s_sml = swap ? sa : sb;
    big_s = s_big;

    // alignment: 1 carry bit, 24 mantissa bits, guard, round, sticky
    d       = e_big - e_sml;
    x_big   = {1'b0, m_big, 3'b000};
    x_sml   = {1'b0, m_sml, 3'b000};
    x_shift = '0;
    sticky  = 1'b0;
    if (d >= 8'd27) begin
      x_shift = 28'd1;                   // only the sticky bit survives
    end else begin
      x_shift = x_sml >> d;
      for (int i = 0; i < 27; i++)
        if (i < int'(d) && x_sml[i]) sticky = 1'b1;
      x_shift[0] = x_shift[0] | sticky;
    end

    acc = (s_big == s_sml) ? (x_big + x_shift) : (x_big - x_shift);

    // normalise so that the leading one sits at bit 26
    e_res = {2'b00, e_big};
    norm  = acc[26:0];
    lz    = '0;
    if (acc[27]) begin
      norm  = {acc[27:2], acc[1] | acc[0]};
      e_res = e_res + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (acc[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      norm  = 27'(acc << lz);
      e_res = e_res - 10'(lz);
    end

    // round to nearest, ties to even
    rnd_up  = norm[2] && (norm[1] || norm[0] || norm[3]);
    rounded = {1'b0, norm[26:3]} + 25'(rnd_up);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e_res   = e_res + 10'sd1;
    end

    // result selection
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      sum = 32'h7FC0_0000;
    end else if (a_inf) begin
      sum = a;
    end else if (b_inf) begin
      sum = b;
    end else if (a_zero && b_zero) begin
      sum = {sa & sb, 31'd0};
    end else if (b_zero) begin
      sum = a;
    end else if (a_zero) begin
      sum = b;
    end else if (acc == 0) begin
      sum = 32'd0;
    end else if (e_res >= 10'sd255) begin
      sum = {big_s, 8'hFF, 23'd0};
    end else if (e_res <= 10'sd0) begin
      sum = {big_s, 31'd0};
    end else begin
      sum = {big_s, e_res[7:0], rounded[22:0]};
    end
  end

endmodule
