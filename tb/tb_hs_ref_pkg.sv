// tb_hs_ref_pkg: reference model of the harmonic-summing module for the
// testbenches.
//
// fop(i, j)        synthetic filter-output plane, values in [1, 2)
// rfop_word(...)   word m of work group w of the reordered plane, as the host
//                  would lay it out (block k = 1..N_HP of rows_k x cols_k
//                  points, row-major, then padding)
// hp_ref(i, j)     all N_HP harmonic sums of output point (i, j), each formed
//                  as HP_k = HP_{k-1} + FOP(floor(i/k), floor(j/k)) with
//                  correctly rounded single-precision additions
// ta(k, i)         thresholds used by the tests: about the mean of HP_k, so
//                  many candidates, on every third row; far above it elsewhere
// The stretch and summation rules follow the original; the layout modelled
// by rfop_word and the thresholds are this design's own test choices.
package tb_hs_ref_pkg;
  import hs_pkg::*;
  import tb_fp_pkg::*;

  localparam int SEED = 5;
  localparam logic [31:0] PAD = 32'hDEAD_BEEF;

  function automatic fp32_t fop(int i, int j);
    return fop_value(i, j, SEED);
  endfunction

  function automatic fp32_t rfop_word(int w, int m, int n_chan);
    int k, loc, r, c, col;
    if (m >= WG_NEEDED) return PAD;
    k = 1;
    while (m >= offset_k(k + 1)) k++;
    loc = m - offset_k(k);
    r   = loc / cols_k(k);
    c   = loc % cols_k(k);
    col = (w * N_COL) / k + c;
    if (col >= n_chan) return PAD;   // beyond the plane: never read
    return fop(r, col);
  endfunction

  function automatic fp32_t [N_HP-1:0] hp_ref(int i, int j);
    fp32_t [N_HP-1:0] h;
    h[0] = fop(i, j);
    for (int k = 2; k <= N_HP; k++)
      h[k-1] = fp_add_ref(h[k-2], fop(i / k, j / k));
    return h;
  endfunction

  // rate: 0 gives a high hit rate on every third row, larger values fewer hits
  function automatic fp32_t ta(int k, int i, real rate);
    real mean, sd;
    mean = 1.5 * k;
    sd   = 0.29 * $sqrt(real'(k));
    if (i % 3 == 0) return real_to_fp(mean + rate * sd);
    return real_to_fp(mean + (rate + 2.0) * sd);
  endfunction

endpackage
