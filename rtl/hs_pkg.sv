// hs_pkg: constants, types and constant functions shared by the harmonic-summing
// datapath (MULTIPLEHP-R organisation).
//
// The harmonic planes HP_1..HP_N_HP are formed from one half of the filter-output
// plane (FOP): N_ROWS rows (templates) by N_CHAN columns (channels). The k-th
// stretch plane reads FOP(floor(i/k), floor(j/k)); HP_k = HP_{k-1} + SP_k.
//
// Work is cut into work groups of N_COL consecutive output columns. For each
// work group the host has laid out, contiguously, every FOP point the group
// needs (the reordered FOP, RFOP). The layout of one work group is:
//   block k = 1..N_HP, one after the other, each block row-major with
//   rows_k = floor((N_ROWS-1)/k)+1 rows and cols_k columns, where cols_k is the
//   largest number of distinct floor(j/k) values any work group can touch;
//   the group is padded with dummy words up to N_LPCC * S_WG words.
// S_WG = N_ROWS*N_COL/N_PWI is the number of work items (one per cycle), so
// loading a work group at N_LPCC words per cycle takes exactly as many cycles
// as computing it. The numbers (8 HPs, 42-row half plane, 16 columns per
// group, 4 points per work item, 8 loaded points per cycle) are the document's
// MULTIPLEHP-R-(16,4) configuration; the exact block order and the row-major
// layout inside each block are this design's choice.
package hs_pkg;

  // ---- configuration -----------------------------------------------------
  localparam int N_HP   = 8;    // harmonic planes
  localparam int N_ROWS = 42;   // rows of a half FOP
  localparam int N_COL  = 16;   // output columns per work group
  localparam int N_PWI  = 4;    // output points (of all HPs) per work item
  localparam int N_LPCC = 8;    // RFOP words loaded per clock cycle
  localparam int FP_W   = 32;   // IEEE-754 single precision
  localparam int ROW_W  = 6;    // enough for N_ROWS
  localparam int COL_W  = 21;   // column index, N_CHAN up to 2^21
  localparam int HP_W   = 3;    // harmonic index 0..N_HP-1 (HP_{k} is index k-1)

  localparam int S_WG   = N_ROWS * N_COL / N_PWI;  // work items per work group (168)

  typedef logic [FP_W-1:0] fp32_t;

  // ---- RFOP layout (constant functions) -----------------------------------
  // k is the harmonic number, 1..N_HP.
  function automatic int rows_k(int k);
    return (N_ROWS - 1) / k + 1;
  endfunction

  // Largest count of distinct floor(j/k) over the N_COL columns of any work
  // group. Work-group starts are multiples of N_COL, so the start modulo k
  // cycles through at most k values.
  function automatic int cols_k(int k);
    int best, n;
    best = 0;
    for (int w = 0; w < k; w++) begin
      n = (w * N_COL + N_COL - 1) / k - (w * N_COL) / k + 1;
      if (n > best) best = n;
    end
    return best;
  endfunction

  function automatic int size_k(int k);
    return rows_k(k) * cols_k(k);
  endfunction

  function automatic int offset_k(int k);
    int s;
    s = 0;
    for (int m = 1; m < k; m++) s += size_k(m);
    return s;
  endfunction

  localparam int WG_NEEDED = offset_k(N_HP + 1);       // 1068 points
  localparam int WG_WORDS  = N_LPCC * S_WG;            // 1344 words incl. padding
  localparam int MIN_LPCC  = (WG_NEEDED + S_WG - 1) / S_WG;  // 7 (unoptimised)
  localparam int MAX_BANK  = size_k(1);                // largest block
  localparam int BADDR_W   = $clog2(MAX_BANK);

  // ---- floating point helpers ---------------------------------------------
  // a > b for IEEE-754 single values (NaN never compares greater; +0 == -0).
  function automatic logic fp32_gt(fp32_t a, fp32_t b);
    logic a_nan, b_nan;
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    if (a_nan || b_nan) return 1'b0;
    if (a[30:0] == 0 && b[30:0] == 0) return 1'b0;
    case ({a[31], b[31]})
      2'b00:   return a[30:0] > b[30:0];
      2'b01:   return 1'b1;
      2'b10:   return 1'b0;
      default: return a[30:0] < b[30:0];
    endcase
  endfunction

  // ---- stream types ---------------------------------------------------------
  // One beat from the HP calculation to candidate detection: N_PWI points in
  // one row, columns col0 .. col0+N_PWI-1, each with all N_HP harmonic sums.
  typedef struct packed {
    logic                         last;   // final beat of the whole plane
    logic [ROW_W-1:0]             row;
    logic [COL_W-1:0]             col0;
    fp32_t [N_PWI-1:0][N_HP-1:0]  hp;     // hp[p][k-1] = HP_k(row, col0+p)
  } hp_beat_t;

  // One recorded candidate.
  typedef struct packed {
    logic [HP_W-1:0]  hp;    // harmonic index k-1
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
    fp32_t            value;
  } cand_t;

endpackage
