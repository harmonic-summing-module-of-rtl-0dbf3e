// hs_multiplehp_r: harmonic-summing module, MULTIPLEHP-R organisation, with
// candidate detection.
//
// Purpose: from one half of the filter-output plane (N_ROWS x N_CHAN single-
// precision points) form all N_HP harmonic planes HP_k(i, j) =
// sum over m = 1..k of FOP(floor(i/m), floor(j/m)), compare every point with
// the threshold of its plane and row, and keep the last N_CAND candidates of
// each plane. No harmonic plane is ever stored: all N_HP sums of a point are
// formed together and tested at once.
//
// Data flow:
//   s_* stream (host-reordered FOP, N_LPCC words per cycle)
//     -> rfop_preloader -> wg_buffer (two halves, one work group each)
//     -> hp_calc (N_PWI points x N_HP planes per cycle)
//     -> channel_fifo (depth CH_DEPTH)
//     -> candidate_detector (+ threshold_array) -> cand_* stream.
// A work group of N_COL columns is loaded in S_WG cycles and computed in S_WG
// cycles; the two overlap, so a pass over N_CHAN columns takes about
// (N_CHAN/N_COL + 1) * S_WG cycles plus pipeline fill and candidate read-out.
//
// Ports: ta_* loads thresholds before a pass; start begins a pass (while
// idle); busy is high from start until the candidate lists have been sent;
// done pulses high once they have. total[k-1] counts candidates found in HP_k.
// starve is high in cycles where compute waits for the stream (for
// monitoring). The parameter defaults are the document's main configuration
// (8 planes, 42-row half plane, 2^21 channels, 200 candidates, channel depth
// 1, work groups of 16 columns, 4 points per work item, 8 words per cycle).
module hs_multiplehp_r
  import hs_pkg::*;
#(
  parameter int N_CHAN   = 2**21,
  parameter int N_CAND   = 200,
  parameter int CH_DEPTH = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // threshold load
  input  logic                  ta_we,
  input  logic [HP_W-1:0]       ta_hp,
  input  logic [ROW_W-1:0]      ta_row,
  input  fp32_t                 ta_data,
  // control
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // reordered FOP stream
  input  logic                  s_valid,
  output logic                  s_ready,
  input  fp32_t [N_LPCC-1:0]    s_data,
  // candidate list
  output logic                  cand_valid,
  input  logic                  cand_ready,
  output cand_t                 cand,
  output logic [N_HP-1:0][31:0] total,
  output logic                  starve
);

  localparam int N_WG = N_CHAN / N_COL;

  logic                                    wr_en, wr_buf;
  logic [$clog2(S_WG)-1:0]                 wr_beat;
  fp32_t [N_LPCC-1:0]                      wr_data;
  logic [1:0]                              full;
  logic                                    rel, rel_buf;
  logic                                    rd_en, rd_buf;
  logic [N_PWI-1:0][N_HP-1:0][BADDR_W-1:0] rd_addr;
  fp32_t [N_PWI-1:0][N_HP-1:0]             rd_data;
  logic                                    hv, hr, cv, cr;
  hp_beat_t                                hbeat, cbeat;
  logic [ROW_W-1:0]                        th_row;
  fp32_t [N_HP-1:0]                        th;
  logic                                    load_busy, calc_busy, det_done;
  logic                                    active;

  // pass control: active from start until the candidate read-out is done
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 active <= 1'b0;
    else if (start && !active)  active <= 1'b1;
    else if (det_done)          active <= 1'b0;
  end
  assign busy = active;
  assign done = active && det_done;

  logic go;
  assign go = start && !active;

  rfop_preloader #(.N_WG(N_WG)) u_load (
    .clk, .rst_n, .start(go),
    .s_valid, .s_ready, .s_data,
    .wr_en, .wr_buf, .wr_beat, .wr_data,
    .full, .rel, .rel_buf, .busy(load_busy)
  );

  wg_buffer u_buf (
    .clk, .wr_en, .wr_buf, .wr_beat, .wr_data,
    .rd_en, .rd_buf, .rd_addr, .rd_data
  );

  hp_calc #(.N_WG(N_WG)) u_calc (
    .clk, .rst_n, .start(go), .full, .rel, .rel_buf,
    .rd_en, .rd_buf, .rd_addr, .rd_data,
    .out_valid(hv), .out_ready(hr), .out_beat(hbeat),
    .busy(calc_busy), .starve
  );

  channel_fifo #(.T(hp_beat_t), .DEPTH(CH_DEPTH)) u_ch (
    .clk, .rst_n,
    .in_valid(hv), .in_ready(hr), .in_data(hbeat),
    .out_valid(cv), .out_ready(cr), .out_data(cbeat)
  );

  threshold_array u_ta (
    .clk, .we(ta_we), .wk(ta_hp), .wrow(ta_row), .wdata(ta_data),
    .rrow(th_row), .th
  );

  candidate_detector #(.N_CAND(N_CAND)) u_det (
    .clk, .rst_n, .start(go),
    .in_valid(cv), .in_ready(cr), .in_beat(cbeat),
    .th_row, .th,
    .cand_valid, .cand_ready, .cand, .total,
    .done(det_done)
  );

  // load_busy and calc_busy are kept for visibility in simulation.
  logic unused_busy;
  assign unused_busy = load_busy ^ calc_busy;

  initial assert (N_CHAN % N_COL == 0);

endmodule
