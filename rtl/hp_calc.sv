// hp_calc: the harmonic-plane calculation of the MULTIPLEHP-R organisation.
//
// It walks the plane one work group (N_COL columns) at a time. Inside a work
// group one work item is issued per cycle; work item t covers row
// floor(t / (N_COL/N_PWI)) and N_PWI consecutive columns of that row, so a
// work group of N_ROWS rows takes S_WG = N_ROWS*N_COL/N_PWI cycles. For each
// of its points the work item reads, from the local copy of the work group,
// the N_HP stretch-plane values SP_k = FOP(floor(i/k), floor(j/k)) and sums
// them into HP_1..HP_N_HP; the beat of N_PWI points with all their harmonic
// sums goes to candidate detection and is not stored. A work group may start
// only once the preloader has filled its buffer half; the half is released as
// soon as the last work item of the group has read it.
//
// Pipeline: issue (address generation) -> local-memory read register ->
// N_HP-1 adder stages -> out. Latency from issue to out_valid is N_HP cycles.
// Backpressure: while out_valid is high and out_ready low, the whole pipeline
// holds. The work-item shape (row-wise groups of N_PWI columns) and the
// pipeline are this design's reading of the document's NDRange kernel, whose
// work-group and work-item sizes (16 columns, 4 points per work item) it
// keeps.
//
// Interface: start (pulse, while idle); full[b] from the preloader; rel,
// rel_buf to it; rd_* to wg_buffer; out_valid/out_ready/out_beat to the
// channel; busy; starve is high in cycles where a work group is due but its
// data have not arrived yet.
module hp_calc
  import hs_pkg::*;
#(
  parameter int N_WG = 2**21 / N_COL
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  start,
  input  logic [1:0]                            full,
  output logic                                  rel,
  output logic                                  rel_buf,
  output logic                                  rd_en,
  output logic                                  rd_buf,
  output logic [N_PWI-1:0][N_HP-1:0][BADDR_W-1:0] rd_addr,
  input  fp32_t [N_PWI-1:0][N_HP-1:0]           rd_data,
  output logic                                  out_valid,
  input  logic                                  out_ready,
  output hp_beat_t                              out_beat,
  output logic                                  busy,
  output logic                                  starve
);

  localparam int WG_W  = $clog2(N_WG + 1);
  localparam int WIR   = N_COL / N_PWI;          // work items per row
  localparam int CW    = $clog2(N_COL);
  localparam int TAG_W = 1 + ROW_W + COL_W;

  typedef struct packed {
    logic             last;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col0;
  } tag_t;

  // ---------------- issue stage ----------------
  logic                       running;
  logic                       buf_ptr;
  logic [WG_W-1:0]            wg_cnt;
  logic [ROW_W-1:0]           row;
  logic [$clog2(WIR+1)-1:0]   wi;        // work item within the row
  logic [COL_W-1:0]           jb;        // first column of the work group
  logic [N_HP-1:0][HP_W-1:0]  rmod;      // jb mod k
  logic                       en;
  logic                       issue;
  logic                       last_wi;
  logic                       last_wg;
  logic [CW-1:0]              c0;

  assign en      = !(out_valid && !out_ready);
  assign issue   = running && full[buf_ptr] && en;
  assign starve  = running && !full[buf_ptr];
  assign last_wi = (int'(row) == N_ROWS - 1) && (int'(wi) == WIR - 1);
  assign last_wg = (int'(wg_cnt) == N_WG - 1);
  assign c0      = CW'(int'(wi) * N_PWI);

  assign rel     = issue && last_wi;
  assign rel_buf = buf_ptr;
  assign rd_en   = en;
  assign rd_buf  = buf_ptr;

  for (genvar p = 0; p < N_PWI; p++) begin : g_addr
    stretch_index u_idx (
      .row  (row),
      .c    (c0 + CW'(p)),
      .rmod (rmod),
      .addr (rd_addr[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      buf_ptr <= 1'b0;
      wg_cnt  <= '0;
      row     <= '0;
      wi      <= '0;
      jb      <= '0;
      rmod    <= '0;
    end else if (start && !busy) begin
      running <= 1'b1;
      buf_ptr <= 1'b0;
      wg_cnt  <= '0;
      row     <= '0;
      wi      <= '0;
      jb      <= '0;
      rmod    <= '0;
    end else if (issue) begin
      if (int'(wi) == WIR - 1) begin
        wi <= '0;
        if (int'(row) == N_ROWS - 1) begin
          row     <= '0;
          buf_ptr <= ~buf_ptr;
          wg_cnt  <= wg_cnt + 1'b1;
          jb      <= jb + COL_W'(N_COL);
          for (int g = 0; g < N_HP; g++) begin
            automatic int r = int'(rmod[g]) + N_COL % (g + 1);
            if (r >= g + 1) r -= g + 1;
            rmod[g] <= HP_W'(r);
          end
          if (last_wg) running <= 1'b0;
        end else begin
          row <= row + 1'b1;
        end
      end else begin
        wi <= wi + 1'b1;
      end
    end
  end

  // ---------------- read stage (data register lives in wg_buffer) --------
  logic rd_valid;
  tag_t rd_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else if (en) rd_valid <= issue;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      rd_tag.last <= last_wi && last_wg;
      rd_tag.row  <= row;
      rd_tag.col0 <= jb + COL_W'(c0);
    end
  end

  // ---------------- harmonic summation -----------------------------------
  logic [N_PWI-1:0] sum_valid;
  tag_t             out_tag;

  for (genvar p = 0; p < N_PWI; p++) begin : g_sum
    if (p == 0) begin : g_tagged
      hp_sum_pipe #(.TAG_W(TAG_W)) u_sum (
        .clk, .rst_n, .en,
        .in_valid  (rd_valid),
        .in_sp     (rd_data[p]),
        .in_tag    (rd_tag),
        .out_valid (sum_valid[p]),
        .out_hp    (out_beat.hp[p]),
        .out_tag   (out_tag)
      );
    end else begin : g_plain
      logic unused_tag;
      hp_sum_pipe #(.TAG_W(1)) u_sum (
        .clk, .rst_n, .en,
        .in_valid  (rd_valid),
        .in_sp     (rd_data[p]),
        .in_tag    (1'b0),
        .out_valid (sum_valid[p]),
        .out_hp    (out_beat.hp[p]),
        .out_tag   (unused_tag)
      );
    end
  end

  // all N_PWI pipes advance together; lane 0 speaks for them
  assign out_valid     = sum_valid[0];
  logic unused_valid;
  assign unused_valid  = ^sum_valid[N_PWI-1:1];
  assign out_beat.last = out_tag.last;
  assign out_beat.row  = out_tag.row;
  assign out_beat.col0 = out_tag.col0;

  // work items issued whose beat has not yet left
  localparam int IF_W = $clog2(N_HP + 4);
  logic [IF_W-1:0] inflight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + IF_W'(issue) - IF_W'(out_valid && out_ready);
  end

  assign busy = running || (inflight != 0);

endmodule
