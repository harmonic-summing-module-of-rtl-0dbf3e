// rfop_preloader: streams the reordered FOP from off-chip memory into the
// double-buffered local memory, one work group per buffer half.
//
// After the host has reordered the FOP, the points a work group needs lie at
// consecutive addresses, so they arrive as a plain stream of N_LPCC words per
// beat; one work group is exactly S_WG beats (N_LPCC*S_WG words with padding).
// The preloader writes the beats into the half it is filling; after the last
// beat it marks that half full and moves to the other half, which it may only
// fill once the compute side has released it. The compute side therefore
// never waits while the stream keeps up, and the stream is held off
// (s_ready low) while both halves are full. Streaming the reordered plane and
// overlapping the loading of one work group with the computing of the
// previous one follow the document; the ready/valid stream and the two-flag
// buffer handover are this design's choice.
//
// Interface: start (pulse, while idle) begins a pass over N_WG work groups.
// s_valid/s_ready/s_data: input stream, a beat moves when both are high.
// wr_*: write port of wg_buffer. full[b]: half b holds a complete work group.
// rel/rel_buf: the compute side has finished reading half rel_buf.
// busy: a pass is loading.
module rfop_preloader
  import hs_pkg::*;
#(
  parameter int N_WG = 2**21 / N_COL
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      s_valid,
  output logic                      s_ready,
  input  fp32_t [N_LPCC-1:0]        s_data,
  output logic                      wr_en,
  output logic                      wr_buf,
  output logic [$clog2(S_WG)-1:0]   wr_beat,
  output fp32_t [N_LPCC-1:0]        wr_data,
  output logic [1:0]                full,
  input  logic                      rel,
  input  logic                      rel_buf,
  output logic                      busy
);

  localparam int WG_W = $clog2(N_WG + 1);

  logic [$clog2(S_WG)-1:0] beat;
  logic [WG_W-1:0]         wg_cnt;
  logic                    fill_buf;
  logic                    take;

  assign s_ready = busy && !full[fill_buf];
  assign take    = s_valid && s_ready;

  assign wr_en   = take;
  assign wr_buf  = fill_buf;
  assign wr_beat = beat;
  assign wr_data = s_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat     <= '0;
      wg_cnt   <= '0;
      fill_buf <= 1'b0;
      full     <= 2'b00;
      busy     <= 1'b0;
    end else begin
      if (start && !busy) begin
        busy     <= 1'b1;
        beat     <= '0;
        wg_cnt   <= '0;
        fill_buf <= 1'b0;
        full     <= 2'b00;
      end else begin
        if (rel) full[rel_buf] <= 1'b0;
        if (take) begin
          if (int'(beat) == S_WG - 1) begin
            beat           <= '0;
            full[fill_buf] <= 1'b1;
            fill_buf       <= ~fill_buf;
            wg_cnt         <= wg_cnt + 1'b1;
            if (int'(wg_cnt) == N_WG - 1) busy <= 1'b0;
          end else begin
            beat <= beat + 1'b1;
          end
        end
      end
    end
  end

  // A half is never released while it is being filled.
  assert property (@(posedge clk) disable iff (!rst_n) rel |-> full[rel_buf]);

endmodule
