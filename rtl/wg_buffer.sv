// wg_buffer: double-buffered local memory holding one work group's slice of
// the reordered FOP (RFOP).
//
// While the compute side reads the work group held in one half, the preloader
// fills the other half with the next work group, so loading overlaps
// computing as in the document's pipelined work groups. Each half is split
// into N_HP banks, bank k holding block k of the RFOP layout (see hs_pkg):
// every cycle the compute side reads one point per harmonic for each of its
// N_PWI output points, i.e. N_PWI read ports per bank, and the preloader
// writes N_LPCC consecutive RFOP words, which may straddle two banks. Words
// beyond the needed points (the padding of a work group) are dropped.
// Inside a bank, words are spread over N_LPCC lane memories by word number
// modulo N_LPCC, so each lane memory has one write port (lane l of the beat)
// and N_PWI read ports; a read fetches the row from every lane memory and the
// registered lane number picks the word. The banking by harmonic, the lane
// split and the port counts are this design's choice; on an FPGA each lane
// memory maps to replicated block RAM or LUT RAM.
//
// Interface:
//   write: wr_en, wr_buf (half), wr_beat (beat number within the work group,
//          words wr_beat*N_LPCC .. +N_LPCC-1), wr_data[N_LPCC]
//   read:  rd_en, rd_buf, rd_addr[p][k-1] (address within bank k);
//          rd_data[p][k-1] is registered, valid the cycle after rd_en.
//          rd_en = 0 holds rd_data.
module wg_buffer
  import hs_pkg::*;
(
  input  logic                                clk,
  input  logic                                wr_en,
  input  logic                                wr_buf,
  input  logic [$clog2(S_WG)-1:0]             wr_beat,
  input  fp32_t [N_LPCC-1:0]                  wr_data,
  input  logic                                rd_en,
  input  logic                                rd_buf,
  input  logic [N_PWI-1:0][N_HP-1:0][BADDR_W-1:0] rd_addr,
  output fp32_t [N_PWI-1:0][N_HP-1:0]         rd_data
);

  for (genvar g = 0; g < N_HP; g++) begin : g_bank
    localparam int K   = g + 1;
    localparam int OFF = offset_k(K);
    localparam int SZ  = size_k(K);
    // beats that carry words of this bank, and rows per half of each lane
    localparam int R0  = OFF / N_LPCC;
    localparam int R1  = (OFF + SZ - 1) / N_LPCC;
    localparam int D   = R1 - R0 + 1;
    localparam int MW  = $clog2(2 * D);
    localparam int LW  = (N_LPCC > 1) ? $clog2(N_LPCC) : 1;

    // one memory per write lane: word w of the bank sits in lane w mod N_LPCC,
    // row w / N_LPCC - R0, so every memory has a single write port
    fp32_t [N_PWI-1:0][N_LPCC-1:0] q;
    logic  [N_PWI-1:0][LW-1:0]     sel;

    for (genvar l = 0; l < N_LPCC; l++) begin : g_lane
      fp32_t mem [2 * D];
      logic  we;
      logic  [MW-1:0] wa;

      always_comb begin
        automatic int w = int'(wr_beat) * N_LPCC + l;
        we = wr_en && (w >= OFF) && (w < OFF + SZ);
        wa = MW'(int'(wr_buf) * D + int'(wr_beat) - R0);
      end

      always_ff @(posedge clk) begin
        if (we) mem[wa] <= wr_data[l];
      end

      for (genvar p = 0; p < N_PWI; p++) begin : g_port
        logic [MW-1:0] ra;
        assign ra = MW'(int'(rd_buf) * D + (OFF + int'(rd_addr[p][g])) / N_LPCC - R0);
        always_ff @(posedge clk) begin
          if (rd_en) q[p][l] <= mem[ra];
        end
      end
    end

    for (genvar p = 0; p < N_PWI; p++) begin : g_port
      always_ff @(posedge clk) begin
        if (rd_en) sel[p] <= LW'((OFF + int'(rd_addr[p][g])) % N_LPCC);
      end
      assign rd_data[p][g] = q[p][sel[p]];
    end
  end

  // The stream must deliver a work group's needed points in S_WG beats.
  initial assert (N_LPCC >= MIN_LPCC);

endmodule
