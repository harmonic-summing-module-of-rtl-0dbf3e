// candidate_detector: threshold detection and candidate lists.
//
// Every beat carries N_PWI points of one row with all N_HP harmonic sums. A
// sum HP_k(i, j) that is greater than TA(k, i) is a candidate. Each harmonic
// plane has its own array of N_CAND entries used as a ring: candidates are
// written in arrival order (beat order, then column order within the beat),
// and once more than N_CAND have been found the oldest are overwritten, so the
// array ends up holding the last N_CAND candidates of that plane, as the
// document specifies while no ranking rule is settled. Up to N_PWI candidates
// per plane can be written in one cycle; each ring is split into N_PWI
// interleaved memories so that every memory has one write port (N_CAND must
// be a multiple of N_PWI). After the beat marked last, the
// arrays are sent out plane by plane, oldest first, and done is raised.
// A candidate record (plane, row, column, value) and the read-out stream are
// this design's choice.
//
// Interface: start (pulse, in idle or done) clears the lists and begins a
// pass. in_valid/in_ready/in_beat: beats from the channel, accepted one per
// cycle while running. th_row/th: row of the current beat to the threshold
// array and the N_HP thresholds of that row. cand_valid/cand_ready/cand:
// read-out stream. total[k-1]: candidates found in HP_k this pass (saturates).
// done: read-out finished.
module candidate_detector
  import hs_pkg::*;
#(
  parameter int N_CAND = 200
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  hp_beat_t                  in_beat,
  output logic [ROW_W-1:0]          th_row,
  input  fp32_t [N_HP-1:0]          th,
  output logic                      cand_valid,
  input  logic                      cand_ready,
  output cand_t                     cand,
  output logic [N_HP-1:0][31:0]     total,
  output logic                      done
);

  localparam int CA_W = $clog2(N_CAND);

  typedef enum logic [1:0] {IDLE, RUN, DRAIN, DONE} state_t;
  state_t state;

  logic [N_HP-1:0][CA_W-1:0] wr_ptr;
  logic                      take;

  assign in_ready = (state == RUN);
  assign take     = in_valid && in_ready;
  assign th_row   = in_beat.row;
  assign done     = (state == DONE);

  // ---- detection and ring write ----
  logic [N_HP-1:0][N_PWI-1:0]             hit;
  logic [N_HP-1:0][N_PWI-1:0][CA_W-1:0]   pos;
  logic [N_HP-1:0][CA_W-1:0]              nxt_ptr;
  logic [N_HP-1:0][$clog2(N_PWI+1)-1:0]   nhit;

  always_comb begin
    for (int k = 0; k < N_HP; k++) begin
      automatic int n = 0;
      for (int p = 0; p < N_PWI; p++) begin
        automatic int q = int'(wr_ptr[k]) + n;
        if (q >= N_CAND) q -= N_CAND;
        hit[k][p] = fp32_gt(in_beat.hp[p][k], th[k]);
        pos[k][p] = CA_W'(q);
        if (hit[k][p]) n++;
      end
      nhit[k] = ($clog2(N_PWI+1))'(n);
      begin
        automatic int q = int'(wr_ptr[k]) + n;
        if (q >= N_CAND) q -= N_CAND;
        nxt_ptr[k] = CA_W'(q);
      end
    end
  end

  // Each ring is stored as N_PWI interleaved memories, slot q in memory
  // q mod N_PWI at index q / N_PWI. The candidates of one beat take
  // consecutive slots, so each memory receives at most one write per cycle.
  localparam int NR   = N_PWI;
  localparam int DS   = N_CAND / NR;
  localparam int DA_W = (DS > 1) ? $clog2(DS) : 1;

  cand_t [N_HP-1:0][NR-1:0] rd;      // read-out word of every memory
  logic  [CA_W-1:0]         rslot;

  for (genvar k = 0; k < N_HP; k++) begin : g_plane
    for (genvar r = 0; r < NR; r++) begin : g_ring
      cand_t          mem [DS];
      logic           we;
      logic [DA_W-1:0] wa;
      cand_t          wd;

      always_comb begin
        we = 1'b0;
        wa = '0;
        wd = '0;
        for (int p = 0; p < N_PWI; p++)
          if (hit[k][p] && int'(pos[k][p]) % NR == r) begin
            we = 1'b1;
            wa = DA_W'(int'(pos[k][p]) / NR);
            wd = '{hp: HP_W'(k), row: in_beat.row,
                   col: in_beat.col0 + COL_W'(p), value: in_beat.hp[p][k]};
          end
      end

      always_ff @(posedge clk) begin
        if (take && we) mem[wa] <= wd;
      end

      assign rd[k][r] = mem[DA_W'(int'(rslot) / NR)];
    end
  end

  // ---- read-out ----
  logic [HP_W-1:0]  rk;          // plane being read out
  logic [CA_W:0]    rn;          // entries of it already sent
  logic [CA_W:0]    rcount;      // entries it holds

  always_comb begin
    automatic int s;
    rcount = (total[rk] > 32'(N_CAND)) ? (CA_W+1)'(N_CAND) : (CA_W+1)'(total[rk]);
    s = int'(rn) + ((total[rk] > 32'(N_CAND)) ? int'(wr_ptr[rk]) : 0);
    if (s >= N_CAND) s -= N_CAND;
    rslot = CA_W'(s);
  end

  assign cand_valid = (state == DRAIN) && (rn < rcount);
  assign cand       = rd[rk][int'(rslot) % NR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      wr_ptr <= '0;
      total  <= '0;
      rk     <= '0;
      rn     <= '0;
    end else begin
      case (state)
        IDLE, DONE: if (start) begin
          state  <= RUN;
          wr_ptr <= '0;
          total  <= '0;
        end
        RUN: if (take) begin
          for (int k = 0; k < N_HP; k++) begin
            wr_ptr[k] <= nxt_ptr[k];
            if (total[k] <= 32'hFFFF_FFFF - N_PWI) total[k] <= total[k] + 32'(nhit[k]);
          end
          if (in_beat.last) begin
            state <= DRAIN;
            rk    <= '0;
            rn    <= '0;
          end
        end
        DRAIN: begin
          if (rn >= rcount) begin
            rn <= '0;
            if (int'(rk) == N_HP - 1) state <= DONE;
            else rk <= rk + 1'b1;
          end else if (cand_ready) begin
            rn <= rn + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A plane can never gain more than N_PWI candidates in a cycle, and the
  // ring splits evenly into N_PWI memories.
  initial assert (N_CAND >= N_PWI && N_CAND % N_PWI == 0);

endmodule
