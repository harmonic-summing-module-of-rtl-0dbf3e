// threshold_array: the per-plane, per-row detection thresholds (TA).
//
// Each harmonic plane has its own array of thresholds, one per row
// (template); a point of HP_k in row i is a candidate when it exceeds
// TA(k, i). The host loads the table before a pass (as constant memory in the
// document); during the pass the detector reads the N_HP thresholds of the
// row of the current beat, all at once. The load port and the combinational
// read are this design's choice.
//
// Interface: we/wk (harmonic index k-1)/wrow/wdata write one threshold;
// rrow selects a row and th[k-1] returns TA(k, rrow) combinationally.
module threshold_array
  import hs_pkg::*;
(
  input  logic                clk,
  input  logic                we,
  input  logic [HP_W-1:0]     wk,
  input  logic [ROW_W-1:0]    wrow,
  input  fp32_t               wdata,
  input  logic [ROW_W-1:0]    rrow,
  output fp32_t [N_HP-1:0]    th
);

  fp32_t ta [N_HP][N_ROWS];

  always_ff @(posedge clk) begin
    if (we && int'(wrow) < N_ROWS) ta[wk][wrow] <= wdata;
  end

  always_comb begin
    for (int k = 0; k < N_HP; k++)
      th[k] = (int'(rrow) < N_ROWS) ? ta[k][rrow] : 32'h7F80_0000;
  end

endmodule
