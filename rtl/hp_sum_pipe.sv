// hp_sum_pipe: harmonic summation of one output point over all N_HP planes.
//
// Given the N_HP stretch-plane values of one point, SP_1..SP_N_HP (SP_1 is the
// FOP value itself), it forms the running sums HP_k = HP_{k-1} + SP_k for
// k = 2..N_HP, so that all harmonic planes of the point come out together and
// can be tested and discarded without ever being written back to memory. The
// chain is pipelined with one adder and one register stage per harmonic: stage
// s replaces element s+1 of the vector by the sum of elements s and s+1; the
// other elements ride along. That the sums are accumulated one after the other
// follows the document's equation for HP_k; one register per adder is this
// design's choice.
//
// Interface: in_valid/in_sp/in_tag enter, out_valid/out_hp/out_tag leave
// N_HP-1 cycles later. en = 0 freezes every stage (backpressure). No reset
// of the data path; valid bits reset to 0.
module hp_sum_pipe
  import hs_pkg::*;
#(
  parameter int TAG_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  fp32_t [N_HP-1:0]     in_sp,
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output fp32_t [N_HP-1:0]     out_hp,
  output logic [TAG_W-1:0]     out_tag
);

  localparam int NS = N_HP - 1;   // adder stages

  fp32_t [N_HP-1:0]   vec   [NS+1];
  logic  [TAG_W-1:0]  tag   [NS+1];
  logic               vld   [NS+1];
  fp32_t              s_sum [NS];

  assign vec[0] = in_sp;
  assign tag[0] = in_tag;
  assign vld[0] = in_valid;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    fp32_add u_add (.a(vec[s][s]), .b(vec[s][s+1]), .sum(s_sum[s]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[s+1] <= 1'b0;
      end else if (en) begin
        vld[s+1] <= vld[s];
      end
    end

    always_ff @(posedge clk) begin
      if (en) begin
        vec[s+1]      <= vec[s];
        vec[s+1][s+1] <= s_sum[s];
        tag[s+1]      <= tag[s];
      end
    end
  end

  assign out_valid = vld[NS];
  assign out_hp    = vec[NS];
  assign out_tag   = tag[NS];

endmodule
