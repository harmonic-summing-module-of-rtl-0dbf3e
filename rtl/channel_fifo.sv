// channel_fifo: the kernel-to-kernel channel between harmonic-plane calculation
// and candidate detection.
//
// A channel is a FIFO: beats leave in the order they entered and never touch
// off-chip memory. The document sets its depth to 1 (DEPTH default). To keep
// one beat per cycle at depth 1, a full FIFO still accepts a beat in the cycle
// its head is taken (in_ready = not full, or out_ready); this pass-through of
// ready is this design's choice.
//
// Interface: in_valid/in_ready/in_data, out_valid/out_ready/out_data; a beat
// moves on a side when valid and ready are both high. Registered output: a beat
// written in one cycle is visible on out_data from the next.
module channel_fifo #(
  parameter type T     = hs_pkg::hp_beat_t,
  parameter int  DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                       mem [DEPTH];
  logic [AW-1:0]          rp, wp;
  localparam int CW = $clog2(DEPTH + 1);
  logic [CW-1:0]          count;
  logic                   push, pop;

  assign out_valid = (count != 0);
  assign in_ready  = (int'(count) < DEPTH) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] a);
    return (int'(a) == DEPTH - 1) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  // Never overflows or underflows.
  assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= DEPTH);

endmodule
