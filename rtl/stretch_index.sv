// stretch_index: local-memory addresses of the stretch-plane points of one
// output point, for every harmonic.
//
// The k-th stretch plane reads FOP(floor(i/k), floor(j/k)). Inside a work group
// whose first column is jb, those points sit in block k of the work group's
// local copy at
//     addr_k = floor(i/k) * cols_k + ( floor(j/k) - floor(jb/k) ).
// With j = jb + c (c = 0..N_COL-1) and r_k = jb mod k, the column term equals
// floor((r_k + c)/k), so only small constant divisions are needed: the divider
// never sees the 21-bit column number. The caller keeps r_k up to date from
// one work group to the next. The stretch rule is the document's; the
// address arithmetic and the use of r_k are this design's choice.
//
// Interface: row i, column offset c, remainders rmod[k-1] = jb mod k in;
// addr[k-1] (address within block k) out. Purely combinational.
module stretch_index
  import hs_pkg::*;
(
  input  logic [ROW_W-1:0]               row,
  input  logic [$clog2(N_COL)-1:0]       c,
  input  logic [N_HP-1:0][HP_W-1:0]      rmod,
  output logic [N_HP-1:0][BADDR_W-1:0]   addr
);

  for (genvar g = 0; g < N_HP; g++) begin : g_hp
    localparam int K  = g + 1;
    localparam int NC = cols_k(K);
    logic [ROW_W-1:0]           srow;
    logic [$clog2(N_COL)+1:0]   scol;
    always_comb begin
      srow    = ROW_W'(row / K);
      scol    = ($clog2(N_COL)+2)'((int'(rmod[g]) + int'(c)) / K);
      addr[g] = BADDR_W'(srow * NC + scol);
    end
  end

endmodule
