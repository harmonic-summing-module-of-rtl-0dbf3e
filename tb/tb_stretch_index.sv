// tb_stretch_index: checks the stretch-plane address generator.
// For every row and column offset of many work groups (small and near the
// end of a 2^21-column plane) it checks that the address of harmonic k,
// looked up in the host's reordered layout of that work group, holds exactly
// FOP(floor(i/k), floor(j/k)), and that it lies inside block k.
// No ports; combinational DUT, checked 1 ns after each input change. The
// stretch rule is the original's; the layout and addressing are this design's.
module tb_stretch_index;
  import hs_pkg::*;
  import tb_hs_ref_pkg::*;

  logic [ROW_W-1:0]              row;
  logic [$clog2(N_COL)-1:0]      c;
  logic [N_HP-1:0][HP_W-1:0]     rmod;
  logic [N_HP-1:0][BADDR_W-1:0]  addr;

  int checks = 0, failures = 0;

  stretch_index dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, jb, j;
    for (int n = 0; n < 60; n++) begin
      w  = (n < 30) ? n : (2**21 / N_COL - 1 - int'($urandom_range(5000)));
      jb = w * N_COL;
      for (int k = 1; k <= N_HP; k++) rmod[k-1] = HP_W'(jb % k);
      for (int i = 0; i < N_ROWS; i++)
        for (int cc = 0; cc < N_COL; cc++) begin
          row = ROW_W'(i); c = 4'(cc);
          #1;
          j = jb + cc;
          for (int k = 1; k <= N_HP; k++) begin
            checks++;
            if (int'(addr[k-1]) >= size_k(k) ||
                rfop_word(w, offset_k(k) + int'(addr[k-1]), 2**21) != fop(i / k, j / k)) begin
              failures++;
              if (failures < 10) $display("FAIL w=%0d i=%0d c=%0d k=%0d addr=%0d", w, i, cc, k, addr[k-1]);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
