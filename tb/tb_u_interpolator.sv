// tb_u_interpolator: checks the U-Architecture bilinear interpolator on random
// vectors: da, db, dc against floor averages and the two-phase port order
// (upper: d4 then da, middle: db then dc).
module tb_u_interpolator;
  import hbma_pkg::*;
  mvec_t d1, d2, d3, d4, upper, middle, da, db, dc;
  logic phase;
  int checks = 0, failures = 0;
  u_interpolator dut (.*);

  function automatic int fl(int s, int sh); return s >>> sh; endfunction

  initial begin
    for (int i = 0; i < 400; i++) begin
      int a[4][2];
      for (int k = 0; k < 4; k++) for (int c = 0; c < 2; c++) a[k][c] = int'($urandom % 61) - 30;
      d1 = '{x: 8'(a[0][0]), y: 8'(a[0][1])}; d2 = '{x: 8'(a[1][0]), y: 8'(a[1][1])};
      d3 = '{x: 8'(a[2][0]), y: 8'(a[2][1])}; d4 = '{x: 8'(a[3][0]), y: 8'(a[3][1])};
      for (int p = 0; p < 2; p++) begin
        phase = p[0];
        #1;
        checks++;
        if (int'(da.x) != fl(a[2][0] + a[3][0], 1) || int'(da.y) != fl(a[2][1] + a[3][1], 1) ||
            int'(dc.x) != fl(a[0][0] + a[2][0], 1) || int'(dc.y) != fl(a[0][1] + a[2][1], 1) ||
            int'(db.x) != fl(a[0][0] + a[1][0] + a[2][0] + a[3][0], 2) ||
            int'(db.y) != fl(a[0][1] + a[1][1] + a[2][1] + a[3][1], 2)) begin
          failures++; $display("average mismatch at %0d", i);
        end
        checks++;
        if (upper != (p ? da : d4) || middle != (p ? dc : db)) begin
          failures++; $display("port order mismatch at %0d phase %0d", i, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
