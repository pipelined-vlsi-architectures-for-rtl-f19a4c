// tb_b_interpolator: random and extreme vectors on d1..d4 in both scan
// directions and all four slots; checks da, db, dc against the floor-rounded
// averages and the r1/r2 port sequence (values and valid flags).
module tb_b_interpolator;
  import hbma_pkg::*;
  mvec_t d1, d2, d3, d4, r1, r2, da, db, dc;
  logic leftward, r1_v, r2_v;
  logic [1:0] slot;
  int checks = 0, failures = 0;
  b_interpolator dut (.*);

  function automatic int fl(int s, int sh);
    return s >>> sh;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int a[4][2];
      for (int k = 0; k < 4; k++) for (int c = 0; c < 2; c++)
        a[k][c] = (it < 16) ? ((it >> k) % 2 ? 127 : -128) : int'($urandom % 256) - 128;
      d1 = '{x: 8'(a[0][0]), y: 8'(a[0][1])};
      d2 = '{x: 8'(a[1][0]), y: 8'(a[1][1])};
      d3 = '{x: 8'(a[2][0]), y: 8'(a[2][1])};
      d4 = '{x: 8'(a[3][0]), y: 8'(a[3][1])};
      leftward = it[0];
      slot = 2'(it >> 1);
      #1;
      chk("da.x", int'(da.x), fl(a[0][0] + a[1][0], 1));
      chk("da.y", int'(da.y), fl(a[0][1] + a[1][1], 1));
      chk("dc.x", int'(dc.x), fl(a[1][0] + a[2][0], 1));
      chk("dc.y", int'(dc.y), fl(a[1][1] + a[2][1], 1));
      chk("db.x", int'(db.x), fl(a[0][0] + a[1][0] + a[2][0] + a[3][0], 2));
      chk("db.y", int'(db.y), fl(a[0][1] + a[1][1] + a[2][1] + a[3][1], 2));
      chk("r1_v", int'(r1_v), int'(slot <= 1));
      if (slot == 0) chk("r1", int'(r1.x), int'(d2.x));
      if (slot == 1) chk("r1", int'(r1.x), int'(da.x));
      if (!leftward) begin
        chk("r2_v", int'(r2_v), int'(slot >= 2));
        if (slot == 2) chk("r2", int'(r2.x), int'(db.x));
        if (slot == 3) chk("r2", int'(r2.x), int'(dc.x));
      end else begin
        chk("r2_v", int'(r2_v), int'(slot == 1 || slot == 2));
        if (slot == 1) chk("r2", int'(r2.x), int'(dc.x));
        if (slot == 2) chk("r2", int'(r2.x), int'(db.x));
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
