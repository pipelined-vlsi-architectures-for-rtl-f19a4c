// tb_b_fetch_unit: 600 random block pairs (block 6 x 6, 2 lanes, 16 x 16
// frame, origins partly outside the frame, offsets from 0 to beyond the block
// size, `have` mostly set). For each fetch the set of issued virtual
// coordinates must be exactly the pixels of the new block B missing from the
// previous block A (all of B when `have` is low), each issued once; the
// clamped coordinates must be the virtual ones clamped to the frame; `done`
// must be high exactly once, in the clock of the last lanes.
module tb_b_fetch_unit;
  localparam int BLK = 6, PIX = 2, FW = 16, FH = 16;
  logic clk = 0, rst_n = 0, start = 0, have = 0, busy, done;
  logic signed [13:0] bx, by, ax, ay;
  logic signed [13:0] lane_vx [PIX], lane_vy [PIX];
  logic [$clog2(FW)-1:0] lane_ex [PIX];
  logic [$clog2(FH)-1:0] lane_ey [PIX];
  logic lane_v [PIX];
  int checks = 0, failures = 0, partial = 0, whole = 0;
  b_fetch_unit #(.BLK(BLK), .PIX(PIX), .FW(FW), .FH(FH)) dut (.*);
  always #5 clk = ~clk;

  function automatic int clampi(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      int b_x, b_y, a_x, a_y, h, expn, got, ndone;
      bit seen [int];
      bit lastd;
      a_x = int'($urandom % 24) - 6; a_y = int'($urandom % 24) - 6;
      b_x = a_x + int'($urandom % 17) - 8; b_y = a_y + int'($urandom % 17) - 8;
      if (it % 5 == 0) b_y = a_y;
      h = ($urandom % 6) != 0;
      @(negedge clk);
      start = 1; have = h; bx = 14'(b_x); by = 14'(b_y); ax = 14'(a_x); ay = 14'(a_y);
      @(posedge clk); #1 start = 0;
      expn = 0;
      for (int y = b_y; y < b_y + BLK; y++)
        for (int x = b_x; x < b_x + BLK; x++)
          if (!(h && x >= a_x && x < a_x + BLK && y >= a_y && y < a_y + BLK)) expn++;
      got = 0; ndone = 0;
      seen.delete();
      while (busy) begin
        for (int j = 0; j < PIX; j++) if (lane_v[j]) begin
          int x, y, key;
          x = int'(lane_vx[j]); y = int'(lane_vy[j]);
          key = (y + 100) * 1000 + (x + 100);
          checks += 3;
          if (seen.exists(key)) begin failures++; $display("(%0d,%0d) issued twice", x, y); end
          seen[key] = 1;
          if (x < b_x || x >= b_x + BLK || y < b_y || y >= b_y + BLK ||
              (h && x >= a_x && x < a_x + BLK && y >= a_y && y < a_y + BLK)) begin
            failures++; $display("(%0d,%0d) should not be fetched", x, y);
          end
          if (int'(lane_ex[j]) != clampi(x, FW - 1) || int'(lane_ey[j]) != clampi(y, FH - 1)) begin
            failures++; $display("clamp wrong at (%0d,%0d)", x, y);
          end
          got++;
        end
        lastd = done;
        if (done) ndone++;
        @(posedge clk); #1;
      end
      checks += 2;
      if (got != expn) begin failures++; $display("fetch %0d: %0d pixels, expected %0d", it, got, expn); end
      if (ndone != 1 || !lastd) begin failures++; $display("fetch %0d: done wrong", it); end
      if (expn < BLK * BLK) partial++; else whole++;
    end
    checks++;
    if (partial == 0 || whole == 0) begin failures++; $display("partial %0d whole %0d", partial, whole); end
    $display("b_fetch_unit: partial fetches %0d, whole fetches %0d", partial, whole);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
