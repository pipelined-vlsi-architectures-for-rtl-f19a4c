// tb_b_input_latch: feeds six lines of a random W-wide vector field in
// bidirectional order (even lines rightward with ctl = 0, odd lines leftward
// with ctl = 1) and, at every arrival, checks d1 (the arriving vector), d2
// (the previous vector of the line), d4 (the vector above d1) and d3 (the
// vector above d2) against the field, wherever those neighbours exist.
module tb_b_input_latch;
  import hbma_pkg::*;
  localparam int W = 5, H = 6;
  logic clk = 0, rst_n = 0, ctl = 0, shift = 0, line_start = 0;
  mvec_t v, d1, d2, d3, d4;
  int checks = 0, failures = 0;
  mvec_t f [H][W];
  b_input_latch #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, mvec_t got, mvec_t exp, int y, int x);
    checks++;
    if (got != exp) begin failures++; $display("%s wrong at line %0d column %0d", what, y, x); end
  endtask

  initial begin
    foreach (f[y, x]) f[y][x] = '{x: 8'($urandom), y: 8'($urandom)};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int k = 0; k < W; k++) begin
        int x, xp;
        x  = (y % 2 == 0) ? k : W - 1 - k;
        xp = (y % 2 == 0) ? x - 1 : x + 1;
        @(negedge clk);
        ctl = y % 2; line_start = (k == 0); v = f[y][x]; shift = 1;
        #1;
        chk("d1", d1, f[y][x], y, x);
        if (k > 0) chk("d2", d2, f[y][xp], y, x);
        if (y > 0) chk("d4", d4, f[y-1][x], y, x);
        if (y > 0 && k > 0) chk("d3", d3, f[y-1][xp], y, x);
        @(posedge clk);
        #1 shift = 0;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
