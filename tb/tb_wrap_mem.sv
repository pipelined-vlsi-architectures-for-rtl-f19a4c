// tb_wrap_mem: a 7-module wraparound memory with two write lanes. Writes
// random pixels at random virtual coordinates (negative ones included) inside
// a moving 7 x 7 window (the lanes of one clock always hit different modules,
// as the fetch unit guarantees), then reads rows and checks that module m returns the
// pixel most recently written at a coordinate X = m (mod 7) on that row
// (Y = row mod 7), i.e. that both wraparounds place pixels consistently.
module tb_wrap_mem;
  import hbma_pkg::*;
  localparam int A = 7, PIX = 2;
  logic clk = 0;
  logic wr_lane [PIX];
  logic signed [13:0] wr_x [PIX], wr_y [PIX], rd_y;
  pixel_t wr_data [PIX], rd_data [A];
  int checks = 0, failures = 0;
  int shadow [A][A];
  wrap_mem #(.A(A), .PIX(PIX)) dut (.*);
  always #5 clk = ~clk;

  function automatic int md(int c);
    return ((c % A) + A) % A;
  endfunction

  initial begin
    foreach (shadow[i, j]) shadow[i][j] = -1;
    for (int it = 0; it < 400; it++) begin
      int ox, oy;
      ox = int'($urandom % 60) - 30; oy = int'($urandom % 60) - 30;
      // write phase: two lanes, distinct cells
      repeat (20) begin
        int x0, y0, x1, y1;
        @(negedge clk);
        x0 = ox + int'($urandom % A); y0 = oy + int'($urandom % A);
        x1 = ox + int'($urandom % A); y1 = oy + int'($urandom % A);
        wr_lane[0] = 1; wr_x[0] = 14'(x0); wr_y[0] = 14'(y0); wr_data[0] = 8'($urandom);
        wr_lane[1] = (md(x0) != md(x1));  // one write per module per clock
        wr_x[1] = 14'(x1); wr_y[1] = 14'(y1); wr_data[1] = 8'($urandom);
        shadow[md(y0)][md(x0)] = int'(wr_data[0]);
        if (wr_lane[1]) shadow[md(y1)][md(x1)] = int'(wr_data[1]);
      end
      @(negedge clk);
      wr_lane[0] = 0; wr_lane[1] = 0;
      @(posedge clk);
      // read phase
      for (int r = 0; r < A; r++) begin
        rd_y = 14'(oy + r);
        @(posedge clk); #1;
        for (int m = 0; m < A; m++)
          if (shadow[md(oy + r)][m] >= 0) begin
            checks++;
            if (int'(rd_data[m]) != shadow[md(oy + r)][m]) begin
              failures++; $display("row %0d module %0d wrong", oy + r, m);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
