// tb_u_interp_unit: feeds a random GW x GH field (two frames in a row) with
// random input gaps and random output back-pressure, and compares the emitted
// 2GW x 2GH field, in raster order, with the reference interpolation. Also
// checks that frame_done pulses once per frame.
module tb_u_interp_unit;
  import hbma_pkg::*;
  import tb_hbma_model_pkg::*;
  localparam int GW = 4, GH = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready, frame_done;
  mvec_t in_vec, out_vec;
  int checks = 0, failures = 0, nout = 0, nfd = 0;
  ivec_t fld[2][], expv[2][];
  u_interp_unit #(.GW(GW), .GH(GH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) out_ready <= ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n) begin
    if (frame_done) nfd++;
    if (out_valid && out_ready) begin
      int f, i;
      f = nout / (4 * GW * GH); i = nout % (4 * GW * GH);
      checks++;
      if (f > 1 || int'(out_vec.x) != expv[f][i].x || int'(out_vec.y) != expv[f][i].y) begin
        failures++; $display("frame %0d index %0d wrong", f, i);
      end
      nout++;
    end
  end
  initial begin
    for (int f = 0; f < 2; f++) begin
      fld[f] = new[GW * GH];
      foreach (fld[f][i]) begin fld[f][i].x = int'($urandom % 23) - 11; fld[f][i].y = int'($urandom % 23) - 11; end
      interp2(GW, GH, fld[f], expv[f]);
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < GW * GH; i++) begin
        @(negedge clk);
        while ($urandom % 3 == 0) @(negedge clk);
        in_valid = 1; in_vec = '{x: 8'(fld[f][i].x), y: 8'(fld[f][i].y)};
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
      end
    while (nout < 8 * GW * GH) @(posedge clk);
    repeat (10) @(posedge clk);
    checks += 2;
    if (nout != 8 * GW * GH) begin failures++; $display("count %0d", nout); end
    if (nfd != 2) begin failures++; $display("frame_done %0d", nfd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
