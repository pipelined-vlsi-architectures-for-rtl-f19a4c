// tb_ext_addr_unit: checks the raster order, lane count per clock, border
// clamping and completion of the external address unit for blocks placed
// inside, across and beyond the frame edges.
module tb_ext_addr_unit;
  import hbma_pkg::*;
  localparam int BLK = 5, PIX = 3, FW = 16, FH = 12;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [13:0] org_x, org_y;
  logic [$clog2(FW)-1:0] lane_x [PIX];
  logic [$clog2(FH)-1:0] lane_y [PIX];
  logic lane_v [PIX];
  logic busy, done;
  int checks = 0, failures = 0;
  ext_addr_unit #(.BLK(BLK), .PIX(PIX), .FW(FW), .FH(FH)) dut (.*);
  always #5 clk = ~clk;

  function automatic int cl(int v, int hi); return v < 0 ? 0 : (v > hi ? hi : v); endfunction

  task automatic run(int ox, int oy);
    int idx, clk_n;
    @(negedge clk); org_x = 14'(ox); org_y = 14'(oy); start = 1; @(negedge clk); start = 0;
    idx = 0; clk_n = 0;
    while (busy) begin
      for (int j = 0; j < PIX; j++) begin
        if (lane_v[j]) begin
          checks++;
          if (int'(lane_x[j]) != cl(ox + idx % BLK, FW - 1) || int'(lane_y[j]) != cl(oy + idx / BLK, FH - 1)) begin
            failures++; $display("addr wrong idx %0d", idx);
          end
          idx++;
        end
      end
      checks++;
      if (done != (idx == BLK * BLK)) begin failures++; $display("done wrong at idx %0d", idx); end
      clk_n++;
      @(negedge clk);
    end
    checks += 2;
    if (idx != BLK * BLK) begin failures++; $display("count %0d", idx); end
    if (clk_n != (BLK * BLK + PIX - 1) / PIX) begin failures++; $display("clocks %0d", clk_n); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(2, 3); run(-3, -2); run(13, 9); run(20, -10); run(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
