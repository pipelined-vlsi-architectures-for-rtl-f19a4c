// tb_nmodule_mem: writes a random K x D block through PIX lanes per clock (with
// random idle lanes), then reads it back row by row with zero and with random
// per-module skews; every module must return pixel (row+skew mod D, module).
module tb_nmodule_mem;
  import hbma_pkg::*;
  localparam int K = 7, D = 7, PIX = 3;
  logic clk = 0, rst_n = 0, wr_start = 0;
  logic wr_lane [PIX];
  pixel_t wr_data [PIX];
  logic [$clog2(D)-1:0] rd_row;
  logic [$clog2(D)-1:0] rd_skew [K];
  pixel_t rd_data [K];
  pixel_t blk [D][K];
  int checks = 0, failures = 0;
  nmodule_mem #(.K(K), .D(D), .PIX(PIX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    int idx;
    for (int j = 0; j < PIX; j++) wr_lane[j] = 0;
    for (int m = 0; m < K; m++) rd_skew[m] = 0;
    rd_row = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int r = 0; r < D; r++) for (int c = 0; c < K; c++) blk[r][c] = pixel_t'($urandom);
      @(negedge clk); wr_start = 1; @(negedge clk); wr_start = 0;
      idx = 0;
      while (idx < K * D) begin
        int n;
        n = 1 + int'($urandom % PIX);
        if (n > K * D - idx) n = K * D - idx;
        for (int j = 0; j < PIX; j++) begin
          wr_lane[j] = (j < n);
          wr_data[j] = (j < n) ? blk[(idx + j) / K][(idx + j) % K] : 8'h00;
        end
        idx += n;
        @(negedge clk);
      end
      for (int j = 0; j < PIX; j++) wr_lane[j] = 0;
      for (int r = 0; r < D; r++) begin
        for (int m = 0; m < K; m++) rd_skew[m] = (pass == 0) ? 0 : $clog2(D)'($urandom % D);
        rd_row = $clog2(D)'(r);
        @(negedge clk);
        for (int m = 0; m < K; m++) begin
          checks++;
          if (rd_data[m] != blk[(r + int'(rd_skew[m])) % D][m]) begin
            failures++; $display("pass %0d row %0d module %0d wrong", pass, r, m);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
