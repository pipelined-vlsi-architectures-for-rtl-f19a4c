// tb_mgcn_switch: loads every rotation into 8-line and 32-line cube networks
// and checks out[h] = in[(h + shift) mod M] for random data; also checks that
// the setting holds until the next load.
module tb_mgcn_switch;
  import hbma_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [2:0] sh3;
  logic [4:0] sh5;
  pixel_t i3 [8], o3 [8], i5 [32], o5 [32];
  int checks = 0, failures = 0;
  mgcn_switch #(.LOGM(3)) dut3 (.clk, .rst_n, .load, .shift(sh3), .in(i3), .out(o3));
  mgcn_switch #(.LOGM(5)) dut5 (.clk, .rst_n, .load, .shift(sh5), .in(i5), .out(o5));
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 32; k++) begin
      @(negedge clk); sh3 = 3'(k); sh5 = 5'(k); load = 1;
      @(negedge clk); load = 0; sh3 = 3'(k + 3); sh5 = 5'(k + 7);
      for (int r = 0; r < 3; r++) begin
        for (int l = 0; l < 8; l++)  i3[l] = pixel_t'($urandom);
        for (int l = 0; l < 32; l++) i5[l] = pixel_t'($urandom);
        #1;
        for (int h = 0; h < 8; h++) begin
          checks++;
          if (o3[h] != i3[(h + k) % 8]) begin failures++; $display("M=8 shift %0d out %0d wrong", k % 8, h); end
        end
        for (int h = 0; h < 32; h++) begin
          checks++;
          if (o5[h] != i5[(h + k) % 32]) begin failures++; $display("M=32 shift %0d out %0d wrong", k, h); end
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
