// tb_update_adder: checks the registered vector update d(i) = d(i-1) + u(i) on
// random vectors, including the one-clock latency of out_valid.
module tb_update_adder;
  import hbma_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  mvec_t prev_vec, upd_vec, out_vec;
  int checks = 0, failures = 0;
  update_adder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int px, py, ux, uy;
      px = int'($urandom % 41) - 20; py = int'($urandom % 41) - 20;
      ux = int'($urandom % 15) - 7;  uy = int'($urandom % 15) - 7;
      @(negedge clk);
      prev_vec = '{x: 8'(px), y: 8'(py)}; upd_vec = '{x: 8'(ux), y: 8'(uy)}; in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(out_vec.x) != px + ux || int'(out_vec.y) != py + uy) begin
        failures++; $display("sum mismatch %0d", i);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
