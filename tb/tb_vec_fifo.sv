// tb_vec_fifo: random push/pop traffic against a queue model; checks order,
// empty/full flags and the occupancy count.
module tb_vec_fifo;
  import hbma_pkg::*;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  mvec_t wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  mvec_t q[$];
  int checks = 0, failures = 0;
  vec_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || int'(count) != q.size()) begin
        failures++; $display("flags wrong at %0d", i);
      end
      if (q.size() > 0) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("data wrong at %0d", i); end
      end
      push = (q.size() < DEPTH) && ($urandom % 2 == 0);
      pop  = (q.size() > 0) && ($urandom % 3 == 0);
      wr_data = mvec_t'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
