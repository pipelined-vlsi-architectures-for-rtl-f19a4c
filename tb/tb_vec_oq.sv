// tb_vec_oq: random pushes and pops on an 8-deep output queue, switching
// between first-in-first-out and last-in-first-out mode whenever it is empty;
// every value read and the empty/full flags are compared with a queue model.
module tb_vec_oq;
  import hbma_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, lifo = 0, push = 0, pop = 0, empty, full;
  mvec_t wr_data, rd_data;
  int checks = 0, failures = 0, n_lifo = 0, n_fifo = 0;
  mvec_t q[$];
  vec_oq #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      checks += 2;
      if (empty != (q.size() == 0)) begin failures++; $display("empty flag wrong"); end
      if (full != (q.size() == DEPTH)) begin failures++; $display("full flag wrong"); end
      if (q.size() == 0 && $urandom % 4 == 0) lifo = $urandom % 2;
      push = (q.size() < DEPTH) && ($urandom % 2);
      pop  = (q.size() > 0) && ($urandom % 2) && !push;
      wr_data = '{x: 8'($urandom), y: 8'($urandom)};
      if (pop) begin
        mvec_t e;
        e = lifo ? q[$] : q[0];
        checks++;
        if (rd_data != e) begin failures++; $display("read wrong at %0d", it); end
        if (lifo) begin void'(q.pop_back()); n_lifo++; end
        else begin void'(q.pop_front()); n_fifo++; end
      end
      if (push) q.push_back(wr_data);
      @(posedge clk);
      #1 push = 0; pop = 0;
    end
    checks++;
    if (n_lifo == 0 || n_fifo == 0) begin failures++; $display("a mode was never used"); end
    $display("vec_oq: fifo pops %0d lifo pops %0d", n_fifo, n_lifo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
