// tb_mem_switch_2to1: checks that every lane of the memory-to-EU switch follows
// the common select: memory A when sel=0, memory B when sel=1.
module tb_mem_switch_2to1;
  import hbma_pkg::*;
  localparam int K = 14;
  logic sel;
  pixel_t in_a [K], in_b [K], out [K];
  int checks = 0, failures = 0;
  mem_switch_2to1 #(.K(K)) dut (.*);
  initial begin
    for (int i = 0; i < 100; i++) begin
      for (int k = 0; k < K; k++) begin in_a[k] = pixel_t'($urandom); in_b[k] = pixel_t'($urandom); end
      sel = i[0];
      #1;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (out[k] != (sel ? in_b[k] : in_a[k])) begin failures++; $display("lane %0d wrong", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
