// mem_switch_2to1: memory-to-EU switch of the U-Architecture (PM-switch, CM-switch).
//
// An array of K two-to-one multiplexers that connects either memory unit A or
// memory unit B of a double-buffered pair to the K data inputs of the
// estimation unit. One select line, `sel`, steers all multiplexers together
// (0 picks A, 1 picks B). K is n+2p for the previous-frame memory and n for
// the current-frame memory. Combinational.
module mem_switch_2to1
  import hbma_pkg::*;
#(
  parameter int unsigned K = 78
) (
  input  logic   sel,
  input  pixel_t in_a [K],
  input  pixel_t in_b [K],
  output pixel_t out  [K]
);
  always_comb begin
    for (int k = 0; k < K; k++) out[k] = sel ? in_b[k] : in_a[k];
  end
endmodule
