// vec_fifo: first-in-first-out latch array of motion vectors.
//
// Used for the output latches LA2 and LA3 of the U-Architecture interpolation
// unit. A register array with read and write pointers; one push and one pop per
// clock, both allowed in the same cycle. `rd_data` shows the oldest entry
// whenever `empty` is low (first-word fall-through). Pushing while full or
// popping while empty is a protocol error and is flagged by assertions.
// Reset empties the FIFO.
module vec_fifo
  import hbma_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  mvec_t wr_data,
  input  logic  pop,
  output mvec_t rd_data,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  mvec_t mem [DEPTH];
  logic [AW-1:0] wp, rp;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

`ifndef SYNTHESIS
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
`endif
endmodule
