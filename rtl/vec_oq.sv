// vec_oq: output queue of the B-Architecture latch mechanism (OQ1, OQ2).
//
// A ring of DEPTH vectors with a write pointer and a read pointer that works
// either first-in-first-out or last-in-first-out, as selected by `lifo`.
// As a FIFO it reads at r_ptr and advances it; as a LIFO it reads the entry
// just below w_ptr and moves w_ptr back. Reversing the read order this way
// turns a line produced in one scan direction into the opposite direction.
// `rd_data` shows the entry a pop would take whenever `empty` is low. The mode
// may only change while the queue is empty (checked by an assertion).
module vec_oq
  import hbma_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  lifo,
  input  logic  push,
  input  mvec_t wr_data,
  input  logic  pop,
  output mvec_t rd_data,
  output logic  empty,
  output logic  full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  mvec_t mem [DEPTH];
  logic [AW-1:0] wp, rp, wpm1;
  logic [CW-1:0] cnt;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [AW-1:0] dec(logic [AW-1:0] p);
    return (p == '0) ? AW'(DEPTH - 1) : p - 1'b1;
  endfunction

  assign wpm1    = dec(wp);
  assign empty   = (cnt == '0);
  assign full    = (cnt == CW'(DEPTH));
  assign rd_data = lifo ? mem[wpm1] : mem[rp];

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= inc(wp);
      else if (pop && lifo) wp <= wpm1;
      if (pop && !lifo) rp <= inc(rp);
      cnt <= cnt + CW'(push) - CW'(pop);
    end
  end

`ifndef SYNTHESIS
  a_one_op_lifo: assert property (@(posedge clk) disable iff (!rst_n) !(lifo && push && pop));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
  a_mode_change: assert property (@(posedge clk) disable iff (!rst_n) $changed(lifo) |-> empty);
`endif
endmodule
