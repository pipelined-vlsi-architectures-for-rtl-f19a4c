// update_adder: the "update" subblock of a stage module.
//
// Forms the vector of a grid point at layer i as the vector it carried from
// layer i-1 plus the update found by the estimation unit at layer i:
// d(i,x,y) = d(i-1,x,y) + u(i,x,y). The addition is registered: `out_valid`
// follows `in_valid` by one clock. Component overflow wraps (this design's
// vectors stay far inside the 8-bit range).
module update_adder
  import hbma_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  mvec_t prev_vec,   // vector handed down from the previous layer
  input  mvec_t upd_vec,    // update estimated at this layer
  output logic  out_valid,
  output mvec_t out_vec
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_vec   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_vec <= vec_add(prev_vec, upd_vec);
    end
  end
endmodule
