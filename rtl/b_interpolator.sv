// b_interpolator: bilinear interpolator of the B-Architecture.
//
// In the bidirectional scan the newest vector d1 and the previous one d2 lie on
// the current line; d4 sits above d1 and d3 above d2 on the line scanned before.
// The interpolator forms
//   da = (d1 + d2) / 2               between d2 and d1 on the current line
//   dc = (d2 + d3) / 2               between d3 and d2 (vertical midpoint)
//   db = (d1 + d2 + d3 + d4) / 4     centre of the four
// with arithmetic right shifts (rounding toward minus infinity).
// Port r1 carries the current-line values (d2, then da); port r2 the
// intermediate-line values, whose order depends on the scan direction, per the
// document's timing chart: rightward, r2 gives db in slot 2 and dc in slot 3;
// leftward, dc in slot 1 and db in slot 2. `slot` (0..3) selects the clock of
// the sequence; r1_v / r2_v mark the slots in which a port carries a value.
// Combinational.
module b_interpolator
  import hbma_pkg::*;
(
  input  mvec_t d1,
  input  mvec_t d2,
  input  mvec_t d3,
  input  mvec_t d4,
  input  logic  leftward,
  input  logic [1:0] slot,
  output mvec_t r1,
  output logic  r1_v,
  output mvec_t r2,
  output logic  r2_v,
  output mvec_t da,
  output mvec_t db,
  output mvec_t dc
);
  logic signed [VW:0]   s12x, s12y, s23x, s23y, s34x, s34y;
  logic signed [VW+1:0] s4x, s4y;

  always_comb begin
    s12x = (VW+1)'(signed'(d1.x)) + (VW+1)'(signed'(d2.x));
    s12y = (VW+1)'(signed'(d1.y)) + (VW+1)'(signed'(d2.y));
    s23x = (VW+1)'(signed'(d2.x)) + (VW+1)'(signed'(d3.x));
    s23y = (VW+1)'(signed'(d2.y)) + (VW+1)'(signed'(d3.y));
    s34x = (VW+1)'(signed'(d3.x)) + (VW+1)'(signed'(d4.x));
    s34y = (VW+1)'(signed'(d3.y)) + (VW+1)'(signed'(d4.y));
    s4x  = (VW+2)'(s12x) + (VW+2)'(s34x);
    s4y  = (VW+2)'(s12y) + (VW+2)'(s34y);
    da.x = VW'(s12x >>> 1);
    da.y = VW'(s12y >>> 1);
    dc.x = VW'(s23x >>> 1);
    dc.y = VW'(s23y >>> 1);
    db.x = VW'(s4x >>> 2);
    db.y = VW'(s4y >>> 2);

    r1   = (slot == 2'd0) ? d2 : da;
    r1_v = (slot <= 2'd1);
    if (!leftward) begin
      r2   = (slot == 2'd3) ? dc : db;
      r2_v = (slot >= 2'd2);
    end else begin
      r2   = (slot == 2'd1) ? dc : db;
      r2_v = (slot == 2'd1) || (slot == 2'd2);
    end
  end
endmodule
