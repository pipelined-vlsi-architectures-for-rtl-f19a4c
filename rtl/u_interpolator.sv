// u_interpolator: bilinear interpolator of the U-Architecture (IPLT).
//
// With the step size halving from one layer to the next, bilinear interpolation
// reduces to averages of two or four neighbours. Given the newest estimated
// vector d1 and its neighbours d2 (left), d3 (above) and d4 (above-left), it
// forms
//   da = (d3 + d4) / 2   (midway between d4 and d3, upper line)
//   db = (d1 + d2 + d3 + d4) / 4   (centre of the four)
//   dc = (d1 + d3) / 2   (midway between d3 and d1, middle line)
// The halving and quartering are arithmetic right shifts, as in the document's
// shifter-based datapath (so results round toward minus infinity).
// Outputs come in two phases, following the document's timing chart: the upper
// port gives d4 then da, the middle port gives db then dc. `phase` selects which.
// Purely combinational; the caller registers the results.
module u_interpolator
  import hbma_pkg::*;
(
  input  mvec_t d1,
  input  mvec_t d2,
  input  mvec_t d3,
  input  mvec_t d4,
  input  logic  phase,      // 0: first output of each port, 1: second
  output mvec_t upper,      // d4, then da
  output mvec_t middle,     // db, then dc
  output mvec_t da,
  output mvec_t db,
  output mvec_t dc
);
  logic signed [VW:0]   s34x, s34y, s13x, s13y;
  logic signed [VW+1:0] s4x, s4y;

  always_comb begin
    s34x = (VW+1)'(signed'(d3.x)) + (VW+1)'(signed'(d4.x));
    s34y = (VW+1)'(signed'(d3.y)) + (VW+1)'(signed'(d4.y));
    s13x = (VW+1)'(signed'(d1.x)) + (VW+1)'(signed'(d3.x));
    s13y = (VW+1)'(signed'(d1.y)) + (VW+1)'(signed'(d3.y));
    s4x  = (VW+2)'(s34x) + (VW+2)'(signed'(d1.x)) + (VW+2)'(signed'(d2.x));
    s4y  = (VW+2)'(s34y) + (VW+2)'(signed'(d1.y)) + (VW+2)'(signed'(d2.y));
    da.x = VW'(s34x >>> 1);
    da.y = VW'(s34y >>> 1);
    dc.x = VW'(s13x >>> 1);
    dc.y = VW'(s13y >>> 1);
    db.x = VW'(s4x >>> 2);
    db.y = VW'(s4y >>> 2);
    upper  = phase ? da : d4;
    middle = phase ? dc : db;
  end
endmodule
