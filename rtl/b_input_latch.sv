// b_input_latch: input latch mechanism of the B-Architecture interpolation unit.
//
// Two groups, A (latch RA and LIFO stack ISA) and B (RB and ISB), each stack
// holding W-1 vectors, W being the number of estimated vectors per line. The
// line being scanned goes to one group (switch S0, selected by `ctl`: 0 = A,
// the rightward lines, 1 = B, the leftward lines); the other group holds the
// line scanned before. Because consecutive lines run in opposite directions,
// the previous line comes back out of its stack in exactly the order the
// current line needs it.
// On each arriving vector V (`shift`), before the update:
//   d1 = V, d2 = R of the current group (previous vector on this line),
//   d4 = R of the other group (vector above V), d3 = PL (vector above d2).
// Update: the current group pushes its R onto its stack (not at a line start)
// and takes V; the other group moves R into PL and pops its stack into R.
// Switches S1 and S2 are the d1..d4 selection by `ctl`.
// The document's groups and stacks are kept; the extra latch PL that keeps the
// upper-left/right neighbour is this design's addition (the document does not
// show where d3 is held once the upper line advances).
module b_input_latch
  import hbma_pkg::*;
#(
  parameter int unsigned W = 36
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ctl,
  input  logic  shift,
  input  logic  line_start,
  input  mvec_t v,
  output mvec_t d1,
  output mvec_t d2,
  output mvec_t d3,
  output mvec_t d4
);
  localparam int unsigned SD = (W > 1) ? W - 1 : 1;
  localparam int unsigned SW = $clog2(SD + 1);

  mvec_t r  [2];
  mvec_t pl;
  mvec_t st [2][SD];
  logic [SW-1:0] sp [2];

  logic cur, oth;
  assign cur = ctl;
  assign oth = !ctl;

  assign d1 = v;
  assign d2 = r[cur];
  assign d3 = pl;
  assign d4 = r[oth];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r[0]  <= '0;
      r[1]  <= '0;
      pl    <= '0;
      sp[0] <= '0;
      sp[1] <= '0;
      for (int g = 0; g < 2; g++) for (int k = 0; k < SD; k++) st[g][k] <= '0;
    end else if (shift) begin
      // current group: push R, take V
      if (!line_start && sp[cur] < SW'(SD)) begin
        st[cur][sp[cur]] <= r[cur];
        sp[cur] <= sp[cur] + 1'b1;
      end
      r[cur] <= v;
      // other group: R -> PL, pop stack -> R
      pl <= r[oth];
      if (sp[oth] != '0) begin
        r[oth]  <= st[oth][sp[oth] - 1'b1];
        sp[oth] <= sp[oth] - 1'b1;
      end
    end
  end
endmodule
