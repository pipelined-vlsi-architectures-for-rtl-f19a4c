// b_interp_unit: interpolation unit of a B-Architecture stage.
//
// Takes the GW x GH field of layer i in bidirectional scan order (even lines
// rightward, odd lines leftward) and emits the 2GW x 2GH field of layer i+1 in
// the same bidirectional order: even output lines (the estimated lines plus
// their horizontal midpoints) run rightward, odd output lines (the vertical
// and centre midpoints) run leftward.
//
// Input latches (b_input_latch) give the newest vector d1, the previous one d2
// and the two above them (d4 above d1, d3 above d2). For each arrival the
// interpolator (b_interpolator) supplies d2 and da for the current line (port
// r1, to output queue OQ1) and dc and db for the line between (port r2, to
// OQ2), one pair per clock. The order in which a line is produced follows the
// scan direction; OQ1 is read first-in-first-out after a rightward line and
// last-in-first-out after a leftward one, and OQ2 the other way round, so every
// output line leaves in its proper direction.
// Borders (this design's choice, the document leaves them open): the last
// column and the last line are replicated. At the right end of a line the
// interpolator is fed d2 := d1 and d3 := d4, which yields the replicated
// column; after the last input line the unit replays that line from its own
// latches. Each output line is released only when complete: after input line
// y the unit sends the intermediate line 2y-1 (from OQ2), then line 2y (from
// OQ1), and accepts no input meanwhile. Flow control is valid/ready.
// `frame_done` pulses when the last line of the output field has been sent.
module b_interp_unit
  import hbma_pkg::*;
#(
  parameter int unsigned GW = 36,
  parameter int unsigned GH = 44
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  mvec_t in_vec,
  output logic  out_valid,
  input  logic  out_ready,
  output mvec_t out_vec,
  output logic  frame_done
);
  localparam int unsigned KW = $clog2(GW + 1);
  localparam int unsigned YW = $clog2(GH + 2);

  typedef enum logic [1:0] {S_TAKE, S_EMIT, S_DRAIN} state_t;
  state_t state;

  logic [KW-1:0] nk, ck;
  logic [YW-1:0] ny, cy;
  logic          left;      // line being emitted runs leftward
  logic [1:0]    st;
  logic          dsel;      // drain: 0 = OQ2, 1 = OQ1

  // input latches
  mvec_t l1, l2, l3, l4, q1, q2, q3, q4;
  logic  virt, take;
  assign virt     = (ny == YW'(GH));
  assign in_ready = (state == S_TAKE) && !virt;
  assign take     = (state == S_TAKE) && (virt || in_valid);

  b_input_latch #(.W(GW)) u_il (
    .clk, .rst_n, .ctl(ny[0]), .shift(take), .line_start(nk == '0),
    .v(virt ? l4 : in_vec), .d1(l1), .d2(l2), .d3(l3), .d4(l4)
  );

  // emission schedule: phase 0 = (d2, dc), phase 1 = (da, db); sub = border substitution
  logic phase, sub, last_step;
  always_comb begin
    logic lastk;
    lastk     = (ck == KW'(GW - 1));
    phase     = st[0];
    sub       = 1'b0;
    last_step = 1'b0;
    if (!left) begin
      sub       = st[1];
      last_step = lastk ? (st == 2'd3) : (st == 2'd1);
    end else if (ck == '0) begin
      phase     = 1'b1;
      sub       = 1'b1;
      last_step = 1'b1;
    end else begin
      sub       = st[1];
      last_step = lastk ? (st == 2'd2) : (st == 2'd1);
    end
  end

  mvec_t i2, i3, r1_unused, r2_unused, da, db, dc;
  logic  r1v_unused, r2v_unused;
  assign i2 = sub ? q1 : q2;
  assign i3 = sub ? q4 : q3;

  b_interpolator u_iplt (
    .d1(q1), .d2(i2), .d3(i3), .d4(q4), .leftward(left), .slot(st),
    .r1(r1_unused), .r1_v(r1v_unused), .r2(r2_unused), .r2_v(r2v_unused),
    .da(da), .db(db), .dc(dc)
  );

  // output queues
  logic  oq1_push, oq2_push, oq1_pop, oq2_pop, oq1_empty, oq2_empty, oq1_full, oq2_full;
  mvec_t oq1_out, oq2_out;
  assign oq1_push = (state == S_EMIT) && (cy != YW'(GH));
  assign oq2_push = (state == S_EMIT) && (cy != '0);

  vec_oq #(.DEPTH(2 * GW)) u_oq1 (
    .clk, .rst_n, .lifo(left), .push(oq1_push), .wr_data(phase ? da : i2),
    .pop(oq1_pop), .rd_data(oq1_out), .empty(oq1_empty), .full(oq1_full)
  );
  vec_oq #(.DEPTH(2 * GW)) u_oq2 (
    .clk, .rst_n, .lifo(!left), .push(oq2_push), .wr_data(phase ? db : dc),
    .pop(oq2_pop), .rd_data(oq2_out), .empty(oq2_empty), .full(oq2_full)
  );

  assign out_valid = (state == S_DRAIN) && (dsel ? !oq1_empty : !oq2_empty);
  assign out_vec   = dsel ? oq1_out : oq2_out;
  assign oq1_pop   = out_valid && out_ready && dsel;
  assign oq2_pop   = out_valid && out_ready && !dsel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_TAKE;
      nk         <= '0;
      ny         <= '0;
      ck         <= '0;
      cy         <= '0;
      left       <= 1'b0;
      st         <= '0;
      dsel       <= 1'b0;
      frame_done <= 1'b0;
      q1 <= '0; q2 <= '0; q3 <= '0; q4 <= '0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_TAKE: if (take) begin
          q1   <= l1;
          q2   <= l2;
          q3   <= l3;
          q4   <= l4;
          ck   <= nk;
          cy   <= ny;
          left <= ny[0];
          st   <= '0;
          if (nk == KW'(GW - 1)) begin
            nk <= '0;
            ny <= ny + 1'b1;
          end else begin
            nk <= nk + 1'b1;
          end
          // a rightward line emits nothing for its first vector
          if (!(nk == '0 && !ny[0])) state <= S_EMIT;
        end
        S_EMIT: begin
          if (last_step) begin
            if (ck == KW'(GW - 1)) begin
              state <= S_DRAIN;
              dsel  <= 1'b0;
            end else begin
              state <= S_TAKE;
            end
          end else begin
            st <= st + 1'b1;
          end
        end
        default: begin  // S_DRAIN
          if (!dsel && oq2_empty) dsel <= 1'b1;
          if (dsel && oq1_empty) begin
            state <= S_TAKE;
            if (cy == YW'(GH)) begin
              ny         <= '0;
              frame_done <= 1'b1;
            end
          end
        end
      endcase
    end
  end

`ifndef SYNTHESIS
  a_oq_room: assert property (@(posedge clk) disable iff (!rst_n)
               !(oq1_push && oq1_full) && !(oq2_push && oq2_full));
`endif
endmodule
