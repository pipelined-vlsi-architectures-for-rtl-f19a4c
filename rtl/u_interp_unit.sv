// u_interp_unit: interpolation unit of a U-Architecture stage (latch mechanism
// plus bilinear interpolator).
//
// Takes the GW x GH field of estimated vectors of layer i in unidirectional
// (raster) scan order and delivers the 2GW x 2GH field of layer i+1, also in
// raster order: even rows and columns carry the estimated vectors, the others
// their two- or four-neighbour averages.
//
// Input latches: the chain R1 -> R2 -> LA1 (GW-1 entries) -> R3 is shifted by
// every accepted vector, so that R1, R2, the last entry of LA1 and R3 always
// hold the newest vector d1 and its left (d2), upper (d3) and upper-left (d4)
// neighbours, which feed the interpolator at once.
// Interpolator: for each newest vector from the second row on, the upper line
// (row 2y-2) receives d4 and da and the middle line (row 2y-1) receives db and
// dc, one pair per clock into the output latches LA3 and LA2.
// Output latches and latch-array controller (LAC): LA3 and LA2 are FIFOs; the
// LAC opens LA3 for one whole output line, then LA2 for the next, and so on
// (signal `ctl`, 1 = LA3, its initial value).
//
// Borders are this design's choice (the document leaves them open): the
// vector field is extended by replicating its last column and last row. At the
// first column only dc is produced; at the last column d3 is repeated twice on
// the upper line and dc once more on the middle line; after the last input row
// the unit replays that row from its own latches to emit the last two lines.
// Flow control is valid/ready on both sides, in place of the document's
// fixed four-to-one clock ratio between CLK_i and CLK_{i+1}: a step waits while
// the FIFO it writes is full. LA3 holds 2GW and LA2 2GW+1 vectors (the
// document's LA2 size; LA3 is doubled because with back-pressure it can no
// longer rely on the faster output clock).
// `frame_done` pulses when the last vector of the output field has been
// written into the latches.
module u_interp_unit
  import hbma_pkg::*;
#(
  parameter int unsigned GW = 36,   // estimated vectors per line (N_p / s_i)
  parameter int unsigned GH = 44    // estimated vector lines
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
  localparam int unsigned XW  = $clog2(GW + 1);
  localparam int unsigned YW  = $clog2(GH + 2);
  localparam int unsigned OW  = $clog2(2 * GW + 1);
  localparam int unsigned LA3_DEPTH = 2 * GW;
  localparam int unsigned LA2_DEPTH = 2 * GW + 1;

  // ch[0] = R1, ch[1] = R2, ch[2..GW] = LA1, ch[GW+1] = R3
  mvec_t ch [GW+2];

  typedef enum logic [1:0] {S_TAKE, S_EMIT} state_t;
  state_t state;

  logic [XW-1:0] nx, cx;    // column of next input / of newest vector
  logic [YW-1:0] ny, cy;
  logic [1:0]    step;

  mvec_t d1, d2, d3, d4, da, db, dc, up_unused, mid_unused;
  assign d1 = ch[0];
  assign d2 = ch[1];
  assign d3 = ch[GW];
  assign d4 = ch[GW+1];

  u_interpolator u_iplt (
    .d1(d1), .d2(d2), .d3(d3), .d4(d4), .phase(step[0]),
    .upper(up_unused), .middle(mid_unused), .da(da), .db(db), .dc(dc)
  );

  // output latches
  logic  la3_push, la2_push, la3_pop, la2_pop;
  mvec_t la3_in, la2_in, la3_out, la2_out;
  logic  la3_empty, la3_full, la2_empty, la2_full;

  vec_fifo #(.DEPTH(LA3_DEPTH)) u_la3 (
    .clk, .rst_n, .push(la3_push), .wr_data(la3_in), .pop(la3_pop),
    .rd_data(la3_out), .empty(la3_empty), .full(la3_full), .count()
  );
  vec_fifo #(.DEPTH(LA2_DEPTH)) u_la2 (
    .clk, .rst_n, .push(la2_push), .wr_data(la2_in), .pop(la2_pop),
    .rd_data(la2_out), .empty(la2_empty), .full(la2_full), .count()
  );

  // input side
  logic virt;      // replaying the last row
  logic take;
  assign virt     = (ny == YW'(GH));
  assign in_ready = (state == S_TAKE) && !virt;
  assign take     = (state == S_TAKE) && (virt || in_valid);

  // emission schedule for the newest vector (cx, cy)
  logic first_col, last_col, last_step, can_go;
  always_comb begin
    first_col = (cx == '0);
    last_col  = (cx == XW'(GW - 1));
    la3_push  = 1'b0;
    la2_push  = 1'b0;
    la3_in    = d4;
    la2_in    = db;
    last_step = 1'b0;
    if (first_col) begin
      la2_push  = 1'b1;
      la2_in    = dc;
      last_step = 1'b1;
    end else begin
      unique case (step)
        2'd0: begin la3_push = 1'b1; la3_in = d4; la2_push = 1'b1; la2_in = db; end
        2'd1: begin la3_push = 1'b1; la3_in = da; la2_push = 1'b1; la2_in = dc;
                    last_step = !last_col; end
        2'd2: begin la3_push = 1'b1; la3_in = d3; la2_push = 1'b1; la2_in = dc; end
        default: begin la3_push = 1'b1; la3_in = d3; last_step = 1'b1; end
      endcase
    end
    can_go = (state == S_EMIT) && !(la3_push && la3_full) && !(la2_push && la2_full);
    if (!can_go) begin
      la3_push = 1'b0;
      la2_push = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_TAKE;
      nx         <= '0;
      ny         <= '0;
      cx         <= '0;
      cy         <= '0;
      step       <= '0;
      frame_done <= 1'b0;
      for (int k = 0; k < GW + 2; k++) ch[k] <= '0;
    end else begin
      frame_done <= 1'b0;
      if (take) begin
        ch[0] <= virt ? ch[GW-1] : in_vec;
        for (int k = 1; k < GW + 2; k++) ch[k] <= ch[k-1];
        cx <= nx;
        cy <= ny;
        if (nx == XW'(GW - 1)) begin
          nx <= '0;
          ny <= ny + 1'b1;
        end else begin
          nx <= nx + 1'b1;
        end
        step <= '0;
        if (ny != '0) state <= S_EMIT;
      end else if (can_go) begin
        if (last_step) begin
          state <= S_TAKE;
          if (cy == YW'(GH) && last_col) begin
            nx         <= '0;
            ny         <= '0;
            frame_done <= 1'b1;
          end
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  // latch-array controller: one output line from LA3, the next from LA2
  logic          ctl;
  logic [OW-1:0] ocnt;
  assign out_valid = ctl ? !la3_empty : !la2_empty;
  assign out_vec   = ctl ? la3_out : la2_out;
  assign la3_pop   = ctl && !la3_empty && out_ready;
  assign la2_pop   = !ctl && !la2_empty && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl  <= 1'b1;
      ocnt <= '0;
    end else if (la3_pop || la2_pop) begin
      if (ocnt == OW'(2 * GW - 1)) begin
        ocnt <= '0;
        ctl  <= !ctl;
      end else begin
        ocnt <= ocnt + 1'b1;
      end
    end
  end
endmodule
