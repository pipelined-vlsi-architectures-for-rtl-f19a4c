// b_fetch_unit: external address generator of a B-Architecture stage.
//
// Given the origin of the next data block B (BLK x BLK pixels, search area or
// reference block) and the origin of the block A already held in the
// wraparound memory, it issues, PIX pixels per clock and line by line, only
// the pixels of B that are not in A (the B1, B2, B3 parts of the document's
// wraparound example); the overlap B4 is reused. When `have` is low (nothing
// reusable, e.g. at the start of a frame) the whole block is fetched.
// For line r of B (Y = by + r): if Y lies outside A's lines, or the horizontal
// offset dx = bx - ax is BLK or more, the whole line is fetched; otherwise
// columns [BLK-dx, BLK) when dx > 0, [0, -dx) when dx < 0, nothing when dx = 0.
// A line with nothing to fetch still takes one clock (this design's choice,
// it keeps the control a simple line counter).
// Each lane carries the pixel's virtual frame coordinate (vx, vy), used to
// place it in the wraparound memory, and the same coordinate clamped into the
// frame (ex, ey) for the external memory, so pixels outside the frame repeat
// the nearest border pixel. Timing: lanes are valid in the clocks after
// `start`; `done` is high in the clock that issues the last lanes (or in the
// last, empty, line clock). `start` is ignored while busy.
module b_fetch_unit #(
  parameter int unsigned BLK = 78,
  parameter int unsigned PIX = 1,
  parameter int unsigned FW  = 288,
  parameter int unsigned FH  = 352
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic have,
  input  logic signed [13:0] bx,
  input  logic signed [13:0] by,
  input  logic signed [13:0] ax,
  input  logic signed [13:0] ay,
  output logic signed [13:0] lane_vx [PIX],
  output logic signed [13:0] lane_vy [PIX],
  output logic [$clog2(FW)-1:0] lane_ex [PIX],
  output logic [$clog2(FH)-1:0] lane_ey [PIX],
  output logic                  lane_v  [PIX],
  output logic busy,
  output logic done
);
  localparam int unsigned RW = $clog2(BLK + 1);
  localparam logic signed [13:0] SBLK = 14'(BLK);
  localparam logic signed [13:0] SPIX = 14'(PIX);
  localparam logic signed [13:0] SXM  = 14'(FW - 1);
  localparam logic signed [13:0] SYM  = 14'(FH - 1);

  logic signed [13:0] bx_q, by_q, ax_q, ay_q;
  logic               have_q;
  logic [RW-1:0]      r_q, off_q;

  // column range [c0, c1) of line r_q
  logic signed [13:0] dx, dy, c0, c1, cpos;
  logic               last_chunk;
  always_comb begin
    dx = bx_q - ax_q;
    dy = by_q + signed'(14'(r_q)) - ay_q;
    c0 = '0;
    c1 = SBLK;
    if (have_q && dy >= 0 && dy < SBLK && dx < SBLK && dx > -SBLK) begin
      if (dx > 0)      c0 = SBLK - dx;
      else if (dx < 0) c1 = -dx;
      else             c1 = '0;
    end
    cpos       = c0 + 14'(off_q);
    last_chunk = (cpos + SPIX) >= c1;
  end

  always_comb begin
    for (int j = 0; j < PIX; j++) begin
      logic signed [13:0] x, y;
      x = bx_q + cpos + signed'(14'(j));
      y = by_q + signed'(14'(r_q));
      lane_vx[j] = x;
      lane_vy[j] = y;
      lane_v[j]  = busy && (cpos + signed'(14'(j)) < c1);
      lane_ex[j] = (x < 0) ? '0 : (x > SXM) ? ($clog2(FW))'(FW - 1) : x[$clog2(FW)-1:0];
      lane_ey[j] = (y < 0) ? '0 : (y > SYM) ? ($clog2(FH))'(FH - 1) : y[$clog2(FH)-1:0];
    end
  end

  assign done = busy && last_chunk && (r_q == RW'(BLK - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      have_q <= 1'b0;
      bx_q   <= '0;
      by_q   <= '0;
      ax_q   <= '0;
      ay_q   <= '0;
      r_q    <= '0;
      off_q  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        have_q <= have;
        bx_q   <= bx;
        by_q   <= by;
        ax_q   <= ax;
        ay_q   <= ay;
        r_q    <= '0;
        off_q  <= '0;
      end
    end else if (last_chunk) begin
      off_q <= '0;
      if (r_q == RW'(BLK - 1)) busy <= 1'b0;
      else                     r_q  <= r_q + 1'b1;
    end else begin
      off_q <= off_q + RW'(PIX);
    end
  end
endmodule
