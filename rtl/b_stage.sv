// b_stage: one stage module of the B-Architecture (one layer of the hierarchy).
//
// Grid points are visited in bidirectional scan order: line gy of the grid
// runs rightward when gy is even and leftward when it is odd, and the
// intermediate vectors arrive (and leave, after interpolation) in that order.
// Grid point (gx,gy) sits at pixel (gx*S, gy*S); its reference block starts at
// (gx*S - N/2, gy*S - N/2) and its search area at that corner minus P plus the
// incoming vector, as in the U-Architecture stage.
//
// Memories: one wraparound previous-frame memory PM of ALPHA x ALPHA pixels,
// ALPHA = N + 2P + S + PP (PP = search range of the previous layer), and one
// wraparound current-frame memory CM of GAMMA x GAMMA, GAMMA = N + S + PP, the
// sizes the document derives. Pixel (X,Y) of the frame lives in module X mod
// ALPHA, row Y mod ALPHA. A new block is fetched by b_fetch_unit, which skips
// the part that overlaps the block fetched just before it. The memory-to-EU
// switches are MGCN rotators (mgcn_switch) set to the block's start module
// when the estimation unit starts on the block.
//
// Concurrency (this design's rule): the next block may be fetched while the
// estimation unit works on the previous one only if both blocks fit together
// in the memory, i.e. their origins differ by at most ALPHA-(N+2P) (PM) and
// GAMMA-N (CM) in each direction; the document's bound p_{i-1}+s_i assumes
// neighbouring vectors differ by at most p_{i-1}, which the accumulated
// vectors do not guarantee. Otherwise the fetch waits until the estimation
// unit is idle (`fit_wait` marks such clocks). The first block of a frame is
// always fetched whole, after the estimation unit has finished.
// To keep the rotator no wider than a power of two that needs no modulo, it
// has M >= ALPHA + (N+2P) - 1 lines, input line p driven by module p mod ALPHA
// (the document uses an ALPHA x ALPHA network); CM likewise.
// Timing: the estimation unit takes E = (N+1)(2P+1)+2N clocks per vector plus
// three clocks of hand-over; the update adder, result register and the
// interpolation unit (b_interp_unit) behave as in the U stage. The
// interpolation unit accepts no input while it sends a finished pair of
// output lines, so a first-word-fall-through buffer of two output lines
// (4 GW vectors, this design's addition) decouples it from the next stage;
// `frame_done` pulses when the last vector of a frame enters that buffer. External ports
// return data in the same clock as the address (combinational frame memory
// model), like the U stage.
module b_stage
  import hbma_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned P    = 7,
  parameter int unsigned S    = 8,
  parameter int unsigned PP   = 0,
  parameter int unsigned PIXP = 1,
  parameter int unsigned PIXC = 1,
  parameter int unsigned FW   = 288,
  parameter int unsigned FH   = 352
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  mvec_t in_vec,
  output logic  out_valid,
  input  logic  out_ready,
  output mvec_t out_vec,
  output logic  frame_done,
  output logic  fit_wait,
  output logic [$clog2(FW)-1:0] epm_x [PIXP],
  output logic [$clog2(FH)-1:0] epm_y [PIXP],
  output logic                  epm_v [PIXP],
  input  pixel_t                epm_pix [PIXP],
  output logic [$clog2(FW)-1:0] ecm_x [PIXC],
  output logic [$clog2(FH)-1:0] ecm_y [PIXC],
  output logic                  ecm_v [PIXC],
  input  pixel_t                ecm_pix [PIXC]
);
  localparam int unsigned K     = N + 2 * P;
  localparam int unsigned ALPHA = N + 2 * P + S + PP;
  localparam int unsigned GAMMA = N + S + PP;
  localparam int unsigned LMP   = $clog2(ALPHA + K - 1);
  localparam int unsigned LMC   = $clog2(GAMMA + N - 1);
  localparam int unsigned GW    = FW / S;
  localparam int unsigned GH    = FH / S;
  localparam int unsigned GXW   = $clog2(GW + 1);
  localparam int unsigned GYW   = $clog2(GH + 1);
  localparam int unsigned BIASP = ((256 + ALPHA - 1) / ALPHA) * ALPHA;
  localparam int unsigned BIASC = ((256 + GAMMA - 1) / GAMMA) * GAMMA;

  // ---------------- grid walk and block origins ----------------
  logic [GXW-1:0] gx;
  logic [GYW-1:0] gy;
  logic signed [13:0] ref_ox, ref_oy, sa_ox, sa_oy;
  always_comb begin
    ref_ox = 14'(signed'({1'b0, gx})) * 14'(S) - 14'(N / 2);
    ref_oy = 14'(signed'({1'b0, gy})) * 14'(S) - 14'(N / 2);
    sa_ox  = ref_ox - 14'(P) + 14'(in_vec.x);
    sa_oy  = ref_oy - 14'(P) + 14'(in_vec.y);
  end

  function automatic logic near(logic signed [13:0] a, logic signed [13:0] b, int unsigned lim);
    logic signed [13:0] d, l;
    d = a - b;
    l = signed'(14'(lim));
    return (d <= l) && (d >= -l);
  endfunction

  // last fetched blocks (what the memories hold)
  logic signed [13:0] lpx, lpy, lcx, lcy;
  logic               have;
  logic               first, fit;
  assign first = (gx == '0) && (gy == '0);
  assign fit   = near(sa_ox, lpx, ALPHA - K) && near(sa_oy, lpy, ALPHA - K) &&
                 near(ref_ox, lcx, GAMMA - N) && near(ref_oy, lcy, GAMMA - N);

  logic loading, pend, pm_pend, cm_pend, eu_run, upd_pend;
  logic ld_start, can_load;
  assign can_load = !loading && !pend && (!eu_run || (!first && fit));
  assign in_ready = can_load;
  assign ld_start = in_valid && can_load;
  assign fit_wait = in_valid && !loading && !pend && eu_run && !(!first && fit);

  // ---------------- fetch units ----------------
  logic signed [13:0] pvx [PIXP];
  logic signed [13:0] pvy [PIXP];
  logic signed [13:0] cvx [PIXC];
  logic signed [13:0] cvy [PIXC];
  logic pm_busy, pm_done, cm_busy, cm_done;

  b_fetch_unit #(.BLK(K), .PIX(PIXP), .FW(FW), .FH(FH)) u_pm_fetch (
    .clk, .rst_n, .start(ld_start), .have(have && !first),
    .bx(sa_ox), .by(sa_oy), .ax(lpx), .ay(lpy),
    .lane_vx(pvx), .lane_vy(pvy), .lane_ex(epm_x), .lane_ey(epm_y), .lane_v(epm_v),
    .busy(pm_busy), .done(pm_done)
  );
  b_fetch_unit #(.BLK(N), .PIX(PIXC), .FW(FW), .FH(FH)) u_cm_fetch (
    .clk, .rst_n, .start(ld_start), .have(have && !first),
    .bx(ref_ox), .by(ref_oy), .ax(lcx), .ay(lcy),
    .lane_vx(cvx), .lane_vy(cvy), .lane_ex(ecm_x), .lane_ey(ecm_y), .lane_v(ecm_v),
    .busy(cm_busy), .done(cm_done)
  );

  // ---------------- wraparound memories and switches ----------------
  logic [$clog2(K)-1:0] pm_row;
  logic [$clog2(N)-1:0] cm_row;
  logic signed [13:0]   cur_py, cur_cy;
  pixel_t pm_q [ALPHA];
  pixel_t cm_q [GAMMA];
  pixel_t pm_in  [2**LMP];
  pixel_t pm_out [2**LMP];
  pixel_t cm_in  [2**LMC];
  pixel_t cm_out [2**LMC];
  pixel_t sa_row [K];
  pixel_t ref_row [N];

  wrap_mem #(.A(ALPHA), .PIX(PIXP)) u_pm (
    .clk, .wr_lane(epm_v), .wr_x(pvx), .wr_y(pvy), .wr_data(epm_pix),
    .rd_y(cur_py + 14'(pm_row)), .rd_data(pm_q)
  );
  wrap_mem #(.A(GAMMA), .PIX(PIXC)) u_cm (
    .clk, .wr_lane(ecm_v), .wr_x(cvx), .wr_y(cvy), .wr_data(ecm_pix),
    .rd_y(cur_cy + 14'(cm_row)), .rd_data(cm_q)
  );

  always_comb begin
    for (int p = 0; p < 2**LMP; p++) pm_in[p] = pm_q[p % ALPHA];
    for (int p = 0; p < 2**LMC; p++) cm_in[p] = cm_q[p % GAMMA];
    for (int j = 0; j < K; j++) sa_row[j] = pm_out[j];
    for (int j = 0; j < N; j++) ref_row[j] = cm_out[j];
  end

  // start module of the next block, loaded into the switches with the EU start
  logic [15:0] pshift_u, cshift_u;
  logic [LMP-1:0] pshift;
  logic [LMC-1:0] cshift;
  logic signed [13:0] nxt_px, nxt_py, nxt_cx, nxt_cy;
  logic eu_start;
  always_comb begin
    pshift_u = (16'(signed'(nxt_px)) + 16'(BIASP)) % 16'(ALPHA);
    cshift_u = (16'(signed'(nxt_cx)) + 16'(BIASC)) % 16'(GAMMA);
    pshift   = LMP'(pshift_u);
    cshift   = LMC'(cshift_u);
  end

  mgcn_switch #(.LOGM(LMP)) u_pm_switch (
    .clk, .rst_n, .load(eu_start), .shift(pshift), .in(pm_in), .out(pm_out)
  );
  mgcn_switch #(.LOGM(LMC)) u_cm_switch (
    .clk, .rst_n, .load(eu_start), .shift(cshift), .in(cm_in), .out(cm_out)
  );

  // ---------------- estimation, update ----------------
  logic  eu_busy, eu_done, fire, add_valid, res_valid, res_take, iu_ready;
  mvec_t eu_mv, add_out, res_vec, nxt_vec, cur_vec;

  assign eu_start = !eu_run && !upd_pend && pend;
  assign fire     = upd_pend && !res_valid && !add_valid;

  estimation_unit #(.N(N), .P(P)) u_eu (
    .clk, .rst_n, .start(eu_start), .pm_row(pm_row), .cm_row(cm_row),
    .sa_in(sa_row), .ref_in(ref_row), .busy(eu_busy), .done(eu_done),
    .mv(eu_mv), .min_sad()
  );

  update_adder u_update (
    .clk, .rst_n, .in_valid(fire), .prev_vec(cur_vec), .upd_vec(eu_mv),
    .out_valid(add_valid), .out_vec(add_out)
  );

  logic  iu_valid, ob_ready, ob_empty, ob_full;
  mvec_t iu_vec;
  assign res_take = res_valid && iu_ready;

  b_interp_unit #(.GW(GW), .GH(GH)) u_iu (
    .clk, .rst_n, .in_valid(res_valid), .in_ready(iu_ready), .in_vec(res_vec),
    .out_valid(iu_valid), .out_ready(ob_ready), .out_vec(iu_vec),
    .frame_done(frame_done)
  );

  // output buffer: two output lines, so the interpolation unit can release a
  // finished pair of lines at one vector per clock and go back to work
  assign ob_ready  = !ob_full;
  assign out_valid = !ob_empty;

  vec_fifo #(.DEPTH(4 * GW)) u_obuf (
    .clk, .rst_n, .push(iu_valid && ob_ready), .wr_data(iu_vec),
    .pop(out_valid && out_ready), .rd_data(out_vec), .empty(ob_empty), .full(ob_full),
    .count()
  );

  // ---------------- stage controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gx <= '0; gy <= '0;
      lpx <= '0; lpy <= '0; lcx <= '0; lcy <= '0;
      have <= 1'b0;
      loading <= 1'b0; pm_pend <= 1'b0; cm_pend <= 1'b0; pend <= 1'b0;
      nxt_px <= '0; nxt_py <= '0; nxt_cx <= '0; nxt_cy <= '0; nxt_vec <= '0;
      cur_py <= '0; cur_cy <= '0; cur_vec <= '0;
      eu_run <= 1'b0; upd_pend <= 1'b0;
      res_valid <= 1'b0; res_vec <= '0;
    end else begin
      // fetch
      if (ld_start) begin
        lpx <= sa_ox;  lpy <= sa_oy;
        lcx <= ref_ox; lcy <= ref_oy;
        have    <= 1'b1;
        nxt_px  <= sa_ox;  nxt_py <= sa_oy;
        nxt_cx  <= ref_ox; nxt_cy <= ref_oy;
        nxt_vec <= in_vec;
        loading <= 1'b1;
        pm_pend <= 1'b1;
        cm_pend <= 1'b1;
        // bidirectional walk over the grid
        if (!gy[0]) begin
          if (gx == GXW'(GW - 1)) begin
            if (gy == GYW'(GH - 1)) begin gx <= '0; gy <= '0; end
            else gy <= gy + 1'b1;
          end else gx <= gx + 1'b1;
        end else begin
          if (gx == '0) begin
            if (gy == GYW'(GH - 1)) gy <= '0;
            else gy <= gy + 1'b1;
          end else gx <= gx - 1'b1;
        end
      end else if (loading) begin
        if (pm_done) pm_pend <= 1'b0;
        if (cm_done) cm_pend <= 1'b0;
        if ((!pm_pend || pm_done) && (!cm_pend || cm_done)) begin
          loading <= 1'b0;
          pend    <= 1'b1;
        end
      end
      // estimation
      if (eu_start) begin
        eu_run  <= 1'b1;
        pend    <= 1'b0;
        cur_py  <= nxt_py;
        cur_cy  <= nxt_cy;
        cur_vec <= nxt_vec;
      end
      if (eu_done) begin
        eu_run   <= 1'b0;
        upd_pend <= 1'b1;
      end
      if (fire) upd_pend <= 1'b0;
      if (add_valid) begin
        res_valid <= 1'b1;
        res_vec   <= add_out;
      end else if (res_take) begin
        res_valid <= 1'b0;
      end
    end
  end

`ifndef SYNTHESIS
  a_eu_busy: assert property (@(posedge clk) disable iff (!rst_n) eu_run == eu_busy || eu_done);
`endif
endmodule
