// u_stage: one stage module of the U-Architecture (one layer of the hierarchy).
//
// For every grid point of layer i (every S-th pixel, GW = FW/S points per line,
// GH = FH/S lines) the stage receives the vector handed down by the previous
// layer, fetches from the external frame memories the (N+2P)^2 search area,
// displaced by that vector, and the N^2 reference block centred on the point,
// runs the full search over +-P, adds the update to the incoming vector, and
// passes the result to the interpolation unit, which emits the doubled-density
// field for layer i+1 in raster order.
//
// Double buffering (PM-A/PM-B, CM-A/CM-B): while the estimation unit works on
// one buffer pair, the next grid point's blocks are written into the other, so
// the fetch hides behind the computation when the port widths PIXP/PIXC (pixels
// per clock) are at least (N+2P)^2/E and N^2/E. The DMUX on the write side is a
// per-buffer write strobe; the PM-switch and CM-switch pick the buffer the
// estimation unit reads (`sel`). The vector being computed plays the role of
// the document's v1 and the vector being prefetched that of v2; both come in
// over one valid/ready stream, which is this design's choice.
// Grid point (gx,gy) sits at pixel (gx*S, gy*S); its reference block has its
// top-left corner at (gx*S - N/2, gy*S - N/2) and its search area at that
// corner minus P plus the incoming vector. Pixels outside the frame are taken
// from the nearest border pixel.
// Timing: a vector occupies the estimation unit for E = (N+1)(2P+1)+2N clocks
// plus three clocks of hand-over (result update and buffer swap).
module u_stage
  import hbma_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned P    = 7,
  parameter int unsigned S    = 8,
  parameter int unsigned PIXP = 6,
  parameter int unsigned PIXC = 4,
  parameter int unsigned FW   = 288,
  parameter int unsigned FH   = 352
) (
  input  logic  clk,
  input  logic  rst_n,
  // vectors from the previous stage
  input  logic  in_valid,
  output logic  in_ready,
  input  mvec_t in_vec,
  // vectors to the next stage
  output logic  out_valid,
  input  logic  out_ready,
  output mvec_t out_vec,
  output logic  frame_done,
  // external previous-frame memory port (EPM address / PM port)
  output logic [$clog2(FW)-1:0] epm_x [PIXP],
  output logic [$clog2(FH)-1:0] epm_y [PIXP],
  output logic                  epm_v [PIXP],
  input  pixel_t                epm_pix [PIXP],
  // external current-frame memory port (ECM address / CM port)
  output logic [$clog2(FW)-1:0] ecm_x [PIXC],
  output logic [$clog2(FH)-1:0] ecm_y [PIXC],
  output logic                  ecm_v [PIXC],
  input  pixel_t                ecm_pix [PIXC]
);
  localparam int unsigned K  = N + 2 * P;
  localparam int unsigned GW = FW / S;
  localparam int unsigned GH = FH / S;
  localparam int unsigned GXW = $clog2(GW + 1);
  localparam int unsigned GYW = $clog2(GH + 1);
  localparam int unsigned KRW = $clog2(K);
  localparam int unsigned NRW = $clog2(N);

  // ---------------- buffer bookkeeping ----------------
  logic   load_buf, comp_buf;
  logic   full [2];
  mvec_t  bvec [2];
  logic   loading, pm_pend, cm_pend;
  logic [GXW-1:0] gx;
  logic [GYW-1:0] gy;

  // ---------------- external address units ----------------
  logic ld_start;
  logic signed [13:0] ref_ox, ref_oy, sa_ox, sa_oy;
  logic pm_busy, pm_done, cm_busy, cm_done;

  always_comb begin
    ref_ox = 14'(signed'({1'b0, gx})) * 14'(S) - 14'(N / 2);
    ref_oy = 14'(signed'({1'b0, gy})) * 14'(S) - 14'(N / 2);
    sa_ox  = ref_ox - 14'(P) + 14'(in_vec.x);
    sa_oy  = ref_oy - 14'(P) + 14'(in_vec.y);
  end

  assign in_ready = !loading && !full[load_buf];
  assign ld_start = in_valid && in_ready;

  ext_addr_unit #(.BLK(K), .PIX(PIXP), .FW(FW), .FH(FH)) u_epm_addr (
    .clk, .rst_n, .start(ld_start), .org_x(sa_ox), .org_y(sa_oy),
    .lane_x(epm_x), .lane_y(epm_y), .lane_v(epm_v), .busy(pm_busy), .done(pm_done)
  );
  ext_addr_unit #(.BLK(N), .PIX(PIXC), .FW(FW), .FH(FH)) u_ecm_addr (
    .clk, .rst_n, .start(ld_start), .org_x(ref_ox), .org_y(ref_oy),
    .lane_x(ecm_x), .lane_y(ecm_y), .lane_v(ecm_v), .busy(cm_busy), .done(cm_done)
  );

  // ---------------- internal memories (DMUX = per-buffer write strobes) ----------------
  logic   pm_we [2][PIXP];
  logic   cm_we [2][PIXC];
  pixel_t pm_q  [2][K];
  pixel_t cm_q  [2][N];
  pixel_t sa_row  [K];
  pixel_t ref_row [N];
  logic [KRW-1:0] pm_row;
  logic [NRW-1:0] cm_row;
  logic [KRW-1:0] pm_skew [K];
  logic [NRW-1:0] cm_skew [N];
  logic sel;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      for (int j = 0; j < PIXP; j++) pm_we[b][j] = epm_v[j] && (load_buf == b[0]);
      for (int j = 0; j < PIXC; j++) cm_we[b][j] = ecm_v[j] && (load_buf == b[0]);
    end
    for (int m = 0; m < K; m++) pm_skew[m] = '0;
    for (int m = 0; m < N; m++) cm_skew[m] = '0;
  end

  for (genvar b = 0; b < 2; b++) begin : g_buf
    nmodule_mem #(.K(K), .D(K), .PIX(PIXP)) u_pm (
      .clk, .rst_n, .wr_start(ld_start && load_buf == b[0]), .wr_lane(pm_we[b]),
      .wr_data(epm_pix), .rd_row(pm_row), .rd_skew(pm_skew), .rd_data(pm_q[b])
    );
    nmodule_mem #(.K(N), .D(N), .PIX(PIXC)) u_cm (
      .clk, .rst_n, .wr_start(ld_start && load_buf == b[0]), .wr_lane(cm_we[b]),
      .wr_data(ecm_pix), .rd_row(cm_row), .rd_skew(cm_skew), .rd_data(cm_q[b])
    );
  end

  mem_switch_2to1 #(.K(K)) u_pm_switch (.sel(sel), .in_a(pm_q[0]), .in_b(pm_q[1]), .out(sa_row));
  mem_switch_2to1 #(.K(N)) u_cm_switch (.sel(sel), .in_a(cm_q[0]), .in_b(cm_q[1]), .out(ref_row));
  assign sel = comp_buf;

  // ---------------- estimation, update ----------------
  logic  eu_start, eu_busy, eu_done, eu_run, upd_pend, fire;
  mvec_t eu_mv, add_out, res_vec;
  logic  add_valid, res_valid, res_take;

  estimation_unit #(.N(N), .P(P)) u_eu (
    .clk, .rst_n, .start(eu_start), .pm_row(pm_row), .cm_row(cm_row),
    .sa_in(sa_row), .ref_in(ref_row), .busy(eu_busy), .done(eu_done),
    .mv(eu_mv), .min_sad()
  );

  assign eu_start = !eu_run && !upd_pend && full[comp_buf];
  assign fire     = upd_pend && !res_valid && !add_valid;

  update_adder u_update (
    .clk, .rst_n, .in_valid(fire), .prev_vec(bvec[comp_buf]), .upd_vec(eu_mv),
    .out_valid(add_valid), .out_vec(add_out)
  );

  // ---------------- interpolation unit ----------------
  logic iu_ready;
  assign res_take = res_valid && iu_ready;

  u_interp_unit #(.GW(GW), .GH(GH)) u_iu (
    .clk, .rst_n, .in_valid(res_valid), .in_ready(iu_ready), .in_vec(res_vec),
    .out_valid(out_valid), .out_ready(out_ready), .out_vec(out_vec),
    .frame_done(frame_done)
  );

  // ---------------- stage controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_buf  <= 1'b0;
      comp_buf  <= 1'b0;
      full[0]   <= 1'b0;
      full[1]   <= 1'b0;
      bvec[0]   <= '0;
      bvec[1]   <= '0;
      loading   <= 1'b0;
      pm_pend   <= 1'b0;
      cm_pend   <= 1'b0;
      gx        <= '0;
      gy        <= '0;
      eu_run    <= 1'b0;
      upd_pend  <= 1'b0;
      res_valid <= 1'b0;
      res_vec   <= '0;
    end else begin
      // loader
      if (ld_start) begin
        bvec[load_buf] <= in_vec;
        loading <= 1'b1;
        pm_pend <= 1'b1;
        cm_pend <= 1'b1;
        if (gx == GXW'(GW - 1)) begin
          gx <= '0;
          gy <= (gy == GYW'(GH - 1)) ? '0 : gy + 1'b1;
        end else begin
          gx <= gx + 1'b1;
        end
      end else if (loading) begin
        if (pm_done) pm_pend <= 1'b0;
        if (cm_done) cm_pend <= 1'b0;
        if ((!pm_pend || pm_done) && (!cm_pend || cm_done)) begin
          loading        <= 1'b0;
          full[load_buf] <= 1'b1;
          load_buf       <= !load_buf;
        end
      end
      // estimation
      if (eu_start) eu_run <= 1'b1;
      if (eu_done) begin
        eu_run   <= 1'b0;
        upd_pend <= 1'b1;
      end
      if (fire) begin
        upd_pend       <= 1'b0;
        full[comp_buf] <= 1'b0;
        comp_buf       <= !comp_buf;
      end
      // result register toward the interpolation unit
      if (add_valid) begin
        res_valid <= 1'b1;
        res_vec   <= add_out;
      end else if (res_take) begin
        res_valid <= 1'b0;
      end
    end
  end

`ifndef SYNTHESIS
  // The buffer being loaded is never the one being computed on.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                  (loading && eu_run) |-> (load_buf != comp_buf));
`endif
endmodule
