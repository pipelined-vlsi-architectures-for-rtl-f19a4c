// tb_hbma_top: one full-size frame through both pipelines of hbma_top.
//
// The top keeps all its default parameters: a 288-pixel by 352-line frame,
// layers of 64/28/12-pixel blocks searching +-7/+-3/+-1 on 8/4/2-pixel grids,
// and the document's port widths for each architecture. Frame memories are
// modelled here as combinational lookups into generated frames (a textured
// frame and a copy displaced by a global motion). Both output fields are
// compared vector by vector with the reference model: the U field in raster
// order, the B field in bidirectional order. Output back-pressure is random on
// both streams.
// Mechanisms counted, each of which must occur: U: prefetch overlapping a
// search (double buffering), latch-array controller line switches, last-row
// replay, border fetches, output stalls. B: fetch overlapping a search,
// pixels fetched against whole blocks (wraparound reuse), last-in-first-out
// queue reads, last-row replay, border fetches, output stalls. Clocks spent
// waiting because two blocks did not fit in a wraparound memory are reported
// (they depend on the motion field; tb_b_stage forces them).
module tb_hbma_top;
  import hbma_pkg::*;
  import tb_hbma_model_pkg::*;

  localparam int FW = 288, FH = 352;
  localparam int N1 = 64, P1 = 7, S1 = 8;
  localparam int N2 = 28, P2 = 3, S2 = 4;
  localparam int N3 = 12, P3 = 1, S3 = 2;
  localparam int MAXCYC = 4_000_000;

  logic clk = 0, rst_n = 0, start = 0;
  logic u_busy, u_done, u_out_valid, u_out_ready, b_busy, b_done, b_out_valid, b_out_ready;
  mvec_t u_out_vec, b_out_vec;
  logic [$clog2(FW)-1:0] u_s1_epm_x [6];
  logic [$clog2(FH)-1:0] u_s1_epm_y [6];
  logic u_s1_epm_v [6];
  pixel_t u_s1_epm_pix [6];
  logic [$clog2(FW)-1:0] u_s1_ecm_x [4];
  logic [$clog2(FH)-1:0] u_s1_ecm_y [4];
  logic u_s1_ecm_v [4];
  pixel_t u_s1_ecm_pix [4];
  logic [$clog2(FW)-1:0] u_s2_epm_x [5];
  logic [$clog2(FH)-1:0] u_s2_epm_y [5];
  logic u_s2_epm_v [5];
  pixel_t u_s2_epm_pix [5];
  logic [$clog2(FW)-1:0] u_s2_ecm_x [4];
  logic [$clog2(FH)-1:0] u_s2_ecm_y [4];
  logic u_s2_ecm_v [4];
  pixel_t u_s2_ecm_pix [4];
  logic [$clog2(FW)-1:0] u_s3_epm_x [4];
  logic [$clog2(FH)-1:0] u_s3_epm_y [4];
  logic u_s3_epm_v [4];
  pixel_t u_s3_epm_pix [4];
  logic [$clog2(FW)-1:0] u_s3_ecm_x [3];
  logic [$clog2(FH)-1:0] u_s3_ecm_y [3];
  logic u_s3_ecm_v [3];
  pixel_t u_s3_ecm_pix [3];
  logic [$clog2(FW)-1:0] b_s1_epm_x [1];
  logic [$clog2(FH)-1:0] b_s1_epm_y [1];
  logic b_s1_epm_v [1];
  pixel_t b_s1_epm_pix [1];
  logic [$clog2(FW)-1:0] b_s1_ecm_x [1];
  logic [$clog2(FH)-1:0] b_s1_ecm_y [1];
  logic b_s1_ecm_v [1];
  pixel_t b_s1_ecm_pix [1];
  logic [$clog2(FW)-1:0] b_s2_epm_x [3];
  logic [$clog2(FH)-1:0] b_s2_epm_y [3];
  logic b_s2_epm_v [3];
  pixel_t b_s2_epm_pix [3];
  logic [$clog2(FW)-1:0] b_s2_ecm_x [2];
  logic [$clog2(FH)-1:0] b_s2_ecm_y [2];
  logic b_s2_ecm_v [2];
  pixel_t b_s2_ecm_pix [2];
  logic [$clog2(FW)-1:0] b_s3_epm_x [2];
  logic [$clog2(FH)-1:0] b_s3_epm_y [2];
  logic b_s3_epm_v [2];
  pixel_t b_s3_epm_pix [2];
  logic [$clog2(FW)-1:0] b_s3_ecm_x [2];
  logic [$clog2(FH)-1:0] b_s3_ecm_y [2];
  logic b_s3_ecm_v [2];
  pixel_t b_s3_ecm_pix [2];

  // external frame memories: same-clock access
  always_comb begin
    for (int j = 0; j < 6; j++) u_s1_epm_pix[j] = prev_pix(int'(u_s1_epm_x[j]), int'(u_s1_epm_y[j]));
    for (int j = 0; j < 4; j++) u_s1_ecm_pix[j] = cur_pix (int'(u_s1_ecm_x[j]), int'(u_s1_ecm_y[j]));
    for (int j = 0; j < 5; j++) u_s2_epm_pix[j] = prev_pix(int'(u_s2_epm_x[j]), int'(u_s2_epm_y[j]));
    for (int j = 0; j < 4; j++) u_s2_ecm_pix[j] = cur_pix (int'(u_s2_ecm_x[j]), int'(u_s2_ecm_y[j]));
    for (int j = 0; j < 4; j++) u_s3_epm_pix[j] = prev_pix(int'(u_s3_epm_x[j]), int'(u_s3_epm_y[j]));
    for (int j = 0; j < 3; j++) u_s3_ecm_pix[j] = cur_pix (int'(u_s3_ecm_x[j]), int'(u_s3_ecm_y[j]));
    for (int j = 0; j < 1; j++) b_s1_epm_pix[j] = prev_pix(int'(b_s1_epm_x[j]), int'(b_s1_epm_y[j]));
    for (int j = 0; j < 1; j++) b_s1_ecm_pix[j] = cur_pix (int'(b_s1_ecm_x[j]), int'(b_s1_ecm_y[j]));
    for (int j = 0; j < 3; j++) b_s2_epm_pix[j] = prev_pix(int'(b_s2_epm_x[j]), int'(b_s2_epm_y[j]));
    for (int j = 0; j < 2; j++) b_s2_ecm_pix[j] = cur_pix (int'(b_s2_ecm_x[j]), int'(b_s2_ecm_y[j]));
    for (int j = 0; j < 2; j++) b_s3_epm_pix[j] = prev_pix(int'(b_s3_epm_x[j]), int'(b_s3_epm_y[j]));
    for (int j = 0; j < 2; j++) b_s3_ecm_pix[j] = cur_pix (int'(b_s3_ecm_x[j]), int'(b_s3_ecm_y[j]));
  end

  hbma_top dut (
    .clk, .rst_n, .start,
    .u_busy, .u_done, .u_out_valid, .u_out_ready, .u_out_vec,
    .b_busy, .b_done, .b_out_valid, .b_out_ready, .b_out_vec,
    .u_s1_epm_x,
    .u_s1_epm_y,
    .u_s1_epm_v,
    .u_s1_epm_pix,
    .u_s1_ecm_x,
    .u_s1_ecm_y,
    .u_s1_ecm_v,
    .u_s1_ecm_pix,
    .u_s2_epm_x,
    .u_s2_epm_y,
    .u_s2_epm_v,
    .u_s2_epm_pix,
    .u_s2_ecm_x,
    .u_s2_ecm_y,
    .u_s2_ecm_v,
    .u_s2_ecm_pix,
    .u_s3_epm_x,
    .u_s3_epm_y,
    .u_s3_epm_v,
    .u_s3_epm_pix,
    .u_s3_ecm_x,
    .u_s3_ecm_y,
    .u_s3_ecm_v,
    .u_s3_ecm_pix,
    .b_s1_epm_x,
    .b_s1_epm_y,
    .b_s1_epm_v,
    .b_s1_epm_pix,
    .b_s1_ecm_x,
    .b_s1_ecm_y,
    .b_s1_ecm_v,
    .b_s1_ecm_pix,
    .b_s2_epm_x,
    .b_s2_epm_y,
    .b_s2_epm_v,
    .b_s2_epm_pix,
    .b_s2_ecm_x,
    .b_s2_ecm_y,
    .b_s2_ecm_v,
    .b_s2_ecm_pix,
    .b_s3_epm_x,
    .b_s3_epm_y,
    .b_s3_epm_v,
    .b_s3_epm_pix,
    .b_s3_ecm_x,
    .b_s3_ecm_y,
    .b_s3_ecm_v,
    .b_s3_ecm_pix
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0, u_nout = 0, b_nout = 0, u_ndone = 0, b_ndone = 0;
  int u_overlap = 0, u_stall = 0, u_lac = 0, u_replay = 0, u_clamp = 0;
  int b_overlap = 0, b_stall = 0, b_fetch = 0, b_full = 0, b_wait = 0, b_lifo = 0, b_replay = 0, b_clamp = 0;
  int u_last = 0, b_last = 0;
  ivec_t expv[];
  bit finished = 0;

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_arch.u_stage1.loading && dut.u_arch.u_stage1.eu_run) u_overlap++;
    if (dut.u_arch.u_stage3.loading && dut.u_arch.u_stage3.eu_run) u_overlap++;
    if ((dut.u_arch.u_stage1.u_iu.la2_pop || dut.u_arch.u_stage1.u_iu.la3_pop) &&
        dut.u_arch.u_stage1.u_iu.ocnt == 2 * (FW / S1) - 1) u_lac++;
    if (dut.u_arch.u_stage2.u_iu.take && dut.u_arch.u_stage2.u_iu.virt) u_replay++;
    if (dut.u_arch.u_stage1.u_epm_addr.busy && dut.u_arch.u_stage1.u_epm_addr.ox < 0) u_clamp++;
    if (u_out_valid && !u_out_ready) u_stall++;
    if (u_done) begin u_ndone++; u_last = cycles; end

    if (dut.b_arch.b_stage1.ld_start && dut.b_arch.b_stage1.eu_run) b_overlap++;
    if (dut.b_arch.b_stage2.ld_start && dut.b_arch.b_stage2.eu_run) b_overlap++;
    if (dut.b_arch.b_stage3.ld_start && dut.b_arch.b_stage3.eu_run) b_overlap++;
    if (dut.b_arch.b_stage1.ld_start) b_full += (N1 + 2 * P1) ** 2;
    if (dut.b_arch.b_stage2.ld_start) b_full += (N2 + 2 * P2) ** 2;
    if (dut.b_arch.b_stage3.ld_start) b_full += (N3 + 2 * P3) ** 2;
    foreach (b_s1_epm_v[j]) if (b_s1_epm_v[j]) b_fetch++;
    foreach (b_s2_epm_v[j]) if (b_s2_epm_v[j]) b_fetch++;
    foreach (b_s3_epm_v[j]) if (b_s3_epm_v[j]) b_fetch++;
    if (dut.b_arch.b_stage1.fit_wait || dut.b_arch.b_stage2.fit_wait || dut.b_arch.b_stage3.fit_wait) b_wait++;
    if ((dut.b_arch.b_stage2.u_iu.oq1_pop && dut.b_arch.b_stage2.u_iu.left) ||
        (dut.b_arch.b_stage2.u_iu.oq2_pop && !dut.b_arch.b_stage2.u_iu.left)) b_lifo++;
    if (dut.b_arch.b_stage2.u_iu.take && dut.b_arch.b_stage2.u_iu.virt) b_replay++;
    if (dut.b_arch.b_stage1.u_pm_fetch.lane_v[0] && dut.b_arch.b_stage1.u_pm_fetch.lane_vx[0] < 0) b_clamp++;
    if (b_out_valid && !b_out_ready) b_stall++;
    if (b_done) begin b_ndone++; b_last = cycles; end
  end

  // output checkers
  always @(posedge clk) if (rst_n && u_out_valid && u_out_ready) begin
    checks++;
    if (u_nout >= FW * FH || int'(u_out_vec.x) != expv[u_nout].x || int'(u_out_vec.y) != expv[u_nout].y) begin
      failures++;
      if (failures < 10) $display("U mismatch at output %0d", u_nout);
    end
    u_nout++;
  end
  always @(posedge clk) if (rst_n && b_out_valid && b_out_ready) begin
    int x, y;
    y = b_nout / FW;
    x = (y % 2 == 0) ? b_nout % FW : FW - 1 - b_nout % FW;
    checks++;
    if (b_nout >= FW * FH || int'(b_out_vec.x) != expv[y * FW + x].x || int'(b_out_vec.y) != expv[y * FW + x].y) begin
      failures++;
      if (failures < 10) $display("B mismatch at (%0d,%0d)", x, y);
    end
    b_nout++;
  end

  always @(posedge clk) begin
    u_out_ready <= ($urandom % 4) != 0;
    b_out_ready <= ($urandom % 4) != 0;
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("%s never happened", what); end
  endtask

  initial begin
    ivec_t v0[], e1[], f1[], e2[], f2[], e3[];
    g_fw = FW; g_fh = FH; g_mx = 3; g_my = -2;
    v0 = new[(FW / S1) * (FH / S1)];
    foreach (v0[i]) begin v0[i].x = 0; v0[i].y = 0; end
    bma_layer(N1, P1, S1, FW / S1, FH / S1, v0, e1);
    interp2(FW / S1, FH / S1, e1, f1);
    bma_layer(N2, P2, S2, FW / S2, FH / S2, f1, e2);
    interp2(FW / S2, FH / S2, e2, f2);
    bma_layer(N3, P3, S3, FW / S3, FH / S3, f2, e3);
    interp2(FW / S3, FH / S3, e3, expv);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (u_ndone == 1 && b_ndone == 1);
    repeat (20) @(posedge clk);
    checks += 2;
    if (u_nout != FW * FH) begin failures++; $display("U output count %0d", u_nout); end
    if (b_nout != FW * FH) begin failures++; $display("B output count %0d", b_nout); end
    need(u_overlap, "U prefetch overlapping a search");
    need(u_lac, "U latch-array controller switch");
    need(u_replay, "U last-row replay");
    need(u_clamp, "U border fetch");
    need(u_stall, "U output stall");
    need(b_overlap, "B fetch overlapping a search");
    need(b_fetch < b_full, "B wraparound reuse");
    need(b_lifo, "B last-in-first-out queue read");
    need(b_replay, "B last-row replay");
    need(b_clamp, "B border fetch");
    need(b_stall, "B output stall");
    $display("U: done at %0d clocks, overlap=%0d lac=%0d replay=%0d clamp=%0d stall=%0d",
             u_last, u_overlap, u_lac, u_replay, u_clamp, u_stall);
    $display("B: done at %0d clocks, overlap=%0d fetched=%0d of %0d fit_wait=%0d lifo=%0d replay=%0d clamp=%0d stall=%0d",
             b_last, b_overlap, b_fetch, b_full, b_wait, b_lifo, b_replay, b_clamp, b_stall);
    finished = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    if (!finished) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
