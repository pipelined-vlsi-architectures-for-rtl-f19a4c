// tb_hbma_b_top: end-to-end test of the three-stage B-Architecture pipeline.
//
// Runs one frame through the pipeline at a reduced size (32 x 32 frame,
// 16/8/4-pixel blocks searching +-3/+-2/+-1 on 8/4/2-pixel grids, narrow
// ports as in the full design) and compares every output vector, read in
// bidirectional order, with the reference model. Frame memories are modelled
// here as combinational lookups into generated frames; output back-pressure
// is random. It counts the mechanisms of the design: fetch overlapping a
// search, pixels actually fetched against whole blocks (wraparound reuse),
// clocks waiting because two blocks did not fit, last-in-first-out output
// queue reads, last-row replay, border fetches and output stalls; all but the
// fit waits must occur (those depend on the vector field and are exercised
// by tb_b_stage).
module tb_hbma_b_top;
  import hbma_pkg::*;
  import tb_hbma_model_pkg::*;

  localparam int FW = 32, FH = 32;
  localparam int N1 = 16, P1 = 3, S1 = 8, PP1 = 1, PC1 = 1;
  localparam int N2 = 8,  P2 = 2, S2 = 4, PP2 = 2, PC2 = 1;
  localparam int N3 = 4,  P3 = 1, S3 = 2, PP3 = 2, PC3 = 1;
  localparam int MAXCYC = 2_000_000;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, out_valid, out_ready;
  mvec_t out_vec;

  logic [$clog2(FW)-1:0] s1px [PP1], s1cx [PC1], s2px [PP2], s2cx [PC2], s3px [PP3], s3cx [PC3];
  logic [$clog2(FH)-1:0] s1py [PP1], s1cy [PC1], s2py [PP2], s2cy [PC2], s3py [PP3], s3cy [PC3];
  logic s1pv [PP1], s1cv [PC1], s2pv [PP2], s2cv [PC2], s3pv [PP3], s3cv [PC3];
  pixel_t s1pd [PP1], s1cd [PC1], s2pd [PP2], s2cd [PC2], s3pd [PP3], s3cd [PC3];

  // external frame memories: same-clock access
  always_comb begin
    for (int j = 0; j < PP1; j++) s1pd[j] = prev_pix(int'(s1px[j]), int'(s1py[j]));
    for (int j = 0; j < PC1; j++) s1cd[j] = cur_pix (int'(s1cx[j]), int'(s1cy[j]));
    for (int j = 0; j < PP2; j++) s2pd[j] = prev_pix(int'(s2px[j]), int'(s2py[j]));
    for (int j = 0; j < PC2; j++) s2cd[j] = cur_pix (int'(s2cx[j]), int'(s2cy[j]));
    for (int j = 0; j < PP3; j++) s3pd[j] = prev_pix(int'(s3px[j]), int'(s3py[j]));
    for (int j = 0; j < PC3; j++) s3cd[j] = cur_pix (int'(s3cx[j]), int'(s3cy[j]));
  end

  hbma_b_top #(
    .FW(FW), .FH(FH),
    .N1(N1), .P1(P1), .S1(S1), .PIXP1(PP1), .PIXC1(PC1),
    .N2(N2), .P2(P2), .S2(S2), .PIXP2(PP2), .PIXC2(PC2),
    .N3(N3), .P3(P3), .S3(S3), .PIXP3(PP3), .PIXC3(PC3)
  ) dut (
    .clk, .rst_n, .start, .busy, .done, .out_valid, .out_ready, .out_vec,
    .s1_epm_x(s1px), .s1_epm_y(s1py), .s1_epm_v(s1pv), .s1_epm_pix(s1pd),
    .s1_ecm_x(s1cx), .s1_ecm_y(s1cy), .s1_ecm_v(s1cv), .s1_ecm_pix(s1cd),
    .s2_epm_x(s2px), .s2_epm_y(s2py), .s2_epm_v(s2pv), .s2_epm_pix(s2pd),
    .s2_ecm_x(s2cx), .s2_ecm_y(s2cy), .s2_ecm_v(s2cv), .s2_ecm_pix(s2cd),
    .s3_epm_x(s3px), .s3_epm_y(s3py), .s3_epm_v(s3pv), .s3_epm_pix(s3pd),
    .s3_ecm_x(s3cx), .s3_ecm_y(s3cy), .s3_ecm_v(s3cv), .s3_ecm_pix(s3cd)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0, nout = 0;
  int n_overlap = 0, n_stall = 0, n_replay = 0, n_done = 0, n_clamp = 0;
  ivec_t expv[];
  bit finished = 0;

  // mechanism counters
  int n_fetch = 0, n_full = 0, n_wait = 0, n_lifo = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.b_stage1.ld_start && dut.b_stage1.eu_run) n_overlap++;
    if (dut.b_stage2.ld_start && dut.b_stage2.eu_run) n_overlap++;
    if (dut.b_stage3.ld_start && dut.b_stage3.eu_run) n_overlap++;
    if (dut.b_stage1.ld_start) n_full += (N1 + 2 * P1) ** 2;
    if (dut.b_stage2.ld_start) n_full += (N2 + 2 * P2) ** 2;
    if (dut.b_stage3.ld_start) n_full += (N3 + 2 * P3) ** 2;
    for (int j = 0; j < PP1; j++) if (s1pv[j]) n_fetch++;
    for (int j = 0; j < PP2; j++) if (s2pv[j]) n_fetch++;
    for (int j = 0; j < PP3; j++) if (s3pv[j]) n_fetch++;
    if (dut.b_stage1.fit_wait || dut.b_stage2.fit_wait || dut.b_stage3.fit_wait) n_wait++;
    if ((dut.b_stage2.u_iu.oq1_pop && dut.b_stage2.u_iu.left) ||
        (dut.b_stage2.u_iu.oq2_pop && !dut.b_stage2.u_iu.left)) n_lifo++;
    if (out_valid && !out_ready) n_stall++;
    if (dut.b_stage2.u_iu.take && dut.b_stage2.u_iu.virt) n_replay++;
    if (dut.b_stage1.u_pm_fetch.lane_v[0] && dut.b_stage1.u_pm_fetch.lane_vx[0] < 0) n_clamp++;
    if (done) n_done++;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int x, y;
    y = nout / FW;
    x = (y % 2 == 0) ? nout % FW : FW - 1 - nout % FW;
    checks++;
    if (nout >= FW * FH || int'(out_vec.x) != expv[y * FW + x].x || int'(out_vec.y) != expv[y * FW + x].y) begin
      failures++;
      if (failures < 10)
        $display("mismatch at (%0d,%0d): got (%0d,%0d) expected (%0d,%0d)", x, y,
                 out_vec.x, out_vec.y, expv[y * FW + x].x, expv[y * FW + x].y);
    end
    nout++;
  end

  always @(posedge clk) out_ready <= ($urandom % 4) != 0;

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
    wait (n_done == 1);
    repeat (20) @(posedge clk);
    checks++;
    if (nout != FW * FH) begin
      failures++;
      $display("output count %0d, expected %0d", nout, FW * FH);
    end
    if (n_overlap == 0) begin failures++; $display("prefetch never overlapped a search"); end
    if (n_stall   == 0) begin failures++; $display("no output stall"); end
    if (n_lifo    == 0) begin failures++; $display("no last-in-first-out queue read"); end
    if (n_fetch >= n_full) begin failures++; $display("no overlap reused"); end
    if (n_replay  == 0) begin failures++; $display("last-row replay never ran"); end
    if (n_clamp   == 0) begin failures++; $display("no border fetch"); end
    checks += 6;
    $display("cycles=%0d overlap=%0d fetched=%0d of %0d fit_wait=%0d lifo=%0d stall=%0d replay=%0d clamp=%0d",
             cycles, n_overlap, n_fetch, n_full, n_wait, n_lifo, n_stall, n_replay, n_clamp);
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
