// tb_b_stage: one B-Architecture stage (N=8, P=2, step 4, previous range 3,
// 24 x 24 frame) fed, in bidirectional scan order, with a random incoming
// vector field that now and then jumps far enough that two neighbouring
// blocks no longer fit together in the wraparound memory. Every output vector
// is compared, in bidirectional order, with the reference layer (search,
// update, interpolation). Counts the pixels actually fetched against a full
// fetch (reuse of the overlap), fetches overlapped with estimation, clocks
// spent waiting because blocks did not fit, and start intervals of E + 3.
module tb_b_stage;
  import hbma_pkg::*;
  import tb_hbma_model_pkg::*;
  localparam int N = 8, P = 2, S = 4, PV = 3, FW = 24, FH = 24, PP = 2, PC = 1;
  localparam int GW = FW / S, GH = FH / S, E = (N + 1) * (2 * P + 1) + 2 * N;
  localparam int K = N + 2 * P;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1, frame_done, fit_wait;
  mvec_t in_vec, out_vec;
  logic [$clog2(FW)-1:0] epm_x [PP], ecm_x [PC];
  logic [$clog2(FH)-1:0] epm_y [PP], ecm_y [PC];
  logic epm_v [PP], ecm_v [PC];
  pixel_t epm_pix [PP], ecm_pix [PC];
  int checks = 0, failures = 0, nout = 0;
  int fetched = 0, overlap = 0, waits = 0, fast = 0, nfd = 0;
  ivec_t vin[], est[], expv[];
  int starts[$];

  b_stage #(.N(N), .P(P), .S(S), .PP(PV), .PIXP(PP), .PIXC(PC), .FW(FW), .FH(FH)) dut (.*);
  always #5 clk = ~clk;
  always_comb begin
    for (int j = 0; j < PP; j++) epm_pix[j] = prev_pix(int'(epm_x[j]), int'(epm_y[j]));
    for (int j = 0; j < PC; j++) ecm_pix[j] = cur_pix(int'(ecm_x[j]), int'(ecm_y[j]));
  end

  function automatic int serp(int i, int W);
    int y, k;
    y = i / W; k = i % W;
    return y * W + ((y % 2 == 0) ? k : W - 1 - k);
  endfunction

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.eu_start) starts.push_back(cyc);
      if (dut.ld_start && dut.eu_run) overlap++;
      if (fit_wait) waits++;
      if (frame_done) nfd++;
      for (int j = 0; j < PP; j++) if (epm_v[j]) fetched++;
    end
    if (rst_n && out_valid && out_ready) begin
      int j;
      j = serp(nout, 2 * GW);
      checks++;
      if (nout >= 4 * GW * GH || int'(out_vec.x) != expv[j].x || int'(out_vec.y) != expv[j].y) begin
        failures++; $display("output %0d wrong", nout);
      end
      nout++;
    end
  end
  initial begin
    g_fw = FW; g_fh = FH; g_mx = 1; g_my = -2;
    vin = new[GW * GH];
    foreach (vin[i]) begin
      int r;
      r = (i % 7 == 3) ? 7 : 2;
      vin[i].x = int'($urandom % (2 * r + 1)) - r; vin[i].y = int'($urandom % 5) - 2;
    end
    bma_layer(N, P, S, GW, GH, vin, est);
    interp2(GW, GH, est, expv);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < GW * GH; i++) begin
      int j;
      j = serp(i, GW);
      @(negedge clk);
      in_valid = 1; in_vec = '{x: 8'(vin[j].x), y: 8'(vin[j].y)};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
    end
    while (nout < 4 * GW * GH) @(posedge clk);
    repeat (5) @(posedge clk);
    checks += 6;
    if (starts.size() != GW * GH) begin failures++; $display("starts %0d", starts.size()); end
    for (int i = 1; i < starts.size(); i++) if (starts[i] - starts[i-1] == E + 3) fast++;
    if (fast < GW * GH / 2) begin failures++; $display("only %0d intervals of E+3", fast); end
    if (fetched >= GW * GH * K * K / 2) begin failures++; $display("no reuse: %0d pixels", fetched); end
    if (overlap == 0) begin failures++; $display("no overlapped fetch"); end
    if (waits == 0) begin failures++; $display("no fit wait"); end
    if (nfd != 1) begin failures++; $display("frame_done %0d", nfd); end
    $display("b_stage: fetched %0d of %0d search-area pixels, overlapped fetches %0d, fit-wait clocks %0d, E+3 intervals %0d",
             fetched, GW * GH * K * K, overlap, waits, fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
