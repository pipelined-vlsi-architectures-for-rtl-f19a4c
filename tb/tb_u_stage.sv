// tb_u_stage: one stage module (N=8, P=2, step 4, 16 x 16 frame) fed with a
// random incoming vector field. Checks every output vector against the
// reference layer (search, update, interpolation), and the steady-state
// throughput: one vector per E + 3 clocks, E = (N+1)(2P+1)+2N, with the block
// fetch fully hidden by double buffering.
module tb_u_stage;
  import hbma_pkg::*;
  import tb_hbma_model_pkg::*;
  localparam int N = 8, P = 2, S = 4, FW = 16, FH = 16, PP = 3, PC = 2;
  localparam int GW = FW / S, GH = FH / S, E = (N + 1) * (2 * P + 1) + 2 * N;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1, frame_done;
  mvec_t in_vec, out_vec;
  logic [$clog2(FW)-1:0] epm_x [PP], ecm_x [PC];
  logic [$clog2(FH)-1:0] epm_y [PP], ecm_y [PC];
  logic epm_v [PP], ecm_v [PC];
  pixel_t epm_pix [PP], ecm_pix [PC];
  int checks = 0, failures = 0, nout = 0;
  ivec_t vin[], est[], expv[];
  int starts[$];

  u_stage #(.N(N), .P(P), .S(S), .PIXP(PP), .PIXC(PC), .FW(FW), .FH(FH)) dut (.*);
  always #5 clk = ~clk;
  always_comb begin
    for (int j = 0; j < PP; j++) epm_pix[j] = prev_pix(int'(epm_x[j]), int'(epm_y[j]));
    for (int j = 0; j < PC; j++) ecm_pix[j] = cur_pix(int'(ecm_x[j]), int'(ecm_y[j]));
  end
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.eu_start) starts.push_back(cyc);
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (nout >= 4 * GW * GH || int'(out_vec.x) != expv[nout].x || int'(out_vec.y) != expv[nout].y) begin
        failures++; $display("output %0d wrong", nout);
      end
      nout++;
    end
  end
  initial begin
    g_fw = FW; g_fh = FH; g_mx = -1; g_my = 2;
    vin = new[GW * GH];
    foreach (vin[i]) begin vin[i].x = int'($urandom % 5) - 2; vin[i].y = int'($urandom % 5) - 2; end
    bma_layer(N, P, S, GW, GH, vin, est);
    interp2(GW, GH, est, expv);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < GW * GH; i++) begin
      @(negedge clk);
      in_valid = 1; in_vec = '{x: 8'(vin[i].x), y: 8'(vin[i].y)};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
    end
    while (nout < 4 * GW * GH) @(posedge clk);
    checks++;
    if (starts.size() != GW * GH) begin failures++; $display("starts %0d", starts.size()); end
    for (int i = 2; i < starts.size(); i++) begin
      checks++;
      if (starts[i] - starts[i-1] != E + 3) begin
        failures++; $display("start interval %0d, expected %0d", starts[i] - starts[i-1], E + 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
