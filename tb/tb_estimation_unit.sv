// tb_estimation_unit: checks the full-search estimation unit against a brute-force
// search. Small blocks (N=4, P=2) filled with random pixels, some with a
// planted exact match; synchronous-read memories are modelled here. Checks the
// vector, the minimum MAD and the E = (N+1)(2P+1)+2N clock latency.
module tb_estimation_unit;
  import hbma_pkg::*;
  localparam int N = 4, P = 2, K = N + 2 * P, E = (N + 1) * (2 * P + 1) + 2 * N;

  logic clk = 0, rst_n = 0, start = 0;
  logic [$clog2(K)-1:0] pm_row;
  logic [$clog2(N)-1:0] cm_row;
  pixel_t sa_in [K], ref_in [N];
  logic busy, done;
  mvec_t mv;
  logic [$clog2(N*N*255+1)-1:0] min_sad;
  pixel_t SA [K][K], RB [N][N];
  int checks = 0, failures = 0;

  estimation_unit #(.N(N), .P(P)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    for (int k = 0; k < K; k++) sa_in[k] <= SA[pm_row][k];
    for (int k = 0; k < N; k++) ref_in[k] <= RB[cm_row][k];
  end

  task automatic run_one(int plant_u, int plant_v);
    int best, bu, bv, lat;
    for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) SA[r][c] = pixel_t'($urandom);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      RB[r][c] = (plant_u >= 0) ? SA[r + plant_v][c + plant_u] : pixel_t'($urandom);
    best = -1;
    for (int v = 0; v <= 2 * P; v++) for (int u = 0; u <= 2 * P; u++) begin
      int s; s = 0;
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        int d; d = int'(RB[r][c]) - int'(SA[r + v][c + u]); s += d < 0 ? -d : d;
      end
      if (best < 0 || s < best) begin best = s; bu = u - P; bv = v - P; end
    end
    @(negedge clk); start = 1; @(posedge clk); #1 start = 0;
    lat = 0;
    while (!done) begin @(posedge clk); #1 lat++; end
    checks += 3;
    if (lat != E) begin failures++; $display("latency %0d expected %0d", lat, E); end
    if (int'(mv.x) != bu || int'(mv.y) != bv) begin
      failures++; $display("mv (%0d,%0d) expected (%0d,%0d)", mv.x, mv.y, bu, bv);
    end
    if (int'(min_sad) != best) begin failures++; $display("sad %0d expected %0d", min_sad, best); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run_one(0, 0); run_one(4, 4); run_one(1, 3); run_one(3, 0);
    repeat (20) run_one(-1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
