// hbma_u_top: three-stage pipelined U-Architecture for hierarchical block matching.
//
// The hierarchy refines a motion field in three layers: layer 1 searches +-7
// pixels with 64x64 blocks on an 8-pixel grid, layer 2 +-3 with 28x28 blocks on
// a 4-pixel grid, layer 3 +-1 with 12x12 blocks on a 2-pixel grid. Each layer is
// one stage module; stage i adds its update to the vector from stage i-1 and
// bilinearly interpolates its field to the next grid, so vectors flow through
// the pipeline in raster (unidirectional) order and the last stage emits a
// vector for every pixel of the FW x FH frame.
// A `start` pulse makes the seed counter feed stage 1 with (FW/8) x (FH/8) zero
// vectors (the coarsest layer has no prior estimate). The final field leaves on
// `out_*` in raster order under valid/ready; `done` pulses with its last vector.
// Each stage has its own pair of external frame-memory ports; the frame
// memories themselves are off chip. Default sizes: the layer parameters and
// port widths (pixels per clock = pins/8) are the document's; the frame is the
// 352-line by 288-pixel video-conference format of its evaluation.
// Stages hand vectors over with valid/ready on one clock, in place of the
// document's per-stage clocks that run four times faster from stage to stage.
module hbma_u_top
  import hbma_pkg::*;
#(
  parameter int unsigned FW    = 288,  // pixels per line (N_p)
  parameter int unsigned FH    = 352,  // lines per frame
  parameter int unsigned N1    = 64,
  parameter int unsigned P1    = 7,
  parameter int unsigned S1    = 8,
  parameter int unsigned PIXP1 = 6,
  parameter int unsigned PIXC1 = 4,
  parameter int unsigned N2    = 28,
  parameter int unsigned P2    = 3,
  parameter int unsigned S2    = 4,
  parameter int unsigned PIXP2 = 5,
  parameter int unsigned PIXC2 = 4,
  parameter int unsigned N3    = 12,
  parameter int unsigned P3    = 1,
  parameter int unsigned S3    = 2,
  parameter int unsigned PIXP3 = 4,
  parameter int unsigned PIXC3 = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  busy,
  output logic  done,
  output logic  out_valid,
  input  logic  out_ready,
  output mvec_t out_vec,
  // stage 1 external memory ports
  output logic [$clog2(FW)-1:0] s1_epm_x [PIXP1],
  output logic [$clog2(FH)-1:0] s1_epm_y [PIXP1],
  output logic                  s1_epm_v [PIXP1],
  input  pixel_t                s1_epm_pix [PIXP1],
  output logic [$clog2(FW)-1:0] s1_ecm_x [PIXC1],
  output logic [$clog2(FH)-1:0] s1_ecm_y [PIXC1],
  output logic                  s1_ecm_v [PIXC1],
  input  pixel_t                s1_ecm_pix [PIXC1],
  // stage 2 external memory ports
  output logic [$clog2(FW)-1:0] s2_epm_x [PIXP2],
  output logic [$clog2(FH)-1:0] s2_epm_y [PIXP2],
  output logic                  s2_epm_v [PIXP2],
  input  pixel_t                s2_epm_pix [PIXP2],
  output logic [$clog2(FW)-1:0] s2_ecm_x [PIXC2],
  output logic [$clog2(FH)-1:0] s2_ecm_y [PIXC2],
  output logic                  s2_ecm_v [PIXC2],
  input  pixel_t                s2_ecm_pix [PIXC2],
  // stage 3 external memory ports
  output logic [$clog2(FW)-1:0] s3_epm_x [PIXP3],
  output logic [$clog2(FH)-1:0] s3_epm_y [PIXP3],
  output logic                  s3_epm_v [PIXP3],
  input  pixel_t                s3_epm_pix [PIXP3],
  output logic [$clog2(FW)-1:0] s3_ecm_x [PIXC3],
  output logic [$clog2(FH)-1:0] s3_ecm_y [PIXC3],
  output logic                  s3_ecm_v [PIXC3],
  input  pixel_t                s3_ecm_pix [PIXC3]
);
  localparam int unsigned NSEED = (FW / S1) * (FH / S1);
  localparam int unsigned NOUT  = FW * FH;
  localparam int unsigned SW    = $clog2(NSEED + 1);
  localparam int unsigned OW    = $clog2(NOUT + 1);

  // seed generator: zero vectors for layer 1
  logic [SW-1:0] seed_left;
  logic          seed_valid, seed_ready;
  assign seed_valid = (seed_left != '0);

  logic  v12_valid, v12_ready, v23_valid, v23_ready;
  mvec_t v12, v23;

  u_stage #(.N(N1), .P(P1), .S(S1), .PIXP(PIXP1), .PIXC(PIXC1), .FW(FW), .FH(FH)) u_stage1 (
    .clk, .rst_n, .in_valid(seed_valid), .in_ready(seed_ready), .in_vec('0),
    .out_valid(v12_valid), .out_ready(v12_ready), .out_vec(v12), .frame_done(),
    .epm_x(s1_epm_x), .epm_y(s1_epm_y), .epm_v(s1_epm_v), .epm_pix(s1_epm_pix),
    .ecm_x(s1_ecm_x), .ecm_y(s1_ecm_y), .ecm_v(s1_ecm_v), .ecm_pix(s1_ecm_pix)
  );
  u_stage #(.N(N2), .P(P2), .S(S2), .PIXP(PIXP2), .PIXC(PIXC2), .FW(FW), .FH(FH)) u_stage2 (
    .clk, .rst_n, .in_valid(v12_valid), .in_ready(v12_ready), .in_vec(v12),
    .out_valid(v23_valid), .out_ready(v23_ready), .out_vec(v23), .frame_done(),
    .epm_x(s2_epm_x), .epm_y(s2_epm_y), .epm_v(s2_epm_v), .epm_pix(s2_epm_pix),
    .ecm_x(s2_ecm_x), .ecm_y(s2_ecm_y), .ecm_v(s2_ecm_v), .ecm_pix(s2_ecm_pix)
  );
  u_stage #(.N(N3), .P(P3), .S(S3), .PIXP(PIXP3), .PIXC(PIXC3), .FW(FW), .FH(FH)) u_stage3 (
    .clk, .rst_n, .in_valid(v23_valid), .in_ready(v23_ready), .in_vec(v23),
    .out_valid(out_valid), .out_ready(out_ready), .out_vec(out_vec), .frame_done(),
    .epm_x(s3_epm_x), .epm_y(s3_epm_y), .epm_v(s3_epm_v), .epm_pix(s3_epm_pix),
    .ecm_x(s3_ecm_x), .ecm_y(s3_ecm_y), .ecm_v(s3_ecm_v), .ecm_pix(s3_ecm_pix)
  );

  logic [OW-1:0] out_left;
  assign busy = (out_left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seed_left <= '0;
      out_left  <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        seed_left <= SW'(NSEED);
        out_left  <= OW'(NOUT);
      end else begin
        if (seed_valid && seed_ready) seed_left <= seed_left - 1'b1;
        if (out_valid && out_ready && busy) begin
          out_left <= out_left - 1'b1;
          if (out_left == OW'(1)) done <= 1'b1;
        end
      end
    end
  end
endmodule
