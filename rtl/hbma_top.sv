// hbma_top: both three-stage HBMA pipelines of the document side by side.
//
// One `start` pulse launches the same frame through the U-Architecture
// pipeline (hbma_u_top: raster scan, double-buffered block memories, full
// block fetch) and the B-Architecture pipeline (hbma_b_top: bidirectional
// scan, wraparound memories that refetch only the new part of a block). Each
// pipeline has its own output stream (u_out_*, b_out_*; the B field leaves in
// bidirectional order), its own busy/done and its own external frame-memory
// ports per stage, so both can be compared on the same frames. Layer
// parameters are shared; port widths are per architecture (the document's
// pin counts divided by 8 bits per pixel).
// Defaults: the document's layers (+-7/64/8, +-3/28/4, +-1/12/2) on the
// 352-line by 288-pixel video-conference frame. Putting both in one top is
// this design's choice, made so that one top holds every block.
module hbma_top
  import hbma_pkg::*;
#(
  parameter int unsigned FW     = 288,
  parameter int unsigned FH     = 352,
  parameter int unsigned N1    = 64,
  parameter int unsigned P1    = 7,
  parameter int unsigned S1    = 8,
  parameter int unsigned N2    = 28,
  parameter int unsigned P2    = 3,
  parameter int unsigned S2    = 4,
  parameter int unsigned N3    = 12,
  parameter int unsigned P3    = 1,
  parameter int unsigned S3    = 2,
  parameter int unsigned UPIXP1 = 6,
  parameter int unsigned UPIXC1 = 4,
  parameter int unsigned UPIXP2 = 5,
  parameter int unsigned UPIXC2 = 4,
  parameter int unsigned UPIXP3 = 4,
  parameter int unsigned UPIXC3 = 3,
  parameter int unsigned BPIXP1 = 1,
  parameter int unsigned BPIXC1 = 1,
  parameter int unsigned BPIXP2 = 3,
  parameter int unsigned BPIXC2 = 2,
  parameter int unsigned BPIXP3 = 2,
  parameter int unsigned BPIXC3 = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic u_busy,
  output logic u_done,
  output logic u_out_valid,
  input  logic u_out_ready,
  output mvec_t u_out_vec,
  // U-Architecture stage 1 external memory ports
  output logic [$clog2(FW)-1:0] u_s1_epm_x [UPIXP1],
  output logic [$clog2(FH)-1:0] u_s1_epm_y [UPIXP1],
  output logic u_s1_epm_v [UPIXP1],
  input  pixel_t u_s1_epm_pix [UPIXP1],
  output logic [$clog2(FW)-1:0] u_s1_ecm_x [UPIXC1],
  output logic [$clog2(FH)-1:0] u_s1_ecm_y [UPIXC1],
  output logic u_s1_ecm_v [UPIXC1],
  input  pixel_t u_s1_ecm_pix [UPIXC1],
  // U-Architecture stage 2 external memory ports
  output logic [$clog2(FW)-1:0] u_s2_epm_x [UPIXP2],
  output logic [$clog2(FH)-1:0] u_s2_epm_y [UPIXP2],
  output logic u_s2_epm_v [UPIXP2],
  input  pixel_t u_s2_epm_pix [UPIXP2],
  output logic [$clog2(FW)-1:0] u_s2_ecm_x [UPIXC2],
  output logic [$clog2(FH)-1:0] u_s2_ecm_y [UPIXC2],
  output logic u_s2_ecm_v [UPIXC2],
  input  pixel_t u_s2_ecm_pix [UPIXC2],
  // U-Architecture stage 3 external memory ports
  output logic [$clog2(FW)-1:0] u_s3_epm_x [UPIXP3],
  output logic [$clog2(FH)-1:0] u_s3_epm_y [UPIXP3],
  output logic u_s3_epm_v [UPIXP3],
  input  pixel_t u_s3_epm_pix [UPIXP3],
  output logic [$clog2(FW)-1:0] u_s3_ecm_x [UPIXC3],
  output logic [$clog2(FH)-1:0] u_s3_ecm_y [UPIXC3],
  output logic u_s3_ecm_v [UPIXC3],
  input  pixel_t u_s3_ecm_pix [UPIXC3],
  output logic b_busy,
  output logic b_done,
  output logic b_out_valid,
  input  logic b_out_ready,
  output mvec_t b_out_vec,
  // B-Architecture stage 1 external memory ports
  output logic [$clog2(FW)-1:0] b_s1_epm_x [BPIXP1],
  output logic [$clog2(FH)-1:0] b_s1_epm_y [BPIXP1],
  output logic b_s1_epm_v [BPIXP1],
  input  pixel_t b_s1_epm_pix [BPIXP1],
  output logic [$clog2(FW)-1:0] b_s1_ecm_x [BPIXC1],
  output logic [$clog2(FH)-1:0] b_s1_ecm_y [BPIXC1],
  output logic b_s1_ecm_v [BPIXC1],
  input  pixel_t b_s1_ecm_pix [BPIXC1],
  // B-Architecture stage 2 external memory ports
  output logic [$clog2(FW)-1:0] b_s2_epm_x [BPIXP2],
  output logic [$clog2(FH)-1:0] b_s2_epm_y [BPIXP2],
  output logic b_s2_epm_v [BPIXP2],
  input  pixel_t b_s2_epm_pix [BPIXP2],
  output logic [$clog2(FW)-1:0] b_s2_ecm_x [BPIXC2],
  output logic [$clog2(FH)-1:0] b_s2_ecm_y [BPIXC2],
  output logic b_s2_ecm_v [BPIXC2],
  input  pixel_t b_s2_ecm_pix [BPIXC2],
  // B-Architecture stage 3 external memory ports
  output logic [$clog2(FW)-1:0] b_s3_epm_x [BPIXP3],
  output logic [$clog2(FH)-1:0] b_s3_epm_y [BPIXP3],
  output logic b_s3_epm_v [BPIXP3],
  input  pixel_t b_s3_epm_pix [BPIXP3],
  output logic [$clog2(FW)-1:0] b_s3_ecm_x [BPIXC3],
  output logic [$clog2(FH)-1:0] b_s3_ecm_y [BPIXC3],
  output logic b_s3_ecm_v [BPIXC3],
  input  pixel_t b_s3_ecm_pix [BPIXC3]
);

  hbma_u_top #(
    .FW(FW), .FH(FH),
    .N1(N1), .P1(P1), .S1(S1), .PIXP1(UPIXP1), .PIXC1(UPIXC1),
    .N2(N2), .P2(P2), .S2(S2), .PIXP2(UPIXP2), .PIXC2(UPIXC2),
    .N3(N3), .P3(P3), .S3(S3), .PIXP3(UPIXP3), .PIXC3(UPIXC3)
  ) u_arch (
    .clk, .rst_n, .start,
    .busy(u_busy),
    .done(u_done),
    .out_valid(u_out_valid),
    .out_ready(u_out_ready),
    .out_vec(u_out_vec),
    .s1_epm_x(u_s1_epm_x),
    .s1_epm_y(u_s1_epm_y),
    .s1_epm_v(u_s1_epm_v),
    .s1_epm_pix(u_s1_epm_pix),
    .s1_ecm_x(u_s1_ecm_x),
    .s1_ecm_y(u_s1_ecm_y),
    .s1_ecm_v(u_s1_ecm_v),
    .s1_ecm_pix(u_s1_ecm_pix),
    .s2_epm_x(u_s2_epm_x),
    .s2_epm_y(u_s2_epm_y),
    .s2_epm_v(u_s2_epm_v),
    .s2_epm_pix(u_s2_epm_pix),
    .s2_ecm_x(u_s2_ecm_x),
    .s2_ecm_y(u_s2_ecm_y),
    .s2_ecm_v(u_s2_ecm_v),
    .s2_ecm_pix(u_s2_ecm_pix),
    .s3_epm_x(u_s3_epm_x),
    .s3_epm_y(u_s3_epm_y),
    .s3_epm_v(u_s3_epm_v),
    .s3_epm_pix(u_s3_epm_pix),
    .s3_ecm_x(u_s3_ecm_x),
    .s3_ecm_y(u_s3_ecm_y),
    .s3_ecm_v(u_s3_ecm_v),
    .s3_ecm_pix(u_s3_ecm_pix)
  );

  hbma_b_top #(
    .FW(FW), .FH(FH),
    .N1(N1), .P1(P1), .S1(S1), .PIXP1(BPIXP1), .PIXC1(BPIXC1),
    .N2(N2), .P2(P2), .S2(S2), .PIXP2(BPIXP2), .PIXC2(BPIXC2),
    .N3(N3), .P3(P3), .S3(S3), .PIXP3(BPIXP3), .PIXC3(BPIXC3)
  ) b_arch (
    .clk, .rst_n, .start,
    .busy(b_busy),
    .done(b_done),
    .out_valid(b_out_valid),
    .out_ready(b_out_ready),
    .out_vec(b_out_vec),
    .s1_epm_x(b_s1_epm_x),
    .s1_epm_y(b_s1_epm_y),
    .s1_epm_v(b_s1_epm_v),
    .s1_epm_pix(b_s1_epm_pix),
    .s1_ecm_x(b_s1_ecm_x),
    .s1_ecm_y(b_s1_ecm_y),
    .s1_ecm_v(b_s1_ecm_v),
    .s1_ecm_pix(b_s1_ecm_pix),
    .s2_epm_x(b_s2_epm_x),
    .s2_epm_y(b_s2_epm_y),
    .s2_epm_v(b_s2_epm_v),
    .s2_epm_pix(b_s2_epm_pix),
    .s2_ecm_x(b_s2_ecm_x),
    .s2_ecm_y(b_s2_ecm_y),
    .s2_ecm_v(b_s2_ecm_v),
    .s2_ecm_pix(b_s2_ecm_pix),
    .s3_epm_x(b_s3_epm_x),
    .s3_epm_y(b_s3_epm_y),
    .s3_epm_v(b_s3_epm_v),
    .s3_epm_pix(b_s3_epm_pix),
    .s3_ecm_x(b_s3_ecm_x),
    .s3_ecm_y(b_s3_ecm_y),
    .s3_ecm_v(b_s3_ecm_v),
    .s3_ecm_pix(b_s3_ecm_pix)
  );
endmodule
