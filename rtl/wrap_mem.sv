// wrap_mem: wraparound internal memory of the B-Architecture (PM or CM).
//
// A single A x A array of A dual-port modules in which frame pixel (X, Y) always
// lives in module X mod A at row Y mod A. Both ends of the module row and both
// ends of every module are therefore logically adjacent (horizontal and
// vertical wraparound), and two overlapping data blocks of up to m x m pixels
// whose origins differ by at most A - m in each direction fit together without
// explicit double buffering: only the pixels of the new block that the old one
// lacks need to be written.
// Input logic: up to PIX pixels per clock, each with its (unclamped, possibly
// negative) frame coordinates; the module and row are the coordinates modulo A.
// Output logic: one common frame row `rd_y`, taken modulo A, read from all
// modules; `rd_data[m]` is module m, one clock later (synchronous RAM). The
// horizontal rotation to the estimation unit's port order is done by the
// memory-to-EU switch.
// Coordinates are 14-bit signed; they must be greater than -BIAS (BIAS is the
// smallest multiple of A not below 256), which covers every block this design
// fetches. The lanes written in one clock must fall in different modules (the
// fetch unit writes PIX <= A consecutive pixels of one line); a module takes
// one write per clock.
module wrap_mem
  import hbma_pkg::*;
#(
  parameter int unsigned A   = 86,
  parameter int unsigned PIX = 1
) (
  input  logic               clk,
  input  logic               wr_lane [PIX],
  input  logic signed [13:0] wr_x    [PIX],
  input  logic signed [13:0] wr_y    [PIX],
  input  pixel_t             wr_data [PIX],
  input  logic signed [13:0] rd_y,
  output pixel_t             rd_data [A]
);
  localparam int unsigned AW   = (A > 1) ? $clog2(A) : 1;
  localparam int unsigned BIAS = ((256 + A - 1) / A) * A;

  function automatic logic [AW-1:0] wrapc(logic signed [13:0] c);
    logic [15:0] u;
    u = 16'(signed'(c)) + 16'(BIAS);
    return AW'(u % 16'(A));
  endfunction

  logic [AW-1:0] lmod [PIX];
  logic [AW-1:0] lrow [PIX];
  logic [AW-1:0] rrow;

  always_comb begin
    for (int j = 0; j < PIX; j++) begin
      lmod[j] = wrapc(wr_x[j]);
      lrow[j] = wrapc(wr_y[j]);
    end
    rrow = wrapc(rd_y);
  end

  for (genvar m = 0; m < A; m++) begin : g_module
    pixel_t ram [A];
    logic          we;
    logic [AW-1:0] wa;
    pixel_t        wd;
    always_comb begin
      we = 1'b0;
      wa = '0;
      wd = '0;
      for (int j = 0; j < PIX; j++) begin
        if (wr_lane[j] && lmod[j] == AW'(m)) begin
          we = 1'b1;
          wa = lrow[j];
          wd = wr_data[j];
        end
      end
    end
    always_ff @(posedge clk) begin
      if (we) ram[wa] <= wd;
      rd_data[m] <= ram[rrow];
    end
  end
endmodule
