// nmodule_mem: n-module internal memory (previous memory PM or current memory CM).
//
// A data block of K columns by D rows is spread over K dual-port RAM modules,
// one module per vertical line of the block, so that K pixels from K different
// columns can be read in the same clock. The input logic takes up to PIX pixels
// per clock from the external memory port in raster order (row by row, left to
// right) and steers each to the module of its column, at the address of its
// row; it keeps a raster pointer that `wr_start` resets to the block's origin.
// Because PIX <= K, the pixels of one transfer always land in distinct modules.
// Each module has its own output logic that forms its read offset as
// (rd_row + rd_skew[m]) mod D, a modular increment, so modules can be read at
// different rows; the U-Architecture drives all skews with zero.
// Reads are synchronous: `rd_data` holds the row addressed in the previous clock.
// The module-per-column organisation follows the document; the raster write
// order and the lane-per-clock input interface are this design's choices.
module nmodule_mem
  import hbma_pkg::*;
#(
  parameter int unsigned K   = 78,   // modules (block columns)
  parameter int unsigned D   = 78,   // rows per module
  parameter int unsigned PIX = 6     // pixels written per clock
) (
  input  logic   clk,
  input  logic   rst_n,
  // input logic
  input  logic   wr_start,               // reset raster pointer to (0,0)
  input  logic   wr_lane [PIX],          // lane carries a pixel this clock
  input  pixel_t wr_data [PIX],
  // output logic
  input  logic [$clog2(D)-1:0] rd_row,
  input  logic [$clog2(D)-1:0] rd_skew [K],
  output pixel_t rd_data [K]
);
  localparam int unsigned CW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned RW = (D > 1) ? $clog2(D) : 1;

  // Raster pointer of lane 0.
  logic [CW-1:0] col_q;
  logic [RW-1:0] row_q;

  // Per-lane destination.
  logic [CW-1:0] lcol [PIX];
  logic [RW-1:0] lrow [PIX];
  logic [CW-1:0] ncol;
  logic [RW-1:0] nrow;

  always_comb begin
    logic [CW:0] c;
    logic [RW-1:0] r;
    c = {1'b0, col_q};
    r = row_q;
    for (int j = 0; j < PIX; j++) begin
      lcol[j] = c[CW-1:0];
      lrow[j] = r;
      if (wr_lane[j]) begin
        if (c == (CW+1)'(K - 1)) begin
          c = '0;
          r = (r == RW'(D - 1)) ? '0 : r + 1'b1;
        end else begin
          c = c + 1'b1;
        end
      end
    end
    ncol = c[CW-1:0];
    nrow = r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q <= '0;
      row_q <= '0;
    end else if (wr_start) begin
      col_q <= '0;
      row_q <= '0;
    end else begin
      col_q <= ncol;
      row_q <= nrow;
    end
  end

  for (genvar m = 0; m < K; m++) begin : g_module
    pixel_t ram [D];
    logic          we;
    logic [RW-1:0] wa;
    pixel_t        wd;
    logic [RW:0]   ra_sum;
    logic [RW-1:0] ra;

    // input logic: pick the lane (if any) whose column is this module
    always_comb begin
      we = 1'b0;
      wa = '0;
      wd = '0;
      for (int j = 0; j < PIX; j++) begin
        if (wr_lane[j] && !wr_start && lcol[j] == CW'(m)) begin
          we = 1'b1;
          wa = lrow[j];
          wd = wr_data[j];
        end
      end
    end

    // output logic: modular increment of the common row by this module's skew
    always_comb begin
      ra_sum = {1'b0, rd_row} + {1'b0, rd_skew[m]};
      ra     = (ra_sum >= (RW+1)'(D)) ? RW'(ra_sum - (RW+1)'(D)) : ra_sum[RW-1:0];
    end

    always_ff @(posedge clk) begin
      if (we) ram[wa] <= wd;
      rd_data[m] <= ram[ra];
    end
  end

endmodule
