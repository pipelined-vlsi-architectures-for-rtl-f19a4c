// ext_addr_unit: external address unit of a stage module.
//
// Generates the frame-memory addresses of one square data block (a search area
// or a reference block) of BLK x BLK pixels whose top-left corner is
// (org_x, org_y) in frame coordinates. After `start` it issues PIX addresses
// per clock in raster order until all BLK*BLK pixels are requested; the last
// clock may carry fewer valid lanes. Coordinates outside the FW x FH frame are
// clamped to the nearest border pixel, which replicates the border (the
// document does not say how blocks that cross the frame edge are handled; this
// is this design's choice). The external memory is taken to return the pixels
// in the same clock (access time equal to the clock period, as the document's
// pin-count analysis assumes), so `lane_v` doubles as the write strobe of the
// internal memory. `done` is high in the clock that issues the last addresses.
module ext_addr_unit
  import hbma_pkg::*;
#(
  parameter int unsigned BLK = 78,
  parameter int unsigned PIX = 6,
  parameter int unsigned FW  = 288,   // pixels per line (N_p)
  parameter int unsigned FH  = 352    // lines per frame
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic signed [13:0] org_x,
  input  logic signed [13:0] org_y,
  output logic [$clog2(FW)-1:0] lane_x [PIX],
  output logic [$clog2(FH)-1:0] lane_y [PIX],
  output logic                  lane_v [PIX],
  output logic busy,
  output logic done
);
  localparam int unsigned BW  = $clog2(BLK + 1);
  localparam int unsigned TOT = BLK * BLK;
  localparam int unsigned NW  = $clog2(TOT + 1);

  logic signed [13:0] ox, oy;
  logic [BW-1:0] col_q, row_q;
  logic [NW-1:0] left_q;     // pixels still to request

  function automatic logic [13:0] clampc(logic signed [14:0] c, int unsigned lim);
    if (c < 0)                        return '0;
    else if (c > 15'(signed'(lim - 1))) return 14'(lim - 1);
    else                              return c[13:0];
  endfunction

  always_comb begin
    logic [BW-1:0] c, r;
    c = col_q;
    r = row_q;
    for (int j = 0; j < PIX; j++) begin
      lane_v[j] = busy && (NW'(j) < left_q);
      lane_x[j] = ($clog2(FW))'(clampc(15'(ox) + 15'(c), FW));
      lane_y[j] = ($clog2(FH))'(clampc(15'(oy) + 15'(r), FH));
      if (c == BW'(BLK - 1)) begin
        c = '0;
        r = r + 1'b1;
      end else begin
        c = c + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      ox     <= '0;
      oy     <= '0;
      col_q  <= '0;
      row_q  <= '0;
      left_q <= '0;
    end else begin
      if (start && !busy) begin
        busy   <= 1'b1;
        ox     <= org_x;
        oy     <= org_y;
        col_q  <= '0;
        row_q  <= '0;
        left_q <= NW'(TOT);
      end else if (busy) begin
        if (left_q <= NW'(PIX)) begin
          busy   <= 1'b0;
          left_q <= '0;
        end else begin
          left_q <= left_q - NW'(PIX);
          // advance the raster pointer by PIX
          begin
            logic [BW-1:0] c, r;
            c = col_q;
            r = row_q;
            for (int j = 0; j < PIX; j++) begin
              if (c == BW'(BLK - 1)) begin
                c = '0;
                r = r + 1'b1;
              end else begin
                c = c + 1'b1;
              end
            end
            col_q <= c;
            row_q <= r;
          end
        end
      end
    end
  end

  // `done` marks the clock of the last request, so the stage can close the
  // load in the same clock the last pixels are written.
  assign done = busy && (left_q <= NW'(PIX));
endmodule
