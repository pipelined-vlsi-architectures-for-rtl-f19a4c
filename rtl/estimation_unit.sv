// estimation_unit: full-search block matching for one reference block (EU).
//
// Finds the displacement (u,v), -P <= u,v <= P, that minimises the sum of
// absolute differences (the MAD criterion) between an N x N reference block and
// the co-sized window at offset (u,v) inside the (N+2P) x (N+2P) search area.
//
// The array holds N x (2P+1) absolute-difference cells: cell (x,u) compares
// reference pixel x of the current row with search-area pixel x+u of the
// matching row. Each clock one reference row (N pixels, from the current
// memory) and one search-area row (N+2P pixels, from the previous memory) are
// read; the N cells of a column are summed (the "A" cells) and accumulated over
// the N rows, so 2P+1 candidates with the same vertical offset v finish every
// N+1 clocks (N reads plus one clock in which the column sums are compared and
// the running minimum, the "M" chain, is updated). The outer loop walks
// v = -P..P. A fixed 2N-clock tail then matches the fill and drain time of the
// document's systolic array, so a vector is ready exactly
//   E = (N+1)(2P+1) + 2N
// clocks after `start` is sampled: `done` is high for one clock then, with the
// result on `mv`/`min_sad` (held until the next start).
// Ties keep the first candidate met (smaller v, then smaller u).
// The cell count and the cycle count follow the document; the row-broadcast
// data flow (instead of the skewed systolic flow of the cited array) is this
// design's own, chosen because it reads exactly the K = N+2P and N memory ports
// the document's stage module provides.
// Memory interface: `pm_row`/`cm_row` are read addresses; the rows arrive on
// `sa_in`/`ref_in` one clock later (synchronous RAMs).
module estimation_unit
  import hbma_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned P = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic [$clog2(N+2*P)-1:0] pm_row,
  output logic [$clog2(N)-1:0]     cm_row,
  input  pixel_t sa_in  [N+2*P],
  input  pixel_t ref_in [N],
  output logic   busy,
  output logic   done,
  output mvec_t  mv,
  output logic [$clog2(N*N*255+1)-1:0] min_sad
);
  localparam int unsigned K    = N + 2 * P;
  localparam int unsigned C    = 2 * P + 1;
  localparam int unsigned SADW = $clog2(N * N * 255 + 1);
  localparam int unsigned E    = (N + 1) * (2 * P + 1) + 2 * N;
  localparam int unsigned EW   = $clog2(E + 1);
  localparam int unsigned TW   = $clog2(N + 1);
  localparam int unsigned VWc  = $clog2(C + 1);

  logic [EW-1:0]  cyc;
  logic [TW-1:0]  t;        // 0..N within a v iteration
  logic [VWc-1:0] v;        // 0..2P
  logic           scan;     // still in the v loop
  logic           dvalid;   // a row read last clock is on the inputs now

  logic [SADW-1:0] acc    [C];
  logic [SADW-1:0] rowsad [C];
  logic [SADW-1:0] colsum [C];

  // The "M" chain: minimum over the column sums of this iteration.
  logic [SADW-1:0] it_min;
  logic [VWc-1:0]  it_u;

  assign pm_row = ($clog2(K))'(t) + ($clog2(K))'(v);
  assign cm_row = ($clog2(N))'(t);

  // AD cells and A cells
  always_comb begin
    for (int u = 0; u < C; u++) begin
      rowsad[u] = '0;
      for (int x = 0; x < N; x++) begin
        pixel_t ad;
        ad = (ref_in[x] > sa_in[x+u]) ? pixel_t'(ref_in[x] - sa_in[x+u])
                                      : pixel_t'(sa_in[x+u] - ref_in[x]);
        rowsad[u] += SADW'(ad);
      end
      colsum[u] = acc[u] + (dvalid ? rowsad[u] : '0);
    end
    it_min = colsum[0];
    it_u   = '0;
    for (int u = 1; u < C; u++) begin
      if (colsum[u] < it_min) begin
        it_min = colsum[u];
        it_u   = VWc'(u);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      scan    <= 1'b0;
      done    <= 1'b0;
      dvalid  <= 1'b0;
      cyc     <= '0;
      t       <= '0;
      v       <= '0;
      mv      <= '0;
      min_sad <= '0;
      for (int u = 0; u < C; u++) acc[u] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        scan    <= 1'b1;
        cyc     <= '0;
        t       <= '0;
        v       <= '0;
        dvalid  <= 1'b0;
        min_sad <= '1;
        for (int u = 0; u < C; u++) acc[u] <= '0;
      end else if (busy) begin
        cyc    <= cyc + 1'b1;
        dvalid <= scan && (t < TW'(N));
        if (scan) begin
          if (t == TW'(N)) begin
            // compare cycle: column sums are final, update the running minimum
            if (it_min < min_sad) begin
              min_sad <= it_min;
              mv.x    <= VW'(signed'({1'b0, it_u})) - VW'(P);
              mv.y    <= VW'(signed'({1'b0, v}))    - VW'(P);
            end
            for (int u = 0; u < C; u++) acc[u] <= '0;
            t <= '0;
            if (v == VWc'(C - 1)) scan <= 1'b0;
            else                  v    <= v + 1'b1;
          end else begin
            for (int u = 0; u < C; u++) acc[u] <= colsum[u];
            t <= t + 1'b1;
          end
        end
        if (cyc == EW'(E - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

`ifndef SYNTHESIS
  a_tail_fits: assert property (@(posedge clk) disable iff (!rst_n) (busy && cyc == EW'(E - 1)) |-> !scan);
`endif
endmodule
