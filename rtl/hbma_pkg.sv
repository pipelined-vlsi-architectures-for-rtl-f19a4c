// hbma_pkg: types and helpers shared by the hierarchical block-matching pipeline.
//
// A motion vector is a pair of signed 8-bit displacements in pixels (x to the
// right, y downward). Eight bits per component is this design's choice: the
// largest vector a three-layer hierarchy with +-7, +-3 and +-1 searches can
// produce is +-11, so 8 bits leave ample headroom. Pixels are 8-bit luminance
// samples, as in the pin-count analysis that assumes 8 bits per pixel.
package hbma_pkg;

  localparam int unsigned PIXW = 8;   // luminance bits per pixel
  localparam int unsigned VW   = 8;   // bits per vector component

  typedef logic [PIXW-1:0] pixel_t;

  typedef struct packed {
    logic signed [VW-1:0] x;
    logic signed [VW-1:0] y;
  } mvec_t;

  // Component-wise vector sum (wraps on overflow; ranges in this design never reach it).
  function automatic mvec_t vec_add(mvec_t a, mvec_t b);
    mvec_t r;
    r.x = a.x + b.x;
    r.y = a.y + b.y;
    return r;
  endfunction

  // Clock cycles the estimation unit of a layer takes for one vector:
  // E = (n+1)(2p+1) + 2n.
  function automatic int unsigned eu_cycles(int unsigned n, int unsigned p);
    return (n + 1) * (2 * p + 1) + 2 * n;
  endfunction

endpackage
