// mgcn_switch: memory-to-EU switch of the B-Architecture, a modified
// multistage generalized cube network (MGCN).
//
// M = 2^LOGM lines pass through LOGM stages of two-by-two interchange boxes;
// stage j (taken from the most significant bit down) pairs the lines whose
// numbers differ only in bit j, the cube connection of the document's 8x8
// figure, so the network uses (M/2)·LOGM boxes. It realises the rotation
// out[h] = in[(h + shift) mod M], the permutation that connects the wraparound
// memory's modules to the estimation unit's ports when the data block starts at
// module `shift`. The per-box settings are found by destination-tag routing
// and held in a register, loaded by `load` once per data block (the stage
// control logic of the document's "P" and "C" blocks); the data path itself is
// combinational. Box settings are this design's routing; the topology and the
// one-setting-per-block operation follow the document.
module mgcn_switch
  import hbma_pkg::*;
#(
  parameter int unsigned LOGM = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [LOGM-1:0] shift,
  input  pixel_t          in  [2**LOGM],
  output pixel_t          out [2**LOGM]
);
  localparam int unsigned M = 2 ** LOGM;

  // ctl_q[s][b]: exchange setting of box b in stage s (stage 0 uses bit LOGM-1)
  logic [M/2-1:0] ctl_q [LOGM];
  logic [M/2-1:0] ctl_d [LOGM];

  // box b of stage s joins lines lo(b) and lo(b) | (1 << bit)
  function automatic int unsigned lo_line(int unsigned b, int unsigned bitn);
    int unsigned low, high;
    low  = b & ((1 << bitn) - 1);
    high = b >> bitn;
    return (high << (bitn + 1)) | low;
  endfunction

  // routing: a message entering at line s is bound for line (s - shift) mod M
  always_comb begin
    logic [LOGM-1:0] tag [M];
    logic [LOGM-1:0] nt  [M];
    for (int l = 0; l < M; l++) tag[l] = LOGM'(l) - shift;
    for (int s = 0; s < LOGM; s++) begin
      int unsigned bitn;
      bitn = LOGM - 1 - s;
      for (int b = 0; b < M / 2; b++) begin
        int unsigned a, c;
        a = lo_line(b, bitn);
        c = a | (1 << bitn);
        ctl_d[s][b] = tag[a][bitn];
        nt[a] = ctl_d[s][b] ? tag[c] : tag[a];
        nt[c] = ctl_d[s][b] ? tag[a] : tag[c];
      end
      for (int l = 0; l < M; l++) tag[l] = nt[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LOGM; s++) ctl_q[s] <= '0;
    end else if (load) begin
      for (int s = 0; s < LOGM; s++) ctl_q[s] <= ctl_d[s];
    end
  end

  // data path
  always_comb begin
    pixel_t line [M];
    pixel_t nl   [M];
    for (int l = 0; l < M; l++) line[l] = in[l];
    for (int s = 0; s < LOGM; s++) begin
      int unsigned bitn;
      bitn = LOGM - 1 - s;
      for (int b = 0; b < M / 2; b++) begin
        int unsigned a, c;
        a = lo_line(b, bitn);
        c = a | (1 << bitn);
        nl[a] = ctl_q[s][b] ? line[c] : line[a];
        nl[c] = ctl_q[s][b] ? line[a] : line[c];
      end
      for (int l = 0; l < M; l++) line[l] = nl[l];
    end
    for (int l = 0; l < M; l++) out[l] = line[l];
  end
endmodule
