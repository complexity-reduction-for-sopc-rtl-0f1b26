// Shared types and constants of the SAD reuse motion-estimation accelerator.
//
// A 16x16 macroblock is cut into a 4x4 grid of 4x4 blocks, indexed (i,j)
// with i the block row and j the block column (top-left pixel at x=4j,
// y=4i). Every one of the seven H.264 block modes is a rectangle of whole
// 4x4 blocks, so its SAD is the sum of (m/4)x(n/4) stored SAD4x4 terms.
// A mode "m x n" here is m pixels high and n pixels wide, following the
// row/column reading of the reuse equation; the seven modes together have
// 41 partitions, each with its own motion vector.
//
// Partition numbering is this design's own: modes in the order below, and
// inside a mode the partitions in raster order over the macroblock.
// The motion-vector bit-count model (signed Exp-Golomb length of each
// vector-difference component) is also this design's choice.
package sad_pkg;

  localparam int unsigned PIX_W    = 8;    // luma sample width
  localparam int unsigned MB       = 16;   // macroblock edge in pixels
  localparam int unsigned NBLK     = 16;   // 4x4 blocks per macroblock
  localparam int unsigned SAD4_W   = 12;   // 16 * 255 = 4080
  localparam int unsigned SAD_W    = 16;   // 256 * 255 = 65280
  localparam int unsigned MV_W     = 8;    // signed MV component, integer pel
  localparam int unsigned LAMBDA_W = 8;    // Lagrangian multiplier
  localparam int unsigned COST_W   = 20;   // SAD + lambda * R
  localparam int unsigned MCOST_W  = 24;   // sum of up to 16 partition costs
  localparam int unsigned NMODE    = 7;
  localparam int unsigned NPART    = 41;

  typedef enum logic [2:0] {
    MODE_16X16 = 3'd0,
    MODE_16X8  = 3'd1,   // 16 high, 8 wide: left and right halves
    MODE_8X16  = 3'd2,   // 8 high, 16 wide: top and bottom halves
    MODE_8X8   = 3'd3,
    MODE_8X4   = 3'd4,   // 8 high, 4 wide
    MODE_4X8   = 3'd5,   // 4 high, 8 wide
    MODE_4X4   = 3'd6
  } mode_e;

  typedef logic [PIX_W-1:0]          pix_t;
  typedef logic [SAD4_W-1:0]         sad4_t;
  typedef logic [SAD_W-1:0]          sad_t;
  typedef logic [COST_W-1:0]         cost_t;
  typedef logic [MCOST_W-1:0]        mcost_t;
  typedef logic signed [MV_W-1:0]    mvc_t;

  typedef struct packed {
    mvc_t y;
    mvc_t x;
  } mv_t;

  // Height of a mode in 4x4-block units (m/4).
  function automatic int unsigned mode_hb(input int unsigned m);
    case (m)
      0: return 4;  1: return 4;  2: return 2;  3: return 2;
      4: return 2;  5: return 1;  default: return 1;
    endcase
  endfunction

  // Width of a mode in 4x4-block units (n/4).
  function automatic int unsigned mode_wb(input int unsigned m);
    case (m)
      0: return 4;  1: return 2;  2: return 4;  3: return 2;
      4: return 1;  5: return 2;  default: return 1;
    endcase
  endfunction

  function automatic int unsigned mode_nparts(input int unsigned m);
    return (4 / mode_hb(m)) * (4 / mode_wb(m));
  endfunction

  // Index of the first partition of a mode in the 41-entry list.
  function automatic int unsigned part_base(input int unsigned m);
    int unsigned b;
    b = 0;
    for (int unsigned k = 0; k < NMODE; k++)
      if (k < m) b += mode_nparts(k);
    return b;
  endfunction

  // Mode of partition p (0..40).
  function automatic int unsigned part_mode(input int unsigned p);
    int unsigned r;
    r = 0;
    for (int unsigned k = 1; k < NMODE; k++)
      if (p >= part_base(k)) r = k;
    return r;
  endfunction

  // True when 4x4 block b (raster, b = 4*i + j) lies inside partition p.
  function automatic bit part_has_blk(input int unsigned p, input int unsigned b);
    int unsigned m, q, pw, pi, pj, bi, bj;
    m  = part_mode(p);
    q  = p - part_base(m);
    pw = 4 / mode_wb(m);
    pi = q / pw;
    pj = q % pw;
    bi = b / 4;
    bj = b % 4;
    return (bi / mode_hb(m) == pi) && (bj / mode_wb(m) == pj);
  endfunction

  // Length in bits of the signed Exp-Golomb code of v.
  function automatic logic [5:0] se_bits(input logic signed [MV_W:0] v);
    logic [MV_W+1:0] code_num;
    logic [5:0]      n;
    code_num = (v > 0) ? (MV_W+2)'(2 * v - 1) : (MV_W+2)'(-2 * v);
    code_num = code_num + 1'b1;
    n = 0;
    for (int k = 0; k < MV_W + 2; k++)
      if (code_num[k]) n = 6'(k);
    return 6'(2 * n + 1);
  endfunction

endpackage
