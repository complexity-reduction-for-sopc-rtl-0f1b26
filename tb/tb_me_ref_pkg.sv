// tb_me_ref_pkg: software reference for the testbenches. It computes,
// straight from the pixel definition, the SAD of every partition of every
// block mode for a candidate vector, the Lagrangian cost with the signed
// Exp-Golomb bit count of the vector difference, the best vector per
// partition over a full [-SR, SR] search and the best mode. It shares no
// code with the RTL.
//
// Partition numbering (same convention as the design): modes 16x16, 16x8,
// 8x16, 8x8, 8x4, 4x8, 4x4 (height x width), partitions of each in raster
// order, 41 in all.
package tb_me_ref_pkg;

  localparam int MAXWIN = 32;
  localparam int NP     = 41;

  typedef int unsigned pic_t [MAXWIN][MAXWIN];

  int mode_h   [7] = '{16, 16, 8, 8, 8, 4, 4};
  int mode_w   [7] = '{16, 8, 16, 8, 4, 8, 4};

  // Geometry of partition p: mode, top-left pixel, size.
  function automatic void part_geom(input int p, output int m, output int y0,
                                    output int x0, output int h, output int w);
    int q, per_row;
    q = p;
    m = 0;
    while (q >= (16 / mode_h[m]) * (16 / mode_w[m])) begin
      q -= (16 / mode_h[m]) * (16 / mode_w[m]);
      m++;
    end
    h = mode_h[m];
    w = mode_w[m];
    per_row = 16 / w;
    y0 = (q / per_row) * h;
    x0 = (q % per_row) * w;
  endfunction

  function automatic int part_mode(input int p);
    int m, y0, x0, h, w;
    part_geom(p, m, y0, x0, h, w);
    return m;
  endfunction

  // SAD of partition p for window offset (oy, ox): window pixel (oy+y, ox+x)
  // is compared with current pixel (y, x).
  function automatic int part_sad(input pic_t cur, input pic_t win, input int p,
                                  input int oy, input int ox);
    int m, y0, x0, h, w, s, d;
    part_geom(p, m, y0, x0, h, w);
    s = 0;
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++) begin
        d = int'(cur[y][x]) - int'(win[oy + y][ox + x]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  function automatic int eg_bits(input int v);
    int code;
    code = (v > 0) ? 2 * v - 1 : -2 * v;
    return 2 * ($clog2(code + 2) - 1) + 1;
  endfunction

  function automatic int rate(input int mvx, input int mvy, input int px, input int py);
    return eg_bits(mvx - px) + eg_bits(mvy - py);
  endfunction

  // Full search. Candidates in raster order, first minimum kept.
  function automatic void full_search(input pic_t cur, input pic_t win, input int sr,
                                      input int lambda, input int px, input int py,
                                      output int bcost [NP], output int bmx [NP],
                                      output int bmy [NP], output int mcost [7],
                                      output int bmode);
    int c;
    for (int p = 0; p < NP; p++) bcost[p] = 32'h7fffffff;
    for (int dy = -sr; dy <= sr; dy++)
      for (int dx = -sr; dx <= sr; dx++)
        for (int p = 0; p < NP; p++) begin
          c = part_sad(cur, win, p, dy + sr, dx + sr) + lambda * rate(dx, dy, px, py);
          if (c < bcost[p]) begin
            bcost[p] = c;
            bmx[p]   = dx;
            bmy[p]   = dy;
          end
        end
    for (int m = 0; m < 7; m++) mcost[m] = 0;
    for (int p = 0; p < NP; p++) mcost[part_mode(p)] += bcost[p];
    bmode = 0;
    for (int m = 1; m < 7; m++) if (mcost[m] < mcost[bmode]) bmode = m;
  endfunction

endpackage
