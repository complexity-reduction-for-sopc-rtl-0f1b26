// sad_1x4: sum of absolute differences of one 4-pixel row.
//
// Takes four current-frame samples c[0..3] and the four reference samples
// r[0..3] they are compared with and returns sum |c[k] - r[k]|. This is the
// "SAD 1x4" term that is formed for every row of data shifted into the
// processing element. Purely combinational; the enclosing PE registers it.
//
// Ports: cur, ref_px (4 x PIX_W), sad (PIX_W+2 bits, at most 4*255 = 1020).
module sad_1x4
  import sad_pkg::*;
(
  input  pix_t                 cur    [4],
  input  pix_t                 ref_px [4],
  output logic [PIX_W+1:0]     sad
);

  always_comb begin
    sad = '0;
    for (int k = 0; k < 4; k++) begin
      if (cur[k] >= ref_px[k]) sad += (PIX_W+2)'(cur[k] - ref_px[k]);
      else                     sad += (PIX_W+2)'(ref_px[k] - cur[k]);
    end
  end

endmodule
