// pcipm_encoder: the "27bit_generator". Pre-codes one 8-bit pixel into the
// 27-bit PCIPM code.
//
// The top level is a three-bit thermometer code of the two most significant
// pixel bits: c26 = a7, c25 = a7 OR a6, c24 = a7 AND a6 (so the four quarters
// of the grey range code as 000, 010, 110, 111). Each lower level k = 6..1
// carries the pixel bit a_k, the Gray bit g_(k-1) and two copies of the
// auxiliary bit g_(k+1)·g_(k-1) + g_k·g_(k-1), which marks pixels that are far
// apart in value although their lower bits look alike. Gray bits come from a
// gray_encoder; all other bits are direct wiring or one AND-OR gate each.
// Every formula is the published codebook. The drive buffers of the original
// schematic on the binary bits have no logic function and are not modelled.
// Purely combinational.
module pcipm_encoder
  import pcipm_pkg::*;
(
  input  logic [PIX_W-1:0] pix,   // a7..a0
  output pcipm_code_t      code   // c26..c00
);

  logic [PIX_W-1:0] g;

  // The code layout in the package must add up to the 27-bit code width.
  if ($bits(pcipm_code_t) != CODE_W) begin : g_width_check
    $error("pcipm_code_t is %0d bits, expected %0d", $bits(pcipm_code_t), CODE_W);
  end

  gray_encoder #(.W(PIX_W)) u_gray (
    .bin  (pix),
    .gray (g)
  );

  always_comb begin
    code.top[2] = pix[7];
    code.top[1] = pix[7] | pix[6];
    code.top[0] = pix[7] & pix[6];
    for (int k = 1; k <= int'(LEVELS); k++) begin
      code.lvl[k-1].aux_hi = (g[k+1] & g[k-1]) | (g[k] & g[k-1]);
      code.lvl[k-1].aux_lo = (g[k+1] & g[k-1]) | (g[k] & g[k-1]);
      code.lvl[k-1].a      = pix[k];
      code.lvl[k-1].g      = g[k-1];
    end
  end

endmodule
