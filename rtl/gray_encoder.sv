// gray_encoder: binary to Gray code conversion (the "GRAY" block inside the
// 27-bit generator).
//
// g_(W-1) = a_(W-1) and g_k = a_k XOR a_(k+1) for the other bits, exactly the
// reflected binary Gray code used by the pixel pre-coder. Purely
// combinational; the width parameter defaults to the 8-bit pixel depth.
module gray_encoder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] bin,   // binary value a_(W-1)..a_0
  output logic [W-1:0] gray   // Gray code g_(W-1)..g_0
);

  always_comb begin
    gray[W-1] = bin[W-1];
    for (int k = 0; k < W - 1; k++) begin
      gray[k] = bin[k] ^ bin[k+1];
    end
  end

endmodule
