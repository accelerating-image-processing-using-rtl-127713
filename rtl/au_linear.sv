// au_linear: arithmetic unit of the linear (8-bit) convolution engine.
//
// Computes one output pixel from a 3x3 window: the nine unsigned 8-bit pixels
// are multiplied by nine signed 8-bit coefficients and the products summed in
// a 20-bit two's-complement accumulator (9 * 255 * 128 < 2^19). The sum is
// shifted right arithmetically by shift_i (e.g. 4 for the 1-2-1 gaussian
// kernel, which sums to 16) and clamped to 0..255 so the result is again an
// 8-bit pixel. Purely combinational; the MAC registers its output.
// The engine has four of these units. Coefficient signedness, the shift and
// the clamping are this implementation's choices.
module au_linear
  import conv_pkg::*;
#(
  parameter int unsigned PIX_W = 8
) (
  input  logic [NTAPS-1:0][PIX_W-1:0]  pix_i,
  input  logic [NTAPS-1:0][COEF_W-1:0] coef_i,
  input  logic [4:0]                   shift_i,
  output logic [PIX_W-1:0]             res_o
);
  localparam int unsigned SW = PIX_W + COEF_W + 4;

  logic signed [SW-1:0] sum, shifted;
  localparam logic signed [SW-1:0] MAXV = SW'((1 << PIX_W) - 1);

  always_comb begin
    sum = '0;
    for (int i = 0; i < NTAPS; i++) begin
      sum += SW'($signed({1'b0, pix_i[i]})) * SW'($signed(coef_i[i]));
    end
    shifted = sum >>> shift_i;
    if (shifted < 0)         res_o = '0;
    else if (shifted > MAXV) res_o = '1;
    else                     res_o = shifted[PIX_W-1:0];
  end
endmodule
