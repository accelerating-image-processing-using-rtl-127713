// au_log: arithmetic unit of the logarithmic (4-bit) convolution engine.
//
// Pixels are 4-bit base-2 log codes: code 0 stands for zero and code c in
// 1..9 for 2^(c-1), so 4 bits cover the whole 0..255 range of an 8-bit pixel.
// A coefficient uses bits [4:0]: bit 4 is its sign and bits 3:0 a code of the
// same form. Multiplication becomes an addition of exponents: a nonzero term
// is +/- 2^((p-1)+(c-1)), produced by a shifter instead of a multiplier. The
// nine terms are summed exactly (28-bit two's complement), shifted right by
// shift_i, clamped to 0..255 and converted back to a log code with rounding:
// code = floor(log2 v) + 1, plus one when the bit below the leading one is set
// (v = 0 gives code 0). Purely combinational.
// The log-domain multiply-as-add is the document's idea; the code format, the
// rounding rule and the exact accumulation are this implementation's choices.
module au_log
  import conv_pkg::*;
#(
  parameter int unsigned PIX_W = 4
) (
  input  logic [NTAPS-1:0][PIX_W-1:0]  pix_i,
  input  logic [NTAPS-1:0][COEF_W-1:0] coef_i,
  input  logic [4:0]                   shift_i,
  output logic [PIX_W-1:0]             res_o
);
  localparam int unsigned SW = 28;

  logic signed [SW-1:0] sum, shifted;
  logic [7:0]           v;
  logic [4:0]           e;
  logic [3:0]           msb;
  logic [PIX_W-1:0]     code;

  always_comb begin
    sum = '0;
    for (int i = 0; i < NTAPS; i++) begin
      e = 5'(pix_i[i]) + 5'(coef_i[i][3:0]) - 5'd2;
      if (pix_i[i] != '0 && coef_i[i][3:0] != '0) begin
        if (coef_i[i][4]) sum -= SW'(1) << e;
        else              sum += SW'(1) << e;
      end
    end
    shifted = sum >>> shift_i;
    if (shifted < 0)                  v = 8'd0;
    else if (shifted > SW'(255))      v = 8'd255;
    else                              v = shifted[7:0];
    msb = 4'd0;
    for (int b = 0; b < 8; b++) if (v[b]) msb = 4'(b);
    if (v == 8'd0)        code = '0;
    else if (msb == 4'd0) code = PIX_W'(1);
    else                  code = PIX_W'(msb + 4'd1 + 4'(v[3'(msb - 4'd1)]));
    res_o = code;
  end
endmodule
