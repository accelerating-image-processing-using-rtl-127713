// conv_mac: shift buffer plus NUM_AU arithmetic units.
//
// Each accepted input is a 3 x NUM_AU block of pixels (three image rows, NUM_AU
// adjacent columns) from the line buffer. The last two columns of the previous
// block are kept in a shift buffer, so together there are NUM_AU+2 columns and
// AU k computes the 3x3 window whose left column is column k of that array.
// This yields NUM_AU result pixels per cycle, horizontally adjacent. At the
// first block of a row the shift buffer holds the previous row's columns, so
// only the windows of AUs 2..NUM_AU-1 are complete; they are moved to the low
// result slots and out_n is NUM_AU-2 (otherwise NUM_AU). An input is accepted
// only while the kernel buffer reports a complete kernel.
// LOG_DOMAIN selects the AU type: au_linear (8-bit pixels, multipliers) or
// au_log (4-bit log codes, exponent adders and shifters).
// Timing: one register stage, one block per cycle, valid/ready on both sides.
// Four AUs per engine and the line/shift buffer reuse come from the document;
// the column-parallel arrangement of the AUs is this design's reading of it.
module conv_mac
  import conv_pkg::*;
#(
  parameter bit          LOG_DOMAIN = 1'b0,
  parameter int unsigned PIX_W      = 8,
  parameter int unsigned NUM_AU     = 4
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                clr_i,
  input  logic [4:0]                          shift_i,
  input  logic                                kern_valid,
  input  logic [NTAPS-1:0][COEF_W-1:0]        kern_coef,
  input  logic                                in_valid,
  output logic                                in_ready,
  input  logic [2:0][NUM_AU-1:0][PIX_W-1:0]   in_col,
  input  logic                                in_first,
  input  logic                                in_last,
  output logic                                out_valid,
  input  logic                                out_ready,
  output logic [NUM_AU-1:0][PIX_W-1:0]        out_pix,
  output logic [$clog2(NUM_AU+1)-1:0]         out_n,
  output logic                                out_last
);
  localparam int unsigned NW = $clog2(NUM_AU + 1);

  logic [2:0][1:0][PIX_W-1:0]          prev;   // shift buffer: 2 columns x 3 rows
  logic [2:0][NUM_AU+1:0][PIX_W-1:0]   cols;   // prev columns then new columns
  logic [NUM_AU-1:0][NTAPS-1:0][PIX_W-1:0] win;
  logic [NUM_AU-1:0][PIX_W-1:0]        res;

  wire accept = in_valid && in_ready;
  assign in_ready = kern_valid && (!out_valid || out_ready);

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      cols[r][0] = prev[r][0];
      cols[r][1] = prev[r][1];
      for (int c = 0; c < NUM_AU; c++) cols[r][c+2] = in_col[r][c];
    end
    for (int k = 0; k < NUM_AU; k++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          win[k][3*r + c] = cols[r][k + c];
  end

  for (genvar k = 0; k < NUM_AU; k++) begin : g_au
    if (LOG_DOMAIN) begin : g_log
      au_log #(.PIX_W(PIX_W)) u_au (.pix_i(win[k]), .coef_i(kern_coef), .shift_i(shift_i), .res_o(res[k]));
    end else begin : g_lin
      au_linear #(.PIX_W(PIX_W)) u_au (.pix_i(win[k]), .coef_i(kern_coef), .shift_i(shift_i), .res_o(res[k]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_n     <= '0;
      out_last  <= 1'b0;
    end else if (clr_i) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (accept) begin
        for (int r = 0; r < 3; r++) begin
          prev[r][0] <= in_col[r][NUM_AU-2];
          prev[r][1] <= in_col[r][NUM_AU-1];
        end
        out_valid <= 1'b1;
        out_last  <= in_last;
        if (in_first) begin
          out_pix <= '0;
          for (int k = 0; k < NUM_AU - 2; k++) out_pix[k] <= res[k+2];
          out_n <= NW'(NUM_AU - 2);
        end else begin
          out_pix <= res;
          out_n   <= NW'(NUM_AU);
        end
      end
    end
  end
endmodule
