// line_buffer: three row buffers that turn a raster stream into 3-row columns.
//
// Pixels arrive NUM_AU at a time (one "group" of horizontally adjacent
// pixels) in raster order. Row r of the image is written into row buffer
// r mod 3; the other two buffers then hold rows r-1 and r-2, so when a group of
// row r >= 2 arrives it leaves together with the same columns of the two
// previous rows as a 3 x NUM_AU column block (out_col[0] = row r-2, the top of
// the window; out_col[2] = row r). Rows 0 and 1 are only stored. Each pixel is
// fetched from memory once and reused for three windows vertically.
// out_first marks the first group of a row (the MAC's shift buffer restarts
// there) and out_last the final group of the image.
// Timing: one register stage; a group is accepted whenever the output register
// is empty or being drained, so the buffer sustains one group per cycle.
// The three row buffers come from the description of the engines; rotating
// them instead of copying rows between buffers is this design's choice.
module line_buffer #(
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned NUM_AU = 4,
  parameter int unsigned MAX_W  = 64,
  localparam int unsigned GMAX  = MAX_W / NUM_AU,
  localparam int unsigned GW    = (GMAX > 1) ? $clog2(GMAX) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                clr_i,
  input  logic [15:0]                         width_i,
  input  logic [15:0]                         height_i,
  input  logic                                in_valid,
  output logic                                in_ready,
  input  logic [NUM_AU-1:0][PIX_W-1:0]        in_pix,
  output logic                                out_valid,
  input  logic                                out_ready,
  output logic [2:0][NUM_AU-1:0][PIX_W-1:0]   out_col,
  output logic                                out_first,
  output logic                                out_last
);
  typedef logic [NUM_AU-1:0][PIX_W-1:0] group_t;

  group_t      rowbuf [3][GMAX];
  logic [1:0]  wsel;          // buffer receiving the current row (row mod 3)
  logic [GW-1:0] gcol;        // group index within the row
  logic [15:0] row;
  logic [1:0]  sel_m1, sel_m2;

  wire [15:0] groups = width_i / 16'(NUM_AU);
  wire        accept = in_valid && in_ready;
  wire        end_of_row = (16'(gcol) == groups - 16'd1);

  assign in_ready = !out_valid || out_ready;
  assign sel_m1   = (wsel == 2'd0) ? 2'd2 : wsel - 2'd1;
  assign sel_m2   = (sel_m1 == 2'd0) ? 2'd2 : sel_m1 - 2'd1;

  always_ff @(posedge clk) begin
    if (accept) rowbuf[wsel][gcol] <= in_pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel      <= '0;
      gcol      <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else if (clr_i) begin
      wsel      <= '0;
      gcol      <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (accept) begin
        if (row >= 16'd2) begin
          out_valid  <= 1'b1;
          out_col[0] <= rowbuf[sel_m2][gcol];
          out_col[1] <= rowbuf[sel_m1][gcol];
          out_col[2] <= in_pix;
          out_first  <= (gcol == '0);
          out_last   <= end_of_row && (row == height_i - 16'd1);
        end
        if (end_of_row) begin
          gcol <= '0;
          row  <= row + 16'd1;
          wsel <= (wsel == 2'd2) ? 2'd0 : wsel + 2'd1;
        end else begin
          gcol <= gcol + 1'b1;
        end
      end
    end
  end
endmodule
