// conv_unpack: splits 64-bit memory words into groups of NUM_AU pixels.
//
// A word holds 64/PIX_W pixels, pixel i at bits [i*PIX_W +: PIX_W]. The word
// is held in a register and handed out one group of NUM_AU adjacent pixels per
// cycle, lowest pixels first: two groups per word for 8-bit pixels, four for
// 4-bit log codes. A new word is taken in the cycle its predecessor's last
// group leaves, so the unit streams one group per cycle without bubbles.
// Packing order and grouping are this implementation's choices.
module conv_unpack #(
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned NUM_AU = 4,
  parameter int unsigned DATA_W = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr_i,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [DATA_W-1:0]             in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [NUM_AU-1:0][PIX_W-1:0]  out_pix
);
  localparam int unsigned GW  = NUM_AU * PIX_W;
  localparam int unsigned GPW = DATA_W / GW;
  localparam int unsigned IW  = (GPW > 1) ? $clog2(GPW) : 1;

  logic [DATA_W-1:0] word;
  logic              full;
  logic [IW-1:0]     idx;

  wire last_grp = (idx == IW'(GPW - 1));
  assign out_valid = full;
  assign out_pix   = word[idx*GW +: GW];
  assign in_ready  = !full || (out_ready && last_grp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
      full <= 1'b0;
      idx  <= '0;
    end else if (clr_i) begin
      full <= 1'b0;
      idx  <= '0;
    end else begin
      if (out_valid && out_ready) begin
        idx <= last_grp ? '0 : idx + 1'b1;
        if (last_grp) full <= 1'b0;
      end
      if (in_valid && in_ready) begin
        word <= in_data;
        full <= 1'b1;
        idx  <= '0;
      end
    end
  end
endmodule
