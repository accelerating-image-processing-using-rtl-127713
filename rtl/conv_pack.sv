// conv_pack: collects result pixels into 64-bit memory words.
//
// The MAC delivers up to NUM_AU pixels per cycle (in_n of them valid, in the
// low slots). They are appended to a small pixel buffer; whenever it holds a
// full word of 64/PIX_W pixels, the word is offered on the output (pixel i at
// bits [i*PIX_W +: PIX_W]). The input marked in_last flushes the buffer: the
// final, partly filled word is padded with zero pixels and carries out_last.
// A word may leave and new pixels arrive in the same cycle.
// Packing order and zero padding are this implementation's choices.
module conv_pack #(
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned NUM_AU = 4,
  parameter int unsigned DATA_W = 64,
  localparam int unsigned NW    = $clog2(NUM_AU + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr_i,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [NUM_AU-1:0][PIX_W-1:0]  in_pix,
  input  logic [NW-1:0]                 in_n,
  input  logic                          in_last,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [DATA_W-1:0]             out_data,
  output logic                          out_last
);
  localparam int unsigned PPW = DATA_W / PIX_W;
  localparam int unsigned CAP = PPW + NUM_AU;
  localparam int unsigned CW  = $clog2(CAP + 1);

  logic [CAP-1:0][PIX_W-1:0] buff, nbuf;
  logic [CW-1:0]             cnt, ncnt;
  logic                      flush;   // last pixels received, drain the rest

  wire word_full = (cnt >= CW'(PPW));
  wire pop       = out_valid && out_ready;
  wire push      = in_valid && in_ready;

  assign out_valid = word_full || (flush && cnt != '0);
  assign out_data  = buff[PPW-1:0];
  assign out_last  = flush && (cnt <= CW'(PPW));
  assign in_ready  = !flush && (!word_full || out_ready);

  always_comb begin
    nbuf = buff;
    ncnt = cnt;
    if (pop) begin
      for (int i = 0; i < CAP; i++) nbuf[i] = (i + PPW < CAP) ? buff[i + PPW] : '0;
      ncnt = (cnt > CW'(PPW)) ? cnt - CW'(PPW) : '0;
    end
    if (push) begin
      for (int k = 0; k < NUM_AU; k++)
        if (k < int'(in_n)) nbuf[int'(ncnt) + k] = in_pix[k];
      ncnt = ncnt + CW'(in_n);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buff  <= '0;
      cnt   <= '0;
      flush <= 1'b0;
    end else if (clr_i) begin
      buff  <= '0;
      cnt   <= '0;
      flush <= 1'b0;
    end else begin
      buff <= nbuf;
      cnt  <= ncnt;
      if (push && in_last) flush <= 1'b1;
      else if (pop && out_last) flush <= 1'b0;
    end
  end
endmodule
