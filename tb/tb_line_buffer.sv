// tb_line_buffer: streams random images (several sizes, back to back with
// clears) through the line buffer under random back-pressure and checks every
// 3-row column block, the first/last flags and the number of blocks.
module tb_line_buffer;
  localparam int PIX_W = 8, NUM_AU = 4, MAX_W = 64;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [15:0] width = 16'd8, height = 16'd5;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_first, out_last;
  logic [NUM_AU-1:0][PIX_W-1:0] in_pix = '0;
  logic [2:0][NUM_AU-1:0][PIX_W-1:0] out_col;
  int checks = 0, failures = 0;
  int img [64][64];

  line_buffer #(.PIX_W(PIX_W), .NUM_AU(NUM_AU), .MAX_W(MAX_W)) dut (.clk, .rst_n, .clr_i(clr),
    .width_i(width), .height_i(height), .in_valid, .in_ready, .in_pix,
    .out_valid, .out_ready, .out_col, .out_first, .out_last);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int orow, ocol, nout;
  // output checker
  always @(posedge clk) if (rst_n && !clr && out_valid && out_ready) begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < NUM_AU; c++)
        chk(out_col[r][c] == PIX_W'(img[orow + r][ocol + c]), "pixel");
    chk(out_first == (ocol == 0), "first flag");
    chk(out_last == (orow == int'(height) - 3 && ocol == int'(width) - NUM_AU), "last flag");
    nout++;
    ocol += NUM_AU;
    if (ocol == int'(width)) begin ocol = 0; orow++; end
  end

  initial begin
    int sizes[4][2] = '{'{8,5}, '{64,4}, '{12,7}, '{4,3}};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk); clr = 1; width = 16'(sizes[s][0]); height = 16'(sizes[s][1]);
      @(negedge clk); clr = 0;
      foreach (img[i, j]) img[i][j] = $urandom_range(255);
      orow = 0; ocol = 0; nout = 0;
      fork
        begin
          for (int r = 0; r < height; r++)
            for (int g = 0; g < width / NUM_AU; g++) begin
              @(negedge clk);
              while ($urandom_range(3) == 0) @(negedge clk);
              in_valid = 1;
              for (int c = 0; c < NUM_AU; c++) in_pix[c] = PIX_W'(img[r][g*NUM_AU + c]);
              #1;
              while (!in_ready) begin @(negedge clk); #1; end
              @(negedge clk) in_valid = 0;
            end
        end
        begin
          forever begin @(negedge clk); out_ready = ($urandom_range(2) != 0); end
        end
      join_any
      repeat (10) @(negedge clk);
      disable fork;
      out_ready = 1; repeat (3) @(negedge clk);
      chk(nout == (int'(height) - 2) * int'(width) / NUM_AU, "block count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
