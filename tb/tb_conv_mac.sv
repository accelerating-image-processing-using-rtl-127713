// tb_conv_mac: drives a linear and a logarithmic MAC with the 3-row column
// blocks of random 3-row image strips and checks each result against the
// reference 3x3 convolution, including the two-result first block of a row,
// the last flag and the stall while the kernel is not yet valid.
module tb_conv_mac;
  import conv_pkg::*;
  import conv_ref_pkg::*;
  localparam int NUM_AU = 4;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic kvalid = 0;
  logic [NTAPS-1:0][7:0] kcoef_l, kcoef_g;
  logic [4:0] shift_l, shift_g;
  // linear
  logic iv_l = 0, ir_l, first_l = 0, last_l = 0, ov_l, or_l = 1, olast_l;
  logic [2:0][NUM_AU-1:0][7:0] col_l;
  logic [NUM_AU-1:0][7:0] opix_l;
  logic [2:0] on_l;
  // log
  logic iv_g = 0, ir_g, first_g = 0, last_g = 0, ov_g, or_g = 1, olast_g;
  logic [2:0][NUM_AU-1:0][3:0] col_g;
  logic [NUM_AU-1:0][3:0] opix_g;
  logic [2:0] on_g;

  conv_mac #(.LOG_DOMAIN(1'b0), .PIX_W(8), .NUM_AU(NUM_AU)) u_lin (.clk, .rst_n, .clr_i(1'b0),
    .shift_i(shift_l), .kern_valid(kvalid), .kern_coef(kcoef_l),
    .in_valid(iv_l), .in_ready(ir_l), .in_col(col_l), .in_first(first_l), .in_last(last_l),
    .out_valid(ov_l), .out_ready(or_l), .out_pix(opix_l), .out_n(on_l), .out_last(olast_l));
  conv_mac #(.LOG_DOMAIN(1'b1), .PIX_W(4), .NUM_AU(NUM_AU)) u_log (.clk, .rst_n, .clr_i(1'b0),
    .shift_i(shift_g), .kern_valid(kvalid), .kern_coef(kcoef_g),
    .in_valid(iv_g), .in_ready(ir_g), .in_col(col_g), .in_first(first_g), .in_last(last_g),
    .out_valid(ov_g), .out_ready(or_g), .out_pix(opix_g), .out_n(on_g), .out_last(olast_g));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int imgl[3][W], imgg[3][W], kl[9], kg[9];
  int expl[$], expg[$];
  int lastl_seen = 0, lastg_seen = 0;

  // collectors
  always @(posedge clk) if (rst_n && ov_l && or_l) begin
    for (int k = 0; k < int'(on_l); k++) begin
      chk(expl.size() > 0, "lin extra"); if (expl.size() > 0) chk(int'(opix_l[k]) == expl.pop_front(), "lin result");
    end
    if (olast_l) lastl_seen++;
  end
  always @(posedge clk) if (rst_n && ov_g && or_g) begin
    for (int k = 0; k < int'(on_g); k++) begin
      chk(expg.size() > 0, "log extra"); if (expg.size() > 0) chk(int'(opix_g[k]) == expg.pop_front(), "log result");
    end
    if (olast_g) lastg_seen++;
  end

  initial begin
    int w[9];
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 9; i++) begin
      kl[i] = sx8($urandom_range(255)); kcoef_l[i] = 8'(kl[i]);
      kg[i] = $urandom_range(31);       kcoef_g[i] = 8'(kg[i]);
    end
    shift_l = 5'd6; shift_g = 5'd3;
    // no kernel yet: inputs must not be taken
    @(negedge clk); iv_l = 1; iv_g = 1;
    repeat (3) @(negedge clk);
    chk(!ir_l && !ir_g && !ov_l && !ov_g, "stall without kernel");
    kvalid = 1; iv_l = 0; iv_g = 0;
    for (int strip = 0; strip < 40; strip++) begin
      foreach (imgl[r, c]) begin imgl[r][c] = $urandom_range(255); imgg[r][c] = $urandom_range(9); end
      for (int j = 0; j + 2 < W; j++) begin
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[3*r+c] = imgl[r][j+c];
        expl.push_back(ref_lin(w, kl, 6));
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[3*r+c] = imgg[r][j+c];
        expg.push_back(ref_log(w, kg, 3));
      end
      for (int g = 0; g < W / NUM_AU; g++) begin
        @(negedge clk);
        or_l = ($urandom_range(3) != 0); or_g = ($urandom_range(3) != 0);
        iv_l = 1; iv_g = 1; first_l = (g == 0); first_g = (g == 0);
        last_l = (strip == 39 && g == W/NUM_AU - 1); last_g = last_l;
        for (int r = 0; r < 3; r++) for (int c = 0; c < NUM_AU; c++) begin
          col_l[r][c] = 8'(imgl[r][g*NUM_AU + c]); col_g[r][c] = 4'(imgg[r][g*NUM_AU + c]);
        end
        fork
          begin #1; while (!ir_l) begin @(negedge clk); or_l = 1; #1; end @(negedge clk); iv_l = 0; end
          begin #1; while (!ir_g) begin @(negedge clk); or_g = 1; #1; end @(negedge clk); iv_g = 0; end
        join
      end
    end
    @(negedge clk); or_l = 1; or_g = 1;
    repeat (5) @(negedge clk);
    chk(expl.size() == 0 && expg.size() == 0, "all results out");
    chk(lastl_seen == 1 && lastg_seen == 1, "last flag once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
