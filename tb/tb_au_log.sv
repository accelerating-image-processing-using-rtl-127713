// tb_au_log: random log-coded windows and signed log coefficients against the
// reference (exact sum of powers of two, shift, clamp, rounded log2 code).
module tb_au_log;
  import conv_pkg::*;
  import conv_ref_pkg::*;
  logic [NTAPS-1:0][3:0] pix;
  logic [NTAPS-1:0][7:0] coef;
  logic [4:0] shift;
  logic [3:0] res;
  int checks = 0, failures = 0;

  au_log dut (.pix_i(pix), .coef_i(coef), .shift_i(shift), .res_o(res));

  initial begin
    int w[9], k[9], e;
    // log form of the edge and gaussian kernels: 1 -> code 1, 2 -> 2, 4 -> 3, 8 -> 4, -1 -> sign|1
    int edge_k[9] = '{17,17,17,17,4,17,17,17,17};
    int gaus_k[9] = '{1,2,1,2,3,2,1,2,1};
    for (int t = 0; t < 3000; t++) begin
      int mode;
      mode = t % 3;
      for (int i = 0; i < 9; i++) begin
        w[i] = $urandom_range(9);
        k[i] = (mode == 0) ? edge_k[i] : (mode == 1) ? gaus_k[i] : $urandom_range(31);
        pix[i] = 4'(w[i]); coef[i] = 8'(k[i]);
      end
      shift = (mode == 1) ? 5'd4 : 5'($urandom_range(mode == 0 ? 0 : 20));
      #1;
      e = ref_log(w, k, int'(shift));
      checks++;
      if (res !== 4'(e)) begin failures++; $display("FAIL t=%0d got %0d exp %0d", t, res, e); end
    end
    // conversion table spot checks: 0->0, 1->1, 2->2, 3->3, 128->8, 192->9, 255->9
    begin
      int vals[7] = '{0,1,2,3,128,192,255};
      int codes[7] = '{0,1,2,3,8,9,9};
      for (int j = 0; j < 7; j++) begin
        // window: one tap with value vals[j] is hard to form directly; use sum of taps
        pix = '0; coef = '0; shift = 0;
        for (int b = 0; b < 8; b++) if ((vals[j] >> b) & 1) begin pix[b] = 4'(b + 1); coef[b] = 8'd1; end
        #1; checks++;
        if (res !== 4'(codes[j])) begin failures++; $display("FAIL code of %0d got %0d", vals[j], res); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
