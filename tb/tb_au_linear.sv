// tb_au_linear: random kernels and the two common ones (edge: 8 centre, -1 around;
// gaussian 1-2-1 with shift 4) against the reference sum/shift/clamp.
module tb_au_linear;
  import conv_pkg::*;
  import conv_ref_pkg::*;
  logic [NTAPS-1:0][7:0] pix, coef;
  logic [4:0] shift;
  logic [7:0] res;
  int checks = 0, failures = 0;

  au_linear dut (.pix_i(pix), .coef_i(coef), .shift_i(shift), .res_o(res));

  initial begin
    int w[9], k[9], e;
    int edge_k[9] = '{-1,-1,-1,-1,8,-1,-1,-1,-1};
    int gaus_k[9] = '{1,2,1,2,4,2,1,2,1};
    for (int t = 0; t < 3000; t++) begin
      int mode;
      mode = t % 3;
      for (int i = 0; i < 9; i++) begin
        w[i] = $urandom_range(255);
        k[i] = (mode == 0) ? edge_k[i] : (mode == 1) ? gaus_k[i] : sx8($urandom_range(255));
        pix[i] = 8'(w[i]); coef[i] = 8'(k[i]);
      end
      shift = (mode == 1) ? 5'd4 : 5'($urandom_range(mode == 0 ? 0 : 12));
      #1;
      e = ref_lin(w, k, int'(shift));
      checks++;
      if (res !== 8'(e)) begin failures++; $display("FAIL t=%0d got %0d exp %0d", t, res, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
