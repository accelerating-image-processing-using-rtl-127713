// tb_kernel_buffer: loads kernels in random order, checks that valid rises
// only after all nine taps, that a complete kernel is locked, and that only the
// kernel soft reset clears it.
module tb_kernel_buffer;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0, srst = 0, we = 0;
  logic [3:0] idx = '0;
  logic [7:0] data = '0;
  logic valid, ready;
  logic [NTAPS-1:0][7:0] coef;
  int checks = 0, failures = 0;
  logic [7:0] exp_k [9];

  kernel_buffer dut (.clk, .rst_n, .srst_i(srst), .we_i(we), .idx_i(idx), .data_i(data),
    .valid_o(valid), .ready_o(ready), .coef_o(coef));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic wr(input int i, input int d);
    @(negedge clk); we = 1; idx = 4'(i); data = 8'(d);
    @(negedge clk); we = 0;
  endtask

  initial begin
    int order[9];
    repeat (3) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 10; round++) begin
      foreach (order[i]) order[i] = i;
      order.shuffle();
      for (int n = 0; n < 9; n++) begin
        chk(!valid && ready, "not valid before all taps");
        exp_k[order[n]] = 8'($urandom);
        wr(order[n], exp_k[order[n]]);
      end
      chk(valid && !ready, "valid after nine taps");
      for (int i = 0; i < 9; i++) chk(coef[i] == exp_k[i], "coef");
      // locked: a write is ignored
      wr(0, ~exp_k[0]);
      chk(coef[0] == exp_k[0], "locked");
      // out-of-range index ignored
      wr(12, 8'h55);
      chk(valid, "still valid");
      srst = 1; @(negedge clk); srst = 0;
      chk(!valid && coef == '0, "kernel reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
