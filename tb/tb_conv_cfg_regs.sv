// tb_conv_cfg_regs: programs every register through AXI4-Lite, reads them
// back, checks the start/reset pulses, the kernel write strobes, the status
// read-back and SLVERR on unmapped offsets.
module tb_conv_cfg_regs;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_rsp_t rsp;
  conv_cfg_t cfg; conv_status_t status = '0;
  logic start, esr, ksr, kwe;
  logic [3:0] kidx; logic [7:0] kdat;
  int checks = 0, failures = 0;
  int n_start = 0, n_esr = 0, n_ksr = 0;
  logic [7:0] kseen [9];
  int kcount = 0;

  conv_cfg_regs dut (.clk, .rst_n, .axil_req_i(req), .axil_rsp_o(rsp), .cfg_o(cfg),
    .start_o(start), .eng_srst_o(esr), .kern_srst_o(ksr), .kern_we_o(kwe),
    .kern_idx_o(kidx), .kern_data_o(kdat), .status_i(status));
  axil_master_bfm cpu (.clk, .req_o(req), .rsp_i(rsp));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (rst_n) begin
    if (start) n_start++;
    if (esr) n_esr++;
    if (ksr) n_ksr++;
    if (kwe) begin kseen[kidx] = kdat; kcount++; end
  end

  initial begin
    logic [1:0] resp; ldata_t d;
    ldata_t src, dst;
    repeat (3) @(posedge clk); rst_n = 1;
    src = $urandom; dst = $urandom;
    cpu.write(32'h08, src, resp); chk(resp == RESP_OKAY, "okay");
    cpu.write(32'h0C, dst, resp);
    cpu.write(32'h10, 32'd64, resp);
    cpu.write(32'h14, 32'd48, resp);
    cpu.write(32'h18, 32'd16, resp);
    cpu.write(32'h1C, 32'd4, resp);
    chk(cfg.src == src && cfg.dst == dst && cfg.width == 64 && cfg.height == 48 && cfg.burst == 16 && cfg.shift == 4, "cfg outputs");
    cpu.read(32'h08, d, resp); chk(d == src && resp == RESP_OKAY, "read src");
    cpu.read(32'h0C, d, resp); chk(d == dst, "read dst");
    cpu.read(32'h10, d, resp); chk(d == 64, "read width");
    cpu.read(32'h14, d, resp); chk(d == 48, "read height");
    cpu.read(32'h18, d, resp); chk(d == 16, "read burst");
    cpu.read(32'h1C, d, resp); chk(d == 4, "read shift");
    for (int i = 0; i < 9; i++) cpu.write(32'h20 + 4*i, 32'(8'hA0 + i), resp);
    chk(kcount == 9, "nine kernel strobes");
    for (int i = 0; i < 9; i++) chk(kseen[i] == 8'(8'hA0 + i), "kernel data");
    cpu.write(32'h00, 32'h1, resp);
    cpu.write(32'h00, 32'h2, resp);
    cpu.write(32'h00, 32'h4, resp);
    cpu.write(32'h00, 32'h4, resp);
    chk(n_start == 1 && n_esr == 1 && n_ksr == 2, "control pulses");
    status = '{kern_valid: 1'b1, error: 1'b0, done: 1'b1, busy: 1'b0};
    cpu.read(32'h04, d, resp); chk(d == 32'hA, "status");
    cpu.write(32'h80, 32'h1, resp); chk(resp == RESP_SLVERR, "write slverr");
    cpu.read(32'h90, d, resp);      chk(resp == RESP_SLVERR, "read slverr");
    chk(n_start == 1, "no stray start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
