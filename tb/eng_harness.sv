// eng_harness: simulation helper that puts one conv_engine next to a CPU
// bus-functional model and an AXI4 memory model and offers tasks to load a
// kernel and convolve a random image, checking the result word by word
// against the reference model. Used by tb_conv_engine.
module eng_harness
  import conv_pkg::*;
  import conv_ref_pkg::*;
#(
  parameter bit LOG_DOMAIN = 1'b0
) (
  input logic clk,
  input logic rst_n
);
  localparam int PIX_W = LOG_DOMAIN ? 4 : 8;
  localparam int PPW   = 64 / PIX_W;

  axil_req_t creq; axil_rsp_t crsp;
  axi_req_t  mreq; axi_rsp_t  mrsp;
  logic      irq;
  int checks = 0, failures = 0;
  int last_cycles = 0;

  conv_engine #(.LOG_DOMAIN(LOG_DOMAIN)) dut (.clk, .rst_n, .cfg_req_i(creq), .cfg_rsp_o(crsp),
    .mem_req_o(mreq), .mem_rsp_i(mrsp), .irq_o(irq));
  axil_master_bfm cpu (.clk, .req_o(creq), .rsp_i(crsp));
  axi_mem_model #(.WORDS(4096), .STALL_PCT(0)) u_mem (.clk, .rst_n, .req_i(mreq), .rsp_o(mrsp));

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL [%s] %s", LOG_DOMAIN ? "log" : "lin", m); end
  endtask

  task automatic wreg(input int a, input int d);
    logic [1:0] resp;
    cpu.write(addr_t'(a), ldata_t'(d), resp);
    chk(resp == RESP_OKAY, "register write accepted");
  endtask

  task automatic rstatus(output conv_status_t st);
    logic [1:0] resp; ldata_t d;
    cpu.read(addr_t'(REG_STATUS), d, resp);
    st = conv_status_t'(d[3:0]);
  endtask

  task automatic load_kernel(input int k[9]);
    for (int i = 0; i < 9; i++) wreg(32'(REG_KERNEL) + 4*i, k[i] & 8'hFF);
  endtask

  // start and wait; returns the status word
  task automatic start_wait(output conv_status_t st);
    int cyc = 0;
    wreg(REG_CTRL, 1);
    fork
      begin while (!irq) begin @(posedge clk); cyc++; end end
    join
    last_cycles = cyc;
    rstatus(st);
  endtask

  // convolve a random w x h image; the kernel must already be loaded
  task automatic run_image(input int w, input int h, input int k[9], input int shift, input int burst,
                           input int src_word, input int dst_word);
    int img[], res[$];
    conv_status_t st;
    int nres;
    img = new[w*h];
    foreach (img[i]) img[i] = LOG_DOMAIN ? $urandom_range(9) : $urandom_range(255);
    for (int i = 0; i < w*h; i++) u_mem.mem[src_word + i / PPW][(i % PPW)*PIX_W +: PIX_W] = PIX_W'(img[i]);
    for (int i = 0; i < 600; i++) u_mem.mem[dst_word + i] = '1;
    ref_image(img, w, h, k, shift, LOG_DOMAIN, res);
    wreg(REG_SRC, src_word * 8); wreg(REG_DST, dst_word * 8);
    wreg(REG_WIDTH, w); wreg(REG_HEIGHT, h); wreg(REG_BURST, burst); wreg(REG_SHIFT, shift);
    start_wait(st);
    chk(st.done && !st.error && !st.busy, $sformatf("done %0dx%0d", w, h));
    nres = res.size();
    for (int i = 0; i < nres; i++)
      chk(int'(u_mem.mem[dst_word + i / PPW][(i % PPW)*PIX_W +: PIX_W]) == res[i], $sformatf("result %0d of %0dx%0d", i, w, h));
    // padding of the last word is zero, the word after it untouched
    for (int i = nres; i % PPW != 0; i++)
      chk(u_mem.mem[dst_word + i / PPW][(i % PPW)*PIX_W +: PIX_W] == '0, "zero padding");
    chk(u_mem.mem[dst_word + (nres + PPW - 1) / PPW] == '1, "no write past the result");
  endtask
endmodule
