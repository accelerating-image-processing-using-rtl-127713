// tb_conv_accel_top: end-to-end test of the two-engine accelerator at its
// default parameters. A CPU bus-functional model programs both engines through
// the crossbar; one AXI4 memory model holds all images. Scenarios: both engines
// converting 64x64 images at the same time (the largest size evaluated), the
// usual edge and gaussian kernels, odd sizes whose result ends in a partly
// filled word and whose transfer ends in a short burst, a memory that stalls,
// an engine reset with the kernel kept, a refused start, and a bus error.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_conv_accel_top;
  import conv_pkg::*;
  import conv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  axil_req_t creq; axil_rsp_t crsp;
  axi_req_t  mreq; axi_rsp_t  mrsp;
  logic [1:0] irq;

  conv_accel_top dut (.clk, .rst_n, .cpu_req_i(creq), .cpu_rsp_o(crsp),
    .mem_req_o(mreq), .mem_rsp_i(mrsp), .irq_o(irq));
  axil_master_bfm cpu (.clk, .req_o(creq), .rsp_i(crsp));
  axi_mem_model #(.WORDS(4096), .STALL_PCT(0)) u_mem (.clk, .rst_n, .req_i(mreq), .rsp_o(mrsp));

  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_lin_done = 0, n_log_done = 0, n_concurrent = 0, n_rd_arb = 0, n_wr_arb = 0;
  int n_short_burst = 0, n_stall = 0, n_partial_word = 0, n_reuse = 0, n_refused = 0, n_bus_err = 0;
  int burst_cfg = 16;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_lin.busy && dut.u_log.busy) n_concurrent++;
    if (dut.emem_req[0].ar_valid && dut.emem_req[1].ar_valid) n_rd_arb++;
    if (dut.emem_req[0].aw_valid && dut.emem_req[1].aw_valid) n_wr_arb++;
    if ((mreq.ar_valid && mrsp.ar_ready && int'(mreq.ar.len) + 1 < burst_cfg) ||
        (mreq.aw_valid && mrsp.aw_ready && int'(mreq.aw.len) + 1 < burst_cfg)) n_short_burst++;
    if ((mreq.ar_valid && !mrsp.ar_ready) || (mreq.aw_valid && !mrsp.aw_ready) ||
        (mreq.w_valid && !mrsp.w_ready)) n_stall++;
  end

  // ---------------- CPU helpers ----------------
  function automatic int base(input bit e); return e ? 32'h100 : 32'h000; endfunction
  task automatic wreg(input bit e, input int a, input int d);
    logic [1:0] resp;
    cpu.write(addr_t'(base(e) + a), ldata_t'(d), resp);
    chk(resp == RESP_OKAY, "register write");
  endtask
  task automatic rstatus(input bit e, output conv_status_t st);
    logic [1:0] resp; ldata_t d;
    cpu.read(addr_t'(base(e) + REG_STATUS), d, resp);
    st = conv_status_t'(d[3:0]);
  endtask
  task automatic load_kernel(input bit e, input int k[9]);
    for (int i = 0; i < 9; i++) wreg(e, 32'(REG_KERNEL) + 4*i, k[i] & 8'hFF);
  endtask

  // pixel i of an image stored from word base_w (8-bit or 4-bit pixels)
  task automatic put_pix(input bit e, input int base_w, input int i, input int v);
    if (e) u_mem.mem[base_w + i / 16][(i % 16)*4 +: 4] = 4'(v);
    else   u_mem.mem[base_w + i / 8][(i % 8)*8 +: 8]  = 8'(v);
  endtask
  function automatic int get_pix(input bit e, input int base_w, input int i);
    if (e) return int'(u_mem.mem[base_w + i / 16][(i % 16)*4 +: 4]);
    return int'(u_mem.mem[base_w + i / 8][(i % 8)*8 +: 8]);
  endfunction

  // program and start engine e on a random image; expected results in res
  task automatic launch(input bit e, input int w, input int h, input int k[9], input int shift,
                        input int burst, input int src, input int dst, ref int res[$]);
    int img[];
    img = new[w*h];
    foreach (img[i]) img[i] = e ? $urandom_range(9) : $urandom_range(255);
    for (int i = 0; i < w*h; i++) put_pix(e, src, i, img[i]);
    for (int i = 0; i < 520 && dst + i < 4096; i++) u_mem.mem[dst + i] = '1;
    ref_image(img, w, h, k, shift, e, res);
    wreg(e, REG_SRC, src * 8); wreg(e, REG_DST, dst * 8);
    wreg(e, REG_WIDTH, w); wreg(e, REG_HEIGHT, h); wreg(e, REG_BURST, burst); wreg(e, REG_SHIFT, shift);
    wreg(e, REG_CTRL, 1);
  endtask

  task automatic finish_check(input bit e, input int dst, ref int res[$], input string tag);
    conv_status_t st;
    int ppw = e ? 16 : 8, bad = 0;
    while (!irq[e]) @(posedge clk);
    rstatus(e, st);
    chk(st.done && !st.error, {tag, ": done"});
    foreach (res[i]) if (get_pix(e, dst, i) != res[i]) bad++;
    chk(bad == 0, $sformatf("%s: %0d of %0d results wrong", tag, bad, res.size()));
    chk(u_mem.mem[dst + (res.size() + ppw - 1) / ppw] == '1, {tag, ": nothing written past the result"});
    if (res.size() % ppw != 0) n_partial_word++;
    if (e) n_log_done++; else n_lin_done++;
  endtask

  int edge_l[9] = '{-1,-1,-1,-1,8,-1,-1,-1,-1};
  int gaus_l[9] = '{1,2,1,2,4,2,1,2,1};
  int edge_g[9] = '{17,17,17,17,4,17,17,17,17};
  int gaus_g[9] = '{1,2,1,2,3,2,1,2,1};

  initial begin
    int rl[$], rg[$];
    conv_status_t st;
    int t0;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1. both engines, 64x64, edge kernel, at the same time
    load_kernel(0, edge_l); load_kernel(1, edge_g);
    launch(0, 64, 64, edge_l, 0, 16, 0, 1024, rl);
    t0 = $time;
    launch(1, 64, 64, edge_g, 0, 16, 2048, 3072, rg);
    fork finish_check(0, 1024, rl, "lin 64x64 edge"); finish_check(1, 3072, rg, "log 64x64 edge"); join
    $display("both 64x64 images done %0d cycles after the second start", ($time - t0) / 10);
    // 2. engine reset with the kernel kept, then gaussian-free reuse of the edge kernel
    wreg(0, REG_CTRL, 2); wreg(1, REG_CTRL, 2);
    rstatus(0, st); chk(!st.done && st.kern_valid, "engine reset keeps the kernel");
    launch(0, 16, 5, edge_l, 0, 16, 0, 1024, rl);
    finish_check(0, 1024, rl, "lin 16x5 reused kernel"); n_reuse++;
    // 3. gaussian kernels on a stalling memory, odd sizes and short bursts
    wreg(0, REG_CTRL, 4); wreg(1, REG_CTRL, 4);
    load_kernel(0, gaus_l); load_kernel(1, gaus_g);
    u_mem.stall_pct = 35; burst_cfg = 5;
    launch(0, 28, 12, gaus_l, 4, 5, 0, 1024, rl);
    launch(1, 36, 12, gaus_g, 4, 5, 2048, 3072, rg);
    fork finish_check(0, 1024, rl, "lin 28x12 gauss stalled"); finish_check(1, 3072, rg, "log 36x12 gauss stalled"); join
    u_mem.stall_pct = 0; burst_cfg = 16;
    // 4. refused start: bad burst length
    wreg(1, REG_BURST, 0); wreg(1, REG_CTRL, 1);
    while (!irq[1]) @(posedge clk);
    rstatus(1, st); chk(st.error && !st.done && !st.busy, "burst 0 refused");
    if (st.error) n_refused++;
    // 5. bus error: result address past the end of memory
    begin
      int dummy[$];
      launch(0, 8, 8, gaus_l, 4, 4, 0, 4094, dummy);
      while (!irq[0]) @(posedge clk);
      rstatus(0, st); chk(st.error && !st.done, "bus error reported");
      if (st.error) n_bus_err++;
    end
    // 6. recovery after the error
    wreg(0, REG_CTRL, 2);
    launch(0, 16, 16, gaus_l, 4, 8, 0, 1024, rl);
    finish_check(0, 1024, rl, "lin 16x16 after error");

    $display("mechanisms: lin=%0d log=%0d concurrent=%0d rd_arb=%0d wr_arb=%0d short_burst=%0d stall=%0d partial_word=%0d reuse=%0d refused=%0d bus_err=%0d",
             n_lin_done, n_log_done, n_concurrent, n_rd_arb, n_wr_arb, n_short_burst, n_stall, n_partial_word, n_reuse, n_refused, n_bus_err);
    chk(n_lin_done > 0, "linear engine ran");
    chk(n_log_done > 0, "log engine ran");
    chk(n_concurrent > 0, "engines ran concurrently");
    chk(n_rd_arb > 0, "read arbitration");
    chk(n_wr_arb > 0, "write arbitration");
    chk(n_short_burst > 0, "short last burst");
    chk(n_stall > 0, "memory stall");
    chk(n_partial_word > 0, "partly filled last word");
    chk(n_reuse > 0, "kernel reuse after engine reset");
    chk(n_refused > 0, "refused start");
    chk(n_bus_err > 0, "bus error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
