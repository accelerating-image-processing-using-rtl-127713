// tb_paper_workloads: the image sizes and kernels of the evaluation, run on the
// full accelerator at its default parameters with a zero-wait memory.
// Part 1: every evaluated size (linear 8x8, 16x16, 32x32, 64x64; logarithmic
// 16x16, 32x32, 64x64), one engine at a time, results checked against the
// reference and the cycles from start to interrupt printed next to the counts
// reported for the original engines (which include 60-90 cycles of CPU
// configuration); each run must not be slower than the report.
// Part 2: the two analysis kernels (edge: 8 in the centre, -1 around; gaussian
// 1-2-1 / 2-4-2 / 1-2-1 divided by 16) on a 64x48 synthetic scene with a smooth
// sky gradient above structured ground, in both domains; the log image is
// the linear image converted pixel by pixel to the 4-bit code, as the CPU
// would do before handing it to the logarithmic engine.
// Part 3: the same 64x64 image in both domains on a slow memory (each
// handshake withheld 70 % of the time). The engines are then limited by data
// movement, and the logarithmic engine, which moves half the words, must need
// fewer cycles than the linear one.
module tb_paper_workloads;
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

  function automatic int base(input bit e); return e ? 32'h100 : 32'h000; endfunction
  task automatic wreg(input bit e, input int a, input int d);
    logic [1:0] resp;
    cpu.write(addr_t'(base(e) + a), ldata_t'(d), resp);
    chk(resp == RESP_OKAY, "register write");
  endtask
  task automatic put_pix(input bit e, input int base_w, input int i, input int v);
    if (e) u_mem.mem[base_w + i / 16][(i % 16)*4 +: 4] = 4'(v);
    else   u_mem.mem[base_w + i / 8][(i % 8)*8 +: 8]  = 8'(v);
  endtask
  function automatic int get_pix(input bit e, input int base_w, input int i);
    if (e) return int'(u_mem.mem[base_w + i / 16][(i % 16)*4 +: 4]);
    return int'(u_mem.mem[base_w + i / 8][(i % 8)*8 +: 8]);
  endfunction

  // convolve img on engine e; returns the cycles from start to interrupt
  task automatic run(input bit e, input int w, input int h, input int img[], input int k[9],
                     input int shift, output int cycles, ref int res[$]);
    logic [1:0] resp; ldata_t d;
    int bad = 0;
    for (int i = 0; i < w*h; i++) put_pix(e, 0, i, img[i]);
    ref_image(img, w, h, k, shift, e, res);
    wreg(e, REG_CTRL, 6);                       // engine and kernel reset
    for (int i = 0; i < 9; i++) wreg(e, 32'(REG_KERNEL) + 4*i, k[i] & 8'hFF);
    wreg(e, REG_SRC, 0); wreg(e, REG_DST, 2048 * 8);
    wreg(e, REG_WIDTH, w); wreg(e, REG_HEIGHT, h); wreg(e, REG_BURST, 16); wreg(e, REG_SHIFT, shift);
    wreg(e, REG_CTRL, 1);
    cycles = 0;
    while (!irq[e]) begin @(posedge clk); cycles++; end
    cpu.read(addr_t'(base(e) + REG_STATUS), d, resp);
    chk(d[1] && !d[2], $sformatf("%s %0dx%0d done", e ? "log" : "lin", w, h));
    foreach (res[i]) if (get_pix(e, 2048, i) != res[i]) bad++;
    chk(bad == 0, $sformatf("%s %0dx%0d: %0d wrong results", e ? "log" : "lin", w, h, bad));
  endtask

  int edge_l[9] = '{-1,-1,-1,-1,8,-1,-1,-1,-1};
  int gaus_l[9] = '{1,2,1,2,4,2,1,2,1};
  int edge_g[9] = '{17,17,17,17,4,17,17,17,17};   // -1 = sign|code 1, 8 = code 4
  int gaus_g[9] = '{1,2,1,2,3,2,1,2,1};           // 1, 2, 4 = codes 1, 2, 3

  initial begin
    int sizes_l[4] = '{8, 16, 32, 64};
    int rep_l[4]   = '{176, 262, 720, 2568};   // smallest reported linear count per size
    int sizes_g[3] = '{16, 32, 64};
    int rep_g[3]   = '{197, 473, 1578};
    int img[], res[$], cyc, n;
    repeat (3) @(posedge clk); rst_n = 1;
    // part 1: sizes
    for (int s = 0; s < 4; s++) begin
      n = sizes_l[s];
      img = new[n*n]; foreach (img[i]) img[i] = $urandom_range(255);
      run(0, n, n, img, gaus_l, 4, cyc, res);
      $display("linear %0dx%0d: %0d cycles (reported for the original engine: %0d)", n, n, cyc, rep_l[s]);
      chk(cyc <= rep_l[s], "linear cycle count within report");
    end
    for (int s = 0; s < 3; s++) begin
      n = sizes_g[s];
      img = new[n*n]; foreach (img[i]) img[i] = $urandom_range(9);
      run(1, n, n, img, gaus_g, 4, cyc, res);
      $display("log %0dx%0d: %0d cycles (reported for the original engine: %0d)", n, n, cyc, rep_g[s]);
      chk(cyc <= rep_g[s], "log cycle count within report");
    end
    // part 2: analysis kernels on a synthetic scene, both domains
    begin
      int scene[], lscene[];
      scene = new[64*48]; lscene = new[64*48];
      for (int r = 0; r < 48; r++)
        for (int c = 0; c < 64; c++) begin
          int v;
          v = (r < 24) ? 140 + r * 4 + c / 8 : ((c / 6 + r / 5) % 2 ? 40 : 200) + $urandom_range(15);
          scene[r*64 + c]  = (v > 255) ? 255 : v;
          lscene[r*64 + c] = lin2log(scene[r*64 + c]);
        end
      run(0, 64, 48, scene, edge_l, 0, cyc, res);
      run(1, 64, 48, lscene, edge_g, 0, cyc, res);
      run(0, 64, 48, scene, gaus_l, 4, cyc, res);
      run(1, 64, 48, lscene, gaus_g, 4, cyc, res);
    end
    // part 3: slow memory, linear against logarithmic on the same scene
    begin
      int lin_img[], log_img[], c_lin, c_log;
      lin_img = new[64*64]; log_img = new[64*64];
      foreach (lin_img[i]) begin
        lin_img[i] = $urandom_range(255);
        log_img[i] = lin2log(lin_img[i]);
      end
      u_mem.stall_pct = 70;
      run(0, 64, 64, lin_img, gaus_l, 4, c_lin, res);
      run(1, 64, 64, log_img, gaus_g, 4, c_log, res);
      u_mem.stall_pct = 0;
      $display("slow memory 64x64: linear %0d cycles, log %0d cycles (%0d %% fewer)",
               c_lin, c_log, 100 - (100 * c_log) / c_lin);
      chk(c_log < c_lin, "log engine faster than linear on a slow memory");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
