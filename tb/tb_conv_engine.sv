// tb_conv_engine: a linear and a logarithmic engine, each with its own memory,
// driven like the CPU would: kernel load, images of several sizes and burst
// lengths, engine soft reset with the kernel kept (reuse), kernel soft reset
// followed by a refused start, an illegal width, a run against a stalling
// memory, and a 64x64 run whose cycle count is held against the engine cycle
// counts reported for the original implementation (2568 linear, 1578 log,
// including 60-90 cycles of CPU configuration).
module tb_conv_engine;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  eng_harness #(.LOG_DOMAIN(1'b0)) h_lin (.clk, .rst_n);
  eng_harness #(.LOG_DOMAIN(1'b1)) h_log (.clk, .rst_n);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_lin.checks + h_log.checks, failures + h_lin.failures + h_log.failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int edge_l[9] = '{-1,-1,-1,-1,8,-1,-1,-1,-1};
  int gaus_l[9] = '{1,2,1,2,4,2,1,2,1};
  int edge_g[9] = '{17,17,17,17,4,17,17,17,17};
  int gaus_g[9] = '{1,2,1,2,3,2,1,2,1};

  initial begin
    conv_status_t st;
    int rkl[9], rkg[9];
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      begin : lin
        h_lin.load_kernel(gaus_l);
        h_lin.run_image(8, 8, gaus_l, 4, 4, 0, 2048);
        h_lin.wreg(REG_CTRL, 2);                       // engine reset, kernel kept
        h_lin.run_image(16, 12, gaus_l, 4, 16, 100, 2048);
        h_lin.wreg(REG_CTRL, 4);                       // kernel reset
        h_lin.start_wait(st);
        h_lin.chk(st.error && !st.done && !st.kern_valid, "start without kernel refused");
        h_lin.load_kernel(edge_l);
        h_lin.wreg(REG_WIDTH, 6);
        h_lin.start_wait(st);
        h_lin.chk(st.error, "width not a multiple of four refused");
        h_lin.u_mem.stall_pct = 40;
        h_lin.run_image(24, 9, edge_l, 0, 5, 300, 2048);
        h_lin.u_mem.stall_pct = 0;
        for (int i = 0; i < 9; i++) rkl[i] = conv_ref_pkg::sx8($urandom_range(255));
        h_lin.wreg(REG_CTRL, 4); h_lin.load_kernel(rkl);
        h_lin.run_image(64, 64, rkl, 7, 16, 0, 2048);
        $display("linear 64x64: %0d cycles from start to done", h_lin.last_cycles);
        h_lin.chk(h_lin.last_cycles < 2568, "linear 64x64 within the reported cycle count");
      end
      begin : log
        h_log.load_kernel(gaus_g);
        h_log.run_image(16, 16, gaus_g, 4, 4, 0, 2048);
        h_log.wreg(REG_CTRL, 2);
        h_log.run_image(32, 5, gaus_g, 4, 16, 100, 2048);
        h_log.wreg(REG_CTRL, 4);
        h_log.start_wait(st);
        h_log.chk(st.error && !st.kern_valid, "start without kernel refused");
        h_log.load_kernel(edge_g);
        h_log.u_mem.stall_pct = 40;
        h_log.run_image(48, 8, edge_g, 0, 7, 300, 2048);
        h_log.u_mem.stall_pct = 0;
        for (int i = 0; i < 9; i++) rkg[i] = $urandom_range(31);
        h_log.wreg(REG_CTRL, 4); h_log.load_kernel(rkg);
        h_log.run_image(64, 64, rkg, 3, 16, 0, 2048);
        $display("log 64x64: %0d cycles from start to done", h_log.last_cycles);
        h_log.chk(h_log.last_cycles < 1578, "log 64x64 within the reported cycle count");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_lin.checks + h_log.checks, failures + h_lin.failures + h_log.failures);
    $finish;
  end
endmodule
