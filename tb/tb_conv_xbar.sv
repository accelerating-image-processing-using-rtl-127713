// tb_conv_xbar: the crossbar with two register files on its CPU side and two
// DMA masters on its memory side. Checks address-based routing of CPU writes
// and reads, and two DMAs copying at the same time through the one memory
// port: all data correct, both masters served, and the number of cycles in
// which both wanted the same channel (arbitration) counted.
module tb_conv_xbar;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  axil_req_t creq; axil_rsp_t crsp;
  axil_req_t ereq [2]; axil_rsp_t ersp [2];
  axi_req_t  mreq [2]; axi_rsp_t  mrsp [2];
  axi_req_t  req;      axi_rsp_t  rsp;
  conv_cfg_t cfg [2];

  conv_xbar #(.N_ENG(2)) dut (.clk, .rst_n, .cpu_req_i(creq), .cpu_rsp_o(crsp),
    .eng_cfg_req_o(ereq), .eng_cfg_rsp_i(ersp), .eng_mem_req_i(mreq), .eng_mem_rsp_o(mrsp),
    .mem_req_o(req), .mem_rsp_i(rsp));
  axil_master_bfm cpu (.clk, .req_o(creq), .rsp_i(crsp));
  axi_mem_model #(.WORDS(2048), .STALL_PCT(20)) u_mem (.clk, .rst_n, .req_i(req), .rsp_o(rsp));

  logic start = 0;
  logic rv [2], rr [2], wv [2], wrd [2], rdone [2], wdone [2], err [2];
  logic sv [2], srdy [2];
  data_t rdat [2], wdat [2], sdat [2];
  logic [4:0] wcnt [2];
  data_t got0[$], got1[$];

  for (genvar e = 0; e < 2; e++) begin : g_e
    conv_cfg_regs u_regs (.clk, .rst_n, .axil_req_i(ereq[e]), .axil_rsp_o(ersp[e]), .cfg_o(cfg[e]),
      .start_o(), .eng_srst_o(), .kern_srst_o(), .kern_we_o(), .kern_idx_o(), .kern_data_o(),
      .status_i(conv_status_t'(4'(e + 1))));
    conv_dma #(.FIFO_DEPTH(16)) u_dma (.clk, .rst_n, .clr_i(1'b0), .start_i(start),
      .rd_addr_i(32'(e * 4096)), .rd_words_i(16'd100), .wr_addr_i(32'(8192 + e * 4096)), .wr_words_i(16'd60),
      .burst_i(9'd8), .rd_valid_o(rv[e]), .rd_ready_i(rr[e]), .rd_data_o(rdat[e]),
      .wr_valid_i(wv[e]), .wr_ready_o(wrd[e]), .wr_data_i(wdat[e]), .wr_count_i(wcnt[e]),
      .rd_done_o(rdone[e]), .wr_done_o(wdone[e]), .err_o(err[e]), .mem_req_o(mreq[e]), .mem_rsp_i(mrsp[e]));
    sync_fifo #(.WIDTH(64), .DEPTH(16)) u_src (.clk, .rst_n, .clr_i(1'b0),
      .in_valid(sv[e]), .in_ready(srdy[e]), .in_data(sdat[e]),
      .out_valid(wv[e]), .out_ready(wrd[e]), .out_data(wdat[e]), .count_o(wcnt[e]));
    assign rr[e] = 1'b1;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int rd_conflict = 0, wr_conflict = 0;
  always @(posedge clk) if (rst_n) begin
    if (rv[0]) got0.push_back(rdat[0]);
    if (rv[1]) got1.push_back(rdat[1]);
    if (mreq[0].ar_valid && mreq[1].ar_valid) rd_conflict++;
    if (mreq[0].aw_valid && mreq[1].aw_valid) wr_conflict++;
  end

  initial begin
    logic [1:0] resp; ldata_t d;
    repeat (3) @(posedge clk); rst_n = 1;
    // CPU side routing
    cpu.write(32'h008, 32'h1111, resp); chk(resp == RESP_OKAY, "write e0");
    cpu.write(32'h108, 32'h2222, resp); chk(resp == RESP_OKAY, "write e1");
    chk(cfg[0].src == 32'h1111 && cfg[1].src == 32'h2222, "writes routed by address");
    cpu.read(32'h004, d, resp); chk(d == 1, "read routed to e0");
    cpu.read(32'h104, d, resp); chk(d == 2, "read routed to e1");
    cpu.read(32'h108, d, resp); chk(d == 32'h2222, "read back e1");
    // memory side: two concurrent copies
    for (int i = 0; i < 2048; i++) u_mem.mem[i] = {$urandom, $urandom};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      for (int i = 0; i < 60; i++) begin
        @(negedge clk); sv[0] = 1; sdat[0] = {32'hAAAA0000 + 32'(i), 32'(i)};
        #1; while (!srdy[0]) begin @(negedge clk); #1; end
        @(negedge clk); sv[0] = 0;
      end
      for (int i = 0; i < 60; i++) begin
        @(negedge clk); sv[1] = 1; sdat[1] = {32'hBBBB0000 + 32'(i), 32'(i)};
        #1; while (!srdy[1]) begin @(negedge clk); #1; end
        @(negedge clk); sv[1] = 0;
      end
    join
    while (!(rdone[0] && rdone[1] && wdone[0] && wdone[1])) @(posedge clk);
    chk(got0.size() == 100 && got1.size() == 100, "both read streams complete");
    for (int i = 0; i < 100 && i < got0.size() && i < got1.size(); i++) begin
      chk(got0[i] == u_mem.mem[i], "engine 0 read data");
      chk(got1[i] == u_mem.mem[512 + i], "engine 1 read data");
    end
    for (int i = 0; i < 60; i++) begin
      chk(u_mem.mem[1024 + i] == {32'hAAAA0000 + 32'(i), 32'(i)}, "engine 0 write data");
      chk(u_mem.mem[1536 + i] == {32'hBBBB0000 + 32'(i), 32'(i)}, "engine 1 write data");
    end
    chk(!err[0] && !err[1], "no errors");
    $display("arbitration conflicts: read %0d, write %0d", rd_conflict, wr_conflict);
    chk(rd_conflict > 0, "read arbitration exercised");
    chk(wr_conflict > 0, "write arbitration exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin sv[0] = 0; sv[1] = 0; sdat[0] = '0; sdat[1] = '0; end
endmodule
