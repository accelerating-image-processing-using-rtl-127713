// tb_conv_dma: the DMA against a stalling AXI4 memory model. Reads a block
// into a randomly stalled sink and checks data and order, writes a block from
// a FIFO and checks memory, counts bursts and their lengths (last burst
// shorter), checks that a write burst starts only with all its data buffered,
// and checks the error flag on an access past the end of memory.
module tb_conv_dma;
  import conv_pkg::*;
  localparam int WORDS = 1024;
  logic clk = 0, rst_n = 0, clr = 0, start = 0;
  addr_t rd_addr = '0, wr_addr = '0;
  logic [15:0] rd_words = '0, wr_words = '0;
  logic [8:0] burst = 9'd8;
  logic rd_valid, rd_ready = 0, wr_valid, wr_ready, rd_done, wr_done, err;
  data_t rd_data, wr_data;
  logic [4:0] wr_count;
  logic src_valid = 0, src_ready;
  data_t src_data = '0;
  axi_req_t mreq; axi_rsp_t mrsp;
  int checks = 0, failures = 0;

  conv_dma #(.FIFO_DEPTH(16)) dut (.clk, .rst_n, .clr_i(clr), .start_i(start),
    .rd_addr_i(rd_addr), .rd_words_i(rd_words), .wr_addr_i(wr_addr), .wr_words_i(wr_words), .burst_i(burst),
    .rd_valid_o(rd_valid), .rd_ready_i(rd_ready), .rd_data_o(rd_data),
    .wr_valid_i(wr_valid), .wr_ready_o(wr_ready), .wr_data_i(wr_data), .wr_count_i(wr_count),
    .rd_done_o(rd_done), .wr_done_o(wr_done), .err_o(err), .mem_req_o(mreq), .mem_rsp_i(mrsp));
  sync_fifo #(.WIDTH(64), .DEPTH(16)) u_src (.clk, .rst_n, .clr_i(clr),
    .in_valid(src_valid), .in_ready(src_ready), .in_data(src_data),
    .out_valid(wr_valid), .out_ready(wr_ready), .out_data(wr_data), .count_o(wr_count));
  axi_mem_model #(.WORDS(WORDS), .STALL_PCT(30)) u_mem (.clk, .rst_n, .req_i(mreq), .rsp_o(mrsp));

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int n_ar = 0, n_aw = 0, ar_lens[$], aw_lens[$];
  data_t got[$];
  always @(posedge clk) if (rst_n) begin
    if (mreq.ar_valid && mrsp.ar_ready) begin n_ar++; ar_lens.push_back(int'(mreq.ar.len) + 1); end
    if (mreq.aw_valid && mrsp.aw_ready) begin
      n_aw++; aw_lens.push_back(int'(mreq.aw.len) + 1);
      chk(int'(wr_count) >= int'(mreq.aw.len) + 1, "write burst fully buffered");
    end
    if (rd_valid && rd_ready) got.push_back(rd_data);
  end
  always @(negedge clk) rd_ready = ($urandom_range(3) != 0);

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < WORDS; i++) u_mem.mem[i] = {$urandom, $urandom};
    // read 37 words from word 100 and write 21 words to word 500
    rd_addr = 32'(100 * 8); rd_words = 16'd37; wr_addr = 32'(500 * 8); wr_words = 16'd21; burst = 9'd8;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      for (int i = 0; i < 21; i++) begin
        @(negedge clk); while ($urandom_range(2) == 0) @(negedge clk);
        src_valid = 1; src_data = {32'hC0DE0000 + 32'(i), 32'(i * 7)};
        #1; while (!src_ready) begin @(negedge clk); #1; end
        @(negedge clk); src_valid = 0;
      end
    join_none
    while (!(rd_done && wr_done)) @(posedge clk);
    repeat (2) @(posedge clk);
    chk(got.size() == 37, "read count");
    for (int i = 0; i < 37 && i < got.size(); i++) chk(got[i] == u_mem.mem[100 + i], "read data");
    for (int i = 0; i < 21; i++) chk(u_mem.mem[500 + i] == {32'hC0DE0000 + 32'(i), 32'(i * 7)}, "write data");
    chk(n_ar == 5 && ar_lens[4] == 5 && ar_lens[0] == 8, "read bursts 8,8,8,8,5");
    chk(n_aw == 3 && aw_lens[2] == 5 && aw_lens[0] == 8, "write bursts 8,8,5");
    chk(!err, "no error");
    chk(u_mem.stall_cnt > 0, "memory stalled");
    // second run with burst 16 and an out-of-range read -> error
    got.delete();
    rd_addr = 32'((WORDS - 4) * 8); rd_words = 16'd8; wr_words = 16'd0; burst = 9'd16;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!rd_done) @(posedge clk);
    @(posedge clk);
    chk(err, "slverr flagged");
    chk(got.size() == 8 && got[0] == u_mem.mem[WORDS - 4], "read across end still completes");
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    chk(!err && !rd_done, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
