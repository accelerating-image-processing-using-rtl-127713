// tb_sync_fifo: random push/pop traffic against a queue scoreboard; checks
// order, data, fill level, full/empty flags and the synchronous clear.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, clr = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = '0, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.clk, .rst_n, .clr_i(clr),
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .count_o(count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int full_seen = 0;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(99) < (cyc < 1500 ? 70 : 30));
      in_data   = 16'($urandom);
      out_ready = ($urandom_range(99) < (cyc < 1500 ? 30 : 70));
      chk(count == 3'(q.size()), "count");
      chk(in_ready == (q.size() < DEPTH), "in_ready");
      chk(out_valid == (q.size() > 0), "out_valid");
      if (q.size() == DEPTH) full_seen++;
      if (out_valid) chk(out_data == q[0], "data");
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    // clear empties the fifo
    @(negedge clk); in_valid = 1; out_ready = 0; clr = 0;
    @(negedge clk); in_valid = 0; clr = 1;
    @(negedge clk); clr = 0;
    chk(count == 0 && !out_valid, "clear");
    chk(full_seen > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
