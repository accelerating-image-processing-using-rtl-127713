// axil_master_bfm: simulation-only AXI4-Lite master with write/read tasks,
// standing in for the CPU that programs the engines.
module axil_master_bfm
  import conv_pkg::*;
(
  input  logic      clk,
  output axil_req_t req_o,
  input  axil_rsp_t rsp_i
);
  initial req_o = '0;

  task automatic write(input addr_t a, input ldata_t d, output logic [1:0] resp);
    bit aw_done = 0, w_done = 0;
    @(negedge clk);
    req_o.aw_addr = a; req_o.aw_valid = 1;
    req_o.w_data  = d; req_o.w_strb = '1; req_o.w_valid = 1;
    req_o.b_ready = 1;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (rsp_i.aw_ready && req_o.aw_valid) aw_done = 1;
      if (rsp_i.w_ready && req_o.w_valid)   w_done = 1;
      @(negedge clk);
      if (aw_done) req_o.aw_valid = 0;
      if (w_done)  req_o.w_valid = 0;
    end
    while (!rsp_i.b_valid) @(negedge clk);
    resp = rsp_i.b_resp;
    @(posedge clk);
    @(negedge clk);
    req_o.b_ready = 0;
  endtask

  task automatic read(input addr_t a, output ldata_t d, output logic [1:0] resp);
    @(negedge clk);
    req_o.ar_addr = a; req_o.ar_valid = 1; req_o.r_ready = 1;
    do @(posedge clk); while (!rsp_i.ar_ready);
    @(negedge clk);
    req_o.ar_valid = 0;
    while (!rsp_i.r_valid) @(negedge clk);
    d = rsp_i.r_data;
    resp = rsp_i.r_resp;
    @(posedge clk);
    @(negedge clk);
    req_o.r_ready = 0;
  endtask
endmodule
