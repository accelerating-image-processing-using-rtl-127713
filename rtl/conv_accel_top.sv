// conv_accel_top: linear and logarithmic convolution engines behind one crossbar.
//
// Engine 0 is the linear engine (8-bit pixels, four multiplier AUs), engine 1
// the logarithmic engine (4-bit log2 codes, four adder/shifter AUs). A host CPU
// programs either engine through the AXI4-Lite port cpu_* (engine 0 at byte
// offsets 0x000-0x0FF, engine 1 at 0x100-0x1FF; see conv_cfg_regs for the
// registers), and each engine then fetches its image and stores its result on
// its own through the shared 64-bit AXI4 memory port mem_*. irq_o[i] is high
// while engine i reports done or error. The engines may run at the same time;
// the crossbar interleaves their bursts.
// The pairing of the two engines on one crossbar with the CPU and memory follows
// the document's system description; the CPU and the memory are outside this
// module.
module conv_accel_top
  import conv_pkg::*;
#(
  parameter int unsigned NUM_AU     = 4,
  parameter int unsigned MAX_W      = 64,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  cpu_req_i,
  output axil_rsp_t  cpu_rsp_o,
  output axi_req_t   mem_req_o,
  input  axi_rsp_t   mem_rsp_i,
  output logic [1:0] irq_o
);
  axil_req_t cfg_req [2];
  axil_rsp_t cfg_rsp [2];
  axi_req_t  emem_req [2];
  axi_rsp_t  emem_rsp [2];

  conv_engine #(.LOG_DOMAIN(1'b0), .NUM_AU(NUM_AU), .MAX_W(MAX_W), .FIFO_DEPTH(FIFO_DEPTH)) u_lin (
    .clk, .rst_n,
    .cfg_req_i(cfg_req[0]), .cfg_rsp_o(cfg_rsp[0]),
    .mem_req_o(emem_req[0]), .mem_rsp_i(emem_rsp[0]),
    .irq_o(irq_o[0])
  );

  conv_engine #(.LOG_DOMAIN(1'b1), .NUM_AU(NUM_AU), .MAX_W(MAX_W), .FIFO_DEPTH(FIFO_DEPTH)) u_log (
    .clk, .rst_n,
    .cfg_req_i(cfg_req[1]), .cfg_rsp_o(cfg_rsp[1]),
    .mem_req_o(emem_req[1]), .mem_rsp_i(emem_rsp[1]),
    .irq_o(irq_o[1])
  );

  conv_xbar #(.N_ENG(2)) u_xbar (
    .clk, .rst_n,
    .cpu_req_i, .cpu_rsp_o,
    .eng_cfg_req_o(cfg_req), .eng_cfg_rsp_i(cfg_rsp),
    .eng_mem_req_i(emem_req), .eng_mem_rsp_o(emem_rsp),
    .mem_req_o, .mem_rsp_i
  );
endmodule
