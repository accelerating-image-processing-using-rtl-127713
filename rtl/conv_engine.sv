// conv_engine: one 3x3 convolution engine with its own DMA.
//
// Data flow: the DMA reads the source image (64-bit AXI4 bursts) into the in
// fifo; conv_unpack splits each word into groups of NUM_AU pixels; the line
// buffer (three row buffers) adds the two rows above; the MAC keeps the last
// two columns in a shift buffer and its NUM_AU arithmetic units produce NUM_AU
// results per cycle using the kernel buffer's coefficients; conv_pack gathers
// results into 64-bit words; the result fifo feeds the DMA's write bursts.
// Every stage uses valid/ready, so a stall anywhere (slow memory, busy
// crossbar) propagates back without losing data.
// LOG_DOMAIN = 0 gives the linear engine (8-bit pixels, multipliers);
// LOG_DOMAIN = 1 the logarithmic engine (4-bit log2 codes, exponent adders),
// which moves half as many bytes for the same image.
// Control: the CPU programs conv_cfg_regs and writes start. The controller
// checks the settings (width a multiple of NUM_AU and at most MAX_W, width and
// height at least 3, image a whole number of 64-bit words, burst 1..FIFO_DEPTH,
// kernel loaded); if they fail it sets error without starting. Otherwise it
// clears the datapath, launches both DMA sides and reports done when the last
// write burst is acknowledged, or error if any response was not OKAY (the
// transfer is still completed so no burst is left open on the shared bus).
// irq_o = done | error. The engine soft reset
// clears datapath and status but keeps the kernel; the kernel soft reset
// clears only the kernel buffer. The engine reset is meant for an idle or
// finished engine: applied during a run it abandons the bursts in flight.
// Output: the (H-2) x (W-2) valid results in raster order, contiguous from the
// destination address, last word zero-padded. The block structure and the
// resets follow the document; the output layout, the checks and the status
// encoding are this design's.
module conv_engine
  import conv_pkg::*;
#(
  parameter bit          LOG_DOMAIN = 1'b0,
  parameter int unsigned PIX_W      = LOG_DOMAIN ? 4 : 8,
  parameter int unsigned NUM_AU     = 4,
  parameter int unsigned MAX_W      = 64,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t cfg_req_i,
  output axil_rsp_t cfg_rsp_o,
  output axi_req_t  mem_req_o,
  input  axi_rsp_t  mem_rsp_i,
  output logic      irq_o
);
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned NW  = $clog2(NUM_AU + 1);

  // ---------------- configuration ----------------
  conv_cfg_t    cfg;
  conv_status_t status;
  logic start, eng_srst, kern_srst, kern_we;
  logic [3:0]        kern_idx;
  logic [COEF_W-1:0] kern_data;

  conv_cfg_regs u_regs (
    .clk, .rst_n,
    .axil_req_i (cfg_req_i),
    .axil_rsp_o (cfg_rsp_o),
    .cfg_o      (cfg),
    .start_o    (start),
    .eng_srst_o (eng_srst),
    .kern_srst_o(kern_srst),
    .kern_we_o  (kern_we),
    .kern_idx_o (kern_idx),
    .kern_data_o(kern_data),
    .status_i   (status)
  );

  logic                         kern_valid;
  logic [NTAPS-1:0][COEF_W-1:0] kern_coef;

  kernel_buffer u_kbuf (
    .clk, .rst_n,
    .srst_i (kern_srst),
    .we_i   (kern_we),
    .idx_i  (kern_idx),
    .data_i (kern_data),
    .ready_o(),
    .valid_o(kern_valid),
    .coef_o (kern_coef)
  );

  // ---------------- controller ----------------
  typedef enum logic [1:0] {C_IDLE, C_LAUNCH, C_RUN} cstate_e;
  cstate_e     cst;
  logic        busy, done, error;
  logic        dp_clr, dma_start;
  logic        rd_done, wr_done, dma_err;
  logic [15:0] rd_words, wr_words;

  wire [31:0] npix_in  = 32'(cfg.width) * 32'(cfg.height);
  wire [31:0] npix_out = 32'(cfg.width - 16'd2) * 32'(cfg.height - 16'd2);
  wire [31:0] bits_in  = npix_in * 32'(PIX_W);
  wire        cfg_ok   = (cfg.width >= 16'd3) && (cfg.height >= 16'd3) &&
                         (cfg.width <= 16'(MAX_W)) &&
                         (cfg.width % 16'(NUM_AU) == 16'd0) &&
                         (bits_in[5:0] == 6'd0) && (bits_in[31:22] == 10'd0) &&
                         (cfg.burst != '0) && (cfg.burst <= 9'(FIFO_DEPTH)) &&
                         kern_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst       <= C_IDLE;
      busy      <= 1'b0;
      done      <= 1'b0;
      error     <= 1'b0;
      dma_start <= 1'b0;
      rd_words  <= '0;
      wr_words  <= '0;
    end else if (eng_srst) begin
      cst       <= C_IDLE;
      busy      <= 1'b0;
      done      <= 1'b0;
      error     <= 1'b0;
      dma_start <= 1'b0;
    end else begin
      dma_start <= 1'b0;
      unique case (cst)
        C_IDLE: if (start) begin
          done  <= 1'b0;
          error <= !cfg_ok;
          if (cfg_ok) begin
            busy     <= 1'b1;
            rd_words <= 16'(bits_in >> 6);
            wr_words <= 16'((npix_out * 32'(PIX_W) + 32'd63) >> 6);
            cst      <= C_LAUNCH;
          end
        end
        C_LAUNCH: begin
          dma_start <= 1'b1;
          cst       <= C_RUN;
        end
        // a bus error does not abort the bursts in flight: the transfer runs
        // to its end so the shared bus is left clean, then error is reported
        C_RUN: if (rd_done && wr_done && !dma_start) begin
          done  <= !dma_err;
          error <= dma_err;
          busy  <= 1'b0;
          cst   <= C_IDLE;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  // datapath is cleared by the engine reset and at each accepted start
  assign dp_clr = eng_srst || (cst == C_IDLE && start && cfg_ok);

  assign status = '{kern_valid: kern_valid, error: error, done: done, busy: busy};
  assign irq_o  = done || error;

  // ---------------- datapath ----------------
  logic  in_wvalid, in_wready, in_rvalid, in_rready;
  data_t in_wdata, in_rdata;
  logic  res_wvalid, res_wready, res_rvalid, res_rready;
  data_t res_wdata, res_rdata;
  logic [FCW-1:0] res_count;

  conv_dma #(.FIFO_DEPTH(FIFO_DEPTH)) u_dma (
    .clk, .rst_n,
    .clr_i     (dp_clr),
    .start_i   (dma_start),
    .rd_addr_i (cfg.src),
    .rd_words_i(rd_words),
    .wr_addr_i (cfg.dst),
    .wr_words_i(wr_words),
    .burst_i   (cfg.burst),
    .rd_valid_o(in_wvalid),
    .rd_ready_i(in_wready),
    .rd_data_o (in_wdata),
    .wr_valid_i(res_rvalid),
    .wr_ready_o(res_rready),
    .wr_data_i (res_rdata),
    .wr_count_i(res_count),
    .rd_done_o (rd_done),
    .wr_done_o (wr_done),
    .err_o     (dma_err),
    .mem_req_o,
    .mem_rsp_i
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .clr_i(dp_clr),
    .in_valid(in_wvalid), .in_ready(in_wready), .in_data(in_wdata),
    .out_valid(in_rvalid), .out_ready(in_rready), .out_data(in_rdata),
    .count_o()
  );

  logic                         grp_valid, grp_ready;
  logic [NUM_AU-1:0][PIX_W-1:0] grp_pix;

  conv_unpack #(.PIX_W(PIX_W), .NUM_AU(NUM_AU), .DATA_W(DATA_W)) u_unpack (
    .clk, .rst_n, .clr_i(dp_clr),
    .in_valid(in_rvalid), .in_ready(in_rready), .in_data(in_rdata),
    .out_valid(grp_valid), .out_ready(grp_ready), .out_pix(grp_pix)
  );

  logic                                col_valid, col_ready, col_first, col_last;
  logic [2:0][NUM_AU-1:0][PIX_W-1:0]   col_pix;

  line_buffer #(.PIX_W(PIX_W), .NUM_AU(NUM_AU), .MAX_W(MAX_W)) u_lbuf (
    .clk, .rst_n, .clr_i(dp_clr),
    .width_i(cfg.width), .height_i(cfg.height),
    .in_valid(grp_valid), .in_ready(grp_ready), .in_pix(grp_pix),
    .out_valid(col_valid), .out_ready(col_ready), .out_col(col_pix),
    .out_first(col_first), .out_last(col_last)
  );

  logic                         mac_valid, mac_ready, mac_last;
  logic [NUM_AU-1:0][PIX_W-1:0] mac_pix;
  logic [NW-1:0]                mac_n;

  conv_mac #(.LOG_DOMAIN(LOG_DOMAIN), .PIX_W(PIX_W), .NUM_AU(NUM_AU)) u_mac (
    .clk, .rst_n, .clr_i(dp_clr),
    .shift_i(cfg.shift),
    .kern_valid, .kern_coef,
    .in_valid(col_valid), .in_ready(col_ready), .in_col(col_pix),
    .in_first(col_first), .in_last(col_last),
    .out_valid(mac_valid), .out_ready(mac_ready), .out_pix(mac_pix),
    .out_n(mac_n), .out_last(mac_last)
  );

  conv_pack #(.PIX_W(PIX_W), .NUM_AU(NUM_AU), .DATA_W(DATA_W)) u_pack (
    .clk, .rst_n, .clr_i(dp_clr),
    .in_valid(mac_valid), .in_ready(mac_ready), .in_pix(mac_pix),
    .in_n(mac_n), .in_last(mac_last),
    .out_valid(res_wvalid), .out_ready(res_wready), .out_data(res_wdata),
    .out_last()
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_res_fifo (
    .clk, .rst_n, .clr_i(dp_clr),
    .in_valid(res_wvalid), .in_ready(res_wready), .in_data(res_wdata),
    .out_valid(res_rvalid), .out_ready(res_rready), .out_data(res_rdata),
    .count_o(res_count)
  );
endmodule
