// conv_cfg_regs: AXI4-Lite register file through which the CPU drives an engine.
//
// The CPU writes the source and destination image addresses, the image width
// and height, the AXI burst size, a result shift and the nine kernel
// coefficients, then writes the start bit. The control register also carries
// the two separate soft resets, one for the engine and one for the kernel
// buffer. The status register reads back busy, done, error and kernel-valid.
// Register map (byte offset within the engine's 256-byte window): 0x00 CTRL
// (write: bit0 start, bit1 engine reset, bit2 kernel reset; these are one-cycle
// pulses), 0x04 STATUS, 0x08 SRC, 0x0C DST, 0x10 WIDTH, 0x14 HEIGHT, 0x18 BURST,
// 0x1C SHIFT, 0x20 + 4*i KERNEL[i] for i = 0..8 (write only, forwarded to the
// kernel buffer). Other offsets answer SLVERR.
// Handshake: a write is taken when AW and W are both valid and no B response is
// pending; the B response follows one cycle later. A read is taken when no R
// response is pending and answered one cycle later. Byte strobes are ignored.
// The set of configuration values, the two soft resets and the use of AXI4-Lite
// are from the document; the map and encodings are this design's.
module conv_cfg_regs
  import conv_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    axil_req_i,
  output axil_rsp_t    axil_rsp_o,
  output conv_cfg_t    cfg_o,
  output logic         start_o,
  output logic         eng_srst_o,
  output logic         kern_srst_o,
  output logic         kern_we_o,
  output logic [3:0]   kern_idx_o,
  output logic [COEF_W-1:0] kern_data_o,
  input  conv_status_t status_i
);
  logic        b_valid, r_valid;
  logic [1:0]  b_resp, r_resp;
  ldata_t      r_data;

  wire        wr_take = axil_req_i.aw_valid && axil_req_i.w_valid && !b_valid;
  wire        rd_take = axil_req_i.ar_valid && !r_valid;
  wire [7:0]  waddr   = axil_req_i.aw_addr[7:0];
  wire [7:0]  raddr   = axil_req_i.ar_addr[7:0];
  wire ldata_t wdata  = axil_req_i.w_data;
  wire        wkern   = (waddr >= REG_KERNEL) && (waddr < REG_KERNEL + 8'(4 * NTAPS)) && (waddr[1:0] == 2'b00);

  always_comb begin
    axil_rsp_o          = '0;
    axil_rsp_o.aw_ready = wr_take;
    axil_rsp_o.w_ready  = wr_take;
    axil_rsp_o.b_valid  = b_valid;
    axil_rsp_o.b_resp   = b_resp;
    axil_rsp_o.ar_ready = rd_take;
    axil_rsp_o.r_valid  = r_valid;
    axil_rsp_o.r_data   = r_data;
    axil_rsp_o.r_resp   = r_resp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_o       <= '0;
      b_valid     <= 1'b0;
      b_resp      <= RESP_OKAY;
      start_o     <= 1'b0;
      eng_srst_o  <= 1'b0;
      kern_srst_o <= 1'b0;
      kern_we_o   <= 1'b0;
      kern_idx_o  <= '0;
      kern_data_o <= '0;
    end else begin
      start_o     <= 1'b0;
      eng_srst_o  <= 1'b0;
      kern_srst_o <= 1'b0;
      kern_we_o   <= 1'b0;
      if (b_valid && axil_req_i.b_ready) b_valid <= 1'b0;
      if (wr_take) begin
        b_valid <= 1'b1;
        b_resp  <= RESP_OKAY;
        if (wkern) begin
          kern_we_o   <= 1'b1;
          kern_idx_o  <= 4'((waddr - REG_KERNEL) >> 2);
          kern_data_o <= wdata[COEF_W-1:0];
        end else begin
          unique case (waddr)
            REG_CTRL: begin
              start_o     <= wdata[0];
              eng_srst_o  <= wdata[1];
              kern_srst_o <= wdata[2];
            end
            REG_SRC:    cfg_o.src    <= wdata;
            REG_DST:    cfg_o.dst    <= wdata;
            REG_WIDTH:  cfg_o.width  <= wdata[15:0];
            REG_HEIGHT: cfg_o.height <= wdata[15:0];
            REG_BURST:  cfg_o.burst  <= wdata[8:0];
            REG_SHIFT:  cfg_o.shift  <= wdata[4:0];
            default:    b_resp <= RESP_SLVERR;
          endcase
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_data  <= '0;
      r_resp  <= RESP_OKAY;
    end else begin
      if (r_valid && axil_req_i.r_ready) r_valid <= 1'b0;
      if (rd_take) begin
        r_valid <= 1'b1;
        r_resp  <= RESP_OKAY;
        unique case (raddr)
          REG_STATUS: r_data <= LDATA_W'(status_i);
          REG_SRC:    r_data <= cfg_o.src;
          REG_DST:    r_data <= cfg_o.dst;
          REG_WIDTH:  r_data <= LDATA_W'(cfg_o.width);
          REG_HEIGHT: r_data <= LDATA_W'(cfg_o.height);
          REG_BURST:  r_data <= LDATA_W'(cfg_o.burst);
          REG_SHIFT:  r_data <= LDATA_W'(cfg_o.shift);
          default: begin
            r_data <= '0;
            r_resp <= RESP_SLVERR;
          end
        endcase
      end
    end
  end
endmodule
