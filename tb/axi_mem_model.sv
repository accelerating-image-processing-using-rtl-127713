// axi_mem_model: behavioural AXI4 memory for simulation only (not synthesizable
// intent; stands in for the SoC memory banks).
//
// 64-bit words, WORDS deep, byte address = 8 * word index. Serves one read
// burst and one write burst at a time (INCR bursts only). With STALL_PCT > 0
// every ready/valid it drives is withheld at random in that share of cycles,
// so the masters see back-pressure. Accesses at or past WORDS*8 get SLVERR.
// stall_pct may be changed during simulation. stall_cnt counts cycles in which it withheld a ready or valid.
module axi_mem_model
  import conv_pkg::*;
#(
  parameter int unsigned WORDS     = 4096,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t req_i,
  output axi_rsp_t rsp_o
);
  data_t mem [WORDS];
  int unsigned stall_cnt = 0;
  int unsigned stall_pct = STALL_PCT;  // may be changed at run time

  logic        rd_act, wr_act, b_pend;
  addr_t       rd_addr, wr_addr;
  logic [8:0]  rd_left;
  logic [1:0]  wr_err;
  logic        st_ar, st_r, st_aw, st_w;

  function automatic bit in_range(addr_t a);
    return (a >> 3) < WORDS;
  endfunction

  always_ff @(posedge clk) begin
    st_ar <= ($urandom_range(99) < stall_pct);
    st_r  <= ($urandom_range(99) < stall_pct);
    st_aw <= ($urandom_range(99) < stall_pct);
    st_w  <= ($urandom_range(99) < stall_pct);
    if (st_ar || st_r || st_aw || st_w) stall_cnt <= stall_cnt + 1;
  end

  always_comb begin
    rsp_o          = '0;
    rsp_o.ar_ready = !rd_act && !st_ar;
    rsp_o.r_valid  = rd_act && !st_r;
    rsp_o.r.data   = in_range(rd_addr) ? mem[rd_addr >> 3] : '0;
    rsp_o.r.resp   = in_range(rd_addr) ? RESP_OKAY : RESP_SLVERR;
    rsp_o.r.last   = (rd_left == 9'd1);
    rsp_o.aw_ready = !wr_act && !b_pend && !st_aw;
    rsp_o.w_ready  = wr_act && !st_w;
    rsp_o.b_valid  = b_pend;
    rsp_o.b_resp   = wr_err;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act <= 1'b0; wr_act <= 1'b0; b_pend <= 1'b0;
      rd_addr <= '0; wr_addr <= '0; rd_left <= '0; wr_err <= RESP_OKAY;
    end else begin
      if (req_i.ar_valid && rsp_o.ar_ready) begin
        rd_act  <= 1'b1;
        rd_addr <= req_i.ar.addr;
        rd_left <= 9'(req_i.ar.len) + 9'd1;
      end else if (rsp_o.r_valid && req_i.r_ready) begin
        rd_addr <= rd_addr + 8;
        rd_left <= rd_left - 9'd1;
        if (rd_left == 9'd1) rd_act <= 1'b0;
      end
      if (req_i.aw_valid && rsp_o.aw_ready) begin
        wr_act  <= 1'b1;
        wr_addr <= req_i.aw.addr;
        wr_err  <= RESP_OKAY;
      end else if (req_i.w_valid && rsp_o.w_ready) begin
        if (in_range(wr_addr)) begin
          for (int b = 0; b < 8; b++)
            if (req_i.w.strb[b]) mem[wr_addr >> 3][8*b +: 8] <= req_i.w.data[8*b +: 8];
        end else begin
          wr_err <= RESP_SLVERR;
        end
        wr_addr <= wr_addr + 8;
        if (req_i.w.last) begin
          wr_act <= 1'b0;
          b_pend <= 1'b1;
        end
      end
      if (b_pend && req_i.b_ready) b_pend <= 1'b0;
    end
  end
endmodule
