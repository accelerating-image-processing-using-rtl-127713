// conv_dma: the engine's AXI4 master (direct memory access).
//
// Read side: after start_i it fetches rd_words_i 64-bit words from rd_addr_i
// in INCR bursts of burst_i beats (the last burst is shorter when the count is
// not a multiple) and streams the data into the in fifo (rd_valid_o/rd_ready_i;
// RREADY follows the fifo's ready). Write side: it sends wr_words_i words from
// the result fifo to wr_addr_i, also in bursts of burst_i beats. A write burst
// is requested (AW) only once the result fifo holds all its beats
// (wr_count_i), so the engine never holds the shared write channel while
// waiting for results. Each side keeps one burst in flight; the two sides run
// concurrently. A response other than OKAY sets err_o. rd_done_o / wr_done_o
// rise when each side has finished and stay high until the next start or clr_i.
// burst_i must be 1..256 and no larger than the result fifo; the controller
// checks this. DMA and AXI4 bursts come from the document; the burst policy
// and the one-burst-in-flight rule are this design's.
module conv_dma
  import conv_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned FCW       = $clog2(FIFO_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr_i,
  input  logic           start_i,
  input  addr_t          rd_addr_i,
  input  logic [15:0]    rd_words_i,
  input  addr_t          wr_addr_i,
  input  logic [15:0]    wr_words_i,
  input  logic [8:0]     burst_i,
  output logic           rd_valid_o,
  input  logic           rd_ready_i,
  output data_t          rd_data_o,
  input  logic           wr_valid_i,
  output logic           wr_ready_o,
  input  data_t          wr_data_i,
  input  logic [FCW-1:0] wr_count_i,
  output logic           rd_done_o,
  output logic           wr_done_o,
  output logic           err_o,
  output axi_req_t       mem_req_o,
  input  axi_rsp_t       mem_rsp_i
);
  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA, S_RESP} state_e;

  state_e      rd_st, wr_st;
  addr_t       rd_ptr, wr_ptr;
  logic [15:0] rd_left, wr_left;
  logic [8:0]  wr_beat;
  logic [8:0]  rd_blen, wr_blen;

  assign rd_blen = (rd_left < 16'(burst_i)) ? rd_left[8:0] : burst_i;
  assign wr_blen = (wr_left < 16'(burst_i)) ? wr_left[8:0] : burst_i;

  // ---------------- AXI request ----------------
  always_comb begin
    mem_req_o          = '0;
    mem_req_o.ar.addr  = rd_ptr;
    mem_req_o.ar.len   = 8'(rd_blen - 9'd1);
    mem_req_o.ar.size  = 3'd3;
    mem_req_o.ar.burst = BURST_INCR;
    mem_req_o.ar_valid = (rd_st == S_ADDR);
    mem_req_o.r_ready  = (rd_st == S_DATA) && rd_ready_i;
    mem_req_o.aw.addr  = wr_ptr;
    mem_req_o.aw.len   = 8'(wr_blen - 9'd1);
    mem_req_o.aw.size  = 3'd3;
    mem_req_o.aw.burst = BURST_INCR;
    mem_req_o.aw_valid = (wr_st == S_ADDR) && (16'(wr_count_i) >= 16'(wr_blen));
    mem_req_o.w.data   = wr_data_i;
    mem_req_o.w.strb   = '1;
    mem_req_o.w.last   = (wr_beat == wr_blen - 9'd1);
    mem_req_o.w_valid  = (wr_st == S_DATA) && wr_valid_i;
    mem_req_o.b_ready  = (wr_st == S_RESP);
  end

  assign rd_valid_o = (rd_st == S_DATA) && mem_rsp_i.r_valid;
  assign rd_data_o  = mem_rsp_i.r.data;
  assign wr_ready_o = (wr_st == S_DATA) && mem_rsp_i.w_ready;

  // ---------------- read side ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_st     <= S_IDLE;
      rd_ptr    <= '0;
      rd_left   <= '0;
      rd_done_o <= 1'b0;
    end else if (clr_i) begin
      rd_st     <= S_IDLE;
      rd_done_o <= 1'b0;
    end else begin
      unique case (rd_st)
        S_IDLE: if (start_i) begin
          rd_ptr    <= rd_addr_i;
          rd_left   <= rd_words_i;
          rd_done_o <= (rd_words_i == '0);
          rd_st     <= (rd_words_i == '0) ? S_IDLE : S_ADDR;
        end
        S_ADDR: if (mem_rsp_i.ar_ready) rd_st <= S_DATA;
        S_DATA: if (mem_rsp_i.r_valid && rd_ready_i && mem_rsp_i.r.last) begin
          rd_ptr  <= rd_ptr + (ADDR_W'(rd_blen) << 3);
          rd_left <= rd_left - 16'(rd_blen);
          if (rd_left == 16'(rd_blen)) begin
            rd_st     <= S_IDLE;
            rd_done_o <= 1'b1;
          end else begin
            rd_st <= S_ADDR;
          end
        end
        default: rd_st <= S_IDLE;
      endcase
    end
  end

  // ---------------- write side ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_st     <= S_IDLE;
      wr_ptr    <= '0;
      wr_left   <= '0;
      wr_beat   <= '0;
      wr_done_o <= 1'b0;
    end else if (clr_i) begin
      wr_st     <= S_IDLE;
      wr_done_o <= 1'b0;
    end else begin
      unique case (wr_st)
        S_IDLE: if (start_i) begin
          wr_ptr    <= wr_addr_i;
          wr_left   <= wr_words_i;
          wr_beat   <= '0;
          wr_done_o <= (wr_words_i == '0);
          wr_st     <= (wr_words_i == '0) ? S_IDLE : S_ADDR;
        end
        S_ADDR: if (mem_req_o.aw_valid && mem_rsp_i.aw_ready) begin
          wr_beat <= '0;
          wr_st   <= S_DATA;
        end
        S_DATA: if (wr_valid_i && mem_rsp_i.w_ready) begin
          wr_beat <= wr_beat + 9'd1;
          if (mem_req_o.w.last) wr_st <= S_RESP;
        end
        S_RESP: if (mem_rsp_i.b_valid) begin
          wr_ptr  <= wr_ptr + (ADDR_W'(wr_blen) << 3);
          wr_left <= wr_left - 16'(wr_blen);
          if (wr_left == 16'(wr_blen)) begin
            wr_st     <= S_IDLE;
            wr_done_o <= 1'b1;
          end else begin
            wr_st <= S_ADDR;
          end
        end
        default: wr_st <= S_IDLE;
      endcase
    end
  end

  // ---------------- bus errors ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        err_o <= 1'b0;
    else if (clr_i)    err_o <= 1'b0;
    else if (start_i && rd_st == S_IDLE && wr_st == S_IDLE) err_o <= 1'b0;
    else if ((rd_st == S_DATA && mem_rsp_i.r_valid && rd_ready_i && mem_rsp_i.r.resp != RESP_OKAY) ||
             (wr_st == S_RESP && mem_rsp_i.b_valid && mem_rsp_i.b_resp != RESP_OKAY))
      err_o <= 1'b1;
  end

  // AXI rule: an address stays valid until it is accepted
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n || clr_i)
    mem_req_o.ar_valid && !mem_rsp_i.ar_ready |=> mem_req_o.ar_valid);
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n || clr_i)
    mem_req_o.aw_valid && !mem_rsp_i.aw_ready |=> mem_req_o.aw_valid);
endmodule
