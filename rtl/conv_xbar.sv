// conv_xbar: crossbar between the CPU, the convolution engines and memory.
//
// Two directions of traffic meet here. The CPU is the master of the engines'
// configuration ports: its AXI4-Lite accesses are routed to engine
// addr[8 +: SELW] (256 bytes per engine; addresses past the last engine go to
// the last one). The engines are masters of memory: their AXI4 bursts share
// the single 64-bit memory port. Read and write channels are arbitrated
// separately and round-robin. The winner of the read channel keeps it from its
// AR handshake until the RLAST handshake; the winner of the write channel keeps
// it from AW until the B handshake. With one burst per direction in flight no
// AXI IDs are needed. On the CPU side one read and one write are in flight at
// a time, in the same way.
// The crossbar and the master/slave roles come from the document's data-path
// figure; the arbitration policy, the address map and the locking are this
// design's. The CPU's own path to memory is not part of this block.
// Assertions check that memory answers only a channel that is owned and that
// a forwarded read address is held until the memory accepts it.
module conv_xbar
  import conv_pkg::*;
#(
  parameter int unsigned N_ENG = 2,
  localparam int unsigned SELW = (N_ENG > 1) ? $clog2(N_ENG) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  // CPU side (AXI4-Lite)
  input  axil_req_t cpu_req_i,
  output axil_rsp_t cpu_rsp_o,
  output axil_req_t eng_cfg_req_o [N_ENG],
  input  axil_rsp_t eng_cfg_rsp_i [N_ENG],
  // memory side (AXI4)
  input  axi_req_t  eng_mem_req_i [N_ENG],
  output axi_rsp_t  eng_mem_rsp_o [N_ENG],
  output axi_req_t  mem_req_o,
  input  axi_rsp_t  mem_rsp_i
);
  function automatic logic [SELW-1:0] decode(input addr_t a);
    logic [SELW-1:0] s = a[8 +: SELW];
    return (int'(s) >= N_ENG) ? SELW'(N_ENG - 1) : s;
  endfunction

  // ---------------- CPU -> engines ----------------
  logic            cw_busy, cr_busy;
  logic [SELW-1:0] cw_sel, cr_sel;

  always_comb begin
    cpu_rsp_o = '0;
    for (int i = 0; i < N_ENG; i++) begin
      eng_cfg_req_o[i] = '0;
      eng_cfg_req_o[i].aw_addr = cpu_req_i.aw_addr;
      eng_cfg_req_o[i].w_data  = cpu_req_i.w_data;
      eng_cfg_req_o[i].w_strb  = cpu_req_i.w_strb;
      eng_cfg_req_o[i].ar_addr = cpu_req_i.ar_addr;
      if (cw_busy && cw_sel == SELW'(i)) begin
        eng_cfg_req_o[i].aw_valid = cpu_req_i.aw_valid;
        eng_cfg_req_o[i].w_valid  = cpu_req_i.w_valid;
        eng_cfg_req_o[i].b_ready  = cpu_req_i.b_ready;
        cpu_rsp_o.aw_ready = eng_cfg_rsp_i[i].aw_ready;
        cpu_rsp_o.w_ready  = eng_cfg_rsp_i[i].w_ready;
        cpu_rsp_o.b_valid  = eng_cfg_rsp_i[i].b_valid;
        cpu_rsp_o.b_resp   = eng_cfg_rsp_i[i].b_resp;
      end
      if (cr_busy && cr_sel == SELW'(i)) begin
        eng_cfg_req_o[i].ar_valid = cpu_req_i.ar_valid;
        eng_cfg_req_o[i].r_ready  = cpu_req_i.r_ready;
        cpu_rsp_o.ar_ready = eng_cfg_rsp_i[i].ar_ready;
        cpu_rsp_o.r_valid  = eng_cfg_rsp_i[i].r_valid;
        cpu_rsp_o.r_data   = eng_cfg_rsp_i[i].r_data;
        cpu_rsp_o.r_resp   = eng_cfg_rsp_i[i].r_resp;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw_busy <= 1'b0;
      cr_busy <= 1'b0;
      cw_sel  <= '0;
      cr_sel  <= '0;
    end else begin
      if (!cw_busy && cpu_req_i.aw_valid) begin
        cw_busy <= 1'b1;
        cw_sel  <= decode(cpu_req_i.aw_addr);
      end else if (cw_busy && cpu_rsp_o.b_valid && cpu_req_i.b_ready) begin
        cw_busy <= 1'b0;
      end
      if (!cr_busy && cpu_req_i.ar_valid) begin
        cr_busy <= 1'b1;
        cr_sel  <= decode(cpu_req_i.ar_addr);
      end else if (cr_busy && cpu_rsp_o.r_valid && cpu_req_i.r_ready) begin
        cr_busy <= 1'b0;
      end
    end
  end

  // ---------------- engines -> memory ----------------
  logic            rd_busy, wr_busy;
  logic [SELW-1:0] rd_gnt, wr_gnt, rd_last, wr_last;
  logic            rd_any, wr_any;
  logic [SELW-1:0] rd_pick, wr_pick;

  // round-robin choice among requesters, starting after the last winner
  always_comb begin
    rd_any  = 1'b0;
    wr_any  = 1'b0;
    rd_pick = '0;
    wr_pick = '0;
    for (int k = N_ENG; k >= 1; k--) begin
      int unsigned ir, iw;
      ir = (int'(rd_last) + k) % N_ENG;
      iw = (int'(wr_last) + k) % N_ENG;
      if (eng_mem_req_i[ir].ar_valid) begin
        rd_any  = 1'b1;
        rd_pick = SELW'(ir);
      end
      if (eng_mem_req_i[iw].aw_valid) begin
        wr_any  = 1'b1;
        wr_pick = SELW'(iw);
      end
    end
  end

  always_comb begin
    mem_req_o = '0;
    for (int i = 0; i < N_ENG; i++) begin
      eng_mem_rsp_o[i] = '0;
      eng_mem_rsp_o[i].r.data = mem_rsp_i.r.data;
      eng_mem_rsp_o[i].r.resp = mem_rsp_i.r.resp;
      eng_mem_rsp_o[i].r.last = mem_rsp_i.r.last;
      eng_mem_rsp_o[i].b_resp = mem_rsp_i.b_resp;
      if (rd_busy && rd_gnt == SELW'(i)) begin
        mem_req_o.ar       = eng_mem_req_i[i].ar;
        mem_req_o.ar_valid = eng_mem_req_i[i].ar_valid;
        mem_req_o.r_ready  = eng_mem_req_i[i].r_ready;
        eng_mem_rsp_o[i].ar_ready = mem_rsp_i.ar_ready;
        eng_mem_rsp_o[i].r_valid  = mem_rsp_i.r_valid;
      end
      if (wr_busy && wr_gnt == SELW'(i)) begin
        mem_req_o.aw       = eng_mem_req_i[i].aw;
        mem_req_o.aw_valid = eng_mem_req_i[i].aw_valid;
        mem_req_o.w        = eng_mem_req_i[i].w;
        mem_req_o.w_valid  = eng_mem_req_i[i].w_valid;
        mem_req_o.b_ready  = eng_mem_req_i[i].b_ready;
        eng_mem_rsp_o[i].aw_ready = mem_rsp_i.aw_ready;
        eng_mem_rsp_o[i].w_ready  = mem_rsp_i.w_ready;
        eng_mem_rsp_o[i].b_valid  = mem_rsp_i.b_valid;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 1'b0;
      wr_busy <= 1'b0;
      rd_gnt  <= '0;
      wr_gnt  <= '0;
      rd_last <= SELW'(N_ENG - 1);
      wr_last <= SELW'(N_ENG - 1);
    end else begin
      if (!rd_busy && rd_any) begin
        rd_busy <= 1'b1;
        rd_gnt  <= rd_pick;
        rd_last <= rd_pick;
      end else if (rd_busy && mem_rsp_i.r_valid && mem_req_o.r_ready && mem_rsp_i.r.last) begin
        rd_busy <= 1'b0;
      end
      if (!wr_busy && wr_any) begin
        wr_busy <= 1'b1;
        wr_gnt  <= wr_pick;
        wr_last <= wr_pick;
      end else if (wr_busy && mem_rsp_i.b_valid && mem_req_o.b_ready) begin
        wr_busy <= 1'b0;
      end
    end
  end

  // Memory must answer only the master that owns the channel, and a forwarded
  // request must stay put until the memory takes it.
  a_r_owned: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_i.r_valid |-> rd_busy);
  a_b_owned: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_i.b_valid |-> wr_busy);
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_o.ar_valid && !mem_rsp_i.ar_ready |=> mem_req_o.ar_valid && $stable(mem_req_o.ar));
endmodule
