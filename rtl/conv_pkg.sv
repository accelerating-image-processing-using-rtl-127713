// conv_pkg: types and constants shared by the convolution engines.
//
// Holds the AXI4 (64-bit data, memory side) and AXI4-Lite (32-bit data, CPU
// side) channel bundles as packed structs, the engine configuration and status
// structs, and the register map of an engine. The bus widths (32-bit CPU
// channel, 64-bit memory channel) follow the system description; the register
// map, the struct layouts and the absence of AXI IDs are choices of this
// implementation (the crossbar keeps one burst in flight per direction, so IDs
// are not needed).
package conv_pkg;

  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned DATA_W  = 64;  // memory channel
  localparam int unsigned LDATA_W = 32;  // CPU (AXI4-Lite) channel
  localparam int unsigned STRB_W  = DATA_W / 8;

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [LDATA_W-1:0] ldata_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] BURST_INCR  = 2'b01;

  // AXI4 address channel (AR or AW)
  typedef struct packed {
    addr_t       addr;
    logic [7:0]  len;    // beats - 1
    logic [2:0]  size;   // log2(bytes per beat)
    logic [1:0]  burst;
  } axi_ax_t;

  typedef struct packed {
    data_t             data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } axi_w_t;

  typedef struct packed {
    data_t      data;
    logic [1:0] resp;
    logic       last;
  } axi_r_t;

  // AXI4 master -> slave
  typedef struct packed {
    axi_ax_t aw;
    logic    aw_valid;
    axi_w_t  w;
    logic    w_valid;
    logic    b_ready;
    axi_ax_t ar;
    logic    ar_valid;
    logic    r_ready;
  } axi_req_t;

  // AXI4 slave -> master
  typedef struct packed {
    logic       aw_ready;
    logic       w_ready;
    logic [1:0] b_resp;
    logic       b_valid;
    logic       ar_ready;
    axi_r_t     r;
    logic       r_valid;
  } axi_rsp_t;

  // AXI4-Lite master -> slave
  typedef struct packed {
    addr_t       aw_addr;
    logic        aw_valid;
    ldata_t      w_data;
    logic [3:0]  w_strb;
    logic        w_valid;
    logic        b_ready;
    addr_t       ar_addr;
    logic        ar_valid;
    logic        r_ready;
  } axil_req_t;

  // AXI4-Lite slave -> master
  typedef struct packed {
    logic        aw_ready;
    logic        w_ready;
    logic [1:0]  b_resp;
    logic        b_valid;
    logic        ar_ready;
    ldata_t      r_data;
    logic [1:0]  r_resp;
    logic        r_valid;
  } axil_rsp_t;

  // Register map of one engine (byte offsets within its 256-byte window)
  localparam logic [7:0] REG_CTRL   = 8'h00; // W: bit0 start, bit1 engine reset, bit2 kernel reset
  localparam logic [7:0] REG_STATUS = 8'h04; // R: bit0 busy, bit1 done, bit2 error, bit3 kernel valid
  localparam logic [7:0] REG_SRC    = 8'h08; // source image byte address
  localparam logic [7:0] REG_DST    = 8'h0C; // result image byte address
  localparam logic [7:0] REG_WIDTH  = 8'h10; // image width in pixels
  localparam logic [7:0] REG_HEIGHT = 8'h14; // image height in pixels
  localparam logic [7:0] REG_BURST  = 8'h18; // AXI burst size in beats
  localparam logic [7:0] REG_SHIFT  = 8'h1C; // right shift applied to each sum
  localparam logic [7:0] REG_KERNEL = 8'h20; // 9 coefficients at 0x20..0x40

  localparam int unsigned NTAPS  = 9;   // 3x3 kernel
  localparam int unsigned COEF_W = 8;

  typedef struct packed {
    addr_t       src;
    addr_t       dst;
    logic [15:0] width;
    logic [15:0] height;
    logic [8:0]  burst;
    logic [4:0]  shift;
  } conv_cfg_t;

  typedef struct packed {
    logic kern_valid;
    logic error;
    logic done;
    logic busy;
  } conv_status_t;

endpackage
