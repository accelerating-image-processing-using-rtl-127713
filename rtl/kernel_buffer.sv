// kernel_buffer: holds the 3x3 filter kernel for the MAC.
//
// The CPU writes the nine coefficients one by one through the configuration
// registers (we_i, idx_i, data_i). A bit per tap records which coefficients
// have been written; valid_o rises once all nine are present and stays high
// while the kernel is kept. The kernel has its own soft reset (srst_i) that is
// separate from the engine reset, so several images can be convolved with the
// same kernel without reloading it, as the system description requires.
// ready_o is high until the kernel is complete: a complete kernel is locked
// and further writes are ignored until the kernel soft reset. The MAC reads
// coef_o whenever valid_o is high; it needs no ready of its own because the
// kernel is held, not consumed.
// Coefficient k = 3*row + col multiplies window row `row` (0 = oldest row) and
// column `col` (0 = leftmost). The coefficient width and the "all nine written"
// valid rule are this implementation's choices.
module kernel_buffer
  import conv_pkg::*;
#(
  parameter int unsigned COEF_WIDTH = COEF_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  srst_i,
  input  logic                  we_i,
  input  logic [3:0]            idx_i,
  input  logic [COEF_WIDTH-1:0] data_i,
  output logic                  valid_o,
  output logic                  ready_o,
  output logic [NTAPS-1:0][COEF_WIDTH-1:0] coef_o
);
  logic [NTAPS-1:0] loaded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded <= '0;
      coef_o <= '0;
    end else if (srst_i) begin
      loaded <= '0;
      coef_o <= '0;
    end else if (we_i && ready_o && (idx_i < 4'(NTAPS))) begin
      coef_o[idx_i] <= data_i;
      loaded[idx_i] <= 1'b1;
    end
  end

  assign valid_o = &loaded;
  assign ready_o = !valid_o;
endmodule
