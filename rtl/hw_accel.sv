// hw_accel: one hardware accelerator with the standard slot interface.
//
// Every accelerator that can be loaded into a reconfigurable slot has the
// same ports, so that any of them fits any slot:
//   - an AXI4-Lite control slave (s_axil_*) with start/done, interrupt
//     control, a read-only identifier and the argument words args[],
//   - an AXI4 master (m_axi_*) through which it reads and writes system memory,
//   - an interrupt line raised when the operation has completed,
//   - an 8-bit state_out port for observing the controller.
// OP selects the operation core placed behind the control registers:
//   OP_SOBEL, OP_BLUR, OP_SHARP: args[0] = source image, args[1] = destination
//   OP_MULT:                     args[0] = A, args[1] = B (column-major), args[2] = C
// The identifier register returns OP. A run is started by writing 1 to CTRL;
// the core then works autonomously on memory and signals completion through
// CTRL.done and, if enabled, the interrupt. The argument assignment above is
// this design's choice.
module hw_accel
  import pr_pkg::*;
#(
  parameter op_id_t OP         = OP_BLUR,
  parameter int     IMG_WIDTH  = IMG_W,
  parameter int     IMG_HEIGHT = IMG_H,
  parameter int     MAT_DIM    = MAT_N
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  output axi_req_t  m_axi_req,
  input  axi_rsp_t  m_axi_rsp,
  output logic      irq,
  output logic [7:0] state_out
);

  logic          core_start, core_busy, core_done;
  logic [DW-1:0] args [ARGS_SIZE];

  acc_ctrl_regs #(.ID(OP)) u_regs (
    .clk, .rst_n, .s_axil_req, .s_axil_rsp,
    .core_start, .core_busy, .core_done, .args, .irq
  );

  if (OP == OP_SOBEL) begin : g_sobel
    sobel_filter #(.IMG_WIDTH(IMG_WIDTH), .IMG_HEIGHT(IMG_HEIGHT)) u_core (
      .clk, .rst_n, .start(core_start), .src(args[0]), .dst(args[1]),
      .busy(core_busy), .done(core_done), .state_out, .m_axi_req, .m_axi_rsp
    );
  end else if (OP == OP_BLUR || OP == OP_SHARP) begin : g_conv
    conv5x5_filter #(.IMG_WIDTH(IMG_WIDTH), .IMG_HEIGHT(IMG_HEIGHT), .KIND(OP)) u_core (
      .clk, .rst_n, .start(core_start), .src(args[0]), .dst(args[1]),
      .busy(core_busy), .done(core_done), .state_out, .m_axi_req, .m_axi_rsp
    );
  end else begin : g_mult
    matrix_mult #(.N(MAT_DIM)) u_core (
      .clk, .rst_n, .start(core_start), .a_addr(args[0]), .b_addr(args[1]), .c_addr(args[2]),
      .busy(core_busy), .done(core_done), .state_out, .m_axi_req, .m_axi_rsp
    );
  end

endmodule
