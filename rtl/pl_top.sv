// pl_top: programmable-logic side of the reconfigurable accelerator system.
//
// The fabric is split into a static region and N_SLOTS reconfigurable slots.
// Each slot holds one hardware accelerator at a time, chosen at run time by
// rewriting the slot through the configuration port; every accelerator
// offers the same interface (AXI4-Lite control, AXI4 memory master,
// interrupt), so any of them fits any slot. The static region contains:
//   - the control interconnect (axil_decoder) from the processor's
//     general-purpose AXI port to the control registers of every slot and of
//     every decoupler,
//   - one pr_decoupler per slot, which cuts the slot off while it is being
//     rewritten.
// Each slot's memory master goes out on its own high-performance port
// (m_axi_hp[k]) towards the shared system memory, and its interrupt on irq[k].
//
// Control address map (byte addresses):
//   BASE + k*0x1000             accelerator control registers of slot k
//   BASE + (N_SLOTS+k)*0x1000   decoupler of slot k (0x0 bit0 = decouple)
//
// Reconfiguration of slot k, as done by the processor:
//   1. set the decoupler of slot k,
//   2. the configuration port rewrites the slot: pr_active[k] high, then low
//      with pr_rm[k] naming the accelerator now in the slot,
//   3. clear the decoupler; the new accelerator can be programmed and started.
// The configuration port itself (bitstream DMA and configuration access port)
// belongs to the processor side and is outside this module: pr_active/pr_rm
// are its outputs. Default sizes: two slots, 800x600 images, 512x512
// matrices. The address map is this design's choice.
module pl_top
  import pr_pkg::*;
#(
  parameter int            N_SLOTS    = 2,
  parameter int            IMG_WIDTH  = IMG_W,
  parameter int            IMG_HEIGHT = IMG_H,
  parameter int            MAT_DIM    = MAT_N,
  parameter logic [AW-1:0] GP_BASE    = 32'h4000_0000
) (
  input  logic       clk,
  input  logic       rst_n,
  // general-purpose AXI port from the processor (control)
  input  axil_req_t  s_axil_gp_req,
  output axil_rsp_t  s_axil_gp_rsp,
  // high-performance AXI ports to system memory, one per slot
  output axi_req_t   m_axi_hp_req [N_SLOTS],
  input  axi_rsp_t   m_axi_hp_rsp [N_SLOTS],
  // interrupts to the processor
  output logic       irq          [N_SLOTS],
  // configuration port
  input  logic       pr_active    [N_SLOTS],
  input  op_id_t     pr_rm        [N_SLOTS],
  // observation
  output op_id_t     loaded_rm    [N_SLOTS],
  output logic       decoupled    [N_SLOTS],
  output logic [7:0] state_out    [N_SLOTS]
);

  axil_req_t dec_req [2*N_SLOTS];
  axil_rsp_t dec_rsp [2*N_SLOTS];

  axil_decoder #(.NS(2 * N_SLOTS), .BASE(GP_BASE)) u_ic (
    .clk, .rst_n,
    .s_req(s_axil_gp_req), .s_rsp(s_axil_gp_rsp),
    .m_req(dec_req), .m_rsp(dec_rsp)
  );

  for (genvar k = 0; k < N_SLOTS; k++) begin : g_slot
    axil_req_t rm_axil_req;
    axil_rsp_t rm_axil_rsp;
    axi_req_t  rm_axi_req;
    axi_rsp_t  rm_axi_rsp;
    logic      rm_irq;

    pr_decoupler u_dec (
      .clk, .rst_n,
      .s_ctrl_req(dec_req[N_SLOTS + k]), .s_ctrl_rsp(dec_rsp[N_SLOTS + k]),
      .decouple(decoupled[k]),
      .s_axil_req(dec_req[k]), .s_axil_rsp(dec_rsp[k]),
      .m_axi_req(m_axi_hp_req[k]), .m_axi_rsp(m_axi_hp_rsp[k]),
      .irq(irq[k]),
      .rm_axil_req, .rm_axil_rsp, .rm_axi_req, .rm_axi_rsp, .rm_irq
    );

    rp_slot #(
      .IMG_WIDTH(IMG_WIDTH), .IMG_HEIGHT(IMG_HEIGHT), .MAT_DIM(MAT_DIM)
    ) u_slot (
      .clk, .rst_n,
      .pr_active(pr_active[k]), .pr_rm(pr_rm[k]), .loaded_rm(loaded_rm[k]),
      .s_axil_req(rm_axil_req), .s_axil_rsp(rm_axil_rsp),
      .m_axi_req(rm_axi_req), .m_axi_rsp(rm_axi_rsp),
      .irq(rm_irq), .state_out(state_out[k])
    );
  end

endmodule
