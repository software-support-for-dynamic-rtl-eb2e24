// rp_slot: a reconfigurable slot (partition) of the fabric, with the set of
// accelerators that can be loaded into it.
//
// On the device a slot is an area whose configuration is rewritten at run
// time, so that it holds one accelerator at a time. This module models that
// as synthesizable logic: it contains one hw_accel per operation
// (OP_SOBEL .. OP_MULT) and a register `loaded_rm` naming the one that is
// currently "configured". Only that accelerator is out of reset and connected
// to the slot's ports; the others are held in reset with their inputs tied
// off. An empty slot (OP_NONE, the state after power-up) drives nothing.
//
// Reconfiguration: while `pr_active` is high the configuration port is
// rewriting the slot. During that time every accelerator is held in reset and
// the slot's outputs carry no valid data: all its handshake outputs
// (valid/ready) and the interrupt are driven high, as undefined logic in a
// half-written area might, so the static side must ignore them (that is the
// job of pr_decoupler). When `pr_active` falls, `pr_rm` is taken as the new
// contents and the new accelerator stays in reset for RST_CYCLES more cycles
// before it starts. Ports towards the static side are the standard
// accelerator interface of hw_accel. The "all handshakes high" pattern for a
// slot under reconfiguration and the reset length are this design's choices.
module rp_slot
  import pr_pkg::*;
#(
  parameter int IMG_WIDTH  = IMG_W,
  parameter int IMG_HEIGHT = IMG_H,
  parameter int MAT_DIM    = MAT_N,
  parameter int RST_CYCLES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // configuration port side
  input  logic       pr_active,
  input  op_id_t     pr_rm,
  output op_id_t     loaded_rm,
  // standard accelerator interface
  input  axil_req_t  s_axil_req,
  output axil_rsp_t  s_axil_rsp,
  output axi_req_t   m_axi_req,
  input  axi_rsp_t   m_axi_rsp,
  output logic       irq,
  output logic [7:0] state_out
);

  logic [$clog2(RST_CYCLES + 1)-1:0] rst_cnt;
  logic rm_rst_n;
  logic rm_rst_q [1:N_OPS];  // registered per-accelerator reset (active low)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded_rm <= OP_NONE;
      rst_cnt   <= '0;
    end else if (pr_active) begin
      loaded_rm <= pr_rm;
      rst_cnt   <= ($bits(rst_cnt))'(RST_CYCLES);
    end else if (rst_cnt != '0) begin
      rst_cnt <= rst_cnt - 1'b1;
    end
  end

  assign rm_rst_n = !pr_active && (rst_cnt == '0);

  axil_rsp_t  rm_axil_rsp [1:N_OPS];
  axi_req_t   rm_axi_req  [1:N_OPS];
  logic       rm_irq      [1:N_OPS];
  logic [7:0] rm_state    [1:N_OPS];

  for (genvar k = 1; k <= N_OPS; k++) begin : g_rm
    logic sel;
    assign sel = (loaded_rm == op_id_t'(k));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) rm_rst_q[k] <= 1'b0;
      else        rm_rst_q[k] <= rm_rst_n && sel;
    end
    hw_accel #(
      .OP(op_id_t'(k)), .IMG_WIDTH(IMG_WIDTH), .IMG_HEIGHT(IMG_HEIGHT), .MAT_DIM(MAT_DIM)
    ) u_acc (
      .clk,
      .rst_n     (rm_rst_q[k]),
      .s_axil_req(sel ? s_axil_req : '0),
      .s_axil_rsp(rm_axil_rsp[k]),
      .m_axi_req (rm_axi_req[k]),
      .m_axi_rsp (sel ? m_axi_rsp : '0),
      .irq       (rm_irq[k]),
      .state_out (rm_state[k])
    );
  end

  always_comb begin
    s_axil_rsp = '0;
    m_axi_req  = '0;
    irq        = 1'b0;
    state_out  = 8'h00;
    if (pr_active) begin
      // half-configured area: spurious handshakes
      s_axil_rsp.awready = 1'b1;
      s_axil_rsp.wready  = 1'b1;
      s_axil_rsp.bvalid  = 1'b1;
      s_axil_rsp.arready = 1'b1;
      s_axil_rsp.rvalid  = 1'b1;
      m_axi_req.arvalid  = 1'b1;
      m_axi_req.awvalid  = 1'b1;
      m_axi_req.wvalid   = 1'b1;
      irq                = 1'b1;
      state_out          = 8'hFF;
    end else begin
      for (int k = 1; k <= N_OPS; k++) begin
        if (loaded_rm == op_id_t'(k)) begin
          s_axil_rsp = rm_axil_rsp[k];
          m_axi_req  = rm_axi_req[k];
          irq        = rm_irq[k];
          state_out  = rm_state[k];
        end
      end
    end
  end

endmodule
