// pr_decoupler: isolates one reconfigurable slot from the static region.
//
// While a slot is being rewritten its outputs are meaningless, and the static
// side must not act on them. The decoupler sits on every signal crossing the
// slot boundary. When `decouple` is set it forces to zero every handshake
// signal (VALID and READY) in both directions on the slot's AXI4-Lite
// control port and AXI4 memory port, and the interrupt; data and address
// fields pass unchanged because without a VALID they carry nothing. When
// `decouple` is clear all signals pass straight through, with no added
// latency.
//
// `decouple` is a register written by the processor over its own AXI4-Lite
// port (s_ctrl_*): offset 0x0, bit0 = decouple (reads back the same bit).
// It resets to 1, so an empty slot starts isolated. A transaction that is
// open when decoupling is switched on is cut off; software decouples only an
// idle slot. The register layout and the reset value are this design's
// choices.
module pr_decoupler
  import pr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // control port
  input  axil_req_t s_ctrl_req,
  output axil_rsp_t s_ctrl_rsp,
  output logic      decouple,
  // static side
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  output axi_req_t  m_axi_req,
  input  axi_rsp_t  m_axi_rsp,
  output logic      irq,
  // slot side
  output axil_req_t rm_axil_req,
  input  axil_rsp_t rm_axil_rsp,
  input  axi_req_t  rm_axi_req,
  output axi_rsp_t  rm_axi_rsp,
  input  logic      rm_irq
);

  // ---- control register ----
  logic bvalid, rvalid, wr_en, rd_en;

  assign wr_en = s_ctrl_req.awvalid && s_ctrl_req.wvalid && !bvalid;
  assign rd_en = s_ctrl_req.arvalid && !rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decouple <= 1'b1;
      bvalid   <= 1'b0;
      rvalid   <= 1'b0;
    end else begin
      if (wr_en) begin
        bvalid <= 1'b1;
        if (s_ctrl_req.awaddr[3:0] == 4'h0) decouple <= s_ctrl_req.wdata[0];
      end else if (bvalid && s_ctrl_req.bready) begin
        bvalid <= 1'b0;
      end
      if (rd_en)                            rvalid <= 1'b1;
      else if (rvalid && s_ctrl_req.rready) rvalid <= 1'b0;
    end
  end

  always_comb begin
    s_ctrl_rsp         = '0;
    s_ctrl_rsp.awready = wr_en;
    s_ctrl_rsp.wready  = wr_en;
    s_ctrl_rsp.bvalid  = bvalid;
    s_ctrl_rsp.arready = rd_en;
    s_ctrl_rsp.rvalid  = rvalid;
    s_ctrl_rsp.rdata   = {31'b0, decouple};
  end

  // ---- isolation ----
  always_comb begin
    rm_axil_req = s_axil_req;
    s_axil_rsp  = rm_axil_rsp;
    m_axi_req   = rm_axi_req;
    rm_axi_rsp  = m_axi_rsp;
    irq         = rm_irq;
    if (decouple) begin
      rm_axil_req.awvalid = 1'b0;
      rm_axil_req.wvalid  = 1'b0;
      rm_axil_req.bready  = 1'b0;
      rm_axil_req.arvalid = 1'b0;
      rm_axil_req.rready  = 1'b0;
      s_axil_rsp.awready  = 1'b0;
      s_axil_rsp.wready   = 1'b0;
      s_axil_rsp.bvalid   = 1'b0;
      s_axil_rsp.arready  = 1'b0;
      s_axil_rsp.rvalid   = 1'b0;
      m_axi_req.arvalid   = 1'b0;
      m_axi_req.rready    = 1'b0;
      m_axi_req.awvalid   = 1'b0;
      m_axi_req.wvalid    = 1'b0;
      m_axi_req.bready    = 1'b0;
      rm_axi_rsp.arready  = 1'b0;
      rm_axi_rsp.rvalid   = 1'b0;
      rm_axi_rsp.awready  = 1'b0;
      rm_axi_rsp.wready   = 1'b0;
      rm_axi_rsp.bvalid   = 1'b0;
      irq                 = 1'b0;
    end
  end

endmodule
