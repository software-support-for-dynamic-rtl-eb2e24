// axil_decoder: AXI4-Lite interconnect from one master (the processor's
// general-purpose port) to NS control slaves.
//
// Slave k owns the 4 KB window BASE + k*0x1000. A write is routed once both
// AW and W are valid from the master; a read once AR is valid. The decoder
// latches the selected slave for the whole transaction (address, data and
// response phase), so one write and one read can be open at the same time,
// each to any slave. An address outside all windows is answered by the
// decoder itself with a DECERR response. Timing: one cycle to decode, then
// the slave's own handshake timing. The window size, the single outstanding
// transaction per direction and the DECERR behaviour are this design's
// choices.
module axil_decoder
  import pr_pkg::*;
#(
  parameter int            NS   = 4,
  parameter logic [AW-1:0] BASE = 32'h4000_0000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output axil_req_t m_req [NS],
  input  axil_rsp_t m_rsp [NS]
);

  localparam int SEL_W = (NS > 1) ? $clog2(NS) : 1;

  function automatic logic decode(input logic [AW-1:0] a, output logic [SEL_W-1:0] sel);
    logic [AW-1:0] off;
    off = a - BASE;
    sel = SEL_W'(off >> 12);
    return (a >= BASE) && ((off >> 12) < AW'(NS));
  endfunction

  typedef enum logic [1:0] {T_IDLE, T_SLAVE, T_ERR} txn_t;
  txn_t wst, rst;
  logic [SEL_W-1:0] wsel, rsel;
  logic aw_done, w_done;
  logic rerr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst     <= T_IDLE;
      rst     <= T_IDLE;
      wsel    <= '0;
      rsel    <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else begin
      // write path
      unique case (wst)
        T_IDLE: if (s_req.awvalid && s_req.wvalid) begin
          logic [SEL_W-1:0] sel;
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          if (decode(s_req.awaddr, sel)) begin
            wsel <= sel;
            wst  <= T_SLAVE;
          end else begin
            wst  <= T_ERR;
          end
        end
        T_SLAVE: begin
          if (s_req.awvalid && m_rsp[wsel].awready) aw_done <= 1'b1;
          if (s_req.wvalid && m_rsp[wsel].wready)   w_done  <= 1'b1;
          if (m_rsp[wsel].bvalid && s_req.bready)   wst     <= T_IDLE;
        end
        T_ERR: if (s_req.bready && aw_done) wst <= T_IDLE;
               else aw_done <= 1'b1;  // AW/W taken in the first T_ERR cycle
        default: wst <= T_IDLE;
      endcase
      // read path
      unique case (rst)
        T_IDLE: if (s_req.arvalid) begin
          logic [SEL_W-1:0] sel;
          if (decode(s_req.araddr, sel)) begin
            rsel <= sel;
            rst  <= T_SLAVE;
          end else begin
            rst  <= T_ERR;
          end
        end
        T_SLAVE: if (m_rsp[rsel].rvalid && s_req.rready) rst <= T_IDLE;
        T_ERR:   if (s_req.rready && rerr_valid) rst <= T_IDLE;
        default: rst <= T_IDLE;
      endcase
    end
  end

  // read error responses go out one cycle after AR is taken
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             rerr_valid <= 1'b0;
    else if (rst == T_ERR)  rerr_valid <= 1'b1;
    else                    rerr_valid <= 1'b0;
  end

  always_comb begin
    s_rsp = '0;
    for (int k = 0; k < NS; k++) begin
      m_req[k] = s_req;
      m_req[k].awvalid = (wst == T_SLAVE) && (wsel == SEL_W'(k)) && s_req.awvalid && !aw_done;
      m_req[k].wvalid  = (wst == T_SLAVE) && (wsel == SEL_W'(k)) && s_req.wvalid && !w_done;
      m_req[k].bready  = (wst == T_SLAVE) && (wsel == SEL_W'(k)) && s_req.bready;
      m_req[k].arvalid = (rst == T_SLAVE) && (rsel == SEL_W'(k)) && s_req.arvalid;
      m_req[k].rready  = (rst == T_SLAVE) && (rsel == SEL_W'(k)) && s_req.rready;
    end
    // write response side
    if (wst == T_SLAVE) begin
      s_rsp.awready = m_rsp[wsel].awready && !aw_done;
      s_rsp.wready  = m_rsp[wsel].wready && !w_done;
      s_rsp.bvalid  = m_rsp[wsel].bvalid;
      s_rsp.bresp   = m_rsp[wsel].bresp;
    end else if (wst == T_ERR) begin
      s_rsp.awready = !aw_done;
      s_rsp.wready  = !aw_done;
      s_rsp.bvalid  = aw_done;
      s_rsp.bresp   = RESP_DECERR;
    end
    // read response side
    if (rst == T_SLAVE) begin
      s_rsp.arready = m_rsp[rsel].arready;
      s_rsp.rvalid  = m_rsp[rsel].rvalid;
      s_rsp.rdata   = m_rsp[rsel].rdata;
      s_rsp.rresp   = m_rsp[rsel].rresp;
    end else if (rst == T_ERR) begin
      s_rsp.arready = !rerr_valid;
      s_rsp.rvalid  = rerr_valid;
      s_rsp.rdata   = '0;
      s_rsp.rresp   = RESP_DECERR;
    end
  end

endmodule
