// acc_ctrl_regs: AXI4-Lite control slave of an accelerator.
//
// Holds the registers through which the processor drives an accelerator:
// a start/done/idle control word, interrupt enables and status, a read-only
// identifier that tells the software which accelerator is loaded in a slot,
// and ARGS_SIZE 32-bit argument words (typically the memory addresses of the
// input and output data). Register map (byte offsets, see pr_pkg):
//   0x00 CTRL  w: bit0=1 starts the core when idle
//              r: bit0 start pending, bit1 done (cleared by this read),
//                 bit2 idle, bit3 ready
//   0x04 GIE   bit0 global interrupt enable
//   0x08 IER   bit0 enable of the "done" interrupt
//   0x0C ISR   bit0 "done" interrupt status, writing 1 toggles it
//   0x10 ID    accelerator identifier (parameter ID), read only
//   0x20+4k    args[k], read/write
// `irq` is GIE & ISR[0]: it rises when the core finishes and stays until the
// software clears ISR. `core_start` is a one-cycle pulse; the core reports
// completion with a one-cycle `core_done` pulse and `core_busy` in between.
// Timing: one write or one read transaction at a time; a write is taken when
// AW and W are both valid, and its B response follows one cycle later; a read
// answers one cycle after AR. The register layout is this design's choice,
// modelled on the usual layout of generated accelerator control ports.
module acc_ctrl_regs
  import pr_pkg::*;
#(
  parameter logic [7:0] ID = 8'h00
) (
  input  logic            clk,
  input  logic            rst_n,
  input  axil_req_t       s_axil_req,
  output axil_rsp_t       s_axil_rsp,
  output logic            core_start,
  input  logic            core_busy,
  input  logic            core_done,
  output logic [DW-1:0]   args [ARGS_SIZE],
  output logic            irq
);

  logic start_req, done_flag, gie, ier, isr;
  logic bvalid, rvalid;
  logic [DW-1:0] rdata;
  logic idle;
  logic wr_en, rd_en;
  logic [7:0] waddr, raddr;
  logic [7:0] widx, ridx;   // argument word index of the write / read address

  localparam int AI_W = (ARGS_SIZE > 1) ? $clog2(ARGS_SIZE) : 1;
  assign widx = (waddr - REG_ARGS) >> 2;
  assign ridx = (raddr - REG_ARGS) >> 2;

  assign idle  = !core_busy && !start_req;
  assign wr_en = s_axil_req.awvalid && s_axil_req.wvalid && !bvalid;
  assign rd_en = s_axil_req.arvalid && !rvalid;
  assign waddr = s_axil_req.awaddr[7:0];
  assign raddr = s_axil_req.araddr[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_req <= 1'b0;
      done_flag <= 1'b0;
      gie       <= 1'b0;
      ier       <= 1'b0;
      isr       <= 1'b0;
      bvalid    <= 1'b0;
      rvalid    <= 1'b0;
      rdata     <= '0;
      for (int k = 0; k < ARGS_SIZE; k++) args[k] <= '0;
    end else begin
      // the core takes the start request in the cycle it is presented
      if (start_req) start_req <= 1'b0;

      if (core_done) begin
        done_flag <= 1'b1;
        if (ier) isr <= 1'b1;
      end

      // write channel
      if (wr_en) begin
        bvalid <= 1'b1;
        if (waddr == REG_CTRL) begin
          if (s_axil_req.wdata[0] && idle) start_req <= 1'b1;
        end else if (waddr == REG_GIE) begin
          gie <= s_axil_req.wdata[0];
        end else if (waddr == REG_IER) begin
          ier <= s_axil_req.wdata[0];
        end else if (waddr == REG_ISR) begin
          if (s_axil_req.wdata[0]) isr <= !isr;
        end else if (waddr >= REG_ARGS && waddr < REG_ARGS + 8'(4 * ARGS_SIZE)) begin
          args[widx[AI_W-1:0]] <= s_axil_req.wdata;
        end
      end else if (bvalid && s_axil_req.bready) begin
        bvalid <= 1'b0;
      end

      // read channel
      if (rd_en) begin
        rvalid <= 1'b1;
        rdata  <= '0;
        if (raddr == REG_CTRL) begin
          rdata     <= {28'b0, idle, idle, done_flag, start_req};
          done_flag <= core_done;  // clear on read, unless a new completion arrives now
        end else if (raddr == REG_GIE) begin
          rdata <= {31'b0, gie};
        end else if (raddr == REG_IER) begin
          rdata <= {31'b0, ier};
        end else if (raddr == REG_ISR) begin
          rdata <= {31'b0, isr};
        end else if (raddr == REG_ID) begin
          rdata <= {24'b0, ID};
        end else if (raddr >= REG_ARGS && raddr < REG_ARGS + 8'(4 * ARGS_SIZE)) begin
          rdata <= args[ridx[AI_W-1:0]];
        end
      end else if (rvalid && s_axil_req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    s_axil_rsp         = '0;
    s_axil_rsp.awready = wr_en;
    s_axil_rsp.wready  = wr_en;
    s_axil_rsp.bvalid  = bvalid;
    s_axil_rsp.bresp   = RESP_OKAY;
    s_axil_rsp.arready = rd_en;
    s_axil_rsp.rvalid  = rvalid;
    s_axil_rsp.rdata   = rdata;
    s_axil_rsp.rresp   = RESP_OKAY;
  end

  assign core_start = start_req;
  assign irq        = gie && isr;

  // AXI4-Lite handshake rules on the response channels
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid && !s_axil_req.bready |=> bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid && !s_axil_req.rready |=> rvalid && $stable(rdata));

endmodule
