// conv5x5_filter: blur or sharpen filter for 24-bit RGB images held in
// system memory, built as a bus-master accelerator core.
//
// Operation (follows the line-by-line scheme of the filter description):
// each image line is read from memory into a 5-line circular window buffer,
// then the 5x5 kernel is slid along the line, one output pixel per cycle, into
// a one-line output buffer, which is finally written back to memory. Output
// pixel (x,y) is the causal discrete convolution
//   sum_{i,j=0..4} F[x-i, y-j] * K[i,j]
// computed per colour channel, divided by the kernel sum, and clamped to
// 0..255. Pixels outside the image (x-i < 0 or y-j < 0) count as zero, which
// is what pre-filling the window buffer with zeros gives.
//   KIND = OP_BLUR : K is all ones ("blur box"), kernel sum 25.
//   KIND = OP_SHARP: K has -1 on the outer ring, 2 on the inner ring and 8 in
//                    the centre, kernel sum 8.
// The blur variant needs no multipliers: with unit weights the tap products
// reduce to plain additions.
//
// Interface: `start` pulse with `src`/`dst` byte addresses (word aligned,
// one pixel per 32-bit word as {8'h00,R,G,B}); `done` pulses at the end;
// `busy` is high in between. Memory is reached through the AXI4 master
// bundle `m_axi_req`/`m_axi_rsp`. `state_out` shows the controller state.
// Timing per line: one read burst sequence of IMG_W words, IMG_W compute
// cycles, one write burst sequence of IMG_W words.
// The zero-padded causal window, the divide-then-clamp order and the pixel
// word format are this design's choices.
module conv5x5_filter
  import pr_pkg::*;
#(
  parameter int     IMG_WIDTH  = IMG_W,
  parameter int     IMG_HEIGHT = IMG_H,
  parameter op_id_t KIND       = OP_BLUR
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] src,
  input  logic [AW-1:0] dst,
  output logic          busy,
  output logic          done,
  output logic [7:0]    state_out,
  output axi_req_t      m_axi_req,
  input  axi_rsp_t      m_axi_rsp
);

  localparam int K     = 5;
  localparam int CNT_W = 20;
  localparam int X_W   = $clog2(IMG_WIDTH + 1);
  localparam int Y_W   = $clog2(IMG_HEIGHT + 1);
  localparam int KSUM  = (KIND == OP_SHARP) ? 8 : 25;

  initial begin
    assert (KIND == OP_BLUR || KIND == OP_SHARP)
      else $error("conv5x5_filter: KIND must be OP_BLUR or OP_SHARP");
  end

  // kernel weight for window row r (0 = newest line) and column c (0 = newest column)
  function automatic int weight(int r, int c);
    if (KIND == OP_BLUR) return 1;
    if (r == 2 && c == 2) return 8;
    if (r >= 1 && r <= 3 && c >= 1 && c <= 3) return 2;
    return -1;
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_RD_GO, S_RD, S_CMP, S_WR_GO, S_WR, S_NEXT} state_t;
  state_t state;

  logic [23:0] lbuf [K][IMG_WIDTH];   // window buffer: last K lines
  logic [23:0] obuf [IMG_WIDTH];      // output line buffer
  logic [23:0] win  [K][1:K-1];       // previous K-1 columns of the window

  logic [X_W-1:0] x;
  logic [Y_W-1:0] y;
  logic [2:0]     cur_slot;           // lbuf line holding line y
  logic [AW-1:0]  src_line, dst_line;

  // reader / writer
  logic             rd_start, rd_busy, rd_done, rd_valid;
  logic [DW-1:0]    rd_data;
  logic [CNT_W-1:0] rd_idx;
  logic             wr_start, wr_busy, wr_done, wr_err;
  logic [CNT_W-1:0] wr_idx;
  logic [DW-1:0]    wr_data;

  axi_burst_reader #(.CNT_W(CNT_W)) u_rd (
    .clk, .rst_n, .start(rd_start), .addr(src_line), .nwords(CNT_W'(IMG_WIDTH)),
    .busy(rd_busy), .done(rd_done),
    .out_valid(rd_valid), .out_data(rd_data), .out_idx(rd_idx),
    .araddr(m_axi_req.araddr), .arlen(m_axi_req.arlen), .arvalid(m_axi_req.arvalid),
    .arready(m_axi_rsp.arready), .rdata(m_axi_rsp.rdata), .rlast(m_axi_rsp.rlast),
    .rvalid(m_axi_rsp.rvalid), .rready(m_axi_req.rready)
  );

  axi_burst_writer #(.CNT_W(CNT_W)) u_wr (
    .clk, .rst_n, .start(wr_start), .addr(dst_line), .nwords(CNT_W'(IMG_WIDTH)),
    .busy(wr_busy), .done(wr_done), .err(wr_err),
    .buf_idx(wr_idx), .buf_data(wr_data),
    .awaddr(m_axi_req.awaddr), .awlen(m_axi_req.awlen), .awvalid(m_axi_req.awvalid),
    .awready(m_axi_rsp.awready), .wdata(m_axi_req.wdata), .wstrb(m_axi_req.wstrb),
    .wlast(m_axi_req.wlast), .wvalid(m_axi_req.wvalid), .wready(m_axi_rsp.wready),
    .bresp(m_axi_rsp.bresp), .bvalid(m_axi_rsp.bvalid), .bready(m_axi_req.bready)
  );

  assign wr_data  = {8'h00, obuf[wr_idx[X_W-1:0]]};
  assign rd_start = (state == S_RD_GO);
  assign wr_start = (state == S_WR_GO);

  // newest column of the window: lines y, y-1, .. y-4 at column x
  logic [23:0] newcol [K];
  always_comb begin
    for (int r = 0; r < K; r++) begin
      logic [2:0] slot;
      slot = (cur_slot >= 3'(r)) ? cur_slot - 3'(r) : cur_slot + 3'(K - r);
      newcol[r] = (32'(y) >= r) ? lbuf[slot][x] : 24'h0;
    end
  end

  // weighted sum and normalisation, per channel
  logic [23:0] pix_out;
  always_comb begin
    for (int ch = 0; ch < 3; ch++) begin
      logic signed [15:0] acc;
      logic [7:0]         p;
      logic signed [15:0] q;
      acc = '0;
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K; c++) begin
          p = (c == 0) ? newcol[r][ch*8 +: 8] : win[r][c][ch*8 +: 8];
          acc = acc + 16'(weight(r, c)) * $signed({8'h00, p});
        end
      end
      q = acc / 16'(KSUM);
      if (acc <= 0)         pix_out[ch*8 +: 8] = 8'd0;
      else if (q > 16'sd255) pix_out[ch*8 +: 8] = 8'd255;
      else                  pix_out[ch*8 +: 8] = q[7:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_valid) lbuf[cur_slot][rd_idx[X_W-1:0]] <= rd_data[23:0];
    if (state == S_CMP) obuf[x] <= pix_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      x        <= '0;
      y        <= '0;
      cur_slot <= '0;
      src_line <= '0;
      dst_line <= '0;
      done     <= 1'b0;
      for (int r = 0; r < K; r++)
        for (int c = 1; c < K; c++) win[r][c] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          src_line <= src;
          dst_line <= dst;
          y        <= '0;
          cur_slot <= '0;
          state    <= S_RD_GO;
        end
        S_RD_GO: state <= S_RD;
        S_RD: if (rd_done) begin
          x     <= '0;
          for (int r = 0; r < K; r++)
            for (int c = 1; c < K; c++) win[r][c] <= '0;
          state <= S_CMP;
        end
        S_CMP: begin
          for (int r = 0; r < K; r++) begin
            win[r][1] <= newcol[r];
            for (int c = 2; c < K; c++) win[r][c] <= win[r][c-1];
          end
          x <= x + 1'b1;
          if (32'(x) == IMG_WIDTH - 1) state <= S_WR_GO;
        end
        S_WR_GO: state <= S_WR;
        S_WR: if (wr_done) state <= S_NEXT;
        S_NEXT: begin
          src_line <= src_line + AW'(IMG_WIDTH * 4);
          dst_line <= dst_line + AW'(IMG_WIDTH * 4);
          cur_slot <= (cur_slot == 3'(K - 1)) ? 3'd0 : cur_slot + 1'b1;
          y        <= y + 1'b1;
          if (32'(y) == IMG_HEIGHT - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_RD_GO;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign state_out = {busy, wr_err, 3'b000, state};

endmodule
