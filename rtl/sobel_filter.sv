// sobel_filter: Sobel edge filter for 24-bit RGB images in system memory,
// built as a bus-master accelerator core.
//
// Each line is read from memory and every pixel is turned into 8-bit luma on
// the way in, Y = (66 R + 129 G + 25 B + 128) >> 8, which is stored in a
// 3-line circular window buffer. The two 3x3 Sobel kernels
//   Gx = [-1 0 1; -2 0 2; -1 0 1]   Gy = [1 2 1; 0 0 0; -1 -2 -1]
// are then slid along the line, one pixel per cycle. The gradient magnitude
// is approximated by |Gx| + |Gy|, inverted (255 - magnitude) and pushed to
// the rails by two thresholds: above H_LUMA it becomes 255, below L_LUMA it
// becomes 0. The result is replicated into R, G and B of the output word and
// collected in a one-line buffer that is written back at the end of the line.
// The window is causal: output (x,y) uses input lines y-2..y and columns
// x-2..x, with pixels outside the image taken as zero.
//
// Interface and timing are those of conv5x5_filter: `start` with `src`/`dst`,
// `done` pulse, AXI4 master bundle, `state_out`. The threshold values, the
// grey-to-RGB output format, storing luma instead of RGB in the window and
// the zero padding are this design's choices.
module sobel_filter
  import pr_pkg::*;
#(
  parameter int         IMG_WIDTH  = IMG_W,
  parameter int         IMG_HEIGHT = IMG_H,
  parameter logic [7:0] H_LUMA     = 8'd200,
  parameter logic [7:0] L_LUMA     = 8'd60
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

  localparam int K     = 3;
  localparam int CNT_W = 20;
  localparam int X_W   = $clog2(IMG_WIDTH + 1);
  localparam int Y_W   = $clog2(IMG_HEIGHT + 1);
  localparam logic signed [12:0] MAX_LUMA = 13'sd255;

  // kernel weights, window row r (0 = newest = bottom line), column c (0 = newest = right)
  function automatic int gx(int r, int c);
    int cw;
    cw = (c == 0) ? 1 : (c == 2) ? -1 : 0;
    return cw * ((r == 1) ? 2 : 1);
  endfunction
  function automatic int gy(int r, int c);
    int rw;
    rw = (r == 2) ? 1 : (r == 0) ? -1 : 0;
    return rw * ((c == 1) ? 2 : 1);
  endfunction

  // BT.601 full-swing approximation
  function automatic logic [7:0] rgb2luma(logic [23:0] p);
    logic [16:0] s;
    s = 17'(p[23:16]) * 17'd66 + 17'(p[15:8]) * 17'd129 + 17'(p[7:0]) * 17'd25 + 17'd128;
    return s[15:8];
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_RD_GO, S_RD, S_CMP, S_WR_GO, S_WR, S_NEXT} state_t;
  state_t state;

  logic [7:0] lbuf [K][IMG_WIDTH];
  logic [7:0] obuf [IMG_WIDTH];
  logic [7:0] win  [K][1:K-1];

  logic [X_W-1:0] x;
  logic [Y_W-1:0] y;
  logic [1:0]     cur_slot;
  logic [AW-1:0]  src_line, dst_line;

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

  logic [7:0] wr_luma;
  assign wr_luma  = obuf[wr_idx[X_W-1:0]];
  assign wr_data  = {8'h00, wr_luma, wr_luma, wr_luma};
  assign rd_start = (state == S_RD_GO);
  assign wr_start = (state == S_WR_GO);

  logic [7:0] newcol [K];
  always_comb begin
    for (int r = 0; r < K; r++) begin
      logic [1:0] slot;
      slot = (cur_slot >= 2'(r)) ? cur_slot - 2'(r) : cur_slot + 2'(K - r);
      newcol[r] = (32'(y) >= r) ? lbuf[slot][x] : 8'h0;
    end
  end

  logic [7:0] luma_out;
  always_comb begin
    logic signed [12:0] dx, dy, mag, inv;
    logic [7:0] p;
    dx = '0;
    dy = '0;
    for (int r = 0; r < K; r++) begin
      for (int c = 0; c < K; c++) begin
        p  = (c == 0) ? newcol[r] : win[r][c];
        dx = dx + 13'(gx(r, c)) * $signed({5'b0, p});
        dy = dy + 13'(gy(r, c)) * $signed({5'b0, p});
      end
    end
    mag = ((dx < 0) ? -dx : dx) + ((dy < 0) ? -dy : dy);
    inv = MAX_LUMA - mag;
    if (inv > $signed({5'b0, H_LUMA}))      luma_out = 8'd255;
    else if (inv < $signed({5'b0, L_LUMA})) luma_out = 8'd0;
    else                                    luma_out = inv[7:0];
  end

  always_ff @(posedge clk) begin
    if (rd_valid) lbuf[cur_slot][rd_idx[X_W-1:0]] <= rgb2luma(rd_data[23:0]);
    if (state == S_CMP) obuf[x] <= luma_out;
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
          x <= '0;
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
          cur_slot <= (cur_slot == 2'(K - 1)) ? 2'd0 : cur_slot + 1'b1;
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
  assign state_out = {busy, wr_err, 3'b001, state};

endmodule
