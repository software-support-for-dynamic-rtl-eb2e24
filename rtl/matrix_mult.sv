// matrix_mult: N x N 32-bit integer matrix multiplier, C = A * B, built as a
// bus-master accelerator core.
//
// Naive row-by-column scheme: for each row i, row a_i of A is copied with a
// burst read into a local buffer; then for each column j, column b_j of B
// (B is stored column-major, so a column is contiguous) is burst-read and the
// dot product a_i . b_j is accumulated, one multiply-accumulate per arriving
// beat, and stored as c_ij in a local row buffer. When the whole row c_i is
// complete it is burst-written back to C (row-major). Arithmetic is 32-bit
// two's complement and wraps, like C integer arithmetic.
//
// Interface: `start` with byte addresses `a_addr`, `b_addr`, `c_addr`;
// `done` pulses at the end; AXI4 master bundle; `state_out` shows the state.
// Timing: about N*(N + bus latency) cycles per row, N^2 (N + latency) in all.
// The accumulation as B's column arrives (instead of first copying it to a
// buffer and then running the dot product) is this design's choice; it gives
// the same result in about half the cycles.
module matrix_mult
  import pr_pkg::*;
#(
  parameter int N = MAT_N
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] a_addr,
  input  logic [AW-1:0] b_addr,
  input  logic [AW-1:0] c_addr,
  output logic          busy,
  output logic          done,
  output logic [7:0]    state_out,
  output axi_req_t      m_axi_req,
  input  axi_rsp_t      m_axi_rsp
);

  localparam int CNT_W = 20;
  localparam int I_W   = $clog2(N);  // N >= 2

  typedef enum logic [2:0] {S_IDLE, S_RA_GO, S_RA, S_RB_GO, S_RB, S_WR_GO, S_WR, S_NEXT} state_t;
  state_t state;

  logic [31:0] a_row [N];
  logic [31:0] c_row [N];

  logic [I_W-1:0] i, j;
  logic [AW-1:0]  a_base, b_base, c_base;
  logic [AW-1:0]  a_line, b_line, c_line;
  logic [31:0]    acc;

  logic             rd_start, rd_busy, rd_done, rd_valid;
  logic [DW-1:0]    rd_data;
  logic [CNT_W-1:0] rd_idx;
  logic [AW-1:0]    rd_addr;
  logic             wr_start, wr_busy, wr_done, wr_err;
  logic [CNT_W-1:0] wr_idx;
  logic [DW-1:0]    wr_data;

  assign rd_addr  = (state == S_RA_GO || state == S_RA) ? a_line : b_line;
  assign rd_start = (state == S_RA_GO) || (state == S_RB_GO);
  assign wr_start = (state == S_WR_GO);
  assign wr_data  = c_row[wr_idx[I_W-1:0]];

  axi_burst_reader #(.CNT_W(CNT_W)) u_rd (
    .clk, .rst_n, .start(rd_start), .addr(rd_addr), .nwords(CNT_W'(N)),
    .busy(rd_busy), .done(rd_done),
    .out_valid(rd_valid), .out_data(rd_data), .out_idx(rd_idx),
    .araddr(m_axi_req.araddr), .arlen(m_axi_req.arlen), .arvalid(m_axi_req.arvalid),
    .arready(m_axi_rsp.arready), .rdata(m_axi_rsp.rdata), .rlast(m_axi_rsp.rlast),
    .rvalid(m_axi_rsp.rvalid), .rready(m_axi_req.rready)
  );

  axi_burst_writer #(.CNT_W(CNT_W)) u_wr (
    .clk, .rst_n, .start(wr_start), .addr(c_line), .nwords(CNT_W'(N)),
    .busy(wr_busy), .done(wr_done), .err(wr_err),
    .buf_idx(wr_idx), .buf_data(wr_data),
    .awaddr(m_axi_req.awaddr), .awlen(m_axi_req.awlen), .awvalid(m_axi_req.awvalid),
    .awready(m_axi_rsp.awready), .wdata(m_axi_req.wdata), .wstrb(m_axi_req.wstrb),
    .wlast(m_axi_req.wlast), .wvalid(m_axi_req.wvalid), .wready(m_axi_rsp.wready),
    .bresp(m_axi_rsp.bresp), .bvalid(m_axi_rsp.bvalid), .bready(m_axi_req.bready)
  );

  always_ff @(posedge clk) begin
    if (rd_valid && state == S_RA) a_row[rd_idx[I_W-1:0]] <= rd_data;
    if (state == S_RB && rd_done)  c_row[j] <= acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      i      <= '0;
      j      <= '0;
      acc    <= '0;
      a_base <= '0;
      b_base <= '0;
      c_base <= '0;
      a_line <= '0;
      b_line <= '0;
      c_line <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_base <= a_addr;
          b_base <= b_addr;
          c_base <= c_addr;
          a_line <= a_addr;
          c_line <= c_addr;
          i      <= '0;
          state  <= S_RA_GO;
        end
        S_RA_GO: state <= S_RA;
        S_RA: if (rd_done) begin
          j      <= '0;
          b_line <= b_base;
          state  <= S_RB_GO;
        end
        S_RB_GO: begin
          acc   <= '0;
          state <= S_RB;
        end
        S_RB: begin
          if (rd_valid) acc <= acc + a_row[rd_idx[I_W-1:0]] * rd_data;
          if (rd_done) begin
            j      <= j + 1'b1;
            b_line <= b_line + AW'(N * 4);
            state  <= (32'(j) == N - 1) ? S_WR_GO : S_RB_GO;
          end
        end
        S_WR_GO: state <= S_WR;
        S_WR: if (wr_done) state <= S_NEXT;
        S_NEXT: begin
          i      <= i + 1'b1;
          a_line <= a_line + AW'(N * 4);
          c_line <= c_line + AW'(N * 4);
          if (32'(i) == N - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_RA_GO;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign state_out = {busy, wr_err, 3'b010, state};

endmodule
