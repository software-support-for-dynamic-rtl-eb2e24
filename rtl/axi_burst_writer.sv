// axi_burst_writer: writes a block of consecutive 32-bit words from a local
// buffer to memory over the write channels of an AXI4 master port.
//
// A pulse on `start` latches `addr` (word aligned) and `nwords`. The writer
// fetches word `buf_idx` from the caller's buffer through `buf_data`, which
// must be a combinational read of that index. Bursts are INCR, at most 256
// beats, never crossing a 4 KB boundary; for each one the writer issues AW,
// streams the W beats (WLAST on the last) and waits for the B response before
// the next burst. `done` pulses once the last response has arrived and `err`
// is raised with it if any response was not OKAY. The one-burst-at-a-time
// policy is this design's choice.
module axi_burst_writer
  import pr_pkg::*;
#(
  parameter int CNT_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [AW-1:0]    addr,
  input  logic [CNT_W-1:0] nwords,
  output logic             busy,
  output logic             done,
  output logic             err,
  // buffer read port
  output logic [CNT_W-1:0] buf_idx,
  input  logic [DW-1:0]    buf_data,
  // AXI write channels
  output logic [AW-1:0]    awaddr,
  output logic [7:0]       awlen,
  output logic             awvalid,
  input  logic             awready,
  output logic [DW-1:0]    wdata,
  output logic [3:0]       wstrb,
  output logic             wlast,
  output logic             wvalid,
  input  logic             wready,
  input  logic [1:0]       bresp,
  input  logic             bvalid,
  output logic             bready
);

  typedef enum logic [1:0] {S_IDLE, S_AW, S_W, S_B} state_t;
  state_t state;

  logic [AW-1:0]    cur_addr;
  logic [CNT_W-1:0] remaining;
  logic [CNT_W-1:0] idx;
  logic [8:0]       beats_left;  // beats left in the open burst
  logic [10:0]      to_boundary;  // words left before the next 4 KB boundary (1..1024)
  logic [CNT_W-1:0] burst_words;

  always_comb begin
    to_boundary = 11'd1024 - 11'(cur_addr[11:2]);
    burst_words = remaining;
    if (burst_words > CNT_W'(MAX_BURST)) burst_words = CNT_W'(MAX_BURST);
    if (burst_words > CNT_W'(to_boundary)) burst_words = CNT_W'(to_boundary);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur_addr   <= '0;
      remaining  <= '0;
      idx        <= '0;
      beats_left <= '0;
      done       <= 1'b0;
      err        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur_addr  <= {addr[AW-1:2], 2'b00};
          remaining <= nwords;
          idx       <= '0;
          err       <= 1'b0;
          if (nwords == '0) done <= 1'b1;
          else              state <= S_AW;
        end
        S_AW: if (awready) begin
          cur_addr   <= cur_addr + AW'({burst_words, 2'b00});
          remaining  <= remaining - burst_words;
          beats_left <= 9'(burst_words);
          state      <= S_W;
        end
        S_W: if (wready) begin
          idx        <= idx + 1'b1;
          beats_left <= beats_left - 1'b1;
          if (beats_left == 9'd1) state <= S_B;
        end
        S_B: if (bvalid) begin
          if (bresp != RESP_OKAY) err <= 1'b1;
          if (remaining == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_AW;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign awaddr  = cur_addr;
  assign awlen   = 8'(burst_words - 1'b1);
  assign awvalid = (state == S_AW);
  assign wvalid  = (state == S_W);
  assign wdata   = buf_data;
  assign wstrb   = 4'hF;
  assign wlast   = (state == S_W) && (beats_left == 9'd1);
  assign bready  = (state == S_B);
  assign busy    = (state != S_IDLE);
  assign buf_idx = idx;

endmodule
