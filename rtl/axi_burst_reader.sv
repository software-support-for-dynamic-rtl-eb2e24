// axi_burst_reader: reads a block of consecutive 32-bit words over the read
// channels of an AXI4 master port and hands them out one per beat.
//
// A pulse on `start` latches `addr` (word aligned) and `nwords`. The block is
// split into INCR bursts of at most 256 beats that never cross a 4 KB
// boundary, as AXI4 requires. One burst is outstanding at a time: AR is
// issued, then every R beat is delivered on `out_valid`/`out_data` together
// with its running word index `out_idx` (0 .. nwords-1). The consumer must
// take a word in the cycle it is presented (rready is held high while a burst
// is open). `done` pulses one cycle after the last beat; `busy` is high from
// `start` until then. The burst splitting and single-outstanding policy are
// this design's choice; the data movement it does is the one the accelerators
// need (copy a line or a matrix row into a local buffer).
module axi_burst_reader
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
  // data out
  output logic             out_valid,
  output logic [DW-1:0]    out_data,
  output logic [CNT_W-1:0] out_idx,
  // AXI read channels
  output logic [AW-1:0]    araddr,
  output logic [7:0]       arlen,
  output logic             arvalid,
  input  logic             arready,
  input  logic [DW-1:0]    rdata,
  input  logic             rlast,
  input  logic             rvalid,
  output logic             rready
);

  typedef enum logic [1:0] {S_IDLE, S_AR, S_R} state_t;
  state_t state;

  logic [AW-1:0]    cur_addr;
  logic [CNT_W-1:0] remaining;
  logic [CNT_W-1:0] idx;
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
      state     <= S_IDLE;
      cur_addr  <= '0;
      remaining <= '0;
      idx       <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur_addr  <= {addr[AW-1:2], 2'b00};
          remaining <= nwords;
          idx       <= '0;
          if (nwords == '0) done <= 1'b1;
          else              state <= S_AR;
        end
        S_AR: begin
          if (arvalid && arready) begin
            cur_addr  <= cur_addr + AW'({burst_words, 2'b00});
            remaining <= remaining - burst_words;
            state     <= S_R;
          end
        end
        S_R: if (rvalid) begin
          idx <= idx + 1'b1;
          if (rlast) begin
            if (remaining == '0) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_AR;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign araddr    = cur_addr;
  assign arlen     = 8'(burst_words - 1'b1);
  assign arvalid   = (state == S_AR);
  assign rready    = (state == S_R);
  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_R) && rvalid;
  assign out_data  = rdata;
  assign out_idx   = idx;
endmodule
