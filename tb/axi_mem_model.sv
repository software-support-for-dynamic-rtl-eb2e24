// axi_mem_model: behavioural model of the shared system memory seen through
// NP AXI4 slave ports (one per accelerator memory port). Test use only.
//
// All ports share one word array `mem` (32-bit words, byte address >> 2),
// which testbenches fill and inspect directly. Each port serves one read
// burst and one write burst at a time (INCR, 4-byte beats). Read data start
// LAT cycles after AR; R beats and W acceptance are stalled at random with
// probability STALL_PCT percent, so the masters see back-pressure.
// The model counts protocol violations (a burst that crosses a 4 KB
// boundary, a WLAST in the wrong place, an address outside the array) in
// `proto_errors`, and stalled beats in `stalls`.
module axi_mem_model
  import pr_pkg::*;
#(
  parameter int NP        = 1,
  parameter int MEM_WORDS = 1 << 16,
  parameter int LAT       = 3,
  parameter int STALL_PCT = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t req [NP],
  output axi_rsp_t rsp [NP]
);

  logic [31:0] mem [MEM_WORDS];

  int proto_errors = 0;
  int stalls       = 0;
  int rd_bursts    = 0;
  int wr_bursts    = 0;

  logic        rd_act  [NP];
  logic [31:0] rd_addr [NP];
  int          rd_left [NP];
  int          rd_wait [NP];
  logic        rd_stall[NP];
  logic        wr_act  [NP];
  logic        wr_bpend[NP];
  logic [31:0] wr_addr [NP];
  int          wr_left [NP];
  logic        wr_stall[NP];

  function automatic logic crosses_4k(logic [31:0] a, logic [7:0] len);
    return (a[11:0] + (32'(len) + 1) * 4) > 32'd4096;
  endfunction

  function automatic int widx(logic [31:0] a);
    if ((a >> 2) >= MEM_WORDS) begin
      proto_errors++;
      return 0;
    end
    return int'(a >> 2);
  endfunction

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      rsp[p]         = '0;
      rsp[p].arready = !rd_act[p];
      rsp[p].rvalid  = rd_act[p] && rd_wait[p] == 0 && !rd_stall[p];
      rsp[p].rdata   = mem[(rd_addr[p] >> 2) % MEM_WORDS];
      rsp[p].rlast   = rd_left[p] == 1;
      rsp[p].rresp   = RESP_OKAY;
      rsp[p].awready = !wr_act[p];
      rsp[p].wready  = wr_act[p] && !wr_bpend[p] && !wr_stall[p];
      rsp[p].bvalid  = wr_bpend[p];
      rsp[p].bresp   = RESP_OKAY;
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        rd_act[p]   <= 1'b0;
        rd_addr[p]  <= '0;
        rd_left[p]  <= 0;
        rd_wait[p]  <= 0;
        rd_stall[p] <= 1'b0;
        wr_act[p]   <= 1'b0;
        wr_bpend[p] <= 1'b0;
        wr_addr[p]  <= '0;
        wr_left[p]  <= 0;
        wr_stall[p] <= 1'b0;
      end
    end else begin
      for (int p = 0; p < NP; p++) begin
        rd_stall[p] <= ($urandom_range(99) < STALL_PCT);
        wr_stall[p] <= ($urandom_range(99) < STALL_PCT);
        if (rd_act[p] && rd_stall[p]) stalls++;
        // read address
        if (req[p].arvalid && !rd_act[p]) begin
          if (crosses_4k(req[p].araddr, req[p].arlen)) proto_errors++;
          rd_act[p]  <= 1'b1;
          rd_addr[p] <= req[p].araddr;
          rd_left[p] <= int'(req[p].arlen) + 1;
          rd_wait[p] <= LAT;
          rd_bursts++;
        end
        // read data
        if (rd_act[p]) begin
          if (rd_wait[p] != 0) rd_wait[p] <= rd_wait[p] - 1;
          else if (!rd_stall[p] && req[p].rready) begin
            void'(widx(rd_addr[p]));
            rd_addr[p] <= rd_addr[p] + 4;
            rd_left[p] <= rd_left[p] - 1;
            if (rd_left[p] == 1) rd_act[p] <= 1'b0;
          end
        end
        // write address
        if (req[p].awvalid && !wr_act[p]) begin
          if (crosses_4k(req[p].awaddr, req[p].awlen)) proto_errors++;
          wr_act[p]  <= 1'b1;
          wr_addr[p] <= req[p].awaddr;
          wr_left[p] <= int'(req[p].awlen) + 1;
          wr_bursts++;
        end
        // write data
        if (wr_act[p] && !wr_bpend[p] && !wr_stall[p] && req[p].wvalid) begin
          mem[widx(wr_addr[p])] <= req[p].wdata;
          if (req[p].wlast != (wr_left[p] == 1)) proto_errors++;
          wr_addr[p] <= wr_addr[p] + 4;
          wr_left[p] <= wr_left[p] - 1;
          if (wr_left[p] == 1) wr_bpend[p] <= 1'b1;
        end
        // write response
        if (wr_bpend[p] && req[p].bready) begin
          wr_bpend[p] <= 1'b0;
          wr_act[p]   <= 1'b0;
        end
      end
    end
  end

endmodule
