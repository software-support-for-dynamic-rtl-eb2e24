// axil_bfm: AXI4-Lite master for testbenches. Test use only.
// Tasks (called hierarchically): write(addr, data, resp) and
// read(addr, data, resp). Each runs one complete transaction: AW and W are
// presented together and held until accepted, then BREADY waits for the
// response; a read holds AR until accepted and takes the R beat. Every
// transaction is bounded by TIMEOUT cycles; a timeout sets resp to 2'b10
// and counts in `timeouts`.
module axil_bfm
  import pr_pkg::*;
#(
  parameter int TIMEOUT = 1000
) (
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);
  int timeouts = 0;

  initial req = '0;

  // Signals are driven after the falling edge and READY/VALID are sampled
  // one time unit later, so each handshake completes at the next rising edge.
  task automatic write(input logic [31:0] addr, input logic [31:0] data, output logic [1:0] resp);
    int n;
    bit aw_ok, w_ok, aw_hs, w_hs;
    @(negedge clk);
    req.awaddr  = addr;
    req.awvalid = 1'b1;
    req.wdata   = data;
    req.wstrb   = 4'hF;
    req.wvalid  = 1'b1;
    req.bready  = 1'b0;
    aw_ok = 0;
    w_ok  = 0;
    n = 0;
    while (!(aw_ok && w_ok) && n < TIMEOUT) begin
      #1;
      aw_hs = req.awvalid && rsp.awready;
      w_hs  = req.wvalid && rsp.wready;
      @(negedge clk);
      if (aw_hs) begin aw_ok = 1; req.awvalid = 1'b0; end
      if (w_hs)  begin w_ok = 1;  req.wvalid = 1'b0; end
      n++;
    end
    req.bready = 1'b1;
    #1;
    while (!rsp.bvalid && n < TIMEOUT) begin
      @(negedge clk);
      #1;
      n++;
    end
    resp = rsp.bresp;
    @(negedge clk);
    req.bready  = 1'b0;
    req.awvalid = 1'b0;
    req.wvalid  = 1'b0;
    if (n >= TIMEOUT) begin
      timeouts++;
      resp = 2'b10;
    end
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data, output logic [1:0] resp);
    int n;
    @(negedge clk);
    req.araddr  = addr;
    req.arvalid = 1'b1;
    req.rready  = 1'b0;
    n = 0;
    #1;
    while (!rsp.arready && n < TIMEOUT) begin
      @(negedge clk);
      #1;
      n++;
    end
    @(negedge clk);
    req.arvalid = 1'b0;
    req.rready  = 1'b1;
    #1;
    while (!rsp.rvalid && n < TIMEOUT) begin
      @(negedge clk);
      #1;
      n++;
    end
    data = rsp.rdata;
    resp = rsp.rresp;
    @(negedge clk);
    req.rready = 1'b0;
    if (n >= TIMEOUT) begin
      timeouts++;
      resp = 2'b10;
      data = '0;
    end
  endtask
endmodule
