// tb_sobel_filter: self-checking test of the Sobel filter core.
// A random W x H image (with flat and saturated patches, so that both
// thresholds and the mid range occur) is filtered from a memory model with
// random bus stalls; every output word is compared with
// tb_ref_pkg::sobel_ref. Also checked: bus protocol, no write past the image,
// and a run time under 4.5 cycles per pixel, the per-pixel rate measured for
// the hardware Sobel filter (21.5 ms for 800x600 at 100 MHz).
module tb_sobel_filter;
  import pr_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 41;
  localparam int H = 9;
  localparam int HI = 200;
  localparam int LO = 60;
  localparam logic [31:0] SRC = 32'h0000_0F80;
  localparam logic [31:0] DST = 32'h0000_5000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start, busy, done;
  logic [7:0] st;
  axi_req_t   req [1];
  axi_rsp_t   rsp [1];

  sobel_filter #(.IMG_WIDTH(W), .IMG_HEIGHT(H)) dut (
    .clk, .rst_n, .start, .src(SRC), .dst(DST), .busy, .done,
    .state_out(st), .m_axi_req(req[0]), .m_axi_rsp(rsp[0]));

  axi_mem_model #(.NP(1), .MEM_WORDS(1 << 13)) u_mem (.clk, .rst_n, .req, .rsp);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_q_t img, expv;
  int cyc, n_hi, n_lo, n_mid;

  initial begin
    start = 0;
    for (int i = 0; i < W * H; i++) begin
      logic [31:0] p;
      int x;
      x = i % W;
      p = {8'h00, 24'($urandom)};
      if (x >= 10 && x < 20) p = 32'h0080_8080;       // flat: no gradient
      if (x >= 20 && x < 24) p = {8'h00, {3{8'(x * 9)}}}; // gentle ramp
      img.push_back(p);
      u_mem.mem[(SRC >> 2) + i] = p;
    end
    u_mem.mem[(DST >> 2) + W * H] = 32'hDEAD_BEEF;
    expv = sobel_ref(img, W, H, HI, LO);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
    repeat (2) @(posedge clk);
    n_hi = 0; n_lo = 0; n_mid = 0;
    for (int i = 0; i < W * H; i++) begin
      checks++;
      if (u_mem.mem[(DST >> 2) + i] !== expv[i]) begin
        failures++;
        if (failures < 10) $display("px %0d: got %h exp %h", i, u_mem.mem[(DST >> 2) + i], expv[i]);
      end
      if (expv[i][7:0] == 8'd255) n_hi++;
      else if (expv[i][7:0] == 8'd0) n_lo++;
      else n_mid++;
    end
    checks++;
    if (u_mem.mem[(DST >> 2) + W * H] !== 32'hDEAD_BEEF) failures++;
    checks++;
    if (real'(cyc) > 4.5 * W * H) begin
      failures++;
      $display("too slow: %0d cycles", cyc);
    end
    checks++;
    if (u_mem.proto_errors != 0) failures++;
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_mid == 0) failures++;
    $display("sobel %0d cycles for %0d pixels; outputs hi/lo/mid %0d/%0d/%0d", cyc, W * H, n_hi, n_lo, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
