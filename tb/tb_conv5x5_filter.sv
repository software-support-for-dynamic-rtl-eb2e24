// tb_conv5x5_filter: self-checking test of the blur and sharpen filter core.
// One blur and one sharpen instance each filter a random W x H image held in
// its own memory model (with random bus stalls). The source block is placed
// so that lines cross 4 KB boundaries. Every output pixel is compared with
// tb_ref_pkg::conv5_ref, the bus model's protocol checks must stay clean,
// and the run time must stay under 5.5 cycles per pixel, the per-pixel rate
// measured for the hardware filter (26.4 ms for 800x600 at 100 MHz).
module tb_conv5x5_filter;
  import pr_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 37;
  localparam int H = 11;
  localparam logic [31:0] SRC = 32'h0000_0F00;
  localparam logic [31:0] DST = 32'h0000_4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic     start;
  logic     busy [2], done [2];
  logic [7:0] st [2];
  axi_req_t req [2][1];
  axi_rsp_t rsp [2][1];

  conv5x5_filter #(.IMG_WIDTH(W), .IMG_HEIGHT(H), .KIND(OP_BLUR)) u_blur (
    .clk, .rst_n, .start, .src(SRC), .dst(DST), .busy(busy[0]), .done(done[0]),
    .state_out(st[0]), .m_axi_req(req[0][0]), .m_axi_rsp(rsp[0][0]));
  conv5x5_filter #(.IMG_WIDTH(W), .IMG_HEIGHT(H), .KIND(OP_SHARP)) u_sharp (
    .clk, .rst_n, .start, .src(SRC), .dst(DST), .busy(busy[1]), .done(done[1]),
    .state_out(st[1]), .m_axi_req(req[1][0]), .m_axi_rsp(rsp[1][0]));

  axi_mem_model #(.NP(1), .MEM_WORDS(1 << 13)) u_mem0 (.clk, .rst_n, .req(req[0]), .rsp(rsp[0]));
  axi_mem_model #(.NP(1), .MEM_WORDS(1 << 13)) u_mem1 (.clk, .rst_n, .req(req[1]), .rsp(rsp[1]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_q_t img, exp_b, exp_s;
  int cyc [2];
  bit fin [2];

  initial begin
    start = 0;
    for (int i = 0; i < W * H; i++) begin
      logic [31:0] p;
      // mostly random, with saturated patches to hit both clamps
      p = {8'h00, 24'($urandom)};
      if (i % 17 == 3) p = 32'h00FF_FFFF;
      if (i % 19 == 5) p = 32'h0000_0000;
      img.push_back(p);
      u_mem0.mem[(SRC >> 2) + i] = p;
      u_mem1.mem[(SRC >> 2) + i] = p;
    end
    u_mem0.mem[(DST >> 2) + W * H] = 32'hDEAD_BEEF;
    u_mem1.mem[(DST >> 2) + W * H] = 32'hDEAD_BEEF;
    exp_b = conv5_ref(img, W, H, 0);
    exp_s = conv5_ref(img, W, H, 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = '{0, 0};
    fin = '{0, 0};
    while (!(fin[0] && fin[1])) begin
      @(posedge clk);
      for (int k = 0; k < 2; k++) begin
        if (!fin[k]) cyc[k]++;
        if (done[k]) fin[k] = 1;
      end
    end
    repeat (2) @(posedge clk);
    for (int i = 0; i < W * H; i++) begin
      checks += 2;
      if (u_mem0.mem[(DST >> 2) + i] !== exp_b[i]) begin
        failures++;
        if (failures < 10) $display("blur  px %0d: got %h exp %h", i, u_mem0.mem[(DST >> 2) + i], exp_b[i]);
      end
      if (u_mem1.mem[(DST >> 2) + i] !== exp_s[i]) begin
        failures++;
        if (failures < 10) $display("sharp px %0d: got %h exp %h", i, u_mem1.mem[(DST >> 2) + i], exp_s[i]);
      end
    end
    // nothing written past the image
    checks += 2;
    if (u_mem0.mem[(DST >> 2) + W * H] !== 32'hDEAD_BEEF) failures++;
    if (u_mem1.mem[(DST >> 2) + W * H] !== 32'hDEAD_BEEF) failures++;
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (real'(cyc[k]) > 5.5 * W * H) begin
        failures++;
        $display("filter %0d too slow: %0d cycles for %0d pixels", k, cyc[k], W * H);
      end
      checks++;
      if (busy[k]) failures++;
    end
    checks += 2;
    if (u_mem0.proto_errors != 0) failures++;
    if (u_mem1.proto_errors != 0) failures++;
    checks++;
    if (u_mem0.stalls == 0) failures++;  // back-pressure was exercised
    $display("blur %0d cycles, sharp %0d cycles, %0d pixels, stalls %0d", cyc[0], cyc[1], W * H, u_mem0.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
