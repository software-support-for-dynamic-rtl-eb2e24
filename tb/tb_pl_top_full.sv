// tb_pl_top_full: full-size run of the design with every parameter at its
// default (two slots, 800x600 images). Both slots are loaded through the
// configuration port with the decouplers set; then slot 0 blurs one 800x600
// RGB image while slot 1 runs the Sobel filter on another, in parallel on
// the shared memory. Slot 0 is then decoupled, rewritten with the sharpen
// accelerator, recoupled, and sharpens the first image. Every output pixel is
// compared with tb_ref_pkg, and each operation's cycle count is compared with
// the hardware times measured for these filters at 100 MHz (blur and sharpen
// 26.4 ms, Sobel 21.5 ms).
module tb_pl_top_full;
  import pr_pkg::*;
  import tb_ref_pkg::*;

  localparam int NSL = 2;
  localparam int W = IMG_W, H = IMG_H;
  localparam logic [31:0] BASE = 32'h4000_0000;
  localparam logic [31:0] SRC0 = 32'h0000_0000, DST0 = 32'h0020_0000;
  localparam logic [31:0] SRC1 = 32'h0040_0000, DST1 = 32'h0060_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;   // 100 MHz

  int checks = 0, failures = 0;

  axil_req_t  gp_req;
  axil_rsp_t  gp_rsp;
  axi_req_t   hp_req [NSL];
  axi_rsp_t   hp_rsp [NSL];
  logic       irq [NSL];
  logic       pr_active [NSL];
  op_id_t     pr_rm [NSL];
  op_id_t     loaded [NSL];
  logic       decoupled [NSL];
  logic [7:0] st [NSL];

  pl_top dut (
    .clk, .rst_n,
    .s_axil_gp_req(gp_req), .s_axil_gp_rsp(gp_rsp),
    .m_axi_hp_req(hp_req), .m_axi_hp_rsp(hp_rsp),
    .irq, .pr_active, .pr_rm, .loaded_rm(loaded), .decoupled, .state_out(st));

  axil_bfm u_bfm (.clk, .req(gp_req), .rsp(gp_rsp));
  axi_mem_model #(.NP(NSL), .MEM_WORDS(1 << 21), .STALL_PCT(10)) u_mem (
    .clk, .rst_n, .req(hp_req), .rsp(hp_rsp));

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  word_q_t img0, img1, e0, e1;
  logic [31:0] d;
  logic [1:0]  r;
  int cyc [NSL];
  bit fin [NSL];

  initial begin
    for (int k = 0; k < NSL; k++) begin
      pr_active[k] = 0;
      pr_rm[k]     = OP_NONE;
    end
    for (int i = 0; i < W * H; i++) begin
      int x, y;
      x = i % W;
      y = i / W;
      // smooth gradients with random texture and a few hard edges
      img0.push_back({8'h00, 8'(x ^ y), 8'(x + 3 * y), 8'($urandom_range(255))});
      img1.push_back((x / 50 + y / 40) % 2 == 0 ? {8'h00, 24'($urandom)} : 32'h00C0_C0C0);
      u_mem.mem[(SRC0 >> 2) + i] = img0[i];
      u_mem.mem[(SRC1 >> 2) + i] = img1[i];
    end
    e0 = conv5_ref(img0, W, H, 0);
    e1 = sobel_ref(img1, W, H, 200, 60);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load blur into slot 0, Sobel into slot 1 (decouplers are set after reset)
    @(negedge clk);
    pr_active[0] = 1; pr_rm[0] = OP_BLUR;
    repeat (50) @(negedge clk);
    pr_active[0] = 0;
    pr_active[1] = 1; pr_rm[1] = OP_SOBEL;
    repeat (50) @(negedge clk);
    pr_active[1] = 0;
    repeat (8) @(negedge clk);
    u_bfm.write(BASE + 32'h2000, 0, r);
    u_bfm.write(BASE + 32'h3000, 0, r);
    u_bfm.read(BASE + 32'h0000 + 32'(REG_ID), d, r);  expect_eq("slot0 id", d, OP_BLUR);
    u_bfm.read(BASE + 32'h1000 + 32'(REG_ID), d, r);  expect_eq("slot1 id", d, OP_SOBEL);
    u_bfm.write(BASE + 32'h0000 + 32'(REG_ARGS), SRC0, r);
    u_bfm.write(BASE + 32'h0000 + 32'(REG_ARGS) + 4, DST0, r);
    u_bfm.write(BASE + 32'h1000 + 32'(REG_ARGS), SRC1, r);
    u_bfm.write(BASE + 32'h1000 + 32'(REG_ARGS) + 4, DST1, r);
    for (int k = 0; k < NSL; k++) begin
      u_bfm.write(BASE + 32'(k) * 32'h1000 + 32'(REG_GIE), 1, r);
      u_bfm.write(BASE + 32'(k) * 32'h1000 + 32'(REG_IER), 1, r);
    end
    u_bfm.write(BASE + 32'h0000 + 32'(REG_CTRL), 1, r);
    u_bfm.write(BASE + 32'h1000 + 32'(REG_CTRL), 1, r);
    cyc = '{0, 0};
    fin = '{0, 0};
    while (!(fin[0] && fin[1])) begin
      @(posedge clk);
      for (int k = 0; k < NSL; k++) begin
        if (!fin[k]) cyc[k]++;
        if (irq[k]) fin[k] = 1;
      end
    end
    for (int i = 0; i < W * H; i++) begin
      expect_eq($sformatf("blur px %0d", i), u_mem.mem[(DST0 >> 2) + i], e0[i]);
      expect_eq($sformatf("sobel px %0d", i), u_mem.mem[(DST1 >> 2) + i], e1[i]);
    end
    $display("800x600 blur: %0d cycles (%0.2f ms at 100 MHz); Sobel: %0d cycles (%0.2f ms)",
             cyc[0], cyc[0] / 1.0e5, cyc[1], cyc[1] / 1.0e5);
    checks++; if (cyc[0] > 2_639_000) failures++;   // 26.39 ms measured for blur
    checks++; if (cyc[1] > 2_152_300) failures++;   // 21.52 ms measured for Sobel
    // second phase: reconfigure slot 0 from blur to sharpen (decoupled while
    // rewritten) and sharpen the first image into the blur output area
    u_bfm.write(BASE + 32'h2000, 1, r);
    @(negedge clk);
    pr_active[0] = 1; pr_rm[0] = OP_SHARP;
    repeat (50) @(negedge clk);
    pr_active[0] = 0;
    repeat (8) @(negedge clk);
    u_bfm.write(BASE + 32'h2000, 0, r);
    u_bfm.read(BASE + 32'(REG_ID), d, r);  expect_eq("slot0 id after reload", d, OP_SHARP);
    u_bfm.read(BASE + 32'h1000 + 32'(REG_ID), d, r);  expect_eq("slot1 id kept", d, OP_SOBEL);
    e0 = conv5_ref(img0, W, H, 1);
    u_bfm.write(BASE + 32'(REG_ARGS), SRC0, r);
    u_bfm.write(BASE + 32'(REG_ARGS) + 4, DST0, r);
    u_bfm.write(BASE + 32'(REG_GIE), 1, r);
    u_bfm.write(BASE + 32'(REG_IER), 1, r);
    u_bfm.write(BASE + 32'(REG_CTRL), 1, r);
    cyc[0] = 0;
    while (!irq[0]) begin
      @(posedge clk);
      cyc[0]++;
    end
    for (int i = 0; i < W * H; i++)
      expect_eq($sformatf("sharp px %0d", i), u_mem.mem[(DST0 >> 2) + i], e0[i]);
    $display("800x600 sharpen: %0d cycles (%0.2f ms at 100 MHz)", cyc[0], cyc[0] / 1.0e5);
    checks++; if (cyc[0] > 2_639_000) failures++;   // 26.39 ms measured for sharpen
    expect_eq("bus protocol", u_mem.proto_errors, 0);
    expect_eq("timeouts", u_bfm.timeouts, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
