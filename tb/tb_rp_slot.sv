// tb_rp_slot: self-checking test of a reconfigurable slot.
// The slot starts empty. It is then loaded in turn with the sharpen, matrix
// multiplier, Sobel and blur accelerators through the configuration-port
// inputs. During each load the test checks that the slot's outputs are
// garbage (spurious handshakes and interrupt), that the new accelerator
// reports its identifier once loaded, and that it computes correct results
// on data in memory, compared with tb_ref_pkg.
module tb_rp_slot;
  import pr_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 14, H = 6, N = 5;
  localparam logic [31:0] SRC = 32'h0000_0400, DST = 32'h0000_2000;
  localparam logic [31:0] A_AD = 32'h0000_3000, B_AD = 32'h0000_3400, C_AD = 32'h0000_3800;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       pr_active;
  op_id_t     pr_rm, loaded_rm;
  axil_req_t  creq;
  axil_rsp_t  crsp;
  axi_req_t   mreq [1];
  axi_rsp_t   mrsp [1];
  logic       irq;
  logic [7:0] st;

  rp_slot #(.IMG_WIDTH(W), .IMG_HEIGHT(H), .MAT_DIM(N)) dut (
    .clk, .rst_n, .pr_active, .pr_rm, .loaded_rm,
    .s_axil_req(creq), .s_axil_rsp(crsp), .m_axi_req(mreq[0]), .m_axi_rsp(mrsp[0]),
    .irq, .state_out(st));

  axil_bfm u_bfm (.clk, .req(creq), .rsp(crsp));
  // the memory only sees the slot while it is not being loaded (a decoupler's job)
  axi_req_t mreq_g [1];
  assign mreq_g[0] = pr_active ? '0 : mreq[0];
  axi_mem_model #(.NP(1), .MEM_WORDS(1 << 14)) u_mem (.clk, .rst_n, .req(mreq_g), .rsp(mrsp));

  initial begin
    repeat (100000) @(posedge clk);
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

  int reconfigs = 0;

  task automatic load(op_id_t rm);
    @(negedge clk);
    pr_active = 1;
    pr_rm     = rm;
    repeat (10) begin
      @(negedge clk);
      expect_eq("spurious irq while loading", irq, 1);
      expect_eq("spurious arvalid while loading", mreq[0].arvalid, 1);
    end
    pr_active = 0;
    repeat (8) @(negedge clk);
    expect_eq("loaded", loaded_rm, rm);
    reconfigs++;
  endtask

  task automatic run(logic [31:0] a0, logic [31:0] a1, logic [31:0] a2);
    logic [1:0] r;
    logic [31:0] d;
    u_bfm.write(REG_ARGS + 0, a0, r);
    u_bfm.write(REG_ARGS + 4, a1, r);
    u_bfm.write(REG_ARGS + 8, a2, r);
    u_bfm.write(REG_GIE, 1, r);
    u_bfm.write(REG_IER, 1, r);
    u_bfm.write(REG_CTRL, 1, r);
    while (!irq) @(posedge clk);
    u_bfm.write(REG_ISR, 1, r);
    u_bfm.read(REG_CTRL, d, r);
    expect_eq("done", d[1], 1);
  endtask

  word_q_t img, a, b, e;
  logic [31:0] d;
  logic [1:0]  r;

  initial begin
    pr_active = 0;
    pr_rm = OP_NONE;
    for (int i = 0; i < W * H; i++) begin
      img.push_back({8'h00, 24'($urandom)});
      u_mem.mem[(SRC >> 2) + i] = img[i];
    end
    for (int i = 0; i < N * N; i++) begin
      a.push_back($urandom);
      b.push_back($urandom);
      u_mem.mem[(A_AD >> 2) + i] = a[i];
      u_mem.mem[(B_AD >> 2) + i] = b[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("empty after reset", loaded_rm, OP_NONE);
    expect_eq("empty slot quiet", {irq, mreq[0].arvalid, mreq[0].awvalid}, 0);

    load(OP_SHARP);
    u_bfm.read(REG_ID, d, r);  expect_eq("id sharp", d, OP_SHARP);
    run(SRC, DST, 0);
    e = conv5_ref(img, W, H, 1);
    for (int i = 0; i < W * H; i++) expect_eq("sharp px", u_mem.mem[(DST >> 2) + i], e[i]);

    load(OP_MULT);
    u_bfm.read(REG_ID, d, r);  expect_eq("id mult", d, OP_MULT);
    run(A_AD, B_AD, C_AD);
    e = mat_ref(a, b, N);
    for (int i = 0; i < N * N; i++) expect_eq("mult elem", u_mem.mem[(C_AD >> 2) + i], e[i]);

    load(OP_SOBEL);
    u_bfm.read(REG_ID, d, r);  expect_eq("id sobel", d, OP_SOBEL);
    run(SRC, DST, 0);
    e = sobel_ref(img, W, H, 200, 60);
    for (int i = 0; i < W * H; i++) expect_eq("sobel px", u_mem.mem[(DST >> 2) + i], e[i]);

    load(OP_BLUR);
    u_bfm.read(REG_ID, d, r);  expect_eq("id blur", d, OP_BLUR);
    run(SRC, DST, 0);
    e = conv5_ref(img, W, H, 0);
    for (int i = 0; i < W * H; i++) expect_eq("blur px", u_mem.mem[(DST >> 2) + i], e[i]);

    expect_eq("bus protocol", u_mem.proto_errors, 0);
    expect_eq("timeouts", u_bfm.timeouts, 0);
    $display("reconfigurations %0d", reconfigs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
