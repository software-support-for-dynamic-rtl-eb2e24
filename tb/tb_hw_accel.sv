// tb_hw_accel: end-to-end test of the standard accelerator wrapper, driven
// only through its ports the way the processor drives it: a blur accelerator
// and a matrix-multiplier accelerator each get their identifier read back,
// their argument words written, the done interrupt enabled and a start
// command; the test waits for the interrupt, checks the done bit, clears the
// interrupt and compares the results in memory with tb_ref_pkg.
module tb_hw_accel;
  import pr_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 19, H = 7, N = 6;
  localparam logic [31:0] SRC = 32'h0000_0400, DST = 32'h0000_2000;
  localparam logic [31:0] A_AD = 32'h0000_0100, B_AD = 32'h0000_0800, C_AD = 32'h0000_1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  axil_req_t creq [2];
  axil_rsp_t crsp [2];
  axi_req_t  mreq [2][1];
  axi_rsp_t  mrsp [2][1];
  logic      irq [2];
  logic [7:0] st [2];

  hw_accel #(.OP(OP_BLUR), .IMG_WIDTH(W), .IMG_HEIGHT(H), .MAT_DIM(N)) u_blur (
    .clk, .rst_n, .s_axil_req(creq[0]), .s_axil_rsp(crsp[0]),
    .m_axi_req(mreq[0][0]), .m_axi_rsp(mrsp[0][0]), .irq(irq[0]), .state_out(st[0]));
  hw_accel #(.OP(OP_MULT), .IMG_WIDTH(W), .IMG_HEIGHT(H), .MAT_DIM(N)) u_mult (
    .clk, .rst_n, .s_axil_req(creq[1]), .s_axil_rsp(crsp[1]),
    .m_axi_req(mreq[1][0]), .m_axi_rsp(mrsp[1][0]), .irq(irq[1]), .state_out(st[1]));

  axil_bfm u_bfm0 (.clk, .req(creq[0]), .rsp(crsp[0]));
  axil_bfm u_bfm1 (.clk, .req(creq[1]), .rsp(crsp[1]));
  axi_mem_model #(.NP(1), .MEM_WORDS(1 << 12)) u_mem0 (.clk, .rst_n, .req(mreq[0]), .rsp(mrsp[0]));
  axi_mem_model #(.NP(1), .MEM_WORDS(1 << 12)) u_mem1 (.clk, .rst_n, .req(mreq[1]), .rsp(mrsp[1]));

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

  word_q_t img, eimg, a, b, c;
  logic [31:0] d;
  logic [1:0]  r;
  int busy_seen;

  initial begin
    for (int i = 0; i < W * H; i++) begin
      img.push_back({8'h00, 24'($urandom)});
      u_mem0.mem[(SRC >> 2) + i] = img[i];
    end
    for (int i = 0; i < N * N; i++) begin
      a.push_back($urandom);
      b.push_back($urandom);
      u_mem1.mem[(A_AD >> 2) + i] = a[i];
      u_mem1.mem[(B_AD >> 2) + i] = b[i];
    end
    eimg = conv5_ref(img, W, H, 0);
    c    = mat_ref(a, b, N);
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        u_bfm0.read(REG_ID, d, r);        expect_eq("blur id", d, OP_BLUR);
        u_bfm0.write(REG_ARGS + 0, SRC, r);
        u_bfm0.write(REG_ARGS + 4, DST, r);
        u_bfm0.write(REG_GIE, 1, r);
        u_bfm0.write(REG_IER, 1, r);
        u_bfm0.write(REG_CTRL, 1, r);
        u_bfm0.read(REG_CTRL, d, r);      expect_eq("blur running", d[2], 0);
        while (!irq[0]) @(posedge clk);
        u_bfm0.read(REG_CTRL, d, r);      expect_eq("blur done", d[1], 1);
        u_bfm0.write(REG_ISR, 1, r);
        expect_eq("blur irq cleared", irq[0], 0);
      end
      begin
        u_bfm1.read(REG_ID, d, r);        expect_eq("mult id", d, OP_MULT);
        u_bfm1.write(REG_ARGS + 0, A_AD, r);
        u_bfm1.write(REG_ARGS + 4, B_AD, r);
        u_bfm1.write(REG_ARGS + 8, C_AD, r);
        u_bfm1.write(REG_GIE, 1, r);
        u_bfm1.write(REG_IER, 1, r);
        u_bfm1.write(REG_CTRL, 1, r);
        busy_seen = 0;
        while (!irq[1]) begin
          @(posedge clk);
          if (st[1][7]) busy_seen++;
        end
        expect_eq("state_out shows busy", 32'(busy_seen > 0), 1);
        u_bfm1.read(REG_CTRL, d, r);      expect_eq("mult done", d[1], 1);
      end
    join
    for (int i = 0; i < W * H; i++) expect_eq("blur pixel", u_mem0.mem[(DST >> 2) + i], eimg[i]);
    for (int i = 0; i < N * N; i++) expect_eq("mult elem", u_mem1.mem[(C_AD >> 2) + i], c[i]);
    expect_eq("bus protocol", u_mem0.proto_errors + u_mem1.proto_errors, 0);
    expect_eq("ctrl timeouts", u_bfm0.timeouts + u_bfm1.timeouts, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
