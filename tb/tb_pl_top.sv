// tb_pl_top: end-to-end test of the programmable-logic design with two slots.
//
// The test plays the processor side. Four periodic "tasks" (Sobel, blur,
// sharpen, matrix multiply) each run JOBS jobs; a job asks the
// reconfiguration service (modelled here in the testbench, as the software
// library does it) to execute its hardware operation:
//   1. wait for a free slot (counting semaphore over the slots),
//   2. prefer a free slot that already holds the needed accelerator;
//      otherwise decouple a free slot, rewrite it through the configuration
//      port (pr_active for RCFG_CYCLES cycles, one load at a time), recouple,
//   3. write the arguments, enable the interrupt, start, wait for the
//      interrupt, clear it, release the slot.
// Results in the shared memory are compared with tb_ref_pkg. Counted and
// required to happen at least once: reconfigurations, reuse of an already
// loaded accelerator, waiting for a slot (slot contention), both slots busy
// at once, cycles in which a slot under reconfiguration drove spurious
// handshakes that the decoupler blocked, bus back-pressure, completions
// signalled by interrupt. Outputs towards the processor and memory must stay
// quiet whenever a slot is decoupled.
module tb_pl_top;
  import pr_pkg::*;
  import tb_ref_pkg::*;

  localparam int NSL = 2;
  localparam int W = 24, H = 8, N = 6;
  localparam int JOBS = 2;
  localparam int RCFG_CYCLES = 40;
  localparam logic [31:0] BASE = 32'h4000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  pl_top #(.N_SLOTS(NSL), .IMG_WIDTH(W), .IMG_HEIGHT(H), .MAT_DIM(N), .GP_BASE(BASE)) dut (
    .clk, .rst_n,
    .s_axil_gp_req(gp_req), .s_axil_gp_rsp(gp_rsp),
    .m_axi_hp_req(hp_req), .m_axi_hp_rsp(hp_rsp),
    .irq, .pr_active, .pr_rm, .loaded_rm(loaded), .decoupled, .state_out(st));

  axil_bfm #(.TIMEOUT(2000)) u_bfm (.clk, .req(gp_req), .rsp(gp_rsp));
  axi_mem_model #(.NP(NSL), .MEM_WORDS(1 << 15)) u_mem (.clk, .rst_n, .req(hp_req), .rsp(hp_rsp));

  initial begin
    repeat (400000) @(posedge clk);
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

  // ---------------- mechanism counters ----------------
  int n_reconfig = 0, n_reuse = 0, n_wait = 0, n_both_busy = 0;
  int n_blocked = 0, n_irq_done = 0, n_leak = 0;

  always @(posedge clk) if (rst_n) begin
    if (st[0][7] && st[1][7]) n_both_busy++;
    // slot under reconfiguration driving spurious requests that the decoupler holds back
    if (pr_active[0] && dut.g_slot[0].rm_axi_req.arvalid && !hp_req[0].arvalid) n_blocked++;
    if (pr_active[1] && dut.g_slot[1].rm_axi_req.arvalid && !hp_req[1].arvalid) n_blocked++;
    for (int k = 0; k < NSL; k++) begin
      if (decoupled[k] && (hp_req[k].arvalid || hp_req[k].awvalid || hp_req[k].wvalid || irq[k]))
        n_leak++;
    end
  end

  // ---------------- reconfiguration service model ----------------
  bit     slot_busy [NSL];
  op_id_t slot_rm   [NSL];
  bit     pcap_busy;

  // serialised AXI-Lite access (one processor port)
  bit gp_lock;
  task automatic gp_write(logic [31:0] a, logic [31:0] v);
    logic [1:0] r;
    while (gp_lock) @(posedge clk);
    gp_lock = 1;
    u_bfm.write(a, v, r);
    gp_lock = 0;
    expect_eq("gp write resp", 32'(r), 0);
  endtask
  task automatic gp_read(logic [31:0] a, output logic [31:0] v);
    logic [1:0] r;
    while (gp_lock) @(posedge clk);
    gp_lock = 1;
    u_bfm.read(a, v, r);
    gp_lock = 0;
    expect_eq("gp read resp", 32'(r), 0);
  endtask

  task automatic execute_hw_op(op_id_t op, logic [31:0] a0, logic [31:0] a1, logic [31:0] a2);
    int s;
    bit waited;
    logic [31:0] d;
    logic [31:0] ctl, dec;
    // 1. take a slot
    waited = 0;
    s = -1;
    while (s < 0) begin
      for (int k = 0; k < NSL; k++) if (!slot_busy[k] && slot_rm[k] == op && s < 0) s = k;
      for (int k = 0; k < NSL; k++) if (!slot_busy[k] && s < 0) s = k;
      if (s < 0) begin
        waited = 1;
        @(posedge clk);
      end
    end
    slot_busy[s] = 1;
    if (waited) n_wait++;
    ctl = BASE + 32'(s) * 32'h1000;
    dec = BASE + 32'(NSL + s) * 32'h1000;
    // 2. reconfigure if needed
    if (slot_rm[s] == op) begin
      n_reuse++;
    end else begin
      while (pcap_busy) @(posedge clk);
      pcap_busy = 1;
      gp_write(dec, 1);
      @(negedge clk);
      pr_active[s] = 1;
      pr_rm[s]     = op;
      repeat (RCFG_CYCLES) @(negedge clk);
      pr_active[s] = 0;
      repeat (8) @(negedge clk);
      gp_write(dec, 0);
      pcap_busy = 0;
      slot_rm[s] = op;
      n_reconfig++;
      gp_read(ctl + 32'(REG_ID), d);
      expect_eq("loaded id", d, op);
    end
    // 3. run
    gp_write(ctl + 32'(REG_ARGS) + 0, a0);
    gp_write(ctl + 32'(REG_ARGS) + 4, a1);
    gp_write(ctl + 32'(REG_ARGS) + 8, a2);
    gp_write(ctl + 32'(REG_GIE), 1);
    gp_write(ctl + 32'(REG_IER), 1);
    gp_write(ctl + 32'(REG_CTRL), 1);
    while (!irq[s]) @(posedge clk);
    n_irq_done++;
    gp_write(ctl + 32'(REG_ISR), 1);
    gp_read(ctl + 32'(REG_CTRL), d);
    expect_eq("done bit", d[1], 1);
    slot_busy[s] = 0;
  endtask

  // ---------------- data ----------------
  // region per task: source image / A, B at +0x2000 words, result at +0x4000 words
  function automatic logic [31:0] region(int t);
    return 32'h0000_4000 + 32'(t) * 32'h0000_6000;
  endfunction

  word_q_t img [3];
  word_q_t ma, mb;

  task automatic check_task(int t, int job);
    word_q_t e;
    logic [31:0] dst;
    dst = region(t) + 32'h4000;
    case (t)
      0: e = sobel_ref(img[0], W, H, 200, 60);
      1: e = conv5_ref(img[1], W, H, 0);
      2: e = conv5_ref(img[2], W, H, 1);
      default: e = mat_ref(ma, mb, N);
    endcase
    for (int i = 0; i < e.size(); i++)
      expect_eq($sformatf("task %0d job %0d word %0d", t, job, i), u_mem.mem[(dst >> 2) + i], e[i]);
  endtask

  initial begin
    for (int k = 0; k < NSL; k++) begin
      pr_active[k] = 0;
      pr_rm[k]     = OP_NONE;
      slot_busy[k] = 0;
      slot_rm[k]   = OP_NONE;
    end
    pcap_busy = 0;
    gp_lock   = 0;
    for (int t = 0; t < 3; t++)
      for (int i = 0; i < W * H; i++) begin
        img[t].push_back({8'h00, 24'($urandom)});
        u_mem.mem[(region(t) >> 2) + i] = img[t][i];
      end
    for (int i = 0; i < N * N; i++) begin
      ma.push_back($urandom);
      mb.push_back($urandom);
      u_mem.mem[(region(3) >> 2) + i] = ma[i];
      u_mem.mem[((region(3) + 32'h2000) >> 2) + i] = mb[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < NSL; k++) begin
      expect_eq("decoupled after reset", decoupled[k], 1);
      expect_eq("empty after reset", loaded[k], OP_NONE);
    end
    fork
      for (int j = 0; j < JOBS; j++) begin
        execute_hw_op(OP_SOBEL, region(0), region(0) + 32'h4000, 0);
        check_task(0, j);
      end
      for (int j = 0; j < JOBS; j++) begin
        repeat (30) @(posedge clk);
        execute_hw_op(OP_BLUR, region(1), region(1) + 32'h4000, 0);
        check_task(1, j);
      end
      for (int j = 0; j < JOBS; j++) begin
        repeat (60) @(posedge clk);
        execute_hw_op(OP_SHARP, region(2), region(2) + 32'h4000, 0);
        check_task(2, j);
      end
      for (int j = 0; j < JOBS; j++) begin
        repeat (90) @(posedge clk);
        execute_hw_op(OP_MULT, region(3), region(3) + 32'h2000, region(3) + 32'h4000);
        check_task(3, j);
      end
    join
    // a final back-to-back repeat of the last operation must reuse its slot
    execute_hw_op(OP_MULT, region(3), region(3) + 32'h2000, region(3) + 32'h4000);
    check_task(3, JOBS);

    $display("reconfigurations=%0d reuse=%0d slot_waits=%0d both_busy_cycles=%0d blocked_spurious=%0d irq_done=%0d bus_stalls=%0d",
             n_reconfig, n_reuse, n_wait, n_both_busy, n_blocked, n_irq_done, u_mem.stalls);
    checks++; if (n_reconfig == 0)  begin failures++; $display("no reconfiguration"); end
    checks++; if (n_reuse == 0)     begin failures++; $display("no slot reuse"); end
    checks++; if (n_wait == 0)      begin failures++; $display("no slot contention"); end
    checks++; if (n_both_busy == 0) begin failures++; $display("slots never ran together"); end
    checks++; if (n_blocked == 0)   begin failures++; $display("decoupler never blocked anything"); end
    checks++; if (n_irq_done != 4 * JOBS + 1) begin failures++; $display("completions %0d", n_irq_done); end
    checks++; if (u_mem.stalls == 0) begin failures++; $display("no back-pressure"); end
    expect_eq("decoupled outputs stayed quiet", n_leak, 0);
    expect_eq("bus protocol", u_mem.proto_errors, 0);
    expect_eq("control timeouts", u_bfm.timeouts, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
