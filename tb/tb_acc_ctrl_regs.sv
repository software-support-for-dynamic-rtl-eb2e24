// tb_acc_ctrl_regs: self-checking test of the accelerator control registers.
// A stand-in core answers each start pulse by staying busy for BUSY_CYC
// cycles and then pulsing done. Checked over AXI4-Lite: the identifier,
// argument write/read-back, the idle/done bits (done clears on read), that
// a start written while busy is ignored, interrupt gating by GIE and IER,
// and clearing the interrupt by toggling ISR.
module tb_acc_ctrl_regs;
  import pr_pkg::*;

  localparam int BUSY_CYC = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  axil_req_t req;
  axil_rsp_t rsp;
  logic core_start, core_busy, core_done, irq;
  logic [31:0] args [ARGS_SIZE];

  acc_ctrl_regs #(.ID(8'h5A)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .core_start, .core_busy, .core_done, .args, .irq);

  axil_bfm u_bfm (.clk, .req, .rsp);

  // stand-in core
  int starts = 0;
  initial begin
    core_busy = 0;
    core_done = 0;
    forever begin
      @(posedge clk);
      if (core_start) begin
        starts++;
        core_busy <= 1;
        repeat (BUSY_CYC) @(posedge clk);
        core_busy <= 0;
        core_done <= 1;
        @(posedge clk);
        core_done <= 0;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [31:0] d;
  logic [1:0]  r;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    u_bfm.read(32'h10, d, r);  expect_eq("id", d, 32'h5A);
    expect_eq("resp", 32'(r), 0);
    u_bfm.read(32'h00, d, r);  expect_eq("ctrl idle after reset", d, 32'h0C);
    for (int k = 0; k < ARGS_SIZE; k++) u_bfm.write(32'h20 + 4 * k, 32'h1000_0000 * (k + 1) + k, r);
    for (int k = 0; k < ARGS_SIZE; k++) begin
      u_bfm.read(32'h20 + 4 * k, d, r);
      expect_eq("arg readback", d, 32'h1000_0000 * (k + 1) + k);
      expect_eq("arg port", args[k], 32'h1000_0000 * (k + 1) + k);
    end
    // run without interrupts enabled
    u_bfm.write(32'h00, 32'h1, r);
    u_bfm.read(32'h00, d, r);  expect_eq("ctrl busy", d & 32'h4, 0);
    u_bfm.write(32'h00, 32'h1, r);             // ignored: core busy
    repeat (BUSY_CYC + 5) @(posedge clk);
    expect_eq("one start only", starts, 1);
    expect_eq("no irq without enables", 32'(irq), 0);
    u_bfm.read(32'h00, d, r);  expect_eq("ctrl done+idle", d, 32'h0E);
    u_bfm.read(32'h00, d, r);  expect_eq("done cleared on read", d, 32'h0C);
    u_bfm.read(32'h0C, d, r);  expect_eq("isr clear (ier off)", d, 0);
    // run with interrupts
    u_bfm.write(32'h04, 32'h1, r);
    u_bfm.write(32'h08, 32'h1, r);
    u_bfm.write(32'h00, 32'h1, r);
    checks++;
    if (irq) failures++;
    repeat (BUSY_CYC + 5) @(posedge clk);
    expect_eq("starts", starts, 2);
    expect_eq("irq raised", 32'(irq), 1);
    u_bfm.read(32'h0C, d, r);  expect_eq("isr set", d, 1);
    u_bfm.write(32'h0C, 32'h1, r);
    expect_eq("irq cleared", 32'(irq), 0);
    // GIE off masks the interrupt
    u_bfm.write(32'h04, 32'h0, r);
    u_bfm.write(32'h00, 32'h1, r);
    repeat (BUSY_CYC + 5) @(posedge clk);
    expect_eq("irq masked by GIE", 32'(irq), 0);
    u_bfm.read(32'h0C, d, r);  expect_eq("isr set again", d, 1);
    expect_eq("bfm timeouts", u_bfm.timeouts, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
