// tb_axil_decoder: self-checking test of the control interconnect.
// Three accelerator control-register blocks with different identifiers sit
// behind the decoder. The test reads every identifier through its window,
// writes a distinct value into each slave's argument words and reads them
// all back (a routing mistake shows up as a wrong or missing value), and
// checks that addresses below and above the windows get DECERR without
// reaching any slave.
module tb_axil_decoder;
  import pr_pkg::*;

  localparam int NS = 3;
  localparam logic [31:0] BASE = 32'h4000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  axil_req_t s_req;
  axil_rsp_t s_rsp;
  axil_req_t m_req [NS];
  axil_rsp_t m_rsp [NS];
  logic [31:0] args [NS][ARGS_SIZE];
  logic irq [NS];
  logic cs [NS];

  axil_decoder #(.NS(NS), .BASE(BASE)) dut (.clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp);
  axil_bfm u_bfm (.clk, .req(s_req), .rsp(s_rsp));

  for (genvar k = 0; k < NS; k++) begin : g_s
    acc_ctrl_regs #(.ID(8'(8'h30 + k))) u_s (
      .clk, .rst_n, .s_axil_req(m_req[k]), .s_axil_rsp(m_rsp[k]),
      .core_start(cs[k]), .core_busy(1'b0), .core_done(1'b0), .args(args[k]), .irq(irq[k]));
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
    for (int k = 0; k < NS; k++) begin
      u_bfm.read(BASE + 32'(k) * 32'h1000 + 32'(REG_ID), d, r);
      expect_eq("id", d, 32'h30 + k);
      expect_eq("id resp", 32'(r), 32'(RESP_OKAY));
    end
    for (int k = 0; k < NS; k++)
      for (int j = 0; j < ARGS_SIZE; j++) begin
        u_bfm.write(BASE + 32'(k) * 32'h1000 + 32'(REG_ARGS) + 4 * j, 32'hA000_0000 + 16 * k + j, r);
        expect_eq("write resp", 32'(r), 32'(RESP_OKAY));
      end
    for (int k = NS - 1; k >= 0; k--)
      for (int j = 0; j < ARGS_SIZE; j++) begin
        u_bfm.read(BASE + 32'(k) * 32'h1000 + 32'(REG_ARGS) + 4 * j, d, r);
        expect_eq("arg", d, 32'hA000_0000 + 16 * k + j);
        expect_eq("arg port", args[k][j], 32'hA000_0000 + 16 * k + j);
      end
    // unmapped addresses
    u_bfm.write(BASE + NS * 32'h1000 + 32'(REG_ARGS), 32'h1234, r);
    expect_eq("decerr write above", 32'(r), 32'(RESP_DECERR));
    u_bfm.read(BASE - 4, d, r);
    expect_eq("decerr read below", 32'(r), 32'(RESP_DECERR));
    u_bfm.read(BASE + NS * 32'h1000, d, r);
    expect_eq("decerr read above", 32'(r), 32'(RESP_DECERR));
    for (int k = 0; k < NS; k++) expect_eq("slave untouched", args[k][0], 32'hA000_0000 + 16 * k);
    // a mapped access still works after the errors
    u_bfm.read(BASE + 32'h1000 + 32'(REG_ID), d, r);
    expect_eq("id after error", d, 32'h31);
    expect_eq("timeouts", u_bfm.timeouts, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
