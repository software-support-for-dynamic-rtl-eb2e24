// tb_pr_decoupler: self-checking test of the slot decoupler.
// Random values are driven on every input crossing the slot boundary, in
// both directions, for many cycles, with the decouple register first at its
// reset value (set), then cleared and set again over the control port. Each
// cycle the outputs are compared with the expected result: a straight copy
// when coupled; when decoupled, the same copy with every VALID/READY and the
// interrupt forced to zero.
module tb_pr_decoupler;
  import pr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  axil_req_t ctrl_req, s_axil_req, rm_axil_req;
  axil_rsp_t ctrl_rsp, s_axil_rsp, rm_axil_rsp;
  axi_req_t  m_axi_req, rm_axi_req;
  axi_rsp_t  m_axi_rsp, rm_axi_rsp;
  logic      decouple, irq, rm_irq;

  pr_decoupler dut (
    .clk, .rst_n, .s_ctrl_req(ctrl_req), .s_ctrl_rsp(ctrl_rsp), .decouple,
    .s_axil_req, .s_axil_rsp, .m_axi_req, .m_axi_rsp, .irq,
    .rm_axil_req, .rm_axil_rsp, .rm_axi_req, .rm_axi_rsp, .rm_irq);

  axil_bfm u_bfm (.clk, .req(ctrl_req), .rsp(ctrl_rsp));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [511:0] rnd512();
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  int n_iso = 0, n_pass = 0;

  // one randomised cycle, checked against the expected isolation
  task automatic poke_and_check(bit iso);
    axil_req_t e_rm_axil_req;
    axil_rsp_t e_s_axil_rsp;
    axi_req_t  e_m_axi_req;
    axi_rsp_t  e_rm_axi_rsp;
    @(negedge clk);
    s_axil_req  = axil_req_t'(rnd512());
    rm_axil_rsp = axil_rsp_t'(rnd512());
    rm_axi_req  = axi_req_t'(rnd512());
    m_axi_rsp   = axi_rsp_t'(rnd512());
    rm_irq      = 1'b1;
    #1;
    e_rm_axil_req = s_axil_req;
    e_s_axil_rsp  = rm_axil_rsp;
    e_m_axi_req   = rm_axi_req;
    e_rm_axi_rsp  = m_axi_rsp;
    if (iso) begin
      {e_rm_axil_req.awvalid, e_rm_axil_req.wvalid, e_rm_axil_req.bready,
       e_rm_axil_req.arvalid, e_rm_axil_req.rready} = '0;
      {e_s_axil_rsp.awready, e_s_axil_rsp.wready, e_s_axil_rsp.bvalid,
       e_s_axil_rsp.arready, e_s_axil_rsp.rvalid} = '0;
      {e_m_axi_req.arvalid, e_m_axi_req.rready, e_m_axi_req.awvalid,
       e_m_axi_req.wvalid, e_m_axi_req.bready} = '0;
      {e_rm_axi_rsp.arready, e_rm_axi_rsp.rvalid, e_rm_axi_rsp.awready,
       e_rm_axi_rsp.wready, e_rm_axi_rsp.bvalid} = '0;
      n_iso++;
    end else n_pass++;
    checks += 5;
    if (rm_axil_req !== e_rm_axil_req) failures++;
    if (s_axil_rsp  !== e_s_axil_rsp)  failures++;
    if (m_axi_req   !== e_m_axi_req)   failures++;
    if (rm_axi_rsp  !== e_rm_axi_rsp)  failures++;
    if (irq !== !iso) failures++;
  endtask

  logic [31:0] d;
  logic [1:0]  r;

  initial begin
    s_axil_req = '0; rm_axil_rsp = '0; rm_axi_req = '0; m_axi_rsp = '0; rm_irq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (decouple !== 1'b1) failures++;
    for (int i = 0; i < 50; i++) poke_and_check(1);
    u_bfm.write(32'h0, 32'h0, r);
    u_bfm.read(32'h0, d, r);
    checks++;
    if (d !== 32'h0) failures++;
    for (int i = 0; i < 50; i++) poke_and_check(0);
    u_bfm.write(32'h0, 32'h1, r);
    u_bfm.read(32'h0, d, r);
    checks++;
    if (d !== 32'h1) failures++;
    for (int i = 0; i < 50; i++) poke_and_check(1);
    checks++;
    if (u_bfm.timeouts != 0) failures++;
    $display("isolated cycles %0d, pass-through cycles %0d", n_iso, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
