// tb_matrix_mult: self-checking test of the matrix multiplier core.
// Random signed 32-bit matrices (with some large values, so products wrap)
// are multiplied: A row-major, B column-major, C row-major. B is placed so
// that its columns cross a 4 KB boundary. Every element of C is compared
// with tb_ref_pkg::mat_ref; the bus protocol and the run time (about one
// multiply-accumulate per beat of B plus per-burst latency) are checked too.
module tb_matrix_mult;
  import pr_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 12;
  localparam logic [31:0] A_AD = 32'h0000_0100;
  localparam logic [31:0] B_AD = 32'h0000_0F40;
  localparam logic [31:0] C_AD = 32'h0000_3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start, busy, done;
  logic [7:0] st;
  axi_req_t   req [1];
  axi_rsp_t   rsp [1];

  matrix_mult #(.N(N)) dut (
    .clk, .rst_n, .start, .a_addr(A_AD), .b_addr(B_AD), .c_addr(C_AD), .busy, .done,
    .state_out(st), .m_axi_req(req[0]), .m_axi_rsp(rsp[0]));

  axi_mem_model #(.NP(1), .MEM_WORDS(1 << 13)) u_mem (.clk, .rst_n, .req, .rsp);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_q_t a, b, c;
  int cyc;

  initial begin
    start = 0;
    for (int i = 0; i < N * N; i++) begin
      logic [31:0] va, vb;
      va = (i % 5 == 0) ? $urandom : 32'($signed($urandom_range(2000)) - 1000);
      vb = (i % 7 == 0) ? $urandom : 32'($signed($urandom_range(2000)) - 1000);
      a.push_back(va);
      b.push_back(vb);
      u_mem.mem[(A_AD >> 2) + i] = va;
      u_mem.mem[(B_AD >> 2) + i] = vb;
    end
    u_mem.mem[(C_AD >> 2) + N * N] = 32'hDEAD_BEEF;
    c = mat_ref(a, b, N);
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
    for (int i = 0; i < N * N; i++) begin
      checks++;
      if (u_mem.mem[(C_AD >> 2) + i] !== c[i]) begin
        failures++;
        if (failures < 10) $display("c[%0d]: got %h exp %h", i, u_mem.mem[(C_AD >> 2) + i], c[i]);
      end
    end
    checks++;
    if (u_mem.mem[(C_AD >> 2) + N * N] !== 32'hDEAD_BEEF) failures++;
    checks++;
    if (cyc > 2 * N * N * N + 24 * N * N) begin
      failures++;
      $display("too slow: %0d cycles", cyc);
    end
    checks++;
    if (cyc < N * N * N) failures++;  // cannot be faster than one MAC per cycle
    checks++;
    if (u_mem.proto_errors != 0) failures++;
    checks++;
    if (busy) failures++;
    $display("mult N=%0d: %0d cycles", N, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
