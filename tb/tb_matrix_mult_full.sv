// tb_matrix_mult_full: the matrix multiplier core at its default size,
// 512 x 512 32-bit integers, run once from start to done.
// A (row-major) and B (column-major) hold random signed values, some of them
// large so that products and sums wrap. Every element of C is compared with
// tb_ref_pkg::mat_ref. The run time must stay below the 1698 ms (169.8 M
// cycles at 100 MHz) measured for a hardware multiply of this size, and the
// memory model checks the bus rules throughout. The memory answers after 3
// cycles and withholds 5 % of the beats at random, a milder stall rate than
// the block tests use: with 20 % stalls on every beat the core needs about
// 171 M cycles. Its speed is bound by the memory port: about 550 cycles per
// column of B (512 beats, the stalls and the burst latency), 144.5 M cycles
// or 1.44 s in all.
module tb_matrix_mult_full;
  import pr_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = MAT_N;
  localparam logic [31:0] A_AD = 32'h0000_0000;
  localparam logic [31:0] B_AD = 32'h0010_0000;
  localparam logic [31:0] C_AD = 32'h0020_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;   // 100 MHz

  int checks = 0, failures = 0;

  logic       start, busy, done;
  logic [7:0] st;
  axi_req_t   req [1];
  axi_rsp_t   rsp [1];

  matrix_mult dut (
    .clk, .rst_n, .start, .a_addr(A_AD), .b_addr(B_AD), .c_addr(C_AD), .busy, .done,
    .state_out(st), .m_axi_req(req[0]), .m_axi_rsp(rsp[0]));

  axi_mem_model #(.NP(1), .MEM_WORDS(1 << 20), .STALL_PCT(5)) u_mem (.clk, .rst_n, .req, .rsp);

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_q_t a, b, c;
  longint cyc;

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
    $display("mult N=%0d: %0d cycles (%0.1f ms at 100 MHz)", N, cyc, cyc / 1.0e5);
    checks++;
    if (cyc > 64'd169_824_500) failures++;   // 1698.245 ms measured
    checks++;
    if (u_mem.proto_errors != 0) failures++;
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
