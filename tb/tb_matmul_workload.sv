// tb_matmul_workload: matrix multiplication on the SIMD-1D accelerators of
// the platform, the benchmark used to rate them, at a size that simulates
// in seconds: C = A x B with 32 x 32 matrices of 16-bit integers (results
// modulo 2^16).
//
// The four 8-column groups of C are spread over the three SIMD-1D
// accelerators (groups 0 and 3 on accelerator 0). For group g the CPU
// loads into an accelerator:
//   A[i][k], index q = 32i + k, at word 16*(q/8) + 8 + q%8  (banks 8..15)
//   B[k][8g+j]                  at word 16k + j             (banks 0..7)
// so that the 16 read ports never collide: all PEs share the A word
// (broadcast), PE j reads its own B column. The a-AGUs walk A with
// c = 1, n = 8, m = 9; the b-AGU of PE j walks column j with c = 16,
// n = 32, m = -31*16; the output AGU puts row i of the group at
// 2048 + 32i + 8g. Each run is 32 rounds of 32 multiply-accumulates and
// must take 1 + 32*32 + 6 cycles: one multiply-accumulate per PE per
// cycle, 8 per accelerator. All of C is read back and checked.
module tb_matmul_workload;
  import hmp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [23:0] bus_addr = '0;
  logic bus_we = 1'b0, bus_re = 1'b0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_rvalid;
  logic [2:0] simd_done;
  logic [1:0] mimd_done;
  int checks = 0, failures = 0;

  hmp_platform dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] SIMD(int i); return 8'(8'h01 + i); endfunction

  task automatic wr(logic [7:0] t, logic [15:0] a, logic [31:0] d);
    @(negedge clk); bus_addr = {t, a}; bus_wdata = d; bus_we = 1'b1;
    @(negedge clk); bus_we = 1'b0;
  endtask

  task automatic rd(logic [7:0] t, logic [15:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = {t, a}; bus_re = 1'b1;
    @(negedge clk); bus_re = 1'b0; d = bus_rdata;
  endtask

  task automatic agu(int acc, int i, int p, int c, int n, int m);
    wr(SIMD(acc), 16'h0100 + 16'(4*i),     32'(p) & 32'hfff);
    wr(SIMD(acc), 16'h0100 + 16'(4*i) + 1, 32'(c) & 32'hfff);
    wr(SIMD(acc), 16'h0100 + 16'(4*i) + 2, 32'(n));
    wr(SIMD(acc), 16'h0100 + 16'(4*i) + 3, 32'(m) & 32'hfff);
  endtask

  localparam int S = 32;
  logic [15:0] A [S][S], B [S][S];

  // load A, column group g of B and the program into accelerator acc
  task automatic setup(int acc, int g);
    simd_instr_t ins;
    for (int q = 0; q < S * S; q++)
      wr(SIMD(acc), 16'h8000 + 16'(16 * (q / 8) + 8 + q % 8), 32'(A[q / S][q % S]));
    for (int k = 0; k < S; k++) for (int j = 0; j < 8; j++)
      wr(SIMD(acc), 16'h8000 + 16'(16 * k + j), 32'(B[k][8 * g + j]));
    ins.pre = PRE_A; ins.pair_sel = 1'b0; ins.mul = MUL_B; ins.post = POST_ACC;
    wr(SIMD(acc), 16'h0001, 32'(ins));
    wr(SIMD(acc), 16'h0003, S);
    wr(SIMD(acc), 16'h0004, S);
    for (int j = 0; j < 8; j++) begin
      agu(acc, 2*j,   8, 1,  8, 9);
      agu(acc, 2*j+1, j, 16, S, -(S - 1) * 16);
    end
    agu(acc, 16, 2048 + 8 * g, 32, 1, 32);
  endtask

  task automatic check_group(int acc, int g);
    logic [31:0] d;
    logic [15:0] e;
    for (int i = 0; i < S; i++) for (int j = 0; j < 8; j++) begin
      e = '0;
      for (int k = 0; k < S; k++) e += A[i][k] * B[k][8 * g + j];
      rd(SIMD(acc), 16'h8000 + 16'(2048 + 32 * i + 8 * g + j), d);
      checks++;
      if (d !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL C[%0d][%0d] got %h exp %h", i, 8 * g + j, d, e);
      end
    end
  endtask

  // start accelerators in `mask` together; each must finish in 1 + S*S + 6 cycles
  task automatic run(logic [2:0] mask);
    int n;
    for (int a = 0; a < 3; a++) if (mask[a]) begin
      @(negedge clk); bus_addr = {SIMD(a), 16'h0000}; bus_wdata = 1; bus_we = 1'b1;
    end
    @(negedge clk); bus_we = 1'b0;
    n = 1;
    while ((simd_done & mask) != mask) begin @(negedge clk); n++; end
    // the last started finished 1 + S*S + 6 cycles after its start write
    checks++;
    if (n != 1 + S * S + 6) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", n, 1 + S * S + 6);
    end
  endtask

  initial begin
    for (int i = 0; i < S; i++) for (int j = 0; j < S; j++) begin
      A[i][j] = 16'($urandom);
      B[i][j] = 16'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 3; a++) setup(a, a);
    run(3'b111);
    for (int a = 0; a < 3; a++) check_group(a, a);
    setup(0, 3);
    run(3'b001);
    check_group(0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
