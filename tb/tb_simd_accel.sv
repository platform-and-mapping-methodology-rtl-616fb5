// tb_simd_accel: self-checking test of the SIMD-1D accelerator through its
// CPU port.
//
//  1. matrix product C = A x B, A 6x5, B 5x8: PE j computes column j of C
//     with the multiply-accumulate instruction, one row of C per round
//     (ACC_LEN = 5, NOUT = 6). A sits in bank 8 with a row stride of 16,
//     B in banks 0..7, so the 16 read ports never collide; all PEs read the
//     same A word (broadcast).
//  2. absolute difference with PE pairs: PE 2p reads (x, y), PE 2p+1 reads
//     (y, x), instruction a-b with pair select, 20 rounds.
//  3. (a + b) * k + k and min(a, b) on random data.
//  4. a deliberate bank conflict must raise the conflict status bit.
// Every result is compared with values computed in the testbench; the run
// time from the start write to done must be 1 + ACC_LEN*NOUT + 6 cycles
// (one operand pair per PE per cycle).
module tb_simd_accel;
  import hmp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] hst_addr = '0;
  logic hst_we = 1'b0, hst_re = 1'b0;
  logic [31:0] hst_wdata = '0, hst_rdata;
  logic done;
  int checks = 0, failures = 0;

  simd_accel dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic simd_instr_t mk(simd_pre_e pr, logic ps, simd_mul_e mu, simd_post_e po);
    simd_instr_t i;
    i.pre = pr; i.pair_sel = ps; i.mul = mu; i.post = po;
    return i;
  endfunction

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); hst_addr = a; hst_wdata = d; hst_we = 1'b1;
    @(negedge clk); hst_we = 1'b0;
  endtask

  task automatic rd(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); hst_addr = a; hst_re = 1'b1;
    @(negedge clk); hst_re = 1'b0; d = hst_rdata;
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic set_agu(int i, int p, int c, int n, int m);
    wr(16'h0100 + 16'(4*i),     32'(p));
    wr(16'h0100 + 16'(4*i) + 1, 32'(c) & 32'hfff);
    wr(16'h0100 + 16'(4*i) + 2, 32'(n));
    wr(16'h0100 + 16'(4*i) + 3, 32'(m) & 32'hfff);
  endtask

  // start, wait for done, check the cycle count
  task automatic run(int expected_cycles);
    int n;
    wr(16'h0000, 32'd1);
    n = 0;
    while (!done) begin @(negedge clk); n++; end
    checks++;
    if (n + 1 != expected_cycles) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", n + 1, expected_cycles);
    end
  endtask

  localparam int M = 6, K = 5;
  logic [15:0] A [M][K];
  logic [15:0] B [K][8];

  initial begin
    logic [31:0] d;
    logic [15:0] e;
    logic [15:0] X [4][20], Y [4][20];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------------------------------------- 1. matrix product
    for (int i = 0; i < M; i++) for (int k = 0; k < K; k++) begin
      A[i][k] = 16'($urandom_range(0, 200)) - 16'd100;
      wr(16'h8000 + 16'(8 + 16 * (i * K + k)), 32'(A[i][k]));
    end
    for (int k = 0; k < K; k++) for (int j = 0; j < 8; j++) begin
      B[k][j] = 16'($urandom_range(0, 200)) - 16'd100;
      wr(16'h8000 + 16'(1024 + 16 * k + j), 32'(B[k][j]));
    end
    wr(16'h0001, 32'(mk(PRE_A, 1'b0, MUL_B, POST_ACC)));
    wr(16'h0003, K);
    wr(16'h0004, M);
    for (int j = 0; j < 8; j++) begin
      set_agu(2*j,   8,        16, K, 16);
      set_agu(2*j+1, 1024 + j, 16, K, -(K - 1) * 16);
    end
    set_agu(16, 2048, 8, 1, 8);
    rd(16'h0100 + 16'(4*3) + 3, d);
    chk(d, 32'(-(K - 1) * 16) & 32'hfff, "agu register read-back");
    run(1 + K * M + 6);
    rd(16'h0000, d);
    chk(d, 32'b001, "status after matmul (done, no conflict)");
    for (int i = 0; i < M; i++) for (int j = 0; j < 8; j++) begin
      e = '0;
      for (int k = 0; k < K; k++) e += A[i][k] * B[k][j];
      rd(16'h8000 + 16'(2048 + 8 * i + j), d);
      chk(d, 32'(e), $sformatf("C[%0d][%0d]", i, j));
    end

    // ---------------------------------------------- 2. absolute difference
    for (int p = 0; p < 4; p++) for (int t = 0; t < 20; t++) begin
      X[p][t] = 16'($urandom_range(0, 255)); Y[p][t] = 16'($urandom_range(0, 255));
      wr(16'h8000 + 16'(16 * t + 2 * p),     32'(X[p][t]));
      wr(16'h8000 + 16'(16 * t + 2 * p + 1), 32'(Y[p][t]));
    end
    wr(16'h0001, 32'(mk(PRE_SUB, 1'b1, MUL_NONE, POST_NONE)));
    wr(16'h0003, 1);
    wr(16'h0004, 20);
    for (int p = 0; p < 4; p++) begin
      set_agu(4*p,     2*p,     16, 1, 16);   // PE 2p:   a = x, b = y
      set_agu(4*p + 1, 2*p + 1, 16, 1, 16);
      set_agu(4*p + 2, 2*p + 1, 16, 1, 16);   // PE 2p+1: a = y, b = x
      set_agu(4*p + 3, 2*p,     16, 1, 16);
    end
    set_agu(16, 3072, 8, 1, 8);
    run(1 + 20 + 6);
    for (int t = 0; t < 20; t++) for (int j = 0; j < 8; j++) begin
      int p;
      p = j / 2;
      e = (X[p][t] > Y[p][t]) ? X[p][t] - Y[p][t] : Y[p][t] - X[p][t];
      rd(16'h8000 + 16'(3072 + 8 * t + j), d);
      chk(d, 32'(e), $sformatf("|x-y| t=%0d pe=%0d", t, j));
    end

    // ---------------------------------------------- 3. (a+b)*k+k, min
    for (int op = 0; op < 2; op++) begin
      logic [15:0] kk;
      kk = 16'($urandom);
      wr(16'h0002, 32'(kk));
      if (op == 0) wr(16'h0001, 32'(mk(PRE_ADD, 1'b0, MUL_K, POST_K)));
      else         wr(16'h0001, 32'(mk(PRE_MIN, 1'b0, MUL_NONE, POST_NONE)));
      wr(16'h0004, 10);
      for (int j = 0; j < 8; j++) begin
        set_agu(2*j,   j,     16, 1, 16);   // a in banks 0..7
        set_agu(2*j+1, 8 + j, 16, 1, 16);   // b in banks 8..15
      end
      set_agu(16, 3584, 8, 1, 8);
      run(1 + 10 + 6);
      for (int t = 0; t < 10; t++) for (int j = 0; j < 8; j++) begin
        logic [31:0] va, vb;
        rd(16'h8000 + 16'(16 * t + j), va);
        rd(16'h8000 + 16'(16 * t + 8 + j), vb);
        if (op == 0) e = (va[15:0] + vb[15:0]) * kk + kk;
        else         e = ($signed(va[15:0]) < $signed(vb[15:0])) ? va[15:0] : vb[15:0];
        rd(16'h8000 + 16'(3584 + 8 * t + j), d);
        chk(d, 32'(e), $sformatf("op%0d t=%0d pe=%0d", op, t, j));
      end
    end

    // ---------------------------------------------- 4. bank conflict
    set_agu(3, 16 * 7 + 2, 16, 1, 16);   // PE1 b: bank 2, other row than PE1 a
    wr(16'h0004, 2);
    run(1 + 2 + 6);
    rd(16'h0000, d);
    chk(d, 32'b101, "conflict status");
    // done clears with the next start
    wr(16'h0000, 32'd1);
    rd(16'h0000, d);
    chk(d[0], 1'b0, "done cleared by start");
    repeat (12) @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
