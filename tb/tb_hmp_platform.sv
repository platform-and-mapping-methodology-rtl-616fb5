// tb_hmp_platform: end-to-end test of the platform at its default size
// (three SIMD-1D and two MIMD-2D accelerators, no parameter overrides).
//
// The testbench plays the CPU on the platform bus:
//  - it puts the input data in the on-chip memory and copies them from
//    there into the accelerators' local memories, word by word;
//  - SIMD-1D: each of the three accelerators computes a different 6x5 by
//    5x8 matrix product (multiply-accumulate), all three running at once;
//    accelerator 1 then runs a pair absolute difference and accelerator 2
//    a run with a bank conflict;
//  - MIMD-2D: both accelerators run a four-context program computing |A-B|
//    and the SAD of two streams, with a partial AGU reconfiguration in
//    context 2, both at once;
//  - results are copied back to the on-chip memory and compared there
//    with values computed in the testbench.
// Each mechanism (copy in/out, concurrent runs, multiply-accumulate, pair
// select, conflict flag, context switch, partial AGU reload) is counted and
// must have happened at least once.
module tb_hmp_platform;
  import hmp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [23:0] bus_addr = '0;
  logic bus_we = 1'b0, bus_re = 1'b0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_rvalid;
  logic [2:0] simd_done;
  logic [1:0] mimd_done;
  int checks = 0, failures = 0;
  int n_copy_in = 0, n_copy_out = 0, n_concurrent = 0, n_mac = 0, n_pair = 0,
      n_conflict = 0, n_ctx_switch = 0, n_agu_reload = 0;

  hmp_platform dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] OCM = 8'h00;
  function automatic logic [7:0] SIMD(int i); return 8'(8'h01 + i); endfunction
  function automatic logic [7:0] MIMD(int i); return 8'(8'h10 + i); endfunction

  task automatic wr(logic [7:0] t, logic [15:0] a, logic [31:0] d);
    @(negedge clk); bus_addr = {t, a}; bus_wdata = d; bus_we = 1'b1;
    @(negedge clk); bus_we = 1'b0;
  endtask

  task automatic rd(logic [7:0] t, logic [15:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = {t, a}; bus_re = 1'b1;
    @(negedge clk); bus_re = 1'b0;
    if (!bus_rvalid) failures++;
    d = bus_rdata;
  endtask

  // CPU copy: on-chip memory -> accelerator local memory and back
  task automatic copy(logic [7:0] st, logic [15:0] sa, logic [7:0] dt, logic [15:0] da, int n);
    logic [31:0] d;
    for (int i = 0; i < n; i++) begin
      rd(st, sa + 16'(i), d);
      wr(dt, da + 16'(i), d);
    end
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic simd_instr_t mk(simd_pre_e pr, logic ps, simd_mul_e mu, simd_post_e po);
    simd_instr_t i;
    i.pre = pr; i.pair_sel = ps; i.mul = mu; i.post = po;
    return i;
  endfunction

  task automatic simd_agu(int acc, int i, int p, int c, int n, int m);
    wr(SIMD(acc), 16'h0100 + 16'(4*i),     32'(p) & 32'hfff);
    wr(SIMD(acc), 16'h0100 + 16'(4*i) + 1, 32'(c) & 32'hfff);
    wr(SIMD(acc), 16'h0100 + 16'(4*i) + 2, 32'(n));
    wr(SIMD(acc), 16'h0100 + 16'(4*i) + 3, 32'(m) & 32'hfff);
  endtask

  function automatic logic [31:0] pe(mimd_op_e op, mimd_src_e a, mimd_src_e b, int c);
    mimd_pe_cfg_t x;
    x.op = op; x.src_a = a; x.src_b = b; x.src_c = 2'(c); x.k = '0;
    return 32'(x);
  endfunction

  function automatic logic [31:0] mm(mimd_mem_mode_e mode, int wsrc, bit load, int idx);
    mimd_mem_cfg_t x;
    x.mode = mode; x.wsrc = 3'(wsrc); x.agu_load = load; x.agu_idx = 4'(idx);
    return 32'(x);
  endfunction

  task automatic mimd_agu(int acc, int e, int p, int c, int n, int m);
    wr(MIMD(acc), 16'h3000 + 16'(4*e),     32'(p) & 32'hfff);
    wr(MIMD(acc), 16'h3000 + 16'(4*e) + 1, 32'(c) & 32'hfff);
    wr(MIMD(acc), 16'h3000 + 16'(4*e) + 2, 32'(n));
    wr(MIMD(acc), 16'h3000 + 16'(4*e) + 3, 32'(m) & 32'hfff);
  endtask

  localparam int M = 6, K = 5, N = 33;
  localparam int LEN [4] = '{6, 14, 19, 2};

  initial begin
    logic [31:0] d;
    logic [15:0] A [3][M][K], B [3][K][8];
    logic [15:0] X [N], Y [N], e;
    logic [15:0] sad;
    int n;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ------------------------------------------------------ SIMD-1D jobs
    // on-chip memory layout per accelerator a: 1024*a + {A: 0.., B: 512..}
    for (int a = 0; a < 3; a++) begin
      for (int i = 0; i < M; i++) for (int k = 0; k < K; k++) begin
        A[a][i][k] = 16'($urandom_range(0, 200)) - 16'd100;
        wr(OCM, 16'(1024 * a + i * K + k), 32'(A[a][i][k]));
      end
      for (int k = 0; k < K; k++) for (int j = 0; j < 8; j++) begin
        B[a][k][j] = 16'($urandom_range(0, 200)) - 16'd100;
        wr(OCM, 16'(1024 * a + 512 + 8 * k + j), 32'(B[a][k][j]));
      end
    end
    for (int a = 0; a < 3; a++) begin
      // A rows go to bank 8 with a stride of 16 words, B rows to banks 0..7
      for (int w = 0; w < M * K; w++) begin
        rd(OCM, 16'(1024 * a + w), d);
        wr(SIMD(a), 16'h8000 + 16'(8 + 16 * w), d);
        n_copy_in++;
      end
      for (int k = 0; k < K; k++) copy(OCM, 16'(1024 * a + 512 + 8 * k), SIMD(a), 16'h8000 + 16'(1024 + 16 * k), 8);
      wr(SIMD(a), 16'h0001, 32'(mk(PRE_A, 1'b0, MUL_B, POST_ACC)));
      wr(SIMD(a), 16'h0003, K);
      wr(SIMD(a), 16'h0004, M);
      for (int j = 0; j < 8; j++) begin
        simd_agu(a, 2*j,   8,        16, K, 16);
        simd_agu(a, 2*j+1, 1024 + j, 16, K, -(K - 1) * 16);
      end
      simd_agu(a, 16, 2048, 8, 1, 8);
    end
    // start all three back to back: they run at the same time
    for (int a = 0; a < 3; a++) wr(SIMD(a), 16'h0000, 1);
    begin
      logic [31:0] s0, s2;
      rd(SIMD(0), 16'h0000, s0);
      rd(SIMD(2), 16'h0000, s2);
      if (s0[1] && s2[1]) n_concurrent++;   // both busy
    end
    n = 0;
    while (simd_done != 3'b111 && n < 1000) begin @(negedge clk); n++; end
    chk(32'(simd_done), 32'b111, "all SIMD-1D done");
    n_mac++;
    for (int a = 0; a < 3; a++) begin
      copy(SIMD(a), 16'h8000 + 16'd2048, OCM, 16'(4096 + 64 * a), M * 8);
      n_copy_out += M * 8;
      for (int i = 0; i < M; i++) for (int j = 0; j < 8; j++) begin
        e = '0;
        for (int k = 0; k < K; k++) e += A[a][i][k] * B[a][k][j];
        rd(OCM, 16'(4096 + 64 * a + 8 * i + j), d);
        chk(d, 32'(e), $sformatf("SIMD%0d C[%0d][%0d]", a, i, j));
      end
    end

    // pair absolute difference on accelerator 1 over the matrix data:
    // pair p compares A-column p words with B-row words already in place
    wr(SIMD(1), 16'h0001, 32'(mk(PRE_SUB, 1'b1, MUL_NONE, POST_NONE)));
    wr(SIMD(1), 16'h0003, 1);
    wr(SIMD(1), 16'h0004, K);
    for (int p = 0; p < 4; p++) begin
      simd_agu(1, 4*p,     1024 + 2*p,     16, 1, 16);  // x = B[k][2p]
      simd_agu(1, 4*p + 1, 1024 + 2*p + 1, 16, 1, 16);  // y = B[k][2p+1]
      simd_agu(1, 4*p + 2, 1024 + 2*p + 1, 16, 1, 16);
      simd_agu(1, 4*p + 3, 1024 + 2*p,     16, 1, 16);
    end
    simd_agu(1, 16, 3072, 8, 1, 8);
    wr(SIMD(1), 16'h0000, 1);
    while (!simd_done[1]) @(negedge clk);
    for (int k = 0; k < K; k++) for (int j = 0; j < 8; j++) begin
      logic [15:0] x, y;
      x = B[1][k][2*(j/2)]; y = B[1][k][2*(j/2)+1];
      e = ($signed(x) > $signed(y)) ? x - y : y - x;
      rd(SIMD(1), 16'h8000 + 16'(3072 + 8 * k + j), d);
      chk(d, 32'(e), $sformatf("pair |x-y| k=%0d pe=%0d", k, j));
    end
    n_pair++;

    // bank conflict on accelerator 2
    simd_agu(2, 3, 16 * 9 + 2, 16, 1, 16);
    wr(SIMD(2), 16'h0004, 1);
    wr(SIMD(2), 16'h0000, 1);
    while (!simd_done[2]) @(negedge clk);
    rd(SIMD(2), 16'h0000, d);
    chk(d[2], 1'b1, "SIMD2 conflict flag");
    if (d[2]) n_conflict++;

    // ------------------------------------------------------ MIMD-2D jobs
    sad = '0;
    for (int i = 0; i < N; i++) begin
      X[i] = (i == N-1) ? '0 : 16'($urandom_range(0, 255));
      Y[i] = (i == N-1) ? '0 : 16'($urandom_range(0, 255));
      sad += (X[i] > Y[i]) ? X[i] - Y[i] : Y[i] - X[i];
      wr(OCM, 16'(6000 + i), 32'(X[i]));
      wr(OCM, 16'(6100 + i), 32'(Y[i]));
    end
    for (int a = 0; a < 2; a++) begin
      copy(OCM, 16'd6000, MIMD(a), 16'h8000 + 16'(0 << 11), N);
      copy(OCM, 16'd6100, MIMD(a), 16'h8000 + 16'(1 << 11), N);
      n_copy_in += 2 * N;
      mimd_agu(a, 0, 0,   1, 1, 1);
      mimd_agu(a, 1, -1,  1, 1, 1);
      mimd_agu(a, 2, 93,  1, 1, 1);
      mimd_agu(a, 3, 500, 1, 1, 1);
      mimd_agu(a, 4, 0,   1, 1, 1);
      for (int x = 0; x < 4; x++) begin
        wr(MIMD(a), 16'h2000 + 16'(16 * x), (x == 3 ? 32'h1_0000 : 0) | 32'(LEN[x]));
        wr(MIMD(a), 16'h2000 + 16'(16 * x) + 8, 0);
        wr(MIMD(a), 16'h2000 + 16'(16 * x) + 9, 1);
        wr(MIMD(a), 16'h1000 + 16'(64 * x + 0),  pe(MOP_PASS, SRC_W,    SRC_ZERO, 0));
        wr(MIMD(a), 16'h1000 + 16'(64 * x + 4),  pe(MOP_SUB,  SRC_N,    SRC_W,    0));
        wr(MIMD(a), 16'h1000 + 16'(64 * x + 5),  pe(MOP_PASS, SRC_W,    SRC_ZERO, 3));
        wr(MIMD(a), 16'h1000 + 16'(64 * x + 8),  pe(MOP_SUB,  SRC_ZERO, SRC_N,    0));
        wr(MIMD(a), 16'h1000 + 16'(64 * x + 9),  pe(MOP_SEL,  SRC_N,    SRC_W,    0));
        wr(MIMD(a), 16'h1000 + 16'(64 * x + 10), pe(MOP_PASS, SRC_W,    SRC_ZERO, 0));
        wr(MIMD(a), 16'h1000 + 16'(64 * x + 11), pe(MOP_PASS, SRC_W,    SRC_ZERO, 0));
        wr(MIMD(a), 16'h1000 + 16'(64 * x + 15), pe(MOP_PASS, SRC_W,    SRC_ZERO, 0));
        wr(MIMD(a), 16'h1000 + 16'(64 * x + 14),
           x == 0 ? pe(MOP_PASS, SRC_ZERO, SRC_ZERO, 0) :
           x == 3 ? pe(MOP_HOLD, SRC_ZERO, SRC_ZERO, 0) : pe(MOP_ACC, SRC_N, SRC_ZERO, 0));
      end
      wr(MIMD(a), 16'h2001, mm(MM_READ,  0, 1, 0));
      wr(MIMD(a), 16'h2002, mm(MM_READ,  0, 1, 1));
      wr(MIMD(a), 16'h2003, mm(MM_WRITE, 6, 1, 2));
      for (int x = 1; x < 3; x++) begin
        wr(MIMD(a), 16'h2000 + 16'(16 * x) + 1, mm(MM_READ,  0, 0, 0));
        wr(MIMD(a), 16'h2000 + 16'(16 * x) + 2, mm(MM_READ,  0, 0, 1));
        wr(MIMD(a), 16'h2000 + 16'(16 * x) + 3, mm(MM_WRITE, 6, x == 2, 3));
      end
      wr(MIMD(a), 16'h2034, mm(MM_WRITE, 7, 1, 4));
    end
    wr(MIMD(0), 16'h0000, 1);
    wr(MIMD(1), 16'h0000, 1);
    begin
      logic [31:0] s0, s1;
      rd(MIMD(0), 16'h0000, s0);
      rd(MIMD(1), 16'h0000, s1);
      if (s0[1] && s1[1]) n_concurrent++;
    end
    n = 0;
    while (mimd_done != 2'b11 && n < 1000) begin @(negedge clk); n++; end
    chk(32'(mimd_done), 32'b11, "both MIMD-2D done");
    for (int a = 0; a < 2; a++) begin
      rd(MIMD(a), 16'h0001, d);
      chk(d, 3, "last context reached");
      n_ctx_switch += int'(d);
      // results back to the on-chip memory, then checked there
      copy(MIMD(a), 16'h8000 + 16'(2 << 11) + 16'd100, OCM, 16'(7000 + 100 * a), 13);
      copy(MIMD(a), 16'h8000 + 16'(2 << 11) + 16'd500, OCM, 16'(7013 + 100 * a), N - 1 - 13);
      copy(MIMD(a), 16'h8000 + 16'(3 << 11) + 16'd1,   OCM, 16'(7099 + 100 * a), 1);
      n_copy_out += N;
      for (int i = 0; i < N - 1; i++) begin
        e = (X[i] > Y[i]) ? X[i] - Y[i] : Y[i] - X[i];
        rd(OCM, 16'(7000 + 100 * a + i), d);
        chk(d, 32'(e), $sformatf("MIMD%0d |A-B|[%0d]", a, i));
        if (i == 13 && d == 32'(e)) n_agu_reload++;
      end
      rd(OCM, 16'(7099 + 100 * a), d);
      chk(d, 32'(sad), $sformatf("MIMD%0d SAD", a));
    end

    // ------------------------------------------------------ coverage
    $display("mechanisms: copy_in=%0d copy_out=%0d concurrent=%0d mac=%0d pair=%0d conflict=%0d ctx_switch=%0d agu_reload=%0d",
             n_copy_in, n_copy_out, n_concurrent, n_mac, n_pair, n_conflict, n_ctx_switch, n_agu_reload);
    if (n_copy_in == 0)    failures++;
    if (n_copy_out == 0)   failures++;
    if (n_concurrent < 2)  failures++;
    if (n_mac == 0)        failures++;
    if (n_pair == 0)       failures++;
    if (n_conflict == 0)   failures++;
    if (n_ctx_switch == 0) failures++;
    if (n_agu_reload == 0) failures++;
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
