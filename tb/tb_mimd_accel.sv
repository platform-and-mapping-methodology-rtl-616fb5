// tb_mimd_accel: self-checking test of the MIMD-2D accelerator through its
// CPU port.
//
// The program computes, over two 33-word streams A and B (memory modules 0
// and 1), the element-wise absolute difference |A-B| (stored by memory
// module 2) and the sum of absolute differences (SAD, stored by module 3):
//   PE(0,0) A            PE(1,0) A-B, borrow   PE(2,0) -(A-B)
//   PE(1,1) A-B, borrow  PE(2,1) borrow ? -(A-B) : A-B
//   PE(2,2), PE(2,3) pass |A-B| east to module 2
//   PE(3,2) accumulates |A-B|, PE(3,3) passes the sum to module 3
// in four contexts: context 0 clears the accumulator and loads all AGUs;
// context 1 changes only PE(3,2) (to accumulate) and reloads no AGU, so the
// streams continue; context 2 reloads only module 2's AGU (partial
// reconfiguration) so later results land in a second region; context 3
// stores the sum. The expected words, the sum, the final context number and
// the run time (one set-up cycle plus the running cycles per context) are
// computed in the testbench.
module tb_mimd_accel;
  import hmp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] hst_addr = '0;
  logic hst_we = 1'b0, hst_re = 1'b0;
  logic [31:0] hst_wdata = '0, hst_rdata;
  logic done;
  int checks = 0, failures = 0;

  mimd_accel dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic set_pe(int ctx, int r, int c, logic [31:0] v);
    wr(16'h1000 + 16'(64 * ctx + 4 * r + c), v);
  endtask

  task automatic set_agu(int e, int p, int c, int n, int m);
    wr(16'h3000 + 16'(4*e),     32'(p) & 32'hfff);
    wr(16'h3000 + 16'(4*e) + 1, 32'(c) & 32'hfff);
    wr(16'h3000 + 16'(4*e) + 2, 32'(n));
    wr(16'h3000 + 16'(4*e) + 3, 32'(m) & 32'hfff);
  endtask

  localparam int N = 33;
  localparam int LEN [4] = '{6, 14, 19, 2};

  initial begin
    logic [31:0] d;
    logic [15:0] A [N], B [N], sad;
    int n, exp_cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    sad = '0;
    for (int i = 0; i < N; i++) begin
      A[i] = (i == N-1) ? '0 : 16'($urandom_range(0, 255));
      B[i] = (i == N-1) ? '0 : 16'($urandom_range(0, 255));
      sad += (A[i] > B[i]) ? A[i] - B[i] : B[i] - A[i];
      wr(16'h8000 + 16'(0 << 11) + 16'(i), 32'(A[i]));
      wr(16'h8000 + 16'(1 << 11) + 16'(i), 32'(B[i]));
    end

    set_agu(0, 0,    1, 1, 1);    // A
    set_agu(1, -1,   1, 1, 1);    // B, one cycle behind
    set_agu(2, 93,   1, 1, 1);    // |A-B| first region: word 100 + i
    set_agu(3, 500,  1, 1, 1);    // |A-B| second region
    set_agu(4, 0,    1, 1, 1);    // SAD

    for (int x = 0; x < 4; x++) begin
      wr(16'h2000 + 16'(16 * x), (x == 3 ? 32'h1_0000 : 0) | 32'(LEN[x]));
      wr(16'h2000 + 16'(16 * x) + 8, 0);   // west of row 0: module 0
      wr(16'h2000 + 16'(16 * x) + 9, 1);   // west of row 1: module 1
      set_pe(x, 0, 0, pe(MOP_PASS, SRC_W,    SRC_ZERO, 0));
      set_pe(x, 1, 0, pe(MOP_SUB,  SRC_N,    SRC_W,    0));
      set_pe(x, 1, 1, pe(MOP_PASS, SRC_W,    SRC_ZERO, 3));
      set_pe(x, 2, 0, pe(MOP_SUB,  SRC_ZERO, SRC_N,    0));
      set_pe(x, 2, 1, pe(MOP_SEL,  SRC_N,    SRC_W,    0));
      set_pe(x, 2, 2, pe(MOP_PASS, SRC_W,    SRC_ZERO, 0));
      set_pe(x, 2, 3, pe(MOP_PASS, SRC_W,    SRC_ZERO, 0));
      set_pe(x, 3, 3, pe(MOP_PASS, SRC_W,    SRC_ZERO, 0));
    end
    set_pe(0, 3, 2, pe(MOP_PASS, SRC_ZERO, SRC_ZERO, 0));
    set_pe(1, 3, 2, pe(MOP_ACC,  SRC_N,    SRC_ZERO, 0));
    set_pe(2, 3, 2, pe(MOP_ACC,  SRC_N,    SRC_ZERO, 0));
    set_pe(3, 3, 2, pe(MOP_HOLD, SRC_ZERO, SRC_ZERO, 0));
    // memory module records: 1 + module index
    wr(16'h2001, mm(MM_READ,  0, 1, 0));
    wr(16'h2002, mm(MM_READ,  0, 1, 1));
    wr(16'h2003, mm(MM_WRITE, 6, 1, 2));
    for (int x = 1; x < 3; x++) begin
      wr(16'h2000 + 16'(16 * x) + 1, mm(MM_READ,  0, 0, 0));
      wr(16'h2000 + 16'(16 * x) + 2, mm(MM_READ,  0, 0, 1));
      wr(16'h2000 + 16'(16 * x) + 3, mm(MM_WRITE, 6, x == 2, 3));
    end
    wr(16'h2030 + 4, mm(MM_WRITE, 7, 1, 4));

    wr(16'h0000, 32'd1);
    n = 0;
    while (!done) begin @(negedge clk); n++; end
    exp_cyc = 0;
    for (int x = 0; x < 4; x++) exp_cyc += 1 + LEN[x];
    chk(n + 1, exp_cyc + 1, "run cycles");
    rd(16'h0001, d);
    chk(d, 3, "last context");
    rd(16'h0000, d);
    chk(d, 1, "status done");

    // element N-1 is padding for the sum; its difference is not stored
    for (int i = 0; i < N - 1; i++) begin
      logic [15:0] e;
      e = (A[i] > B[i]) ? A[i] - B[i] : B[i] - A[i];
      if (i <= 12) rd(16'h8000 + 16'(2 << 11) + 16'(100 + i), d);
      else         rd(16'h8000 + 16'(2 << 11) + 16'(500 + i - 13), d);
      chk(d, 32'(e), $sformatf("|A-B|[%0d]", i));
    end
    rd(16'h8000 + 16'(3 << 11) + 16'd1, d);
    chk(d, 32'(sad), "SAD");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
