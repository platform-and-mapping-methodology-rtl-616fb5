// tb_mimd_mem_module: self-checking test of a MIMD-2D memory module.
//
// The CPU port fills the memory; a READ phase streams words out along an
// AGU pattern (checked one cycle after each address); a WRITE phase stores
// a counting stream along another pattern; a reload of the AGU in the
// middle of a phase restarts the pattern while a pause (run low) must keep
// it; finally the CPU port reads everything back against a scoreboard.
module tb_mimd_mem_module;
  import hmp_pkg::*;

  localparam int unsigned DEPTH = 2048, DW = 16, AW = 11;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, agu_load = 1'b0;
  mimd_mem_mode_e mode = MM_IDLE;
  agu_cfg_t agu_cfg = '0;
  logic [DW-1:0] wdata = '0, rdata, hst_wdata = '0;
  logic hst_we = 1'b0, hst_re = 1'b0;
  logic [AW-1:0] hst_addr = '0;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  mimd_mem_module #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] pat(agu_cfg_t q, int k);
    int n, w;
    n = (q.n == 0) ? 1 : int'(q.n);
    w = k / n;
    return AW'(int'(q.p) + (k - w) * int'(q.c) + w * int'(q.m));
  endfunction

  task automatic chk(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    agu_cfg_t q;
    int k;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      hst_we = 1'b1; hst_addr = AW'(i); hst_wdata = DW'($urandom); ref_mem[i] = hst_wdata;
      @(negedge clk);
    end
    hst_we = 1'b0;
    // READ: 8-wide window rows of a 64-wide image, starting at 130
    q = '{p: 12'd130, c: 12'd1, n: 12'd8, m: 12'd57};
    agu_cfg = q; agu_load = 1'b1;
    @(negedge clk);
    agu_load = 1'b0; mode = MM_READ; run = 1'b1;
    k = 0;
    for (int t = 0; t < 100; t++) begin
      // pause for a cycle now and then: the address must not move
      run = (t % 9 != 4);
      @(negedge clk);
      if (run) begin
        chk(rdata, ref_mem[pat(q, k)], "read stream");
        k++;
      end
    end
    // reload in the middle of the stream
    q = '{p: 12'd7, c: 12'd3, n: 12'd4, m: 12'(-9)};
    agu_cfg = q; agu_load = 1'b1; run = 1'b0;
    @(negedge clk);
    agu_load = 1'b0; run = 1'b1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      chk(rdata, ref_mem[pat(q, t)], "read after reload");
    end
    // WRITE a counting stream along a column of a 32-wide image
    q = '{p: 12'd1000, c: 12'd32, n: 12'd16, m: 12'(-479)};
    agu_cfg = q; agu_load = 1'b1; run = 1'b0;
    @(negedge clk);
    agu_load = 1'b0; mode = MM_WRITE; run = 1'b1;
    for (int t = 0; t < 64; t++) begin
      wdata = DW'(16'h5a00 + t);
      ref_mem[pat(q, t)] = wdata;
      @(negedge clk);
    end
    run = 1'b0; mode = MM_IDLE;
    // CPU read-back of the whole memory
    for (int i = 0; i < DEPTH; i++) begin
      hst_re = 1'b1; hst_addr = AW'(i);
      @(negedge clk);
      chk(rdata, ref_mem[i], "cpu read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
