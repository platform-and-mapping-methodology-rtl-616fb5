// tb_agu: self-checking test of the address generation unit.
//
// Loads random and hand-picked parameter sets (window walk, linear repeat,
// negative step) and compares every address, one per clock, with a model
// that computes address k of the sequence in closed form:
//   addr(k) = P + (k - floor(k/n)) * c + floor(k/n) * m   (mod 2^AW).
// Also checks that `step` low holds the address and that `load` restarts.
module tb_agu;
  import hmp_pkg::*;

  localparam int unsigned AW = 12;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  agu_cfg_t cfg = '0;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  agu #(.AW(AW)) dut (.clk, .rst_n, .cfg, .load, .step, .addr);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] model(agu_cfg_t q, int k);
    int n, w;
    n = (q.n == 0) ? 1 : int'(q.n);
    w = k / n;
    return AW'(int'(q.p) + (k - w) * int'(q.c) + w * int'(q.m));
  endfunction

  task automatic run_seq(agu_cfg_t q, int len);
    @(negedge clk);
    cfg = q; load = 1'b1; step = 1'b0;
    @(negedge clk);
    load = 1'b0; step = 1'b1;
    for (int k = 0; k < len; k++) begin
      checks++;
      if (addr !== model(q, k)) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d c=%0d n=%0d m=%0d k=%0d got %0d exp %0d",
                                    q.p, q.c, q.n, q.m, k, addr, model(q, k));
      end
      // hold for one cycle now and then
      if (k % 7 == 3) begin
        step = 1'b0;
        @(negedge clk);
        checks++;
        if (addr !== model(q, k)) failures++;
        step = 1'b1;
      end
      @(negedge clk);
    end
    step = 1'b0;
  endtask

  initial begin
    agu_cfg_t q;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 4 x 8 window inside a 10-wide area: c = 1, n = 4, m = 10 - 3
    q = '{p: 12'd100, c: 12'd1, n: 12'd4, m: 12'd7};
    run_seq(q, 40);
    // linear addressing that returns to the base after 5 addresses
    q = '{p: 12'd50, c: 12'd3, n: 12'd5, m: 12'(-12)};
    run_seq(q, 30);
    // descending, n = 0 behaves as n = 1
    q = '{p: 12'd10, c: 12'd9, n: 12'd0, m: 12'(-2)};
    run_seq(q, 20);
    for (int t = 0; t < 40; t++) begin
      q.p = 12'($urandom); q.c = 12'($urandom_range(0, 40));
      q.n = 12'($urandom_range(1, 9)); q.m = 12'($urandom);
      run_seq(q, $urandom_range(5, 60));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
