// tb_optflow_workload: block matching for optical flow on a SIMD-1D
// accelerator of the platform, at full size for one reference window: a
// 16 x 16 reference window is compared with all 81 candidate windows of a
// 24 x 24 search area by the sum of absolute differences (SAD), and the
// candidate with the smallest SAD gives the motion vector.
//
// Each PE pair computes the SAD of one candidate: PE 2p reads (reference,
// candidate p), PE 2p+1 the same words swapped, both run a-b with pair
// select and accumulate (ACC_LEN = 256, one round per run), so the four
// pairs give four candidates (dx = x0..x0+3) per run; 27 runs cover
// dy = 0..8 and x0 = 0, 4, 8. The pixel layout keeps the 16 read ports free
// of bank conflicts: search-area rows have a stride of 32 words starting at
// word 0, the reference window (row stride 16) starts at word 3596 (bank 12)
// so the reference word is never in a bank a candidate uses. The AGUs walk
// the windows with c = 1, n = 16, m = 17 (candidates) and m = 1 (reference).
// The CPU part (the testbench) copies the pixels in through the on-chip
// memory, reprograms the candidate AGUs between runs and picks the minimum.
// Every SAD, the conflict flag, the run time (1 + 256 + 6 cycles) and the
// motion vector are checked against values computed here.
// Interface: no ports; it drives the platform's bus (24-bit address, target
// in bits [23:16]) and watches simd_done[0].
// The window and search-area sizes and the SAD criterion are the published
// optical-flow parameters; the memory layout, the pair mapping and the test
// image (a pattern plus noise, reference = a noisy copy of one candidate)
// are choices made for this test.
module tb_optflow_workload;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] OCM = 8'h00, ACC = 8'h01;
  localparam int W = 16, SA = 24, ND = SA - W + 1;   // 9 displacements per axis
  localparam int REF = 3596;                          // bank 12

  task automatic wr(logic [7:0] t, logic [15:0] a, logic [31:0] d);
    @(negedge clk); bus_addr = {t, a}; bus_wdata = d; bus_we = 1'b1;
    @(negedge clk); bus_we = 1'b0;
  endtask

  task automatic rd(logic [7:0] t, logic [15:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = {t, a}; bus_re = 1'b1;
    @(negedge clk); bus_re = 1'b0; d = bus_rdata;
  endtask

  task automatic agu(int i, int p, int c, int n, int m);
    wr(ACC, 16'h0100 + 16'(4*i),     32'(p) & 32'hfff);
    wr(ACC, 16'h0100 + 16'(4*i) + 1, 32'(c) & 32'hfff);
    wr(ACC, 16'h0100 + 16'(4*i) + 2, 32'(n));
    wr(ACC, 16'h0100 + 16'(4*i) + 3, 32'(m) & 32'hfff);
  endtask

  logic [7:0] S [SA][SA];   // search area at time t + dt
  logic [7:0] R [W][W];     // reference window at time t

  initial begin
    logic [31:0] d;
    simd_instr_t ins;
    int sad_m [ND][ND];
    int best, bx, by, tx, ty, n;
    // image content: smooth pattern plus noise; the reference window is the
    // candidate at (tx, ty) with small noise added
    tx = $urandom_range(0, ND - 1); ty = $urandom_range(0, ND - 1);
    for (int y = 0; y < SA; y++) for (int x = 0; x < SA; x++)
      S[y][x] = 8'((x * 37 + y * 11 + (x * y) % 23) % 200 + $urandom_range(0, 40));
    for (int y = 0; y < W; y++) for (int x = 0; x < W; x++)
      R[y][x] = S[ty + y][tx + x] + 8'($urandom_range(0, 3));   // S stays below 240
    for (int dy = 0; dy < ND; dy++) for (int dx = 0; dx < ND; dx++) begin
      sad_m[dy][dx] = 0;
      for (int y = 0; y < W; y++) for (int x = 0; x < W; x++)
        sad_m[dy][dx] += (S[dy + y][dx + x] > R[y][x]) ? S[dy + y][dx + x] - R[y][x] : R[y][x] - S[dy + y][dx + x];
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // pixels to the on-chip memory (as the camera interface would leave them)
    for (int y = 0; y < SA; y++) for (int x = 0; x < SA; x++) wr(OCM, 16'(y * SA + x), 32'(S[y][x]));
    for (int y = 0; y < W; y++)  for (int x = 0; x < W; x++)  wr(OCM, 16'(1024 + y * W + x), 32'(R[y][x]));
    // CPU copy into the accelerator's shared memory in the matching layout
    for (int y = 0; y < SA; y++) for (int x = 0; x < SA; x++) begin
      rd(OCM, 16'(y * SA + x), d);
      wr(ACC, 16'h8000 + 16'(32 * y + x), d);
    end
    for (int i = 0; i < W * W; i++) begin
      rd(OCM, 16'(1024 + i), d);
      wr(ACC, 16'h8000 + 16'(REF + i), d);
    end

    ins.pre = PRE_SUB; ins.pair_sel = 1'b1; ins.mul = MUL_NONE; ins.post = POST_ACC;
    wr(ACC, 16'h0001, 32'(ins));
    wr(ACC, 16'h0003, W * W);
    wr(ACC, 16'h0004, 1);

    best = 1 << 30; bx = -1; by = -1;
    for (int dy = 0; dy < ND; dy++) for (int x0 = 0; x0 < ND; x0 += 4) begin
      for (int p = 0; p < 4; p++) begin
        int cand;
        cand = 32 * dy + x0 + p;
        agu(4*p,     REF,  1, W, 1);        // PE 2p   a = reference
        agu(4*p + 1, cand, 1, W, 32 - W + 1); //        b = candidate
        agu(4*p + 2, cand, 1, W, 32 - W + 1); // PE 2p+1 a = candidate
        agu(4*p + 3, REF,  1, W, 1);        //         b = reference
      end
      agu(16, 2048 + 8 * (dy * 3 + x0 / 4), 8, 1, 8);
      wr(ACC, 16'h0000, 1);
      n = 0;
      while (!simd_done[0]) begin @(negedge clk); n++; end
      checks++;
      if (n + 1 != 1 + W * W + 6) begin
        failures++;
        $display("FAIL run took %0d cycles", n + 1);
      end
      rd(ACC, 16'h0000, d);
      checks++;
      if (d[2]) begin failures++; $display("FAIL bank conflict dy=%0d x0=%0d", dy, x0); end
      for (int p = 0; p < 4 && x0 + p < ND; p++) for (int h = 0; h < 2; h++) begin
        rd(ACC, 16'h8000 + 16'(2048 + 8 * (dy * 3 + x0 / 4) + 2 * p + h), d);
        checks++;
        if (d != 32'(sad_m[dy][x0 + p])) begin
          failures++;
          if (failures < 10) $display("FAIL SAD(%0d,%0d) pe %0d got %0d exp %0d", x0 + p, dy, 2*p+h, d, sad_m[dy][x0 + p]);
        end
        if (h == 0 && int'(d) < best) begin best = int'(d); bx = x0 + p; by = dy; end
      end
    end
    checks++;
    if (bx != tx || by != ty) begin
      failures++;
      $display("FAIL motion vector (%0d,%0d), planted (%0d,%0d)", bx, by, tx, ty);
    end
    $display("motion vector (%0d,%0d), SAD %0d", bx - (ND / 2), by - (ND / 2), best);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
