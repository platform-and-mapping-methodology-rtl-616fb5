// tb_simd_pe: self-checking test of a pair of SIMD-1D PEs.
//
// Two PEs are wired as partners and fed random operands under every
// instruction (pre-op x pair select x multiply x post-op). An independent
// model computes each expected result from the operands, including the
// accumulator, which clears on in_first, and the pair exchange; results
// must appear exactly 3 cycles after the operand pair tagged in_last.
module tb_simd_pe;
  import hmp_pkg::*;

  localparam int unsigned DW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  simd_instr_t instr;
  logic [DW-1:0] k;
  logic v, f, l;
  logic [1:0][DW-1:0] a, b, res, s1;
  logic [1:0] ov;
  int checks = 0, failures = 0, cyc = 0;

  for (genvar j = 0; j < 2; j++) begin : g_pe
    simd_pe #(.DW(DW)) dut (
      .clk, .rst_n, .instr, .k, .in_valid(v), .in_first(f), .in_last(l),
      .a(a[j]), .b(b[j]), .pair_s1(s1[j]), .partner_s1(s1[1-j]),
      .out_valid(ov[j]), .result(res[j]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] pre_f(simd_pre_e p, logic [DW-1:0] x, logic [DW-1:0] y);
    case (p)
      PRE_ADD: return x + y;
      PRE_SUB: return x - y;
      PRE_MIN: return ($signed(x) < $signed(y)) ? x : y;
      PRE_MAX: return ($signed(x) < $signed(y)) ? y : x;
      default: return x;
    endcase
  endfunction

  // expected results and the cycle they are due
  logic [DW-1:0] exp_q[2][$];
  int            due_q[$];
  logic [DW-1:0] acc_m[2];

  always @(negedge clk) if (rst_n) begin
    if (ov[0] || ov[1] || (due_q.size() > 0 && due_q[0] == cyc)) begin
      checks++;
      if (!(ov[0] && ov[1]) || due_q.size() == 0 || due_q[0] != cyc) begin
        failures++;
        if (failures < 10) $display("FAIL timing at %0d", cyc);
        if (due_q.size() > 0 && due_q[0] <= cyc) begin
          void'(due_q.pop_front()); void'(exp_q[0].pop_front()); void'(exp_q[1].pop_front());
        end
      end else begin
        void'(due_q.pop_front());
        for (int j = 0; j < 2; j++) begin
          logic [DW-1:0] e;
          e = exp_q[j].pop_front();
          checks++;
          if (res[j] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL pe%0d instr %p got %h exp %h", j, instr, res[j], e);
          end
        end
      end
    end
  end

  task automatic drive(int n);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      v = ($urandom_range(0, 4) != 0);
      f = ($urandom_range(0, 3) == 0);
      l = ($urandom_range(0, 2) == 0);
      for (int j = 0; j < 2; j++) begin
        a[j] = DW'($urandom); b[j] = DW'($urandom);
        if ($urandom_range(0, 1) == 1) begin a[j] = DW'($urandom_range(0, 300)); b[j] = DW'($urandom_range(0, 300)); end
      end
      if (v) begin
        logic [DW-1:0] p[2], sel, s2;
        for (int j = 0; j < 2; j++) p[j] = pre_f(instr.pre, a[j], b[j]);
        for (int j = 0; j < 2; j++) begin
          sel = (instr.pair_sel && p[j][DW-1]) ? p[1-j] : p[j];
          case (instr.mul)
            MUL_B:   s2 = DW'(sel * b[j]);
            MUL_K:   s2 = DW'(sel * k);
            default: s2 = sel;
          endcase
          if (f) acc_m[j] = '0;
          acc_m[j] = (instr.post == POST_ACC) ? acc_m[j] + s2 : acc_m[j];
          if (l) begin
            case (instr.post)
              POST_K:   exp_q[j].push_back(s2 + k);
              POST_ACC: exp_q[j].push_back(acc_m[j]);
              default:  exp_q[j].push_back(s2);
            endcase
          end
        end
        // sampled at the next posedge (cycle cyc+1), result after 3 edges
        if (l) due_q.push_back(cyc + 3);
      end
    end
    @(negedge clk); v = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    v = 0; f = 0; l = 0; a = '0; b = '0; k = 16'd3; instr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int pr = 0; pr < 5; pr++)
      for (int ps = 0; ps < 2; ps++)
        for (int mu = 0; mu < 3; mu++)
          for (int po = 0; po < 3; po++) begin
            instr.pre = simd_pre_e'(pr); instr.pair_sel = ps[0];
            instr.mul = simd_mul_e'(mu); instr.post = simd_post_e'(po);
            k = DW'($urandom);
            acc_m[0] = '0; acc_m[1] = '0;
            // first operand of a sequence always clears the accumulator
            @(negedge clk); v = 1'b1; f = 1'b1; l = 1'b0; a = '0; b = '0;
            @(negedge clk); v = 1'b0;
            drive(60);
          end
    // absolute difference: partner gets swapped operands
    instr = '{pre: PRE_SUB, pair_sel: 1'b1, mul: MUL_NONE, post: POST_NONE};
    for (int t = 0; t < 50; t++) begin
      logic [DW-1:0] x, y;
      @(negedge clk);
      x = DW'($urandom_range(0, 255)); y = DW'($urandom_range(0, 255));
      a[0] = x; b[0] = y; a[1] = y; b[1] = x; v = 1'b1; f = 1'b1; l = 1'b1;
      exp_q[0].push_back((x > y) ? x - y : y - x);
      exp_q[1].push_back((x > y) ? x - y : y - x);
      due_q.push_back(cyc + 3);
    end
    @(negedge clk); v = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (due_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
