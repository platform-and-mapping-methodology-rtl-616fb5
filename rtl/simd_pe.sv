// simd_pe: processing element of the SIMD-1D accelerator.
//
// Each PE has two input ports (a, b), one output and three pipeline stages:
//   stage 1  adder / comparator : s1 = a, a+b, a-b, min(a,b) or max(a,b)
//            pair select        : if enabled and s1 is negative, the PE takes
//                                 its partner's s1 instead of its own
//   stage 2  multiplier         : s2 = s1, s1*b or s1*k
//   stage 3  post adder         : r = s2, s2+k, or the accumulator
//                                 acc = (first ? 0 : acc) + s2
// so one instruction gives add-multiply ((a+b)*k), multiply-add (a*b+k) or
// multiply-accumulate (sum of a*b). Two neighbouring PEs form a pair: with
// pair_sel and the partner fed swapped operands, a-b in both PEs yields
// |a-b| in both, and the same select serves data-dependent choices.
//
// The adder / multiplier / comparator content, the add-multiply and
// multiply-add pipelining and the two-PE grouping follow the platform
// description; the stage split, the op set and the accumulator are this
// design's choices. Arithmetic is two's complement, DW bits, products
// truncated to DW bits.
//
// Timing: operands sampled with in_valid at edge t give a result at edge
// t+3; out_valid marks results of operand pairs tagged in_last. pair_s1 is
// the stage-1 register, to be wired to the partner's partner_s1.
module simd_pe
  import hmp_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  simd_instr_t   instr,
  input  logic [DW-1:0] k,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] pair_s1,
  input  logic [DW-1:0] partner_s1,
  output logic          out_valid,
  output logic [DW-1:0] result
);

  // stage 1
  logic [DW-1:0] s1, b1, pre;
  logic          v1, f1, l1;
  logic          a_lt_b;   // the comparator

  assign a_lt_b = $signed(a) < $signed(b);

  always_comb begin
    unique case (instr.pre)
      PRE_ADD: pre = a + b;
      PRE_SUB: pre = a - b;
      PRE_MIN: pre = a_lt_b ? a : b;
      PRE_MAX: pre = a_lt_b ? b : a;
      default: pre = a;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0; s1 <= '0; b1 <= '0;
    end else begin
      v1 <= in_valid;
      f1 <= in_first;
      l1 <= in_last;
      if (in_valid) begin
        s1 <= pre;
        b1 <= b;
      end
    end
  end

  assign pair_s1 = s1;

  // stage 2
  logic [DW-1:0]   sel, mop, s2;
  logic [DW-1:0]   prod;   // low half: equal for signed and unsigned
  logic            v2, f2, l2;

  assign sel  = (instr.pair_sel && s1[DW-1]) ? partner_s1 : s1;
  assign mop  = (instr.mul == MUL_K) ? k : b1;
  assign prod = sel * mop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2 <= 1'b0; f2 <= 1'b0; l2 <= 1'b0; s2 <= '0;
    end else begin
      v2 <= v1;
      f2 <= f1;
      l2 <= l1;
      if (v1) s2 <= (instr.mul == MUL_NONE) ? sel : prod;
    end
  end

  // stage 3
  logic [DW-1:0] acc, acc_next;

  assign acc_next = (f2 ? '0 : acc) + s2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      result    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v2 && l2;
      if (v2) begin
        unique case (instr.post)
          POST_K: result <= s2 + k;
          POST_ACC: begin
            acc    <= acc_next;
            result <= acc_next;
          end
          default: result <= s2;
        endcase
      end
    end
  end

endmodule
