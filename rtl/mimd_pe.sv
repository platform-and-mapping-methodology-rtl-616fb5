// mimd_pe: processing element of the MIMD-2D accelerator.
//
// A 16-bit adder and a 16-bit multiplier behind two operand selectors. Each
// operand comes from one of the four nearest neighbours (N, E, S, W), from
// the PE's own output register, from a constant held in the configuration,
// or is zero. One neighbour's flag is the carry-in. The result and a flag
// (carry of an add, borrow of a subtract) are registered and seen by all
// four neighbours, so chains of PEs build wider or conditional operations:
// ADDC/SUBC take the carry/borrow of the neighbour holding the lower half
// (32- and 64-bit arithmetic), MULH gives the upper product half, and SEL
// picks one of two operands by a neighbour's flag (absolute difference =
// SUB, negate, SEL).
//
// The adder + multiplier content, the 4-neighbour links and building
// complex, 32-bit and 64-bit operations by connecting PEs follow the
// platform description; the op list and encodings are this design's own.
// The configuration changes with the context.
//
// Timing: with en high the output registers load at every clock edge; with
// en low they hold (the array is paused between contexts).
module mimd_pe
  import hmp_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  mimd_pe_cfg_t       cfg,
  input  logic [3:0][DW-1:0] nb_data,   // index 0 N, 1 E, 2 S, 3 W
  input  logic [3:0]         nb_flag,
  output logic [DW-1:0]      out_data,
  output logic               out_flag
);

  function automatic logic [DW-1:0] pick(mimd_src_e s, logic [3:0][DW-1:0] nb,
                                         logic [DW-1:0] self_v, logic [DW-1:0] kv);
    unique case (s)
      SRC_N:     return nb[0];
      SRC_E:     return nb[1];
      SRC_S:     return nb[2];
      SRC_W:     return nb[3];
      SRC_SELF:  return self_v;
      SRC_CONST: return kv;
      default:   return '0;
    endcase
  endfunction

  logic [DW-1:0]   a, b;
  logic            cin;
  logic [DW:0]     sum;        // the adder, with carry out
  logic [2*DW-1:0] prod;       // the multiplier
  logic [DW-1:0]   res;
  logic            flg;

  assign a    = pick(cfg.src_a, nb_data, out_data, cfg.k[DW-1:0]);
  assign b    = pick(cfg.src_b, nb_data, out_data, cfg.k[DW-1:0]);
  assign cin  = nb_flag[cfg.src_c];
  assign prod = a * b;

  always_comb begin
    sum = '0;
    res = out_data;
    flg = out_flag;
    unique case (cfg.op)
      MOP_PASS: begin res = a; flg = cin; end
      MOP_ADD:  begin sum = {1'b0, a} + {1'b0, b};                 res = sum[DW-1:0]; flg = sum[DW]; end
      MOP_ADDC: begin sum = {1'b0, a} + {1'b0, b} + (DW+1)'(cin);  res = sum[DW-1:0]; flg = sum[DW]; end
      MOP_SUB:  begin sum = {1'b0, a} - {1'b0, b};                 res = sum[DW-1:0]; flg = sum[DW]; end
      MOP_SUBC: begin sum = {1'b0, a} - {1'b0, b} - (DW+1)'(cin);  res = sum[DW-1:0]; flg = sum[DW]; end
      MOP_MUL:  begin res = prod[DW-1:0];    flg = 1'b0; end
      MOP_MULH: begin res = prod[2*DW-1:DW]; flg = 1'b0; end
      MOP_SEL:  begin res = cin ? b : a;     flg = cin;  end
      MOP_ACC:  begin sum = {1'b0, out_data} + {1'b0, a};          res = sum[DW-1:0]; flg = sum[DW]; end
      default: ;   // MOP_HOLD
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_data <= '0;
      out_flag <= 1'b0;
    end else if (en) begin
      out_data <= res;
      out_flag <= flg;
    end
  end

endmodule
