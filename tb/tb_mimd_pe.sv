// tb_mimd_pe: self-checking test of the MIMD-2D processing element.
//
// Random configurations (every op, operand source and flag source) and
// random neighbour data are applied for many cycles; a model of the output
// and flag registers computes the expected values from the inputs. en low
// must hold both registers. A second part chains two PEs as a 32-bit adder
// (ADD on the low half, ADDC with the low PE's carry on the high half) and
// checks random 32-bit sums. A third part chains four PEs (each taking the
// carry/borrow of its west neighbour) into a 64-bit adder and subtractor;
// slice i is applied one cycle after slice i-1, and the full 64-bit result
// must be in the four output registers at the fourth clock edge.
module tb_mimd_pe;
  import hmp_pkg::*;

  localparam int unsigned DW = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  mimd_pe_cfg_t cfg, cfg_lo, cfg_hi;
  logic [3:0][DW-1:0] nb_d, nb_lo, nb_hi;
  logic [3:0] nb_f, nf_lo, nf_hi;
  logic [DW-1:0] out_data, d_lo, d_hi;
  logic out_flag, f_lo, f_hi;
  int checks = 0, failures = 0;

  mimd_pe #(.DW(DW)) dut (.clk, .rst_n, .en, .cfg, .nb_data(nb_d), .nb_flag(nb_f), .out_data, .out_flag);

  // 32-bit chain: lo is the west neighbour of hi
  mimd_pe #(.DW(DW)) u_lo (.clk, .rst_n, .en, .cfg(cfg_lo), .nb_data(nb_lo), .nb_flag(nf_lo), .out_data(d_lo), .out_flag(f_lo));
  mimd_pe #(.DW(DW)) u_hi (.clk, .rst_n, .en, .cfg(cfg_hi), .nb_data(nb_hi), .nb_flag(nf_hi), .out_data(d_hi), .out_flag(f_hi));
  always_comb begin
    nf_hi    = {f_lo, 3'b000};   // W = lo
  end

  // 64-bit chain: PE i-1 is the west neighbour of PE i
  mimd_pe_cfg_t       cfg64 [4];
  logic [3:0][DW-1:0] nb64 [4];
  logic [DW-1:0]      d64 [4];
  logic               f64 [4];
  for (genvar i = 0; i < 4; i++) begin : g_c64
    logic [3:0] nf;
    if (i == 0) begin : g_first
      assign nf = '0;
    end else begin : g_rest
      assign nf = {f64[i-1], 3'b000};
    end
    mimd_pe #(.DW(DW)) u (.clk, .rst_n, .en, .cfg(cfg64[i]), .nb_data(nb64[i]), .nb_flag(nf),
                          .out_data(d64[i]), .out_flag(f64[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] pick(mimd_src_e s, logic [3:0][DW-1:0] nb, logic [DW-1:0] sf, logic [DW-1:0] kv);
    case (s)
      SRC_N: return nb[0];  SRC_E: return nb[1];  SRC_S: return nb[2];  SRC_W: return nb[3];
      SRC_SELF: return sf;  SRC_CONST: return kv;  default: return '0;
    endcase
  endfunction

  initial begin
    logic [DW-1:0] md, a, b;
    logic mf, ci;
    logic [DW:0] s;
    logic [31:0] p;
    for (int i = 0; i < 4; i++) begin cfg64[i] = '0; nb64[i] = '0; end
    cfg = '0; nb_d = '0; nb_f = '0; cfg_lo = '0; cfg_hi = '0; nb_lo = '0; nb_hi = '0; nf_lo = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    md = '0; mf = 1'b0;
    for (int t = 0; t < 20000; t++) begin
      cfg.op    = mimd_op_e'($urandom_range(0, 9));
      cfg.src_a = mimd_src_e'($urandom_range(0, 6));
      cfg.src_b = mimd_src_e'($urandom_range(0, 6));
      cfg.src_c = 2'($urandom);
      cfg.k     = DW'($urandom);
      for (int i = 0; i < 4; i++) nb_d[i] = DW'($urandom);
      nb_f = 4'($urandom);
      en = ($urandom_range(0, 7) != 0);
      a  = pick(cfg.src_a, nb_d, md, cfg.k);
      b  = pick(cfg.src_b, nb_d, md, cfg.k);
      ci = nb_f[cfg.src_c];
      p  = 32'(a) * 32'(b);
      if (en) begin
        case (cfg.op)
          MOP_PASS: begin md = a; mf = ci; end
          MOP_ADD:  begin s = 17'(a) + 17'(b);              md = s[15:0]; mf = s[16]; end
          MOP_ADDC: begin s = 17'(a) + 17'(b) + 17'(ci);    md = s[15:0]; mf = s[16]; end
          MOP_SUB:  begin s = 17'(a) - 17'(b);              md = s[15:0]; mf = s[16]; end
          MOP_SUBC: begin s = 17'(a) - 17'(b) - 17'(ci);    md = s[15:0]; mf = s[16]; end
          MOP_MUL:  begin md = p[15:0];  mf = 1'b0; end
          MOP_MULH: begin md = p[31:16]; mf = 1'b0; end
          MOP_SEL:  begin md = ci ? b : a; mf = ci; end
          MOP_ACC:  begin s = 17'(md) + 17'(a);             md = s[15:0]; mf = s[16]; end
          default: ;
        endcase
      end
      @(negedge clk);
      checks++;
      if (out_data !== md || out_flag !== mf) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d op %s got %h/%b exp %h/%b", t, cfg.op.name(), out_data, out_flag, md, mf);
      end
    end
    // 32-bit addition over two PEs: low half result one cycle before high half
    en = 1'b1;
    cfg_lo = '{op: MOP_ADD,  src_a: SRC_N, src_b: SRC_S, src_c: 2'd0, k: '0};
    cfg_hi = '{op: MOP_ADDC, src_a: SRC_N, src_b: SRC_S, src_c: 2'd3, k: '0};
    for (int t = 0; t < 500; t++) begin
      logic [31:0] x, y, z;
      x = $urandom; y = $urandom;
      if (t % 4 == 0) begin x[15:0] = 16'hffff; end
      z = x + y;
      nb_lo[0] = x[15:0]; nb_lo[2] = y[15:0];
      @(negedge clk);
      nb_hi[0] = x[31:16]; nb_hi[2] = y[31:16];
      @(negedge clk);
      checks++;
      if ({d_hi, d_lo} !== z) begin
        failures++;
        if (failures < 10) $display("FAIL add32 %h + %h got %h exp %h", x, y, {d_hi, d_lo}, z);
      end
    end
    // 64-bit add / subtract over four PEs
    for (int t = 0; t < 400; t++) begin
      logic [63:0] x, y, z;
      logic sub;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      sub = t[0];
      if (t % 8 < 2) x[47:0] = sub ? 48'h0 : 48'hffff_ffff_ffff;   // long ripple
      z = sub ? x - y : x + y;
      for (int i = 0; i < 4; i++) begin
        cfg64[i] = '{op: (i == 0) ? (sub ? MOP_SUB : MOP_ADD) : (sub ? MOP_SUBC : MOP_ADDC),
                     src_a: SRC_N, src_b: SRC_S, src_c: 2'd3, k: '0};
        nb64[i][0] = x[16*i +: 16]; nb64[i][2] = y[16*i +: 16];
        @(negedge clk);
      end
      checks++;
      if ({d64[3], d64[2], d64[1], d64[0]} !== z) begin
        failures++;
        if (failures < 10) $display("FAIL %s64 %h, %h got %h exp %h", sub ? "sub" : "add", x, y,
                                    {d64[3], d64[2], d64[1], d64[0]}, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
