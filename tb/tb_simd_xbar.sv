// tb_simd_xbar: self-checking test of the SIMD-1D read crossbar.
//
// The banks are modelled in the testbench as registered lookups of a fixed
// content function, word w holding f(w) = w * 40503 + 17 (16 bits). Random
// request patterns are applied: conflict-free permutations, broadcasts of
// one word to many ports, and fully random patterns. The expected data of
// each port (the word of the lowest-numbered port addressing its bank) and
// the conflict flag are computed independently of the design.
module tb_simd_xbar;
  localparam int unsigned NPORT = 16, NBANK = 16, AW = 12, DW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPORT-1:0]         req_valid;
  logic [NPORT-1:0][AW-1:0] req_addr;
  logic [NBANK-1:0]         bank_re;
  logic [NBANK-1:0][AW-5:0] bank_raddr;
  logic [NBANK-1:0][DW-1:0] bank_rdata;
  logic [NPORT-1:0][DW-1:0] rsp_data;
  logic                     conflict;
  int checks = 0, failures = 0, n_conf = 0;

  simd_xbar #(.NPORT(NPORT), .NBANK(NBANK), .AW(AW), .DW(DW)) dut (.*);

  function automatic logic [DW-1:0] content(logic [AW-1:0] w);
    return DW'(32'(w) * 40503 + 17);
  endfunction

  always_ff @(posedge clk)
    for (int bk = 0; bk < NBANK; bk++)
      if (bank_re[bk]) bank_rdata[bk] <= content({bank_raddr[bk], 4'(bk)});

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPORT-1:0][DW-1:0] exp_d;
    logic exp_c;
    logic [NPORT-1:0] vmask;
    req_valid = '0; req_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int kind;
      kind = t % 3;
      for (int p = 0; p < NPORT; p++) begin
        req_valid[p] = (kind != 2) || ($urandom_range(0, 3) != 0);
        case (kind)
          0: req_addr[p] = AW'((($urandom_range(0, 255)) << 4) | ((p * 5 + t) % 16));   // permutation
          1: req_addr[p] = AW'(t * 16 + (p % 4));                                       // broadcast
          default: req_addr[p] = AW'($urandom);
        endcase
      end
      if (kind == 0) for (int p = 0; p < NPORT; p++) req_addr[p][AW-1:4] = AW'(t + p);
      // model
      exp_c = 1'b0;
      for (int p = 0; p < NPORT; p++) begin
        int win;
        win = -1;
        for (int q = 0; q < NPORT; q++)
          if (win < 0 && req_valid[q] && req_addr[q][3:0] == req_addr[p][3:0]) win = q;
        if (win < 0) continue;
        exp_d[p] = content({req_addr[win][AW-1:4], req_addr[p][3:0]});
        if (req_valid[p] && req_addr[win][AW-1:4] != req_addr[p][AW-1:4]) exp_c = 1'b1;
      end
      #1;
      checks++;
      if (conflict !== exp_c) begin
        failures++;
        if (failures < 10) $display("FAIL conflict t=%0d got %b exp %b", t, conflict, exp_c);
      end
      if (exp_c) n_conf++;
      vmask = req_valid;
      @(negedge clk);
      req_valid = '0;
      for (int p = 0; p < NPORT; p++) begin
        if (vmask[p]) begin
          checks++;
          if (rsp_data[p] !== exp_d[p]) begin
            failures++;
            if (failures < 10) $display("FAIL data t=%0d port %0d got %h exp %h", t, p, rsp_data[p], exp_d[p]);
          end
        end
      end
    end
    checks++;
    if (n_conf == 0) failures++;   // the random patterns must have hit conflicts
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
