// tb_simd_bank: self-checking test of one shared-memory bank.
//
// Writes random words, reads them back through the synchronous read port
// (data one cycle after re), checks read-during-write returns the old word
// and that rdata holds while re is low. A scoreboard array is the model.
module tb_simd_bank;
  localparam int unsigned DW = 16, DEPTH = 256;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  simd_bank #(.DW(DW), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [DW-1:0] exp);
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h", rdata, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = DW'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      re = 1'b1; raddr = 8'(i * 37);
      @(negedge clk);
      chk(ref_mem[8'(i * 37)]);
    end
    // rdata holds while re is low
    re = 1'b0;
    @(negedge clk); chk(ref_mem[8'((DEPTH - 1) * 37)]);
    // read during write: old data, new data next time
    re = 1'b1; we = 1'b1; raddr = 8'd5; waddr = 8'd5; wdata = ~ref_mem[5];
    @(negedge clk);
    chk(ref_mem[5]);
    ref_mem[5] = ~ref_mem[5];
    we = 1'b0;
    @(negedge clk);
    chk(ref_mem[5]);
    // random mix
    for (int t = 0; t < 2000; t++) begin
      logic [7:0] ra;
      ra = 8'($urandom);
      we = $urandom_range(0, 1) == 1; waddr = 8'($urandom); wdata = DW'($urandom);
      re = 1'b1; raddr = ra;
      @(negedge clk);
      chk(ref_mem[ra]);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
