// tb_onchip_mem: self-checking test of the on-chip memory.
//
// Random writes and reads against a scoreboard; read data are checked one
// cycle after re, and must hold while re is low.
module tb_onchip_mem;
  localparam int unsigned WORDS = 8192;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [12:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ref_mem [WORDS];
  logic        written [WORDS];
  int checks = 0, failures = 0;

  onchip_mem #(.WORDS(WORDS), .DW(32)) dut (.clk, .we, .re, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] last;
    for (int i = 0; i < WORDS; i++) written[i] = 1'b0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      addr = 13'($urandom_range(0, 511)) * 13'd16 + 13'($urandom_range(0, 3));
      if ($urandom_range(0, 2) == 0 || !written[addr]) begin
        we = 1'b1; re = 1'b0; wdata = $urandom;
        ref_mem[addr] = wdata; written[addr] = 1'b1;
      end else begin
        we = 1'b0; re = 1'b1; last = ref_mem[addr];
        @(negedge clk);
        re = 1'b0;
        checks++;
        if (rdata !== last) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d got %h exp %h", addr, rdata, last);
        end
        @(negedge clk);
        checks++;
        if (rdata !== last) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
