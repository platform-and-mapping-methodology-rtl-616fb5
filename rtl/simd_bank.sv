// simd_bank: one bank of the SIMD-1D shared memory.
//
// A simple dual-port RAM, DEPTH words of DW bits, with one synchronous read
// port and one write port, as an FPGA block RAM provides. The shared memory
// is 16 such banks of 16 bit x 256. Read data appear the cycle after `re`
// and hold until the next read; a read of the row being written returns the
// old word. Contents are not reset.
module simd_bank #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned RW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [RW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [RW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
