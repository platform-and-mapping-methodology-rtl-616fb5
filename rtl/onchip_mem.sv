// onchip_mem: the platform's on-chip memory on the CPU bus.
//
// A single-port synchronous RAM of WORDS x DW bits. The CPU keeps its
// working data here and copies it to and from the accelerators' local
// memories. A write takes effect at the clock edge with `we`; read data
// appear the cycle after `re` and hold until the next read. Size and
// organisation are this design's choice; contents are not reset.
module onchip_mem #(
  parameter int unsigned WORDS = 8192,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
