// mimd_mem_module: a local memory module of the MIMD-2D accelerator with its
// own address generation unit.
//
// DEPTH words of DW bits. While the array runs (`run`), the mode set by the
// current context decides what the module does each cycle: READ sends
// word[addr] into the array, WRITE stores the array's stream `wdata` at
// addr, IDLE does nothing; in READ and WRITE the AGU then steps to the next
// address. `agu_load` reloads the AGU with new parameters (used by the
// context sequencer for partial reconfiguration: modules not reloaded keep
// their address sequence across the context switch). While the array is
// stopped the CPU reads and writes the words through the hst_* port.
//
// One AGU per memory module follows the platform description (load/store
// address generation next to the memories); the capacity and the single
// read-or-write mode per context are this design's choices.
//
// Timing: the AGU address of cycle t is used in cycle t; read data, for the
// array or the CPU, appear in cycle t+1 and hold until the next read.
module mimd_mem_module
  import hmp_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned DW    = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  mimd_mem_mode_e mode,
  input  logic           agu_load,
  input  agu_cfg_t       agu_cfg,
  input  logic [DW-1:0]  wdata,
  output logic [DW-1:0]  rdata,
  input  logic           hst_we,
  input  logic           hst_re,
  input  logic [AW-1:0]  hst_addr,
  input  logic [DW-1:0]  hst_wdata
);

  logic [AW-1:0] addr;
  logic          rd, wr;

  assign rd = run && mode == MM_READ;
  assign wr = run && mode == MM_WRITE;

  agu #(.AW(AW)) u_agu (
    .clk   (clk),
    .rst_n (rst_n),
    .cfg   (agu_cfg),
    .load  (agu_load),
    .step  (rd || wr),
    .addr  (addr)
  );

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr)                mem[addr]     <= wdata;
    else if (!run && hst_we) mem[hst_addr] <= hst_wdata;
    if (rd)                rdata <= mem[addr];
    else if (!run && hst_re) rdata <= mem[hst_addr];
  end

endmodule
