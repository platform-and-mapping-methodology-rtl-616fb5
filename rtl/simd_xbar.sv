// simd_xbar: read crossbar between the SIMD-1D PE input ports and the banks
// of the shared memory.
//
// Word address w lives in bank (w mod NBANK), row (w / NBANK). Each cycle
// every requesting port is steered to its bank; a bank's row address comes
// from the lowest-numbered port that addresses it. There are no arbiters and
// no FIFOs: ports that read the same word share it (broadcast), and ports
// that address different rows of one bank are a mapping error, flagged on
// `conflict` in the same cycle, in which the higher-numbered ports receive
// the winning row's data. The bank each port used is registered so that the
// bank data, arriving one cycle later, are returned to the right ports.
//
// The crossbar and the absence of arbitration follow the platform
// description; the low-order interleaving and the conflict flag are this
// design's choices.
//
// Timing: requests in cycle t, bank_re/bank_raddr combinational in cycle t,
// rsp_data valid in cycle t+1 (bank latency of one cycle).
module simd_xbar #(
  parameter int unsigned NPORT = 16,
  parameter int unsigned NBANK = 16,
  parameter int unsigned AW    = 12,
  parameter int unsigned DW    = 16,
  localparam int unsigned BW   = $clog2(NBANK),
  localparam int unsigned RW   = AW - BW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NPORT-1:0]         req_valid,
  input  logic [NPORT-1:0][AW-1:0] req_addr,
  output logic [NBANK-1:0]         bank_re,
  output logic [NBANK-1:0][RW-1:0] bank_raddr,
  input  logic [NBANK-1:0][DW-1:0] bank_rdata,
  output logic [NPORT-1:0][DW-1:0] rsp_data,
  output logic                     conflict
);

  logic [NPORT-1:0][BW-1:0] port_bank, port_bank_q;

  always_comb begin
    bank_re    = '0;
    bank_raddr = '0;
    conflict   = 1'b0;
    for (int p = 0; p < NPORT; p++) begin
      port_bank[p] = req_addr[p][BW-1:0];
    end
    for (int p = NPORT-1; p >= 0; p--) begin
      // walk from the highest port down so the lowest-numbered port wins
      if (req_valid[p]) begin
        bank_re[port_bank[p]]    = 1'b1;
        bank_raddr[port_bank[p]] = req_addr[p][AW-1:BW];
      end
    end
    for (int p = 0; p < NPORT; p++) begin
      if (req_valid[p] && bank_raddr[port_bank[p]] != req_addr[p][AW-1:BW])
        conflict = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) port_bank_q <= '0;
    else        port_bank_q <= port_bank;
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) rsp_data[p] = bank_rdata[port_bank_q[p]];
  end

endmodule
