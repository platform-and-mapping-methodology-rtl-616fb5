// hmp_platform: FPGA heterogeneous multicore platform.
//
// The platform joins a control-oriented CPU with custom accelerators on one
// memory-mapped bus: an on-chip memory (onchip_mem), N_SIMD SIMD-1D
// accelerators (simd_accel, many simple operations in parallel) and N_MIMD
// MIMD-2D accelerators (mimd_accel, more complex operations at medium
// parallelism). The CPU itself, and the DDR II SDRAM behind it, are outside
// this module: their bus is the bus_* port. The CPU copies data from its
// memories into an accelerator's local memory, writes the accelerator's
// configuration, starts it, waits for its done flag (simd_done / mimd_done,
// also readable in its CTRL register) and reads the results back.
//
// The CPU + on-chip memory + SIMD-1D / MIMD-2D accelerator organisation
// follows the platform description; the default counts are those of its two
// evaluated set-ups (three SIMD-1D accelerators, two MIMD-2D accelerators)
// combined. The bus protocol and address map are this design's own:
//   bus_addr[23:16] = 8'h00        on-chip memory, word bus_addr[AW-1:0]
//                   = 8'h01 + i    SIMD-1D accelerator i (i < N_SIMD)
//                   = 8'h10 + i    MIMD-2D accelerator i (i < N_MIMD)
//   bus_addr[15:0]                 word inside the target (see each block)
// Writes take effect at the clock edge with bus_we. bus_rdata is valid, with
// bus_rvalid, the cycle after bus_re; reads of unmapped targets return 0.
module hmp_platform #(
  parameter int unsigned N_SIMD    = 3,
  parameter int unsigned N_MIMD    = 2,
  parameter int unsigned OCM_WORDS = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [23:0]       bus_addr,
  input  logic              bus_we,
  input  logic              bus_re,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              bus_rvalid,
  output logic [N_SIMD-1:0] simd_done,
  output logic [N_MIMD-1:0] mimd_done
);

  localparam int unsigned OAW = $clog2(OCM_WORDS);

  logic [7:0] tgt, tgt_q;
  assign tgt = bus_addr[23:16];

  // on-chip memory
  logic [31:0] ocm_rdata;
  onchip_mem #(.WORDS(OCM_WORDS), .DW(32)) u_ocm (
    .clk   (clk),
    .we    (bus_we && tgt == 8'h00),
    .re    (bus_re && tgt == 8'h00),
    .addr  (bus_addr[OAW-1:0]),
    .wdata (bus_wdata),
    .rdata (ocm_rdata)
  );

  // SIMD-1D accelerators
  logic [N_SIMD-1:0][31:0] simd_rdata;
  for (genvar i = 0; i < N_SIMD; i++) begin : g_simd
    logic sel;
    assign sel = (tgt == 8'(8'h01 + i));
    simd_accel u_simd (
      .clk       (clk),
      .rst_n     (rst_n),
      .hst_addr  (bus_addr[15:0]),
      .hst_we    (bus_we && sel),
      .hst_re    (bus_re && sel),
      .hst_wdata (bus_wdata),
      .hst_rdata (simd_rdata[i]),
      .done      (simd_done[i])
    );
  end

  // MIMD-2D accelerators
  logic [N_MIMD-1:0][31:0] mimd_rdata;
  for (genvar i = 0; i < N_MIMD; i++) begin : g_mimd
    logic sel;
    assign sel = (tgt == 8'(8'h10 + i));
    mimd_accel u_mimd (
      .clk       (clk),
      .rst_n     (rst_n),
      .hst_addr  (bus_addr[15:0]),
      .hst_we    (bus_we && sel),
      .hst_re    (bus_re && sel),
      .hst_wdata (bus_wdata),
      .hst_rdata (mimd_rdata[i]),
      .done      (mimd_done[i])
    );
  end

  // read-data return
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_rvalid <= 1'b0;
      tgt_q      <= '0;
    end else begin
      bus_rvalid <= bus_re;
      if (bus_re) tgt_q <= tgt;
    end
  end

  always_comb begin
    bus_rdata = '0;
    if (tgt_q == 8'h00) bus_rdata = ocm_rdata;
    for (int i = 0; i < N_SIMD; i++) if (tgt_q == 8'(8'h01 + i)) bus_rdata = simd_rdata[i];
    for (int i = 0; i < N_MIMD; i++) if (tgt_q == 8'(8'h10 + i)) bus_rdata = mimd_rdata[i];
  end

  // a bus cycle either reads or writes
  a_bus_rw: assert property (@(posedge clk) disable iff (!rst_n) !(bus_we && bus_re));

endmodule
