// mimd_accel: MIMD-2D accelerator of the platform.
//
// A ROWS x COLS mesh of mimd_pe, each linked to its four nearest
// neighbours, with NMEM memory modules (mimd_mem_module) on the left and
// right borders. A program is a sequence of contexts kept in a
// configuration memory; each context gives every PE its own operation and
// operand sources (MIMD), and lists for each memory module whether it
// streams into the array, stores a stream from it or idles. A crossbar
// connects the border: the west input of each left-column PE and the east
// input of each right-column PE can take the read stream of any memory
// module, and each memory module can store the output of any border PE.
// Unused mesh edges read zero.
//
// The sequencer runs contexts 0, 1, 2, ... until one marked last. Each
// context takes one set-up cycle, in which the array pauses and the AGUs of
// the memory modules whose context entry asks for it are reloaded from a
// shared AGU parameter table (partial reconfiguration: the other modules
// keep counting across the switch), and then `len` running cycles. PE and
// module registers keep their values across the switch, so a computation
// can span contexts. The CPU may rewrite the AGU table and the contexts at
// any time, also while the array runs; memory words only while it is idle.
//
// The 16 PEs, 6 memory modules, nearest-neighbour network, context
// sequencing and partial AGU reconfiguration follow the platform
// description. The 4x4 arrangement, the border crossbar, the record
// formats, the number of contexts and the memory capacity are this design's
// own choices.
//
// CPU interface (word addresses, 32-bit data, read data the cycle after
// hst_re):
//   0x0000               CTRL  write bit0 = 1: start; read {busy, done}
//   0x0001               current context (read only)
//   0x1000 + 64*x + p    PE p (= row*COLS + col) configuration in context x
//   0x2000 + 16*x + 0    context x: bit 16 last, bits 15:0 running cycles
//   0x2000 + 16*x + 1+i  context x: memory module i record (mimd_mem_cfg_t)
//   0x2000 + 16*x + 8+r  context x: border input r (r < ROWS: west of row r,
//                        else east of row r-ROWS) = memory module index
//                        (>= NMEM reads zero)
//   0x3000 + 4*e + f     AGU table entry e, parameter f (0 P, 1 c, 2 n, 3 m)
//   0x8000 + (i << MAW) + w   word w of memory module i
// A memory record's wsrc picks the border PE whose output it stores: r < ROWS
// the left-column PE of row r, else the right-column PE of row r-ROWS.
//
// Timing: the start write is followed by context 0's set-up cycle. A memory
// word read in running cycle t reaches the border PE's input in cycle t+1;
// every PE adds one cycle. done rises the cycle after the last context's
// last running cycle and stays until the next start.
module mimd_accel
  import hmp_pkg::*;
#(
  parameter int unsigned ROWS      = 4,
  parameter int unsigned COLS      = 4,
  parameter int unsigned NMEM      = 6,
  parameter int unsigned NCTX      = 16,
  parameter int unsigned NAGUCFG   = 16,
  parameter int unsigned MEM_DEPTH = 2048,
  localparam int unsigned NPE      = ROWS * COLS,
  localparam int unsigned MAW      = $clog2(MEM_DEPTH),
  localparam int unsigned CW       = $clog2(NCTX),
  localparam int unsigned DW       = HMP_DW
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] hst_addr,
  input  logic        hst_we,
  input  logic        hst_re,
  input  logic [31:0] hst_wdata,
  output logic [31:0] hst_rdata,
  output logic        done
);

  // ------------------------------------------------- configuration memory
  mimd_pe_cfg_t  pe_cfg  [NCTX][NPE];
  logic [15:0]   ctx_len [NCTX];
  logic          ctx_last[NCTX];
  mimd_mem_cfg_t mem_cfg [NCTX][NMEM];
  logic [2:0]    brd_sel [NCTX][2*ROWS];
  agu_cfg_t      agu_tab [NAGUCFG];

  logic [CW-1:0] h_ctx;
  logic [5:0]    h_idx;
  assign h_idx = hst_addr[5:0];

  always_comb begin
    h_ctx = '0;
    if (hst_addr[15:12] == 4'h1) h_ctx = CW'(hst_addr[11:6]);
    else                         h_ctx = CW'(hst_addr[11:4]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int x = 0; x < NCTX; x++) begin
        ctx_len[x]  <= '0;
        ctx_last[x] <= 1'b1;
        for (int p = 0; p < NPE; p++)     pe_cfg[x][p]  <= '0;
        for (int i = 0; i < NMEM; i++)    mem_cfg[x][i] <= '0;
        for (int r = 0; r < 2*ROWS; r++)  brd_sel[x][r] <= 3'd7;
      end
      for (int e = 0; e < NAGUCFG; e++) agu_tab[e] <= '0;
    end else if (hst_we) begin
      unique case (hst_addr[15:12])
        4'h1: if (32'(hst_addr[11:6]) < NCTX && 32'(h_idx) < NPE)
                pe_cfg[h_ctx][h_idx[$clog2(NPE)-1:0]] <= mimd_pe_cfg_t'(hst_wdata[$bits(mimd_pe_cfg_t)-1:0]);
        4'h2: if (32'(hst_addr[11:4]) < NCTX) begin
                if (hst_addr[3:0] == 4'd0) begin
                  ctx_len[h_ctx]  <= hst_wdata[15:0];
                  ctx_last[h_ctx] <= hst_wdata[16];
                end else if (32'(hst_addr[3:0]) <= NMEM) begin
                  mem_cfg[h_ctx][$clog2(NMEM)'(hst_addr[3:0] - 4'd1)] <=
                    mimd_mem_cfg_t'(hst_wdata[$bits(mimd_mem_cfg_t)-1:0]);
                end else if (hst_addr[3] && 32'(hst_addr[2:0]) < 2*ROWS) begin
                  brd_sel[h_ctx][hst_addr[2:0]] <= hst_wdata[2:0];
                end
              end
        4'h3: if (32'(hst_addr[11:2]) < NAGUCFG) begin
                unique case (hst_addr[1:0])
                  2'd0: agu_tab[hst_addr[$clog2(NAGUCFG)+1:2]].p <= hst_wdata[AGU_AW-1:0];
                  2'd1: agu_tab[hst_addr[$clog2(NAGUCFG)+1:2]].c <= hst_wdata[AGU_AW-1:0];
                  2'd2: agu_tab[hst_addr[$clog2(NAGUCFG)+1:2]].n <= hst_wdata[AGU_AW-1:0];
                  default: agu_tab[hst_addr[$clog2(NAGUCFG)+1:2]].m <= hst_wdata[AGU_AW-1:0];
                endcase
              end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ sequencer
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_RUN} state_e;
  state_e        state;
  logic [CW-1:0] ctx;
  logic [15:0]   cyc;
  logic          busy, start, run, setup;

  assign busy  = (state != S_IDLE);
  assign start = hst_we && hst_addr == 16'h0000 && hst_wdata[0] && !busy;
  assign run   = (state == S_RUN);
  assign setup = (state == S_SETUP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ctx   <= '0;
      cyc   <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SETUP;
          ctx   <= '0;
          done  <= 1'b0;
        end
        S_SETUP: begin
          cyc <= '0;
          if (ctx_len[ctx] != 16'd0)  state <= S_RUN;
          else if (ctx_last[ctx]) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else ctx <= ctx + CW'(1);
        end
        S_RUN: begin
          cyc <= cyc + 16'd1;
          if (cyc == ctx_len[ctx] - 16'd1) begin
            if (ctx_last[ctx] || 32'(ctx) == NCTX-1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_SETUP;
              ctx   <= ctx + CW'(1);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------- memory modules
  logic [NMEM-1:0][DW-1:0] mm_rdata, mm_wdata;
  logic [NMEM-1:0]         mm_hwe, mm_hre;
  logic [2*ROWS-1:0][DW-1:0] brd_out;     // outputs of the border PEs
  logic [2:0]              h_mm;
  assign h_mm = 3'(hst_addr[14:MAW]);

  for (genvar i = 0; i < NMEM; i++) begin : g_mm
    mimd_mem_cfg_t mc;
    assign mc          = mem_cfg[ctx][i];
    assign mm_wdata[i] = (32'(mc.wsrc) < 2*ROWS) ? brd_out[mc.wsrc] : '0;
    assign mm_hwe[i]   = !busy && hst_we && hst_addr[15] && h_mm == 3'(i);
    assign mm_hre[i]   = !busy && hst_re && hst_addr[15] && h_mm == 3'(i);

    mimd_mem_module #(.DEPTH(MEM_DEPTH), .DW(DW)) u_mm (
      .clk       (clk),
      .rst_n     (rst_n),
      .run       (run),
      .mode      (mc.mode),
      .agu_load  (setup && mc.agu_load),
      .agu_cfg   (agu_tab[mc.agu_idx]),
      .wdata     (mm_wdata[i]),
      .rdata     (mm_rdata[i]),
      .hst_we    (mm_hwe[i]),
      .hst_re    (mm_hre[i]),
      .hst_addr  (hst_addr[MAW-1:0]),
      .hst_wdata (hst_wdata[DW-1:0])
    );
  end

  // --------------------------------------------------------------- PE mesh
  logic [ROWS-1:0][COLS-1:0][DW-1:0] pe_data;
  logic [ROWS-1:0][COLS-1:0]         pe_flag;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign brd_out[r]      = pe_data[r][0];
    assign brd_out[ROWS+r] = pe_data[r][COLS-1];
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [3:0][DW-1:0] nb_d;
      logic [3:0]         nb_f;
      if (r > 0) begin : g_n
        assign nb_d[0] = pe_data[r-1][c];
        assign nb_f[0] = pe_flag[r-1][c];
      end else begin : g_n0
        assign nb_d[0] = '0;
        assign nb_f[0] = 1'b0;
      end
      if (c < COLS-1) begin : g_e
        assign nb_d[1] = pe_data[r][c+1];
        assign nb_f[1] = pe_flag[r][c+1];
      end else begin : g_e0
        logic [2:0] esel;
        assign esel    = brd_sel[ctx][ROWS+r];
        assign nb_d[1] = (32'(esel) < NMEM) ? mm_rdata[esel] : '0;
        assign nb_f[1] = 1'b0;
      end
      if (r < ROWS-1) begin : g_s
        assign nb_d[2] = pe_data[r+1][c];
        assign nb_f[2] = pe_flag[r+1][c];
      end else begin : g_s0
        assign nb_d[2] = '0;
        assign nb_f[2] = 1'b0;
      end
      if (c > 0) begin : g_w
        assign nb_d[3] = pe_data[r][c-1];
        assign nb_f[3] = pe_flag[r][c-1];
      end else begin : g_w0
        logic [2:0] wsel;
        assign wsel    = brd_sel[ctx][r];
        assign nb_d[3] = (32'(wsel) < NMEM) ? mm_rdata[wsel] : '0;
        assign nb_f[3] = 1'b0;
      end

      mimd_pe #(.DW(DW)) u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .en       (run),
        .cfg      (pe_cfg[ctx][r*COLS+c]),
        .nb_data  (nb_d),
        .nb_flag  (nb_f),
        .out_data (pe_data[r][c]),
        .out_flag (pe_flag[r][c])
      );
    end
  end

  // ------------------------------------------------------------ CPU reads
  logic        rd_mem_q;
  logic [2:0]  rd_mm_q;
  logic [31:0] rd_reg_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_mem_q <= 1'b0;
      rd_mm_q  <= '0;
      rd_reg_q <= '0;
    end else if (hst_re) begin
      rd_mem_q <= hst_addr[15];
      rd_mm_q  <= h_mm;
      unique case (hst_addr)
        16'h0000: rd_reg_q <= {30'd0, busy, done};
        16'h0001: rd_reg_q <= 32'(ctx);
        default:  rd_reg_q <= '0;
      endcase
    end
  end

  assign hst_rdata = !rd_mem_q ? rd_reg_q :
                     (32'(rd_mm_q) < NMEM) ? 32'(mm_rdata[rd_mm_q]) : '0;

endmodule
