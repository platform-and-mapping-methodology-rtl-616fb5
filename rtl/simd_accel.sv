// simd_accel: SIMD-1D accelerator of the platform.
//
// NPE processing elements (simd_pe) run one instruction in lock step. Each
// PE reads its two operands through its own two AGUs and a read crossbar
// (simd_xbar) from a shared memory of NBANK banks (simd_bank), so every
// cycle every PE gets two new operands. Results bypass the crossbar: one
// output AGU, shared by all PEs, gives a base address o and PE j writes word
// o + j. A run is NOUT rounds; a round is one "thread" per PE and consumes
// ACC_LEN operand pairs per PE (ACC_LEN > 1 with the accumulate
// instruction, e.g. one dot product per thread), after which the PEs write
// their NPE results and the output AGU advances. Adjacent PEs (0-1, 2-3, ...)
// are pairs for two-PE operations.
//
// The PE count, two input AGUs per PE, one shared output AGU, the banked
// memory behind an arbiter-less crossbar and the thread rounds follow the
// platform description. The register map, start/done handshake, bank
// interleaving and run-length fields are this design's own.
//
// CPU interface (word addresses, 32-bit data, read data the cycle after
// hst_re):
//   0x0000  CTRL     write bit0 = 1: start.  read {conflict, busy, done}
//   0x0001  INSTR    simd_instr_t (8 bits)
//   0x0002  K        constant operand
//   0x0003  ACC_LEN  operand pairs per result (0 counts as 1)
//   0x0004  NOUT     rounds per run
//   0x0100 + 4*i + f AGU i parameter f (0 P, 1 c, 2 n, 3 m); i = 2j, 2j+1
//                    are PE j's a and b AGUs, i = 2*NPE the output AGU
//   0x8000 + w       shared-memory word w (CPU access only while idle)
// conflict is sticky until the next start and reports two PE ports that
// addressed different rows of one bank in the same cycle.
//
// Timing: after the start write, one cycle loads the AGUs, then ACC_LEN*NOUT
// issue cycles follow, one operand pair per PE per cycle; the last results
// are written 5 cycles after the last issue (bank read 1, PE 3, write 1) and
// done rises the cycle after that.
module simd_accel
  import hmp_pkg::*;
#(
  parameter int unsigned NPE   = 8,
  parameter int unsigned NBANK = 16,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 16,
  localparam int unsigned BW   = $clog2(NBANK),
  localparam int unsigned RW   = $clog2(DEPTH),
  localparam int unsigned AW   = BW + RW,
  localparam int unsigned NAGU = 2*NPE + 1
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

  // ---------------------------------------------------------------- registers
  simd_instr_t         instr;
  logic [DW-1:0]       k;
  logic [15:0]         acc_len, nout;
  agu_cfg_t            agu_cfg [NAGU];

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN} state_e;
  state_e              state;
  logic                busy, conflict_q, start;

  assign busy  = (state != S_IDLE);
  assign start = hst_we && hst_addr == 16'h0000 && hst_wdata[0] && !busy;

  localparam int unsigned SW = $clog2(NAGU);
  logic [SW-1:0]       agu_sel;   // AGU addressed by the CPU
  assign agu_sel = hst_addr[SW+1:2];

  logic                is_mem;
  logic [AW-1:0]       hst_word;
  assign is_mem   = hst_addr[15];
  assign hst_word = hst_addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      instr   <= '0;
      k       <= '0;
      acc_len <= 16'd1;
      nout    <= '0;
      for (int i = 0; i < NAGU; i++) agu_cfg[i] <= '0;
    end else if (hst_we && !is_mem && !busy) begin
      unique casez (hst_addr)
        16'h0001: instr   <= simd_instr_t'(hst_wdata[$bits(simd_instr_t)-1:0]);
        16'h0002: k       <= hst_wdata[DW-1:0];
        16'h0003: acc_len <= hst_wdata[15:0];
        16'h0004: nout    <= hst_wdata[15:0];
        16'h01??: if (32'(hst_addr[7:2]) < NAGU) begin
          unique case (hst_addr[1:0])
            2'd0: agu_cfg[agu_sel].p <= hst_wdata[AGU_AW-1:0];
            2'd1: agu_cfg[agu_sel].c <= hst_wdata[AGU_AW-1:0];
            2'd2: agu_cfg[agu_sel].n <= hst_wdata[AGU_AW-1:0];
            default: agu_cfg[agu_sel].m <= hst_wdata[AGU_AW-1:0];
          endcase
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------- controller
  logic [15:0] elem_cnt, round_cnt, wr_cnt;
  logic        issue, issue_first, issue_last, issue_end;
  logic [15:0] acc_len_eff;

  assign acc_len_eff = (acc_len == 16'd0) ? 16'd1 : acc_len;
  assign issue       = (state == S_RUN);
  assign issue_first = (elem_cnt == 16'd0);
  assign issue_last  = (elem_cnt == acc_len_eff - 16'd1);
  assign issue_end   = issue_last && (round_cnt == nout - 16'd1);

  logic out_valid_any;   // all PEs produce results in the same cycle
  logic xbar_conflict;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      elem_cnt   <= '0;
      round_cnt  <= '0;
      wr_cnt     <= '0;
      done       <= 1'b0;
      conflict_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_LOAD;
          done       <= 1'b0;
          conflict_q <= 1'b0;
          elem_cnt   <= '0;
          round_cnt  <= '0;
          wr_cnt     <= '0;
        end
        S_LOAD: begin
          if (nout == 16'd0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_RUN;
          end
        end
        S_RUN: begin
          if (issue_last) begin
            elem_cnt  <= '0;
            round_cnt <= round_cnt + 16'd1;
          end else begin
            elem_cnt  <= elem_cnt + 16'd1;
          end
          if (issue_end) state <= S_DRAIN;
        end
        S_DRAIN: if (wr_cnt == nout) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      if (out_valid_any) wr_cnt <= wr_cnt + 16'd1;
      if (xbar_conflict && issue) conflict_q <= 1'b1;
    end
  end

  // ------------------------------------------------------------------ AGUs
  logic [NAGU-1:0][AW-1:0] agu_addr;
  logic                    agu_load;
  assign agu_load = (state == S_LOAD);

  for (genvar i = 0; i < NAGU; i++) begin : g_agu
    agu #(.AW(AW)) u_agu (
      .clk   (clk),
      .rst_n (rst_n),
      .cfg   (agu_cfg[i]),
      .load  (agu_load),
      .step  ((i == NAGU-1) ? out_valid_any : issue),
      .addr  (agu_addr[i])
    );
  end

  // ------------------------------------------------------ crossbar and banks
  logic [2*NPE-1:0]          req_valid;
  logic [2*NPE-1:0][AW-1:0]  req_addr;
  logic [NBANK-1:0]          xb_re, bank_re, bank_we;
  logic [NBANK-1:0][RW-1:0]  xb_raddr, bank_raddr, bank_waddr;
  logic [NBANK-1:0][DW-1:0]  bank_rdata, bank_wdata;
  logic [2*NPE-1:0][DW-1:0]  rsp_data;

  assign req_valid = {(2*NPE){issue}};
  assign req_addr  = agu_addr[2*NPE-1:0];

  simd_xbar #(.NPORT(2*NPE), .NBANK(NBANK), .AW(AW), .DW(DW)) u_xbar (
    .clk        (clk),
    .rst_n      (rst_n),
    .req_valid  (req_valid),
    .req_addr   (req_addr),
    .bank_re    (xb_re),
    .bank_raddr (xb_raddr),
    .bank_rdata (bank_rdata),
    .rsp_data   (rsp_data),
    .conflict   (xbar_conflict)
  );

  // PE results, written straight into the banks
  logic [NPE-1:0][DW-1:0] pe_result;
  logic [NPE-1:0]         pe_out_valid;
  logic [AW-1:0]          obase;
  assign obase         = agu_addr[NAGU-1];
  assign out_valid_any = |pe_out_valid;

  logic [NPE-1:0][AW-1:0] ow;      // word written by each PE
  for (genvar j = 0; j < NPE; j++) begin : g_ow
    assign ow[j] = obase + AW'(j);
  end

  always_comb begin
    bank_we    = '0;
    bank_waddr = '0;
    bank_wdata = '0;
    bank_re    = xb_re;
    bank_raddr = xb_raddr;
    if (!busy) begin
      bank_re    = '0;
      if (is_mem && hst_re) begin
        bank_re[hst_word[BW-1:0]]    = 1'b1;
        bank_raddr[hst_word[BW-1:0]] = hst_word[AW-1:BW];
      end
      if (is_mem && hst_we) begin
        bank_we[hst_word[BW-1:0]]    = 1'b1;
        bank_waddr[hst_word[BW-1:0]] = hst_word[AW-1:BW];
        bank_wdata[hst_word[BW-1:0]] = hst_wdata[DW-1:0];
      end
    end else if (out_valid_any) begin
      for (int j = 0; j < NPE; j++) begin
        bank_we[ow[j][BW-1:0]]    = 1'b1;
        bank_waddr[ow[j][BW-1:0]] = ow[j][AW-1:BW];
        bank_wdata[ow[j][BW-1:0]] = pe_result[j];
      end
    end
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    simd_bank #(.DW(DW), .DEPTH(DEPTH)) u_bank (
      .clk   (clk),
      .we    (bank_we[b]),
      .waddr (bank_waddr[b]),
      .wdata (bank_wdata[b]),
      .re    (bank_re[b]),
      .raddr (bank_raddr[b]),
      .rdata (bank_rdata[b])
    );
  end

  // ------------------------------------------------------------------- PEs
  logic issue_q, first_q, last_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      issue_q <= 1'b0; first_q <= 1'b0; last_q <= 1'b0;
    end else begin
      issue_q <= issue;
      first_q <= issue_first;
      last_q  <= issue_last;
    end
  end

  logic [NPE-1:0][DW-1:0] pair_s1;

  for (genvar j = 0; j < NPE; j++) begin : g_pe
    simd_pe #(.DW(DW)) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .instr      (instr),
      .k          (k),
      .in_valid   (issue_q),
      .in_first   (first_q),
      .in_last    (last_q),
      .a          (rsp_data[2*j]),
      .b          (rsp_data[2*j+1]),
      .pair_s1    (pair_s1[j]),
      .partner_s1 (pair_s1[j ^ 1]),
      .out_valid  (pe_out_valid[j]),
      .result     (pe_result[j])
    );
  end

  // ------------------------------------------------------------ CPU reads
  logic          rd_mem_q;
  logic [BW-1:0] rd_bank_q;
  logic [31:0]   rd_reg_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_mem_q  <= 1'b0;
      rd_bank_q <= '0;
      rd_reg_q  <= '0;
    end else if (hst_re) begin
      rd_mem_q  <= is_mem;
      rd_bank_q <= hst_word[BW-1:0];
      rd_reg_q  <= '0;
      unique casez (hst_addr)
        16'h0000: rd_reg_q <= {29'd0, conflict_q, busy, done};
        16'h0001: rd_reg_q <= 32'(instr);
        16'h0002: rd_reg_q <= 32'(k);
        16'h0003: rd_reg_q <= 32'(acc_len);
        16'h0004: rd_reg_q <= 32'(nout);
        16'h01??: if (32'(hst_addr[7:2]) < NAGU) begin
          unique case (hst_addr[1:0])
            2'd0: rd_reg_q <= 32'(agu_cfg[agu_sel].p);
            2'd1: rd_reg_q <= 32'(agu_cfg[agu_sel].c);
            2'd2: rd_reg_q <= 32'(agu_cfg[agu_sel].n);
            default: rd_reg_q <= 32'(agu_cfg[agu_sel].m);
          endcase
        end
        default: ;
      endcase
    end
  end

  assign hst_rdata = rd_mem_q ? 32'(bank_rdata[rd_bank_q]) : rd_reg_q;

  // the output AGU must keep each round's NPE words in distinct banks
  a_out_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid_any |-> (obase % AW'(NPE)) == '0);

  // the PEs run in lock step
  a_pe_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid_any |-> &pe_out_valid);

endmodule
