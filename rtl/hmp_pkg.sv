// hmp_pkg: types and constants shared by the heterogeneous multicore platform.
//
// It holds the parameter record of the address generation unit (AGU), the
// instruction word of the SIMD-1D processing elements, and the per-context
// configuration records of the MIMD-2D array. The AGU parameter names (P, c,
// n, m), the 16-bit data width, the 8-PE / 16-bank SIMD-1D organisation and
// the 16-PE / 6-memory MIMD-2D organisation follow the platform description;
// every bit encoding below is this design's own choice.
package hmp_pkg;

  localparam int unsigned HMP_DW = 16;   // accelerator data width
  localparam int unsigned AGU_AW = 12;   // widest address any AGU produces

  // ---------------------------------------------------------------------
  // AGU parameters. The AGU starts at P and adds c every cycle; after every
  // n addresses it adds m instead of c (see agu.sv).
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic [AGU_AW-1:0] p;   // start address
    logic [AGU_AW-1:0] c;   // step (two's complement)
    logic [AGU_AW-1:0] n;   // addresses per counter period (0 behaves as 1)
    logic [AGU_AW-1:0] m;   // jump applied when the counter wraps
  } agu_cfg_t;

  // ---------------------------------------------------------------------
  // SIMD-1D PE instruction: stage 1 (adder / comparator), pair select,
  // stage 2 (multiplier), stage 3 (post adder / accumulator).
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    PRE_A   = 3'd0,   // s1 = a
    PRE_ADD = 3'd1,   // s1 = a + b
    PRE_SUB = 3'd2,   // s1 = a - b
    PRE_MIN = 3'd3,   // s1 = min(a, b)
    PRE_MAX = 3'd4    // s1 = max(a, b)
  } simd_pre_e;

  typedef enum logic [1:0] {
    MUL_NONE = 2'd0,  // s2 = s1
    MUL_B    = 2'd1,  // s2 = s1 * b
    MUL_K    = 2'd2   // s2 = s1 * k
  } simd_mul_e;

  typedef enum logic [1:0] {
    POST_NONE = 2'd0, // r = s2
    POST_K    = 2'd1, // r = s2 + k
    POST_ACC  = 2'd2  // acc = (first ? 0 : acc) + s2, r = acc
  } simd_post_e;

  typedef struct packed {
    simd_pre_e  pre;
    logic       pair_sel;  // negative s1 -> take the partner's s1
    simd_mul_e  mul;
    simd_post_e post;
  } simd_instr_t;          // 8 bits

  // ---------------------------------------------------------------------
  // MIMD-2D PE configuration (one record per PE per context).
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    MOP_PASS = 4'd0,  // out = A
    MOP_ADD  = 4'd1,  // out = A + B,          flag = carry
    MOP_SUB  = 4'd2,  // out = A - B,          flag = borrow (A < B unsigned)
    MOP_ADDC = 4'd3,  // out = A + B + cin,    flag = carry
    MOP_SUBC = 4'd4,  // out = A - B - bin,    flag = borrow
    MOP_MUL  = 4'd5,  // out = low half of A * B (unsigned)
    MOP_MULH = 4'd6,  // out = high half of A * B (unsigned)
    MOP_SEL  = 4'd7,  // out = cin ? B : A
    MOP_ACC  = 4'd8,  // out = out + A
    MOP_HOLD = 4'd9   // out keeps its value
  } mimd_op_e;

  typedef enum logic [2:0] {
    SRC_N     = 3'd0,
    SRC_E     = 3'd1,
    SRC_S     = 3'd2,
    SRC_W     = 3'd3,
    SRC_SELF  = 3'd4,
    SRC_CONST = 3'd5,
    SRC_ZERO  = 3'd6
  } mimd_src_e;

  typedef struct packed {
    mimd_op_e        op;
    mimd_src_e       src_a;
    mimd_src_e       src_b;
    logic [1:0]      src_c;   // neighbour (N, E, S, W) whose flag is cin
    logic [HMP_DW-1:0] k;     // constant operand
  } mimd_pe_cfg_t;            // 28 bits

  typedef enum logic [1:0] {
    MM_IDLE  = 2'd0,
    MM_READ  = 2'd1,
    MM_WRITE = 2'd2
  } mimd_mem_mode_e;

  // Per memory module, per context.
  typedef struct packed {
    mimd_mem_mode_e mode;
    logic [2:0]     wsrc;      // border PE feeding the write stream
    logic           agu_load;  // reload this module's AGU at the context start
    logic [3:0]     agu_idx;   // entry of the AGU parameter table
  } mimd_mem_cfg_t;            // 10 bits

endpackage
