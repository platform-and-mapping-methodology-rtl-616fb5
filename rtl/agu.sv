// agu: programmable address generation unit built from one adder and one
// counter.
//
// The unit emits one address per clock. After `load` it sits at the start
// address P. Every cycle with `step` high it moves on: normally it adds the
// step c; when the counter has produced n addresses it adds the jump m
// instead and the counter restarts. Two's-complement c and m allow
// descending and "return to base" patterns, e.g. c = 1, n = W, m = stride-W+1
// walks a W-wide window row by row, and m = -(n-1)*c repeats the same n
// addresses (the plain linear addressing of older load/store cells).
//
// Parameters P, c, n, m and the single adder + counter structure follow the
// platform description; what each parameter means is this design's reading
// of it. Addresses wrap modulo 2^AW. n = 0 behaves as n = 1.
//
// Timing: addr is a register. It changes on the clock edge after `load`
// (to P) or `step` (to the next address); `load` wins over `step`.
module agu
  import hmp_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  agu_cfg_t      cfg,
  input  logic          load,
  input  logic          step,
  output logic [AW-1:0] addr
);

  logic [AW-1:0]   c_r, n_r, m_r;  // parameters in use (reloaded by `load`)
  logic [AW-1:0]   cnt;       // addresses issued in this counter period
  logic            wrap;
  logic [AW-1:0]   inc;

  assign wrap = (cnt + AW'(1) >= n_r);
  assign inc  = wrap ? m_r : c_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_r  <= '0;
      n_r  <= '0;
      m_r  <= '0;
      cnt  <= '0;
      addr <= '0;
    end else if (load) begin
      c_r  <= cfg.c[AW-1:0];
      n_r  <= cfg.n[AW-1:0];
      m_r  <= cfg.m[AW-1:0];
      cnt  <= '0;
      addr <= cfg.p[AW-1:0];
    end else if (step) begin
      addr <= addr + inc;              // the one adder
      cnt  <= wrap ? '0 : cnt + AW'(1); // the one counter
    end
  end

endmodule
