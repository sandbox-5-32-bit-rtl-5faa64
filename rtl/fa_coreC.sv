// fa_coreC: logic of the canonical NCL full adder (fulladdC), without links.
//
// A direct mapping of the canonical equations: eight TH33 gates detect the
// eight minterms of (A, B, carryin), and four 4-input OR gates (TH14) collect
// the minterms of each output rail:
//   sum/0      = m000 + m110 + m101 + m011     sum/1      = m100 + m010 + m001 + m111
//   carryout/0 = m000 + m100 + m010 + m001     carryout/1 = m111 + m110 + m011 + m101
// (minterm index = A B carryin). Every output waits for every input.
//
// Interface: dual-rail a, b, ci in; dual-rail s, co out (raw, unlinked).
// Timing: all outputs after two ticks.
module fa_coreC
  import ncl_pkg::*;
(
  input  logic tick,
  input  logic rst,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  ci,
  output dr_t  s,
  output dr_t  co
);
  logic [7:0] m;

  for (genvar k = 0; k < 8; k++) begin : g_min
    ncl_th #(.N(3), .M(3)) u_m (.tick, .rst,
      .x({a[(k >> 2) & 1], b[(k >> 1) & 1], ci[k & 1]}), .y(m[k]));
  end

  ncl_th #(.N(4), .M(1)) u_s0  (.tick, .rst, .x({m[3], m[5], m[6], m[0]}), .y(s[0]));
  ncl_th #(.N(4), .M(1)) u_s1  (.tick, .rst, .x({m[7], m[1], m[2], m[4]}), .y(s[1]));
  ncl_th #(.N(4), .M(1)) u_co0 (.tick, .rst, .x({m[1], m[2], m[4], m[0]}), .y(co[0]));
  ncl_th #(.N(4), .M(1)) u_co1 (.tick, .rst, .x({m[5], m[3], m[6], m[7]}), .y(co[1]));
endmodule
