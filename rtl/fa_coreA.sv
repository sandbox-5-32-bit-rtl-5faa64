// fa_coreA: logic of the textbook NCL full adder (fulladdA), without links.
//
// carryout/v = TH23(A/v, B/v, carryin/v): any two of the three inputs at v.
// sum/1 = TH34W2(carryout/0 weighted 2, A/1, B/1, carryin/1) and
// sum/0 = TH34W2(carryout/1 weighted 2, A/0, B/0, carryin/0): the sum waits
// for the carry, which keeps the sum complete with respect to all inputs.
// Gate choice and wiring follow the document's fulladdA drawing.
//
// Interface: dual-rail a, b, ci in; dual-rail s, co out (raw, unlinked).
// Timing: carryout after one tick, sum after two.
module fa_coreA
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
  ncl_th #(.N(3), .M(2)) u_co0 (.tick, .rst, .x({ci[0], b[0], a[0]}), .y(co[0]));
  ncl_th #(.N(3), .M(2)) u_co1 (.tick, .rst, .x({ci[1], b[1], a[1]}), .y(co[1]));
  ncl_th #(.N(4), .M(3), .W0(2)) u_s1 (.tick, .rst, .x({ci[1], b[1], a[1], co[0]}), .y(s[1]));
  ncl_th #(.N(4), .M(3), .W0(2)) u_s0 (.tick, .rst, .x({ci[0], b[0], a[0], co[1]}), .y(s[0]));
endmodule
