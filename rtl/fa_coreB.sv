// fa_coreB: logic of the THXOR full adder (fulladdB), without links.
//
// Two half adders of THXOR0 gates: suma = A xor B, sum = suma xor carryin.
// The carry is {[A/v, B/v], [suma/1, carryin/v]} -> carryout/v, built as a
// TH22 on (suma/1, carryin/v) followed by a threshold-2 gate that also takes
// A/v and B/v (TH23W2, the TH22 weighted 2). Keeping the carryin term in
// its own gate means a carry that arrives after it is no longer needed (an
// orphan) holds only that small gate, so a NULL carry can also run ahead
// along chains of 00 or 11 digits. Splitting the carry gate follows the
// document's fulladdB drawing; the weight 2 is this design's reading of it.
//
// Interface: dual-rail a, b, ci in; dual-rail s, co out (raw, unlinked).
// Timing: suma after one tick, sum after two, carryout after two or three.
module fa_coreB
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
  dr_t  suma;
  logic [1:0] x;

  // x = {D, C, B, A} -> AB + CD
  ncl_thxor u_sa0 (.tick, .rst, .x({b[1], a[1], b[0], a[0]}), .y(suma[0]));
  ncl_thxor u_sa1 (.tick, .rst, .x({b[0], a[1], b[1], a[0]}), .y(suma[1]));
  ncl_thxor u_s0  (.tick, .rst, .x({suma[1], ci[1], suma[0], ci[0]}), .y(s[0]));
  ncl_thxor u_s1  (.tick, .rst, .x({suma[0], ci[1], suma[1], ci[0]}), .y(s[1]));

  for (genvar v = 0; v < 2; v++) begin : g_carry
    ncl_th #(.N(2), .M(2))         u_x  (.tick, .rst, .x({ci[v], suma[1]}), .y(x[v]));
    ncl_th #(.N(3), .M(2), .W0(2)) u_co (.tick, .rst, .x({b[v], a[v], x[v]}), .y(co[v]));
  end
endmodule
