// fa_coreQ: logic of the quaternary NCL full adder (fulladdQ), without links.
//
// A and B are one-hot 4-rail digits (0..3); carryin and carryout are
// dual-rail. A first rank detects the ten classes of A+B (value of the
// partial sum digit and its carry: S0C0, S1C0, S2C0A/B, S3C0A/B, S0C1A/B,
// S1C1, S2C1), an OR rank merges them into the sum digit before carryin
// (IS0..IS3) and into carry-decided groups (ICOA/ICOB: A+B <= 2, carry 0;
// IC1A/IC1B: A+B >= 4, carry 1). The last rank adds carryin:
//   sum/k      = [carryin/0, IS k] + [carryin/1, IS (k-1 mod 4)]
//   carryout/0 = ICOA + ICOB + [carryin/0, IS3]
//   carryout/1 = IC1A + IC1B + [carryin/1, IS3]
// The terms follow the document's fulladdQ equations. The gates are this
// design's choice: TH22 for one pair, THXOR0 for two pairs, TH12/TH13 for
// ORs, TH24W22 (X + Y + C.D) for the carry rails.
//
// Interface: one-hot a, b in, dual-rail ci in; one-hot s, dual-rail co out.
// Timing: outputs after three ticks.
module fa_coreQ
  import ncl_pkg::*;
(
  input  logic tick,
  input  logic rst,
  input  qr_t  a,
  input  qr_t  b,
  input  dr_t  ci,
  output qr_t  s,
  output dr_t  co
);
  logic s0c0, s2c0a, s1c0, s2c0b, s3c0a, s3c0b, s0c1a, s2c1, s0c1b, s1c1;
  qr_t  is;
  logic ic0a, ic0b, ic1a, ic1b;

  // partial sums A+B; ncl_thxor x = {D, C, B, A} -> AB + CD
  ncl_th #(.N(2), .M(2)) u_s0c0  (.tick, .rst, .x({b[0], a[0]}), .y(s0c0));
  ncl_th #(.N(2), .M(2)) u_s2c0a (.tick, .rst, .x({b[1], a[1]}), .y(s2c0a));
  ncl_th #(.N(2), .M(2)) u_s0c1a (.tick, .rst, .x({b[2], a[2]}), .y(s0c1a));
  ncl_th #(.N(2), .M(2)) u_s2c1  (.tick, .rst, .x({b[3], a[3]}), .y(s2c1));
  ncl_thxor u_s1c0  (.tick, .rst, .x({b[1], a[0], b[0], a[1]}), .y(s1c0));
  ncl_thxor u_s2c0b (.tick, .rst, .x({b[2], a[0], b[0], a[2]}), .y(s2c0b));
  ncl_thxor u_s3c0a (.tick, .rst, .x({b[1], a[2], b[0], a[3]}), .y(s3c0a));
  ncl_thxor u_s3c0b (.tick, .rst, .x({b[3], a[0], b[2], a[1]}), .y(s3c0b));
  ncl_thxor u_s0c1b (.tick, .rst, .x({b[3], a[1], b[1], a[3]}), .y(s0c1b));
  ncl_thxor u_s1c1  (.tick, .rst, .x({b[3], a[2], b[2], a[3]}), .y(s1c1));

  // intermediate sum digit and carry-decided groups
  ncl_th #(.N(3), .M(1)) u_is0 (.tick, .rst, .x({s0c1b, s0c1a, s0c0}),  .y(is[0]));
  ncl_th #(.N(2), .M(1)) u_is1 (.tick, .rst, .x({s1c1, s1c0}),          .y(is[1]));
  ncl_th #(.N(3), .M(1)) u_is2 (.tick, .rst, .x({s2c1, s2c0b, s2c0a}),  .y(is[2]));
  ncl_th #(.N(2), .M(1)) u_is3 (.tick, .rst, .x({s3c0b, s3c0a}),        .y(is[3]));
  ncl_th #(.N(2), .M(1)) u_i0a (.tick, .rst, .x({s2c0b, s1c0}),         .y(ic0a));
  ncl_th #(.N(2), .M(1)) u_i0b (.tick, .rst, .x({s0c0, s2c0a}),         .y(ic0b));
  ncl_th #(.N(2), .M(1)) u_i1a (.tick, .rst, .x({s0c1a, s2c1}),         .y(ic1a));
  ncl_th #(.N(2), .M(1)) u_i1b (.tick, .rst, .x({s1c1, s0c1b}),         .y(ic1b));

  // carryin rank
  for (genvar k = 0; k < 4; k++) begin : g_sum
    ncl_thxor u_s (.tick, .rst, .x({is[(k + 3) % 4], ci[1], is[k], ci[0]}), .y(s[k]));
  end
  ncl_th #(.N(4), .M(2), .W0(2), .W1(2)) u_co0 (.tick, .rst, .x({is[3], ci[0], ic0b, ic0a}), .y(co[0]));
  ncl_th #(.N(4), .M(2), .W0(2), .W1(2)) u_co1 (.tick, .rst, .x({is[3], ci[1], ic1b, ic1a}), .y(co[1]));
endmodule
