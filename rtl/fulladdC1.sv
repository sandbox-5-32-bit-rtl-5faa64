// fulladdC1: canonical NCL full adder with its AND and OR ranks pipelined.
//
// The eight minterms of fulladdC become three integrated pipeline stages,
// each built from gates that take their consumer's request as an enable
// (ncl_the), so every stage is at once logic and register:
//   min rank  : eight TH33 minterms of (A, B, carryin), enabled by the
//               request of the middle rank
//   middle    : midA pairs minterms for the sum, midB for the carryout,
//               each a one-hot 4-rail value (enabled TH12 gates); midA is
//               enabled by the sum rank's request, midB by the carry rank's
//   output    : sum and carryout rails, enabled TH12 of two mid rails,
//               enabled by the outside consumers
// The minterm rank's completion is an OR tree (two TH14 and a TH12, the
// 4-input ORs made into a tree) and it is the component's done: the inputs
// are released as soon as the minterm is captured, while the middle and
// output ranks still hold the operation. Grouping of minterms into midA,
// midB and the outputs follows the document's fulladdC listing; 33 cells,
// the count given there.
//
// Interface: as fulladdA, but done rises when the minterm rank holds DATA,
// which may be before sum and carryout are out.
// Timing: done three ticks after the inputs; sum and carryout three ticks.
module fulladdC1
  import ncl_pkg::*;
(
  input  logic tick,
  input  logic rst,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  ci,
  input  logic s_close,
  input  logic co_close,
  output dr_t  s,
  output dr_t  co,
  output logic done
);
  logic [7:0] m;                  // minterm k: k = {a, b, ci}
  logic [3:0] mid_a, mid_b;
  logic ki_m, ki_ma, ki_mb, ki_s, ki_co;
  logic m_c0, m_c1, ma_comp, mb_comp, mid_done, s_comp, co_comp;

  for (genvar k = 0; k < 8; k++) begin : g_min
    ncl_the #(.N(3), .M(3)) u_m (.tick, .rst, .en(ki_m),
      .x({a[(k >> 2) & 1], b[(k >> 1) & 1], ci[k & 1]}), .y(m[k]));
  end

  // midA: sum/0 = 000,110 | 101,011   sum/1 = 100,010 | 001,111
  // midB: carryout/0 = 000,100 | 010,001   carryout/1 = 111,110 | 011,101
  localparam int unsigned MA [4][2] = '{'{0, 6}, '{5, 3}, '{4, 2}, '{1, 7}};
  localparam int unsigned MB [4][2] = '{'{0, 4}, '{2, 1}, '{7, 6}, '{3, 5}};
  for (genvar j = 0; j < 4; j++) begin : g_mid
    ncl_the #(.N(2), .M(1)) u_ma (.tick, .rst, .en(ki_ma), .x({m[MA[j][1]], m[MA[j][0]]}), .y(mid_a[j]));
    ncl_the #(.N(2), .M(1)) u_mb (.tick, .rst, .en(ki_mb), .x({m[MB[j][1]], m[MB[j][0]]}), .y(mid_b[j]));
  end

  for (genvar v = 0; v < 2; v++) begin : g_out
    ncl_the #(.N(2), .M(1)) u_s  (.tick, .rst, .en(ki_s),  .x(mid_a[2*v +: 2]), .y(s[v]));
    ncl_the #(.N(2), .M(1)) u_co (.tick, .rst, .en(ki_co), .x(mid_b[2*v +: 2]), .y(co[v]));
  end

  // completions
  ncl_th #(.N(4), .M(1)) u_mc0  (.tick, .rst, .x(m[3:0]),  .y(m_c0));
  ncl_th #(.N(4), .M(1)) u_mc1  (.tick, .rst, .x(m[7:4]),  .y(m_c1));
  ncl_th #(.N(2), .M(1)) u_done (.tick, .rst, .x({m_c1, m_c0}), .y(done));
  ncl_th #(.N(4), .M(1)) u_mac  (.tick, .rst, .x(mid_a), .y(ma_comp));
  ncl_th #(.N(4), .M(1)) u_mbc  (.tick, .rst, .x(mid_b), .y(mb_comp));
  ncl_th #(.N(2), .M(2)) u_midd (.tick, .rst, .x({mb_comp, ma_comp}), .y(mid_done));
  ncl_th #(.N(2), .M(1)) u_scp  (.tick, .rst, .x(s),  .y(s_comp));
  ncl_th #(.N(2), .M(1)) u_cocp (.tick, .rst, .x(co), .y(co_comp));

  // requests: inverted completion of each stage's consumer
  ncl_inv u_km  (.tick, .rst, .x(mid_done), .y(ki_m));
  ncl_inv u_kma (.tick, .rst, .x(s_comp),   .y(ki_ma));
  ncl_inv u_kmb (.tick, .rst, .x(co_comp),  .y(ki_mb));
  ncl_inv u_ks  (.tick, .rst, .x(s_close),  .y(ki_s));
  ncl_inv u_kco (.tick, .rst, .x(co_close), .y(ki_co));
endmodule
