// fulladdA2: integrated textbook NCL full adder without the large sum gate.
//
// Like fulladdA1, but each TH34W2 sum gate plus its enable would need a
// five-input gate, so the sum is backed out into smaller gates:
// TH34W2(X weighted 2, A, B, C) = XA + XB + XC + ABC. Each product is an
// enabled C-element (TH22 or TH33 plus the enable) and a TH14 collects the
// four products of one rail. The carry gates are enabled TH23 gates as in
// fulladdA1. A TH12 per output and a TH22 give done. Decomposition after
// the document's drawing of TH34W2 as smaller functions and its fulladdA2
// drawing (17 cells, the count given there).
//
// Interface: as fulladdA. Timing: carryout one tick, sum three ticks after
// the inputs and requests.
module fulladdA2
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
  logic ki_s, ki_co, s_comp, co_comp;
  logic [1:0][3:0] p;   // products of each sum rail

  ncl_inv u_ks  (.tick, .rst, .x(s_close),  .y(ki_s));
  ncl_inv u_kco (.tick, .rst, .x(co_close), .y(ki_co));

  ncl_the #(.N(3), .M(2)) u_co0 (.tick, .rst, .en(ki_co), .x({ci[0], b[0], a[0]}), .y(co[0]));
  ncl_the #(.N(3), .M(2)) u_co1 (.tick, .rst, .en(ki_co), .x({ci[1], b[1], a[1]}), .y(co[1]));

  for (genvar v = 0; v < 2; v++) begin : g_sum
    // sum/v needs carryout/(1-v): X = co[1-v]
    ncl_the #(.N(2), .M(2)) u_pa (.tick, .rst, .en(ki_s), .x({a[v],  co[1-v]}), .y(p[v][0]));
    ncl_the #(.N(2), .M(2)) u_pb (.tick, .rst, .en(ki_s), .x({b[v],  co[1-v]}), .y(p[v][1]));
    ncl_the #(.N(2), .M(2)) u_pc (.tick, .rst, .en(ki_s), .x({ci[v], co[1-v]}), .y(p[v][2]));
    ncl_the #(.N(3), .M(3)) u_pd (.tick, .rst, .en(ki_s), .x({ci[v], b[v], a[v]}), .y(p[v][3]));
    ncl_th  #(.N(4), .M(1)) u_or (.tick, .rst, .x(p[v]), .y(s[v]));
  end

  ncl_th #(.N(2), .M(1)) u_scp  (.tick, .rst, .x(s),  .y(s_comp));
  ncl_th #(.N(2), .M(1)) u_cocp (.tick, .rst, .x(co), .y(co_comp));
  ncl_th #(.N(2), .M(2)) u_done (.tick, .rst, .x({co_comp, s_comp}), .y(done));
endmodule
