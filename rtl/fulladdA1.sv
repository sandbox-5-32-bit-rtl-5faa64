// fulladdA1: integrated textbook NCL full adder.
//
// The link rank of fulladdA is folded into the logic: the TH23 carry gates
// and the TH34W2 sum gates take the request of their own consumer as an
// enable (ncl_the), so they are at once the logic and the output register.
// Only the completion gates remain behind them: a TH12 on each output and a
// TH22 joining the two give done, which closes A, B and carryin. The sum
// gates read the enabled carry outputs. Organisation after the document's
// integrated fulladdA drawing (9 cells, the count given there).
//
// Interface: as fulladdA. Timing: carryout one tick after the inputs and
// the carry request, sum one tick later; done two ticks after both.
module fulladdA1
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

  ncl_inv u_ks  (.tick, .rst, .x(s_close),  .y(ki_s));
  ncl_inv u_kco (.tick, .rst, .x(co_close), .y(ki_co));

  ncl_the #(.N(3), .M(2)) u_co0 (.tick, .rst, .en(ki_co), .x({ci[0], b[0], a[0]}), .y(co[0]));
  ncl_the #(.N(3), .M(2)) u_co1 (.tick, .rst, .en(ki_co), .x({ci[1], b[1], a[1]}), .y(co[1]));
  ncl_the #(.N(4), .M(3), .W0(2)) u_s1 (.tick, .rst, .en(ki_s), .x({ci[1], b[1], a[1], co[0]}), .y(s[1]));
  ncl_the #(.N(4), .M(3), .W0(2)) u_s0 (.tick, .rst, .en(ki_s), .x({ci[0], b[0], a[0], co[1]}), .y(s[0]));

  ncl_th #(.N(2), .M(1)) u_scp  (.tick, .rst, .x(s),  .y(s_comp));
  ncl_th #(.N(2), .M(1)) u_cocp (.tick, .rst, .x(co), .y(co_comp));
  ncl_th #(.N(2), .M(2)) u_done (.tick, .rst, .x({co_comp, s_comp}), .y(done));
endmodule
