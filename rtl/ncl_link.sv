// ncl_link: the output rank of an NCL component for one dual-rail digit.
//
// Each rail passes a TH22 gate whose second input is the inverted closure
// from the consumer, so DATA passes only while the consumer requests DATA
// and NULL only while it requests NULL. A TH12 on the two output rails gives
// the link's completion (1 = link holds DATA).
//
// Interface: d in, close (consumer completion) in, q out, comp out.
// Timing: inverter, TH22 and TH12 each cost one tick.
module ncl_link
  import ncl_pkg::*;
(
  input  logic tick,
  input  logic rst,
  input  dr_t  d,
  input  logic close,
  output dr_t  q,
  output logic comp
);
  logic ki;

  ncl_inv u_inv (.tick, .rst, .x(close), .y(ki));
  ncl_th #(.N(2), .M(2)) u_r0 (.tick, .rst, .x({ki, d[0]}), .y(q[0]));
  ncl_th #(.N(2), .M(2)) u_r1 (.tick, .rst, .x({ki, d[1]}), .y(q[1]));
  ncl_th #(.N(2), .M(1)) u_cp (.tick, .rst, .x(q),          .y(comp));
endmodule
