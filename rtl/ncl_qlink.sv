// ncl_qlink: the output rank of an NCL component for one quaternary
// (one-hot 4-rail) digit.
//
// Each rail passes a TH22 gate with the inverted consumer closure, and a
// TH14 on the four output rails gives the completion.
// Timing: inverter, TH22 and TH14 each cost one tick.
module ncl_qlink
  import ncl_pkg::*;
(
  input  logic tick,
  input  logic rst,
  input  qr_t  d,
  input  logic close,
  output qr_t  q,
  output logic comp
);
  logic ki;

  ncl_inv u_inv (.tick, .rst, .x(close), .y(ki));
  for (genvar k = 0; k < 4; k++) begin : g_rail
    ncl_th #(.N(2), .M(2)) u_r (.tick, .rst, .x({ki, d[k]}), .y(q[k]));
  end
  ncl_th #(.N(4), .M(1)) u_cp (.tick, .rst, .x(q), .y(comp));
endmodule
