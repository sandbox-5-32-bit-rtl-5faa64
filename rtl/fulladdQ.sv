// fulladdQ: quaternary NCL full-adder component with its output links.
//
// One radix-4 digit of A and B (one-hot 4-rail) plus a dual-rail carryin
// give a one-hot sum digit and a dual-rail carryout (fa_coreQ). Both go
// through links that open as their consumers' closures request; done
// (completion of both links) closes the A, B and carryin sources.
//
// Interface: one-hot a, b, s; dual-rail ci, co; closures s_close, co_close;
// done. Timing: unit-delay model, one tick per gate.
module fulladdQ
  import ncl_pkg::*;
(
  input  logic tick,
  input  logic rst,
  input  qr_t  a,
  input  qr_t  b,
  input  dr_t  ci,
  input  logic s_close,
  input  logic co_close,
  output qr_t  s,
  output dr_t  co,
  output logic done
);
  qr_t  s_d;
  dr_t  co_d;
  logic s_comp, co_comp;

  fa_coreQ  u_core (.tick, .rst, .a, .b, .ci, .s(s_d), .co(co_d));
  ncl_qlink u_ls   (.tick, .rst, .d(s_d),  .close(s_close),  .q(s),  .comp(s_comp));
  ncl_link  u_lco  (.tick, .rst, .d(co_d), .close(co_close), .q(co), .comp(co_comp));
  ncl_th #(.N(2), .M(2)) u_done (.tick, .rst, .x({co_comp, s_comp}), .y(done));
endmodule
