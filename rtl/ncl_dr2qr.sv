// ncl_dr2qr: joins two dual-rail bits into one quaternary (one-hot 4-rail)
// digit, so binary NCL operands can feed the radix-4 adders.
//
// Rail k of the digit is TH22(hi rail k/2, lo rail k mod 2): it rises when
// both bits are DATA with value k and falls when both are NULL.
// Timing: one tick.
module ncl_dr2qr
  import ncl_pkg::*;
(
  input  logic tick,
  input  logic rst,
  input  dr_t  hi,
  input  dr_t  lo,
  output qr_t  q
);
  for (genvar k = 0; k < 4; k++) begin : g_rail
    ncl_th #(.N(2), .M(2)) u_m (.tick, .rst, .x({hi[(k >> 1) & 1], lo[k & 1]}), .y(q[k]));
  end
endmodule
