// fa_outlinks: the output links of a dual-rail full-adder component.
//
// One ncl_link for sum and one for carryout, each with the closure of its
// own consumer, and a TH22 joining their completions. That TH22 output is
// the component's done: it closes the A, B and carryin sources (the
// document's 'close A <- [sum/#, carryout/#]').
// Timing: done rises three ticks after both raw outputs are DATA and the
// closures request DATA.
module fa_outlinks
  import ncl_pkg::*;
(
  input  logic tick,
  input  logic rst,
  input  dr_t  s_d,
  input  dr_t  co_d,
  input  logic s_close,
  input  logic co_close,
  output dr_t  s,
  output dr_t  co,
  output logic done
);
  logic s_comp, co_comp;

  ncl_link u_ls  (.tick, .rst, .d(s_d),  .close(s_close),  .q(s),  .comp(s_comp));
  ncl_link u_lco (.tick, .rst, .d(co_d), .close(co_close), .q(co), .comp(co_comp));
  ncl_th #(.N(2), .M(2)) u_done (.tick, .rst, .x({co_comp, s_comp}), .y(done));
endmodule
