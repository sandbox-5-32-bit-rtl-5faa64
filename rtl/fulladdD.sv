// fulladdD: NCL full-adder component: the full adder built as half adder, half adder and OR,
// with its output links.
//
// The logic (fa_coreD) feeds a link for sum and one for carryout; each link
// opens to DATA or NULL as its own consumer's closure requests, and done
// (completion of both links) closes the A, B and carryin sources. This is
// the component the document composes into its adders.
//
// Interface: dual-rail a, b, ci; closures s_close, co_close (consumer
// completion, 1 = consumer holds DATA); dual-rail s, co; done.
// Timing: unit-delay model, one tick per gate; see fa_coreD.
module fulladdD
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
  dr_t s_d, co_d;

  fa_coreD   u_core  (.tick, .rst, .a, .b, .ci, .s(s_d), .co(co_d));
  fa_outlinks u_links (.tick, .rst, .s_d, .co_d, .s_close, .co_close, .s, .co, .done);
endmodule
