// fa_core_sel: picks the unlinked logic of one dual-rail full adder by KIND.
//
// Used by the structures that put their own link ranks around bare adder
// logic (full word and digit completeness). KIND is one of FA_A, FA_B,
// FA_C, FA_D; any other value gives FA_A.
module fa_core_sel
  import ncl_pkg::*;
#(
  parameter fa_kind_e KIND = FA_A
) (
  input  logic tick,
  input  logic rst,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  ci,
  output dr_t  s,
  output dr_t  co
);
  if (KIND == FA_B) begin : g_b
    fa_coreB u_core (.tick, .rst, .a, .b, .ci, .s, .co);
  end else if (KIND == FA_C) begin : g_c
    fa_coreC u_core (.tick, .rst, .a, .b, .ci, .s, .co);
  end else if (KIND == FA_D) begin : g_d
    fa_coreD u_core (.tick, .rst, .a, .b, .ci, .s, .co);
  end else begin : g_a
    fa_coreA u_core (.tick, .rst, .a, .b, .ci, .s, .co);
  end
endmodule
