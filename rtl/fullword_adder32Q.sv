// fullword_adder32Q: quaternary NCL adder with full word completeness.
//
// DIGITS bare quaternary full adders (fa_coreQ) ripple a dual-rail carry;
// one link rank with a single closure holds all sum digits and carryout,
// and one completion tree over all links gives done, which closes A, B and
// carryin. Built like fullword_adder32 with radix-4 digits.
//
// Interface: one-hot arrays a, b, s; dual-rail ci, co; close; done.
// Timing: unit-delay model; time per addition grows with the carry chain.
module fullword_adder32Q
  import ncl_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  logic             tick,
  input  logic             rst,
  input  qr_t [DIGITS-1:0] a,
  input  qr_t [DIGITS-1:0] b,
  input  dr_t              ci,
  input  logic             close,
  output qr_t [DIGITS-1:0] s,
  output dr_t              co,
  output logic             done
);
  dr_t  [DIGITS:0]   carry;
  qr_t  [DIGITS-1:0] s_d;
  logic [DIGITS:0]   comp;

  assign carry[0] = ci;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    fa_coreQ  u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s(s_d[i]), .co(carry[i+1]));
    ncl_qlink u_ls (.tick, .rst, .d(s_d[i]), .close, .q(s[i]), .comp(comp[i]));
  end
  ncl_link u_lco (.tick, .rst, .d(carry[DIGITS]), .close, .q(co), .comp(comp[DIGITS]));

  ncl_ctree #(.N(DIGITS + 1)) u_tree (.tick, .rst, .x(comp), .y(done));
endmodule
