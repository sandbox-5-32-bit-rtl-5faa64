// digit_adder32Q: digit pipelined quaternary NCL adder.
//
// DIGITS bare quaternary full adders ripple the carry without carry links;
// each sum digit has a link and closure, and digit i's inputs are closed
// when sum i and sum i+1 are both complete (the last digit: sum and
// carryout). Built like digit_adder32 with radix-4 digits.
//
// Interface: one-hot arrays a, b, s; dual-rail ci, co; per-digit s_close
// and done; co_close. Timing: unit-delay model.
module digit_adder32Q
  import ncl_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  logic              tick,
  input  logic              rst,
  input  qr_t  [DIGITS-1:0] a,
  input  qr_t  [DIGITS-1:0] b,
  input  dr_t               ci,
  input  logic [DIGITS-1:0] s_close,
  input  logic              co_close,
  output qr_t  [DIGITS-1:0] s,
  output dr_t               co,
  output logic [DIGITS-1:0] done
);
  dr_t  [DIGITS:0]   carry;
  qr_t  [DIGITS-1:0] s_d;
  logic [DIGITS:0]   comp;

  assign carry[0] = ci;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    fa_coreQ  u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s(s_d[i]), .co(carry[i+1]));
    ncl_qlink u_ls (.tick, .rst, .d(s_d[i]), .close(s_close[i]), .q(s[i]), .comp(comp[i]));
    ncl_th #(.N(2), .M(2)) u_done (.tick, .rst, .x({comp[i+1], comp[i]}), .y(done[i]));
  end
  ncl_link u_lco (.tick, .rst, .d(carry[DIGITS]), .close(co_close), .q(co), .comp(comp[DIGITS]));
endmodule
