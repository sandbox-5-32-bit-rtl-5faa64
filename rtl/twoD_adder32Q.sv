// twoD_adder32Q: 2D pipelined quaternary NCL adder (32 bits as 16 radix-4
// digits).
//
// DIGITS fulladdQ components are chained by dual-rail carries exactly as in
// twoD_adder32: every sum digit and every carry has its own link, carry
// link i is closed by component i+1's done, and done[i] closes a[i], b[i]
// (done[0] also closes ci). Half as many digits as the binary adder means
// half as many carry stages and, for random operands, shorter carry chains.
//
// Interface: one-hot 4-rail arrays a, b, s; dual-rail ci, co; per-digit
// s_close and done; co_close. Timing: unit-delay model.
module twoD_adder32Q
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
  logic [DIGITS-1:0] cclose;

  assign carry[0] = ci;
  assign co       = carry[DIGITS];
  assign cclose[DIGITS-1] = co_close;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    if (i < DIGITS - 1) begin : g_cc
      assign cclose[i] = done[i+1];
    end
    fulladdQ u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s_close(s_close[i]),
                   .co_close(cclose[i]), .s(s[i]), .co(carry[i+1]), .done(done[i]));
  end
endmodule
