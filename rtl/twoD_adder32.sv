// twoD_adder32: 2D pipelined NCL ripple adder.
//
// WIDTH full-adder components, each with its own sum link and carry link,
// are chained by their carries: component i takes a[i], b[i] and carry i
// and gives s[i] and carry i+1. Component i's carry link is closed by
// component i+1's done, so carries are pipelined digit by digit and the
// digits of successive additions flow freely, separated only by NULL
// wavefronts; there is no word-wide completion. done[i] closes a[i] and
// b[i]; done[0] also closes ci. The carry path composition follows the
// document; KIND selects the component (FA_A, FA_B, FA_C, FA_D, or the
// integrated variants FA_A1, FA_A2, FA_C1; other kinds fall back to FA_A).
//
// Interface: dual-rail arrays a, b, s; dual-rail ci, co; per-digit sum
// closures s_close and done; co_close.
// Timing: unit-delay model; the time per addition at a digit is set by the
// local loop through two neighbouring components, not by the carry chain.
module twoD_adder32
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter fa_kind_e    KIND  = FA_A
) (
  input  logic             tick,
  input  logic             rst,
  input  dr_t  [WIDTH-1:0] a,
  input  dr_t  [WIDTH-1:0] b,
  input  dr_t              ci,
  input  logic [WIDTH-1:0] s_close,
  input  logic             co_close,
  output dr_t  [WIDTH-1:0] s,
  output dr_t              co,
  output logic [WIDTH-1:0] done
);
  dr_t  [WIDTH:0] carry;
  logic [WIDTH-1:0] cclose;   // closure of carry i+1's link = done of its consumer

  assign carry[0] = ci;
  assign co       = carry[WIDTH];
  assign cclose[WIDTH-1] = co_close;

  for (genvar i = 0; i < WIDTH; i++) begin : g_digit
    if (i < WIDTH - 1) begin : g_cc
      assign cclose[i] = done[i+1];
    end
    if (KIND == FA_B) begin : g_b
      fulladdB u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s_close(s_close[i]),
                     .co_close(cclose[i]), .s(s[i]), .co(carry[i+1]), .done(done[i]));
    end else if (KIND == FA_C) begin : g_c
      fulladdC u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s_close(s_close[i]),
                     .co_close(cclose[i]), .s(s[i]), .co(carry[i+1]), .done(done[i]));
    end else if (KIND == FA_D) begin : g_d
      fulladdD u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s_close(s_close[i]),
                     .co_close(cclose[i]), .s(s[i]), .co(carry[i+1]), .done(done[i]));
    end else if (KIND == FA_A1) begin : g_a1
      fulladdA1 u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s_close(s_close[i]),
                      .co_close(cclose[i]), .s(s[i]), .co(carry[i+1]), .done(done[i]));
    end else if (KIND == FA_A2) begin : g_a2
      fulladdA2 u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s_close(s_close[i]),
                      .co_close(cclose[i]), .s(s[i]), .co(carry[i+1]), .done(done[i]));
    end else if (KIND == FA_C1) begin : g_c1
      fulladdC1 u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s_close(s_close[i]),
                      .co_close(cclose[i]), .s(s[i]), .co(carry[i+1]), .done(done[i]));
    end else begin : g_a
      fulladdA u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]), .s_close(s_close[i]),
                     .co_close(cclose[i]), .s(s[i]), .co(carry[i+1]), .done(done[i]));
    end
  end
endmodule
