// digit_adder32: digit pipelined NCL ripple adder.
//
// WIDTH bare full adders ripple the carry without carry links; every sum
// digit has its own link and closure, and carryout has one. The carry is
// pipelined indirectly by sharing completeness: the inputs of digit i are
// closed (done[i]) only when sum i and sum i+1 are both complete, because
// sum i+1 can only be complete once carry i has reached it. The last digit
// is closed by sum WIDTH-1 and carryout together. Structure after the
// document's digit completeness drawing.
//
// Interface: dual-rail arrays a, b, s; dual-rail ci, co; per-digit s_close
// and done; co_close. done[0] also closes ci.
// Timing: unit-delay model; no word-wide completion, fewer links than the
// 2D structure.
module digit_adder32
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
  dr_t  [WIDTH:0]   carry;
  dr_t  [WIDTH-1:0] s_d;
  logic [WIDTH:0]   comp;    // comp[WIDTH] is the carryout link

  assign carry[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_digit
    fa_core_sel #(.KIND(KIND)) u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]),
                                     .s(s_d[i]), .co(carry[i+1]));
    ncl_link u_ls (.tick, .rst, .d(s_d[i]), .close(s_close[i]), .q(s[i]), .comp(comp[i]));
    ncl_th #(.N(2), .M(2)) u_done (.tick, .rst, .x({comp[i+1], comp[i]}), .y(done[i]));
  end
  ncl_link u_lco (.tick, .rst, .d(carry[WIDTH]), .close(co_close), .q(co), .comp(comp[WIDTH]));
endmodule
