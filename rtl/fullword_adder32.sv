// fullword_adder32: NCL ripple adder with full word completeness.
//
// WIDTH bare full adders (no links) ripple the carry combinationally. One
// rank of links holds all sum digits and carryout and is opened by a single
// closure from the consumer of the whole word. The completions of all
// WIDTH+1 links are joined by one completion tree whose output, done,
// closes A, B and carryin. This is the clocked-style organisation: a new
// operand waits until the whole word, including the longest carry chain
// of this addition, is complete, and then until the whole word is NULL.
// Structure after the document's full word completeness drawing; the tree
// arity (THnn gates of up to four inputs) is this design's choice.
//
// Interface: dual-rail arrays a, b, s; dual-rail ci, co; close; done.
// Timing: unit-delay model; the time per addition grows with the length of
// the longest carry chain of the operands.
module fullword_adder32
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter fa_kind_e    KIND  = FA_A
) (
  input  logic            tick,
  input  logic            rst,
  input  dr_t [WIDTH-1:0] a,
  input  dr_t [WIDTH-1:0] b,
  input  dr_t             ci,
  input  logic            close,
  output dr_t [WIDTH-1:0] s,
  output dr_t             co,
  output logic            done
);
  dr_t  [WIDTH:0]   carry;
  dr_t  [WIDTH-1:0] s_d;
  logic [WIDTH:0]   comp;

  assign carry[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_digit
    fa_core_sel #(.KIND(KIND)) u_fa (.tick, .rst, .a(a[i]), .b(b[i]), .ci(carry[i]),
                                     .s(s_d[i]), .co(carry[i+1]));
    ncl_link u_ls (.tick, .rst, .d(s_d[i]), .close, .q(s[i]), .comp(comp[i]));
  end
  ncl_link u_lco (.tick, .rst, .d(carry[WIDTH]), .close, .q(co), .comp(comp[WIDTH]));

  ncl_ctree #(.N(WIDTH + 1)) u_tree (.tick, .rst, .x(comp), .y(done));
endmodule
