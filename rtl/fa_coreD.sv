// fa_coreD: logic of the half adder - half adder - OR full adder (fulladdD),
// without links.
//
// Three minterm ranks of TH22 gates, each followed by OR gates:
//   minterma on (A, B):          suma = A xor B, carrya = A and B
//   mintermb on (carryin, suma): sum = carryin xor suma, carryb = carryin and suma
//   mintermc on (carrya, carryb): carryout = carrya or carryb
// carrya/1, carryb/1 and carryout/0 are single minterms and need no OR gate.
// Structure and minterm grouping follow the document's fulladdD equations.
//
// Interface: dual-rail a, b, ci in; dual-rail s, co out (raw, unlinked).
// Timing: sum after four ticks, carryout after five or six.
module fa_coreD
  import ncl_pkg::*;
(
  input  logic tick,
  input  logic rst,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  ci,
  output dr_t  s,
  output dr_t  co
);
  logic [3:0] ma, mb, mc;
  dr_t suma, carrya, carryb;

  for (genvar k = 0; k < 4; k++) begin : g_min
    // minterm k: high bit is the first operand of the half adder
    ncl_th #(.N(2), .M(2)) u_ma (.tick, .rst, .x({a[(k >> 1) & 1],      b[k & 1]}),      .y(ma[k]));
    ncl_th #(.N(2), .M(2)) u_mb (.tick, .rst, .x({ci[(k >> 1) & 1],     suma[k & 1]}),   .y(mb[k]));
    ncl_th #(.N(2), .M(2)) u_mc (.tick, .rst, .x({carrya[(k >> 1) & 1], carryb[k & 1]}), .y(mc[k]));
  end

  ncl_th #(.N(2), .M(1)) u_sa0 (.tick, .rst, .x({ma[3], ma[0]}),        .y(suma[0]));
  ncl_th #(.N(2), .M(1)) u_sa1 (.tick, .rst, .x({ma[2], ma[1]}),        .y(suma[1]));
  ncl_th #(.N(3), .M(1)) u_ca0 (.tick, .rst, .x({ma[2], ma[1], ma[0]}), .y(carrya[0]));
  assign carrya[1] = ma[3];

  ncl_th #(.N(2), .M(1)) u_s0  (.tick, .rst, .x({mb[3], mb[0]}),        .y(s[0]));
  ncl_th #(.N(2), .M(1)) u_s1  (.tick, .rst, .x({mb[2], mb[1]}),        .y(s[1]));
  ncl_th #(.N(3), .M(1)) u_cb0 (.tick, .rst, .x({mb[2], mb[1], mb[0]}), .y(carryb[0]));
  assign carryb[1] = mb[3];

  assign co[0] = mc[0];
  ncl_th #(.N(3), .M(1)) u_co1 (.tick, .rst, .x({mc[3], mc[2], mc[1]}), .y(co[1]));
endmodule
