// adder_sandbox32: two 32-bit NCL counters driving every adder
// configuration side by side.
//
// Counter A and counter B produce a stream of operand pairs as DATA/NULL
// wavefronts. Every configuration receives the same operands and produces
// its own sum and carryout on its own ports, closed by its own consumer:
//   binary, index 0..10: fullword A, fullword B, digit A, digit B,
//                       twoD A, twoD B, twoD C, twoD D, twoD A1, twoD A2,
//                       twoD C1
//   quaternary, index 0..2: twoD Q, fullword Q, digit Q
// The quaternary adders get their digits through ncl_dr2qr. Carryin is a
// DATA 0 that follows the wavefronts of bit 0 of counter A (its rail 0 is a
// TH12 of that bit's rails). The counters advance only when every adder
// has closed its inputs: all done outputs meet in one completion tree, so
// the slowest configuration paces the operands. Plugging every adder into
// the same sources is the document's composition example, widened here to
// all configurations; the operand steps are this design's choice.
//
// Interface: per configuration a close input (the consumer's completion,
// 1 = it holds DATA), sum and carryout outputs. Timing: unit-delay model,
// one tick per gate.
module adder_sandbox32
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH  = 32,
  parameter logic [31:0] STEP_A = 32'h9E37_79B9,
  parameter logic [31:0] STEP_B = 32'h7F4A_7C15
) (
  input  logic                        tick,
  input  logic                        rst,
  input  logic [10:0]                  bin_close,
  output dr_t  [10:0][WIDTH-1:0]       bin_s,
  output dr_t  [10:0]                  bin_co,
  input  logic [2:0]                  q_close,
  output qr_t  [2:0][WIDTH/2-1:0]     q_s,
  output dr_t  [2:0]                  q_co
);
  localparam int unsigned QD  = WIDTH / 2;
  localparam int unsigned NDN = 2 + 9 * WIDTH + 1 + 2 * QD;   // done signals joined

  dr_t  [WIDTH-1:0] a, b;
  dr_t              ci;
  qr_t  [QD-1:0]    qa, qb;
  logic             op_close;
  logic [NDN-1:0]   dn;

  ncl_counter #(.WIDTH(WIDTH), .START('0), .STEP(STEP_A[WIDTH-1:0])) u_cnt_a (.tick, .rst, .close(op_close), .q(a));
  ncl_counter #(.WIDTH(WIDTH), .START('0), .STEP(STEP_B[WIDTH-1:0])) u_cnt_b (.tick, .rst, .close(op_close), .q(b));

  assign ci[1] = 1'b0;
  ncl_th #(.N(2), .M(1)) u_ci (.tick, .rst, .x(a[0]), .y(ci[0]));

  for (genvar d = 0; d < int'(QD); d++) begin : g_q
    ncl_dr2qr u_qa (.tick, .rst, .hi(a[2*d+1]), .lo(a[2*d]), .q(qa[d]));
    ncl_dr2qr u_qb (.tick, .rst, .hi(b[2*d+1]), .lo(b[2*d]), .q(qb[d]));
  end

  // full word completeness
  fullword_adder32 #(.WIDTH(WIDTH), .KIND(FA_A)) u_fw_a (.tick, .rst, .a, .b, .ci,
    .close(bin_close[0]), .s(bin_s[0]), .co(bin_co[0]), .done(dn[0]));
  fullword_adder32 #(.WIDTH(WIDTH), .KIND(FA_B)) u_fw_b (.tick, .rst, .a, .b, .ci,
    .close(bin_close[1]), .s(bin_s[1]), .co(bin_co[1]), .done(dn[1]));

  // digit completeness
  digit_adder32 #(.WIDTH(WIDTH), .KIND(FA_A)) u_dg_a (.tick, .rst, .a, .b, .ci,
    .s_close({WIDTH{bin_close[2]}}), .co_close(bin_close[2]), .s(bin_s[2]), .co(bin_co[2]),
    .done(dn[2+0*WIDTH +: WIDTH]));
  digit_adder32 #(.WIDTH(WIDTH), .KIND(FA_B)) u_dg_b (.tick, .rst, .a, .b, .ci,
    .s_close({WIDTH{bin_close[3]}}), .co_close(bin_close[3]), .s(bin_s[3]), .co(bin_co[3]),
    .done(dn[2+1*WIDTH +: WIDTH]));

  // 2D pipelining
  localparam fa_kind_e TWOD_KIND [7] = '{FA_A, FA_B, FA_C, FA_D, FA_A1, FA_A2, FA_C1};
  for (genvar k = 0; k < 7; k++) begin : g_twod
    twoD_adder32 #(.WIDTH(WIDTH), .KIND(TWOD_KIND[k])) u_add (.tick, .rst, .a, .b, .ci,
      .s_close({WIDTH{bin_close[4+k]}}), .co_close(bin_close[4+k]), .s(bin_s[4+k]),
      .co(bin_co[4+k]), .done(dn[2+(2+k)*WIDTH +: WIDTH]));
  end

  // quaternary
  twoD_adder32Q #(.DIGITS(QD)) u_twod_q (.tick, .rst, .a(qa), .b(qb), .ci,
    .s_close({QD{q_close[0]}}), .co_close(q_close[0]), .s(q_s[0]), .co(q_co[0]),
    .done(dn[2+9*WIDTH +: QD]));
  fullword_adder32Q #(.DIGITS(QD)) u_fw_q (.tick, .rst, .a(qa), .b(qb), .ci,
    .close(q_close[1]), .s(q_s[1]), .co(q_co[1]), .done(dn[2+9*WIDTH+QD]));
  digit_adder32Q #(.DIGITS(QD)) u_dg_q (.tick, .rst, .a(qa), .b(qb), .ci,
    .s_close({QD{q_close[2]}}), .co_close(q_close[2]), .s(q_s[2]), .co(q_co[2]),
    .done(dn[2+9*WIDTH+QD+1 +: QD]));

  ncl_ctree #(.N(NDN)) u_opdone (.tick, .rst, .x(dn), .y(op_close));
endmodule
