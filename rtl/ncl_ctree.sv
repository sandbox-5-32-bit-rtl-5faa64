// ncl_ctree: NCL completion tree (a tree of THnn gates, i.e. C-elements).
//
// The output rises when all N inputs are 1 and falls when all are 0. Up to
// four inputs use one THnn gate; more are split into halves that are joined
// by a TH22, so the depth is about log2(N) ticks.
module ncl_ctree #(
  parameter int unsigned N = 4
) (
  input  logic         tick,
  input  logic         rst,
  input  logic [N-1:0] x,
  output logic         y
);
  if (N <= 4) begin : g_leaf
    ncl_th #(.N(N), .M(N)) u_g (.tick, .rst, .x(x), .y(y));
  end else begin : g_split
    localparam int unsigned NL = N / 2;
    logic yl, yh;
    ncl_ctree #(.N(NL))     u_lo (.tick, .rst, .x(x[NL-1:0]), .y(yl));
    ncl_ctree #(.N(N - NL)) u_hi (.tick, .rst, .x(x[N-1:NL]), .y(yh));
    ncl_th #(.N(2), .M(2)) u_j (.tick, .rst, .x({yh, yl}), .y(y));
  end
endmodule
