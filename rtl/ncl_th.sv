// ncl_th: NCL threshold gate THmn with hysteresis (unit-delay model).
//
// N inputs, threshold M; input 0 counts W0 and input 1 counts W1, all others
// count 1 (so TH34W2 is N=4, M=3, W0=2). The output goes to 1 once the
// weighted count of high inputs reaches M and falls back to 0 only when every
// input is 0; in between it holds. This hysteresis is what makes an NCL gate
// wait for a complete DATA and a complete NULL wavefront.
//
// Timing: the output is a register on tick, so each gate costs one tick,
// standing for one gate delay of the clockless circuit. rst clears it to 0
// (NULL). The gate functions are the standard NCL ones; modelling each gate
// as one tick of delay is this design's own choice.
module ncl_th #(
  parameter int unsigned N  = 2,
  parameter int unsigned M  = 2,
  parameter int unsigned W0 = 1,
  parameter int unsigned W1 = 1
) (
  input  logic         tick,
  input  logic         rst,
  input  logic [N-1:0] x,
  output logic         y
);
  int unsigned count;

  always_comb begin
    count = 0;
    for (int i = 0; i < int'(N); i++) begin
      if (x[i]) count += (i == 0) ? W0 : (i == 1) ? W1 : 1;
    end
  end

  always_ff @(posedge tick) begin
    if (rst)             y <= 1'b0;
    else if (count >= M) y <= 1'b1;
    else if (x == '0)    y <= 1'b0;
  end
endmodule
