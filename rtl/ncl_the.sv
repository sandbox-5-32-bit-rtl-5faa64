// ncl_the: NCL threshold gate with an integrated enable (unit-delay model).
//
// The base gate is THmn with weights W0, W1 on inputs 0 and 1, as in
// ncl_th. The enable is the request of the consumer (1 = request DATA):
// the output sets when en is 1 and the weighted count reaches M, and
// resets when en is 0 and every data input is 0; otherwise it holds. This
// folds a link's TH22 into the logic gate, as in the document's integrated
// components where the closure enters the first-rank gates (the printed
// thresholds there count the enable as one more input).
// Timing: one tick; rst clears the output to 0.
module ncl_the #(
  parameter int unsigned N  = 2,
  parameter int unsigned M  = 2,
  parameter int unsigned W0 = 1,
  parameter int unsigned W1 = 1
) (
  input  logic         tick,
  input  logic         rst,
  input  logic         en,
  input  logic [N-1:0] x,
  output logic         y
);
  logic [7:0] count;

  always_comb begin
    count = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (x[i]) count += (i == 0) ? 8'(W0) : (i == 1) ? 8'(W1) : 8'd1;
    end
  end

  always_ff @(posedge tick) begin
    if (rst)                        y <= 1'b0;
    else if (en && count >= 8'(M))  y <= 1'b1;
    else if (!en && x == '0)        y <= 1'b0;
  end
endmodule
