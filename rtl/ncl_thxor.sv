// ncl_thxor: NCL THXOR0 gate, function AB + CD, with hysteresis
// (unit-delay model).
//
// x = {D, C, B, A}. The output sets when both A and B, or both C and D, are
// high, and resets only when all four inputs are low. In the full adders
// the pairs are the two minterms that map to one output rail, for example
// (A/0,B/0) and (A/1,B/1) for suma/0.
//
// Timing: one tick per gate, rst clears the output to 0.
module ncl_thxor (
  input  logic       tick,
  input  logic       rst,
  input  logic [3:0] x,
  output logic       y
);
  always_ff @(posedge tick) begin
    if (rst)                                    y <= 1'b0;
    else if ((x[0] & x[1]) | (x[2] & x[3]))     y <= 1'b1;
    else if (x == 4'b0000)                      y <= 1'b0;
  end
endmodule
