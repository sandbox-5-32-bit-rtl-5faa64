// ncl_inv: inverter of an NCL closure path (unit-delay model).
//
// It turns a consumer's completion (1 = consumer holds DATA) into the
// request of a link (1 = request DATA, 0 = request NULL). One tick of delay;
// rst sets the output to 1, the request that matches the all-NULL state.
module ncl_inv (
  input  logic tick,
  input  logic rst,
  input  logic x,
  output logic y
);
  always_ff @(posedge tick) begin
    if (rst) y <= 1'b1;
    else     y <= ~x;
  end
endmodule
