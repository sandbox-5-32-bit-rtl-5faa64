// ncl_counter: a WIDTH-bit counter presented as an NCL token source.
//
// It holds a binary count. While its consumers' completion (close) is 0 it
// presents the count as a dual-rail DATA wavefront; once close rises it
// presents NULL and advances the count by STEP; when close falls again the
// next count goes out. So one value is produced per DATA/NULL cycle of the
// consumers, at whatever pace they set. The document only names its
// counters; this simplest token source is this design's own.
//
// Interface: close in (1 = every consumer holds DATA); q, dual-rail array.
// Timing: one tick from a change of close to the new wavefront at q.
module ncl_counter
  import ncl_pkg::*;
#(
  parameter int unsigned     WIDTH = 32,
  parameter logic [WIDTH-1:0] START = '0,
  parameter logic [WIDTH-1:0] STEP  = WIDTH'(1)
) (
  input  logic            tick,
  input  logic            rst,
  input  logic            close,
  output dr_t [WIDTH-1:0] q
);
  logic [WIDTH-1:0] count;
  logic             data_out;   // 1 while q carries DATA

  always_ff @(posedge tick) begin
    if (rst) begin
      count    <= START;
      data_out <= 1'b0;
    end else if (!data_out && !close) begin
      data_out <= 1'b1;
    end else if (data_out && close) begin
      data_out <= 1'b0;
      count    <= count + STEP;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(WIDTH); i++) begin
      q[i] = data_out ? dr_data(count[i]) : DR_NULL;
    end
  end
endmodule
