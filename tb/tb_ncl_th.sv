// tb_ncl_th: self-checking testbench of the ncl_th threshold gate.
//
// Several gate shapes used by the adders (TH12, TH22, TH23, TH34W2,
// TH23W2, TH24W22, TH44) are driven with random input words, each held for
// one tick. A reference model computes the weighted count, the threshold
// and the hysteresis (hold until all inputs are 0) independently, and every
// output is compared one tick later. Inputs are biased towards all-zero
// words so the reset path is exercised often.
module tb_ncl_th;
  logic tick = 1'b0;
  logic rst  = 1'b1;
  always #1 tick = ~tick;

  localparam int NG = 7;
  localparam int GN [NG] = '{2, 2, 3, 4, 3, 4, 4};
  localparam int GM [NG] = '{1, 2, 2, 3, 2, 2, 4};
  localparam int G0 [NG] = '{1, 1, 1, 2, 2, 2, 1};
  localparam int G1 [NG] = '{1, 1, 1, 1, 1, 2, 1};

  logic [3:0]    x;
  logic [NG-1:0] y, ref_y;
  int checks = 0, failures = 0;
  int sets = 0, holds = 0;

  for (genvar g = 0; g < NG; g++) begin : g_gate
    ncl_th #(.N(GN[g]), .M(GM[g]), .W0(G0[g]), .W1(G1[g])) dut (.tick, .rst, .x(x[GN[g]-1:0]), .y(y[g]));
  end

  function automatic int wcount(input int g, input logic [3:0] v);
    int c = 0;
    for (int i = 0; i < GN[g]; i++) if (v[i]) c += (i == 0) ? G0[g] : (i == 1) ? G1[g] : 1;
    return c;
  endfunction

  initial begin
    x = '0; ref_y = '0;
    repeat (3) @(posedge tick);
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      x = ($urandom_range(0, 3) == 0) ? 4'b0000 : 4'($urandom);  // set between edges
      @(posedge tick);
      @(negedge tick);
      for (int g = 0; g < NG; g++) begin
        logic [3:0] v;
        v = x & 4'((1 << GN[g]) - 1);
        if (wcount(g, v) >= GM[g]) begin ref_y[g] = 1'b1; sets++; end
        else if (v == '0) ref_y[g] = 1'b0;
        else if (ref_y[g]) holds++;
        checks++;
        if (y[g] !== ref_y[g]) begin
          failures++;
          $display("FAIL: gate %0d x=%b y=%b expected %b", g, v, y[g], ref_y[g]);
        end
      end
    end
    checks++;
    if (sets == 0 || holds == 0) begin failures++; $display("FAIL: set or hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge tick);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
