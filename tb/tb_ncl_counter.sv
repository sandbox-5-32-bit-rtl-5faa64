// tb_ncl_counter: self-checking testbench of the ncl_counter token source.
//
// A consumer model raises close a random number of ticks after it sees a
// complete DATA word and lowers it a random time after it sees NULL. Each
// DATA word must be complete (every bit on exactly one rail) and equal to
// START + k * STEP for the k-th word, the source must answer each change of
// close within one tick, and it must never change a DATA word while close
// is low.
module tb_ncl_counter;
  import ncl_pkg::*;

  localparam int W = 32;
  localparam logic [W-1:0] START = 32'hFFFF_FFF0;
  localparam logic [W-1:0] STEP  = 32'h0000_0007;

  logic tick = 1'b0;
  logic rst  = 1'b1;
  always #1 tick = ~tick;

  logic close;
  dr_t [W-1:0] q;
  int checks = 0, failures = 0;

  ncl_counter #(.WIDTH(W), .START(START), .STEP(STEP)) dut (.tick, .rst, .close, .q);

  function automatic logic complete(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (v[i] != DR_0 && v[i] != DR_1) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic is_null(input dr_t [W-1:0] v);
    return v == '0;
  endfunction
  function automatic logic [W-1:0] value(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) value[i] = v[i][1];
  endfunction

  initial begin
    logic [W-1:0] expv;
    int wraps = 0;
    close = 1'b0;
    expv = START;
    repeat (3) @(posedge tick);
    rst = 1'b0;
    for (int k = 0; k < 200; k++) begin
      // the source must present DATA within two ticks of close falling
      repeat (2) @(posedge tick);
      checks++;
      if (!complete(q) || value(q) != expv) begin
        failures++;
        $display("FAIL: word %0d is %h expected %h", k, value(q), expv);
      end
      repeat ($urandom_range(0, 4)) begin
        @(posedge tick);
        checks++;
        if (value(q) != expv || !complete(q)) begin failures++; $display("FAIL: DATA changed while held"); end
      end
      close = 1'b1;
      repeat (2) @(posedge tick);
      checks++;
      if (!is_null(q)) begin failures++; $display("FAIL: no NULL after close"); end
      repeat ($urandom_range(0, 4)) @(posedge tick);
      if (expv + STEP < expv) wraps++;
      expv = expv + STEP;
      close = 1'b0;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: wrap-around never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge tick);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
