// tb_adder_sandbox32: end-to-end testbench of adder_sandbox32 at its
// default parameters (32-bit operands, the full set of configurations).
//
// The two counters inside the design generate the operands; the k-th
// operand pair is A = k * STEP_A, B = k * STEP_B with carryin 0, which this
// testbench recomputes on its own. Fourteen consumer models, one per adder
// configuration, wait for a complete DATA result, check it against A + B,
// then close after a random delay and reopen after the NULL wavefront.
// Long random delays of one consumer hold every counter back, because the
// counters advance only after all adders have closed their inputs.
// Counted mechanisms, each of which must occur at least once: a carry out
// of the top bit, a carry chain (run of propagate digits) of 6 or more, a consumer stall of 4 or
// more ticks (back pressure on the counters), a chain-free addition (the
// first operands, 0 + 0), and counter wrap-around of an operand.
module tb_adder_sandbox32;
  import ncl_pkg::*;

  localparam int W  = 32;
  localparam int QD = 16;
  localparam int NB = 11;            // binary configurations
  localparam int NC = NB + 3;        // plus 3 quaternary configurations
  localparam int NV = 40;            // additions checked per configuration
  localparam logic [31:0] STEP_A = 32'h9E37_79B9;
  localparam logic [31:0] STEP_B = 32'h7F4A_7C15;

  logic tick = 1'b0;
  logic rst  = 1'b1;
  always #1 tick = ~tick;

  logic [NB-1:0]            bin_close;
  dr_t  [NB-1:0][W-1:0]     bin_s;
  dr_t  [NB-1:0]            bin_co;
  logic [2:0]            q_close;
  qr_t  [2:0][QD-1:0]    q_s;
  dr_t  [2:0]            q_co;

  adder_sandbox32 dut (.tick, .rst, .bin_close, .bin_s, .bin_co, .q_close, .q_s, .q_co);

  int checks = 0, failures = 0;
  int nres [NC];
  int n_cout = 0, n_long = 0, n_stall = 0, n_nochain = 0, n_wrap = 0;
  logic [NC-1:0] closes;
  assign bin_close = closes[NB-1:0];
  assign q_close   = closes[NC-1:NB];

  // longest NCL carry chain: the longest run of propagate digits (a != b).
  // A 00 or 11 digit decides its carry without its carryin, whatever the
  // value, so only a propagate run makes a carry wavefront ripple.
  function automatic int chain_len(input logic [W-1:0] x, input logic [W-1:0] y);
    int run = 0;
    int best = 0;
    for (int i = 0; i < W; i++) begin
      run = (x[i] ^ y[i]) ? run + 1 : 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  // result of configuration c: ok = complete and legal; any = some rail high
  function automatic void read_result(input int c, output logic ok, output logic any,
                                      output logic [W:0] v);
    ok = 1'b1; any = 1'b0; v = '0;
    if (c < NB) begin
      for (int i = 0; i < W; i++) begin
        if (bin_s[c][i] != '0) any = 1'b1;
        if (bin_s[c][i] == DR_1) v[i] = 1'b1;
        else if (bin_s[c][i] != DR_0) ok = 1'b0;
      end
      if (bin_co[c] != '0) any = 1'b1;
      if (bin_co[c] == DR_1) v[W] = 1'b1;
      else if (bin_co[c] != DR_0) ok = 1'b0;
    end else begin
      for (int d = 0; d < QD; d++) begin
        if (q_s[c-NB][d] != '0) any = 1'b1;
        case (q_s[c-NB][d])
          4'b0001: v[2*d +: 2] = 2'd0;
          4'b0010: v[2*d +: 2] = 2'd1;
          4'b0100: v[2*d +: 2] = 2'd2;
          4'b1000: v[2*d +: 2] = 2'd3;
          default: ok = 1'b0;
        endcase
      end
      if (q_co[c-NB] != '0) any = 1'b1;
      if (q_co[c-NB] == DR_1) v[W] = 1'b1;
      else if (q_co[c-NB] != DR_0) ok = 1'b0;
    end
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_sink
    initial begin
      logic ok, any;
      logic [W:0] v, expv;
      logic [W-1:0] av, bv;
      int dly;
      closes[c] = 1'b0;
      nres[c] = 0;
      forever begin
        @(posedge tick);
        read_result(c, ok, any, v);
        if (!rst && ok) begin
          av = W'(nres[c]) * STEP_A;
          bv = W'(nres[c]) * STEP_B;
          expv = {1'b0, av} + {1'b0, bv};
          checks++;
          if (v !== expv) begin
            failures++;
            $display("FAIL: configuration %0d addition %0d gave %h expected %h", c, nres[c], v, expv);
          end
          if (c == 0) begin
            if (expv[W]) n_cout++;
            if (chain_len(av, bv) >= 6) n_long++;
            if ((av & bv) == '0) n_nochain++;
            if (nres[c] > 0 && (W'(nres[c] - 1) * STEP_A) > av) n_wrap++;
          end
          nres[c]++;
          dly = ($urandom_range(0, 7) == 0) ? $urandom_range(4, 30) : $urandom_range(0, 2);
          if (dly >= 4) n_stall++;
          repeat (dly) @(posedge tick);
          closes[c] = 1'b1;
          do begin
            @(posedge tick);
            read_result(c, ok, any, v);
          end while (any);
          repeat ($urandom_range(0, 2)) @(posedge tick);
          closes[c] = 1'b0;
        end
      end
    end
  end

  initial begin
    logic all_there;
    repeat (4) @(posedge tick);
    rst = 1'b0;
    do begin
      @(posedge tick);
      all_there = 1'b1;
      for (int c = 0; c < NC; c++) if (nres[c] < NV) all_there = 1'b0;
    end while (!all_there);
    repeat (2) @(posedge tick);
    // the counters move in lock step: no configuration may run ahead by two
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (nres[c] < NV || nres[c] > NV + 1) begin
        failures++;
        $display("FAIL: configuration %0d delivered %0d results", c, nres[c]);
      end
    end
    $display("mechanisms: carry out %0d, chain>=6 %0d, consumer stalls %0d, chain-free %0d, wrap %0d",
             n_cout, n_long, n_stall, n_nochain, n_wrap);
    checks++; if (n_cout == 0)    begin failures++; $display("FAIL: no carry out of the top bit"); end
    checks++; if (n_long == 0)    begin failures++; $display("FAIL: no long carry chain"); end
    checks++; if (n_stall == 0)   begin failures++; $display("FAIL: no consumer stall"); end
    checks++; if (n_nochain == 0) begin failures++; $display("FAIL: no chain-free addition"); end
    checks++; if (n_wrap == 0)    begin failures++; $display("FAIL: no counter wrap-around"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * 600 + 2000) @(posedge tick);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
