// tb_digit_adder32Q: self-checking testbench of digit_adder32Q.
//
// Default size: 16 radix-4 digits (32 bits).
// A source drives operand words as DATA wavefronts (summands, then carryin,
// a few ticks apart), waits for the adders to close their inputs, drives
// NULL and waits for the closure to fall. One sink per adder waits for a
// complete DATA result, compares it with the sum worked out here from the
// operands, closes after a random delay, and reopens after the NULL
// wavefront. The vectors include chain-free additions, a carry rippling
// through every digit, and random words; the average ticks per addition
// for chain-free and long-chain vectors are reported.
module tb_digit_adder32Q;
  import ncl_pkg::*;

  localparam int W    = 32;
  localparam int ND   = 16;
  localparam int NK   = 1;
  localparam int NVEC = 120;
  localparam logic CHAIN_SENSITIVE [NK] = '{1'b1};

  logic tick = 1'b0;
  logic rst  = 1'b1;
  always #1 tick = ~tick;

  qr_t  [ND-1:0]         a, b;
  dr_t                    ci;
  logic [NK-1:0]          close;
  qr_t  [NK-1:0][ND-1:0] s;
  dr_t  [NK-1:0]          co;
  logic [NK-1:0][ND-1:0] done;

  int checks = 0, failures = 0;
  int unsigned ticks = 0;
  always @(posedge tick) ticks++;

  for (genvar k = 0; k < NK; k++) begin : g_dut
    digit_adder32Q #(.DIGITS(16)) dut (.tick, .rst, .a, .b, .ci,
      .s_close({ND{close[k]}}), .co_close(close[k]), .done(done[k]), .s(s[k]), .co(co[k]));
  end

  function automatic qr_t [ND-1:0] enc(input logic [W-1:0] v);
    for (int i = 0; i < ND; i++) enc[i] = qr_data(v[2*i +: 2]);
  endfunction

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

  logic [W:0] exp_q [NK][$];

  // sinks
  for (genvar k = 0; k < NK; k++) begin : g_sink
    initial begin
      logic [W-1:0] val;
      logic ok, cv;
      logic [W:0] exp;
      close[k] = 1'b0;
      forever begin
        @(posedge tick);
        if (!rst && co[k] != '0 && s_complete(k)) begin
          ok = 1'b1;
          val = '0;
      for (int i = 0; i < ND; i++) begin
        case (s[k][i])
          4'b0001: val[2*i +: 2] = 2'd0;
          4'b0010: val[2*i +: 2] = 2'd1;
          4'b0100: val[2*i +: 2] = 2'd2;
          4'b1000: val[2*i +: 2] = 2'd3;
          default: ok = 1'b0;
        endcase
      end
          case (co[k]) 2'b01: cv = 1'b0; 2'b10: cv = 1'b1; default: begin cv = 1'b0; ok = 1'b0; end endcase
          checks++;
          if (exp_q[k].size() == 0) begin
            failures++;
            $display("FAIL: adder %0d produced a result with no operands pending", k);
          end else begin
            exp = exp_q[k].pop_front();
            if (!ok || {cv, val} !== exp) begin
              failures++;
              $display("FAIL: adder %0d got %h expected %h", k, {cv, val}, exp);
            end
          end
          repeat ($urandom_range(0, 3)) @(posedge tick);
          close[k] = 1'b1;
          while (co[k] != '0 || s_any(k)) @(posedge tick);
          repeat ($urandom_range(0, 3)) @(posedge tick);
          close[k] = 1'b0;
        end
      end
    end
  end

  function automatic logic s_complete(input int k);
    for (int i = 0; i < ND; i++) if (s[k][i] == '0) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic s_any(input int k);
    for (int i = 0; i < ND; i++) if (s[k][i] != '0) return 1'b1;
    return 1'b0;
  endfunction

  // per-adder time from the first operand to its inputs being closed
  int unsigned t0 = 0;
  logic [NK-1:0] seen_done;
  int unsigned kt [NK];
  int unsigned t_long [NK], t_short [NK];
  always @(posedge tick) begin
    for (int k = 0; k < NK; k++) begin
      if (!seen_done[k] && &done[k]) begin
        seen_done[k] <= 1'b1;
        kt[k] <= ticks - t0;
      end
    end
  end

  // source
  int n_long = 0, n_short = 0;
  initial begin
    logic [W-1:0] av, bv;
    logic cv;
    int cl;
    seen_done = '0;
    for (int k = 0; k < NK; k++) begin t_long[k] = 0; t_short[k] = 0; end
    a = '0; b = '0; ci = DR_NULL;
    repeat (4) @(posedge tick);
    rst = 1'b0;
    repeat (2) @(posedge tick);
    for (int n = 0; n < NVEC; n++) begin
      case (n % 6)
        0: begin av = '0; bv = '0; cv = 1'b0; end
        1: begin av = '1; bv = W'(1); cv = 1'b0; end
        2: begin av = '1; bv = '0; cv = 1'b1; end
        3: begin av = {(W/2){2'b10}}; bv = {(W/2){2'b01}}; cv = 1'b0; end
        default: begin av = W'($urandom); bv = W'($urandom); cv = 1'($urandom); end
      endcase
      cl = chain_len(av, bv);
      for (int k = 0; k < NK; k++) exp_q[k].push_back({1'b0, av} + {1'b0, bv} + (W+1)'(cv));
      t0 = ticks;
      seen_done = '0;
      a = enc(av);
      repeat ($urandom_range(0, 2)) @(posedge tick);
      b = enc(bv);
      repeat ($urandom_range(0, 2)) @(posedge tick);
      ci = dr_data(cv);
      while (!(&done) || seen_done != '1) @(posedge tick);
      @(posedge tick);
      if (cl >= W - 2) begin n_long++; for (int k = 0; k < NK; k++) t_long[k] += kt[k]; end
      else if (cl == 0) begin n_short++; for (int k = 0; k < NK; k++) t_short[k] += kt[k]; end
      repeat ($urandom_range(0, 2)) @(posedge tick);
      a = '0; b = '0; ci = DR_NULL;
      while (|done) @(posedge tick);
    end
    repeat (40) @(posedge tick);
    for (int k = 0; k < NK; k++) begin
      checks++;
      if (exp_q[k].size() != 0) begin
        failures++;
        $display("FAIL: adder %0d left %0d results undelivered", k, exp_q[k].size());
      end
    end
    // every mechanism exercised at least once
    checks++;
    if (n_long == 0 || n_short == 0) begin
      failures++;
      $display("FAIL: long or chain-free carry case never exercised");
    end
    for (int k = 0; k < NK; k++)
      $display("adder %0d ticks to close inputs: chain-free %0d avg over %0d, long chain %0d avg over %0d",
               k, n_short ? t_short[k] / n_short : 0, n_short, n_long ? t_long[k] / n_long : 0, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // an output digit must never hold two rails at once
  always @(posedge tick) begin
    if (!rst) begin
      for (int k = 0; k < NK; k++) begin
        for (int i = 0; i < ND; i++) assert ($countones(s[k][i]) <= 1) else begin
          failures++;
          $display("FAIL: adder %0d digit %0d illegal code %b", k, i, s[k][i]);
        end
        assert (co[k] != 2'b11) else failures++;
      end
    end
  end

  // watchdog
  initial begin
    repeat (NVEC * 400 + 1000) @(posedge tick);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
