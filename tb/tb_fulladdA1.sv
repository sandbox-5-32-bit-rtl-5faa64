// tb_fulladdA1: self-checking testbench of the fulladdA1 full-adder component.
//
// Integrated textbook adder: the output gates carry the enable.
// Every input combination is applied many times, in random order, with the
// inputs arriving a random number of ticks apart. The sum and carryout
// consumers are modelled separately, each closing and reopening after its
// own random delay, so the two output links are exercised independently.
// Each result is compared with the arithmetic sum; the component must keep
// done low until both links hold DATA and raise done only then, and must
// return to NULL before the next operands are accepted.
module tb_fulladdA1;
  import ncl_pkg::*;

  localparam int R    = 2;
  localparam int NVEC = 160;

  logic tick = 1'b0;
  logic rst  = 1'b1;
  always #1 tick = ~tick;

  dr_t  a, b, s;
  dr_t   ci, co;
  logic  s_close, co_close, done;

  int checks = 0, failures = 0;

  fulladdA1 dut (.tick, .rst, .a, .b, .ci, .s_close, .co_close, .s, .co, .done);

  function automatic dr_t enc(input int v);
    return dr_data(1'(v));
  endfunction

  int exp_s [$];
  int exp_c [$];

  // sum consumer
  initial begin
    int sv;
    logic ok;
    s_close = 1'b0;
    forever begin
      @(posedge tick);
      if (!rst && s != '0) begin
        ok = 1'b1; sv = 0;
        case (s) 2'b01: sv = 0; 2'b10: sv = 1; default: ok = 1'b0; endcase
        checks++;
        if (!ok || exp_s.size() == 0 || sv != exp_s.pop_front()) begin
          failures++;
          $display("FAIL: sum %b", s);
        end
        repeat ($urandom_range(0, 4)) @(posedge tick);
        s_close = 1'b1;
        while (s != '0) @(posedge tick);
        repeat ($urandom_range(0, 4)) @(posedge tick);
        s_close = 1'b0;
      end
    end
  end

  // carryout consumer
  initial begin
    int cv;
    co_close = 1'b0;
    forever begin
      @(posedge tick);
      if (!rst && co != '0) begin
        cv = (co == 2'b10) ? 1 : 0;
        checks++;
        if (co == 2'b11 || exp_c.size() == 0 || cv != exp_c.pop_front()) begin
          failures++;
          $display("FAIL: carryout %b", co);
        end
        repeat ($urandom_range(0, 4)) @(posedge tick);
        co_close = 1'b1;
        while (co != '0) @(posedge tick);
        repeat ($urandom_range(0, 4)) @(posedge tick);
        co_close = 1'b0;
      end
    end
  end

  // source
  int unsigned seen [R][R][2];
  initial begin
    int av, bv, cv, order;
    a = '0; b = '0; ci = DR_NULL;
    repeat (4) @(posedge tick);
    rst = 1'b0;
    repeat (2) @(posedge tick);
    for (int n = 0; n < NVEC; n++) begin
      if (n < R * R * 2) begin av = n % R; bv = (n / R) % R; cv = n / (R * R); end
      else begin av = $urandom_range(0, R - 1); bv = $urandom_range(0, R - 1); cv = $urandom_range(0, 1); end
      seen[av][bv][cv]++;
      exp_s.push_back((av + bv + cv) % R);
      exp_c.push_back((av + bv + cv) / R);
      order = $urandom_range(0, 2);
      // apply the three inputs in a rotating order, a few ticks apart
      for (int j = 0; j < 3; j++) begin
        case ((order + j) % 3)
          0: a  = enc(av);
          1: b  = enc(bv);
          default: ci = dr_data(1'(cv));
        endcase
        // done must not rise before all three inputs are DATA
        if (j < 2) begin
          repeat ($urandom_range(0, 3)) begin
            @(posedge tick);
            if (done) begin failures++; $display("FAIL: done before inputs complete"); end
          end
        end
      end
      while (!done) @(posedge tick);
      checks++;
      if (s == '0 || co == '0) begin failures++; $display("FAIL: done with an output still NULL"); end
      repeat ($urandom_range(0, 3)) @(posedge tick);
      a = '0;
      repeat ($urandom_range(0, 2)) @(posedge tick);
      b = '0;
      repeat ($urandom_range(0, 2)) @(posedge tick);
      ci = DR_NULL;
      while (done) @(posedge tick);
    end
    repeat (30) @(posedge tick);
    checks++;
    if (exp_s.size() != 0 || exp_c.size() != 0) begin failures++; $display("FAIL: results undelivered"); end
    for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) for (int k = 0; k < 2; k++) begin
      checks++;
      if (seen[i][j][k] == 0) begin failures++; $display("FAIL: combination %0d %0d %0d never applied", i, j, k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC * 80 + 500) @(posedge tick);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
