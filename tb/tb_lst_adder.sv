// tb_lst_adder: self-checking test of the final adder stage.
//
// Random operand pairs, including negative LST2 corrections in two's
// complement, are offered with a random valid while the consumer applies a
// random ready. Every sum must equal (a + b) mod 2^16, appear one edge after
// it was taken, and stay unchanged while ready_i is low.
module tb_lst_adder;
  logic clock = 0, reset = 1, valid_i = 0, ready_i = 0;
  logic [15:0] a_i = '0, b_i = '0, s_o;
  logic ready_o, valid_o;
  int checks = 0, failures = 0, cycle = 0, n_hold = 0, n_neg = 0;
  logic [15:0] exp_q [$];
  logic [15:0] last_s;
  logic        last_held = 0;

  lst_adder dut (.*);

  always #5 clock = ~clock;
  always @(posedge clock) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clock) if (!reset) begin
    check(ready_o == (!valid_o || ready_i), "ready_o");
    if (last_held) check(valid_o && s_o == last_s, "held output stable");
    last_held = valid_o && !ready_i;
    last_s    = s_o;
    if (valid_o && !ready_i) n_hold++;
    if (valid_o && ready_i) begin
      check(exp_q.size() > 0 && s_o == exp_q[0], "sum");
      void'(exp_q.pop_front());
    end
    if (valid_i && ready_o) exp_q.push_back(16'(32'(a_i) + 32'(b_i)));
  end

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    // Directed: 3158 + (-8) = 3150, visible one edge after it is taken.
    ready_i = 1; valid_i = 1; a_i = 16'd3158; b_i = 16'hfff8;
    @(negedge clock);
    valid_i = 0;
    check(valid_o && s_o == 16'd3150, "3158 + (-8) after one edge");
    @(negedge clock);
    check(!valid_o, "valid drops");
    for (int i = 0; i < 4000; i++) begin
      valid_i = ($urandom_range(0, 99) < 70);
      ready_i = ($urandom_range(0, 99) < 60);
      a_i = 16'(2500 + $urandom_range(0, 1000));
      b_i = 16'($signed(17'($urandom_range(0, 400)) - 17'sd200));
      if (b_i[15]) n_neg++;
      @(negedge clock);
    end
    check(n_hold > 100 && n_neg > 100, "hold and negative correction exercised");
    $display("held cycles %0d, negative corrections %0d", n_hold, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
