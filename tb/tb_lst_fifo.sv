// tb_lst_fifo: self-checking test of the result FIFO pair.
//
// LST1 and LST2 result streams are written with independent random timing
// (so one FIFO runs ahead of the other) and drained with a random ready.
// Every pair that leaves must be the n-th LST1 with the n-th LST2; valid_o
// must be high exactly when both sides hold a result, and count_o must be the
// larger occupancy. Writers never write into a full FIFO, as in the engine.
module tb_lst_fifo;
  localparam int unsigned DEPTH = 16;

  logic clock = 0, reset = 1, write1_i = 0, write2_i = 0, ready_i = 0;
  logic [15:0] fifo_1_i = '0, fifo_2_i = '0, a_o, b_o;
  logic valid_o;
  logic [$clog2(DEPTH+1)-1:0] count_o;
  int checks = 0, failures = 0, cycle = 0;
  int n_skew = 0, n_pairs = 0, n_hold = 0;
  logic [15:0] q1 [$];
  logic [15:0] q2 [$];
  int unsigned n1 = 0, n2 = 0;

  lst_fifo #(.DEPTH(DEPTH)) dut (.*);

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
    bit pop;
    check(valid_o == (q1.size() > 0 && q2.size() > 0), "valid");
    check(int'(count_o) == ((q1.size() > q2.size()) ? q1.size() : q2.size()), "count");
    if (q1.size() != q2.size()) n_skew++;
    if (valid_o && !ready_i) n_hold++;
    pop = valid_o && ready_i;
    if (pop) begin
      check(a_o == q1[0] && b_o == q2[0], "pair data");
      void'(q1.pop_front());
      void'(q2.pop_front());
      n_pairs++;
    end
    if (write1_i) q1.push_back(fifo_1_i);
    if (write2_i) q2.push_back(fifo_2_i);
  end

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    for (int i = 0; i < 5000; i++) begin
      // Streams are numbered so a misaligned pair shows; the lead of one
      // stream over the other changes with the phase of the test.
      int unsigned p1, p2;
      p1 = ((i / 400) % 2 == 1) ? 70 : 30;
      p2 = 100 - p1;
      write1_i = ($urandom_range(0, 99) < p1) && q1.size() < DEPTH;
      write2_i = ($urandom_range(0, 99) < p2) && q2.size() < DEPTH;
      fifo_1_i = 16'(n1);
      fifo_2_i = 16'hffff - 16'(n2);
      if (write1_i) n1++;
      if (write2_i) n2++;
      ready_i  = ($urandom_range(0, 99) < 60);
      @(negedge clock);
    end
    write1_i = 0; write2_i = 0;
    check(n_skew > 100 && n_hold > 100 && n_pairs > 1000, "skew, hold and pairing exercised");
    $display("pairs %0d, skewed cycles %0d, held cycles %0d", n_pairs, n_skew, n_hold);
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
