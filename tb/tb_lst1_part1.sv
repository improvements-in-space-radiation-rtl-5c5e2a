// tb_lst1_part1: self-checking test of the LST1 part (FIFO1, FIFO2 and the
// temperature-term datapath).
//
// Pixels are written into the FIFOs and read out under random enables; every
// result is compared with the double-precision model of
// 10*(0.1 T4 + 0.14 (T4-T5) + 0.0032 (T4-T5)^2 + 0.83), rounded and clamped,
// and with the expected saturation flag. The latency from pop to valid_o must
// be 5 edges, and a burst of reads must give one result per clock.
module tb_lst1_part1;
  import lst_ref_pkg::*;
  localparam int unsigned DEPTH = 16;

  logic clock = 0, reset = 1, write_en = 0, read_en = 0;
  logic [15:0] t4_i = '0, t5_i = '0, lst1_o;
  logic valid_o, sat_o, empty_o, full_o;
  logic [$clog2(DEPTH+1)-1:0] count_o;
  int checks = 0, failures = 0, n_sat = 0, cycle = 0;
  pixel_t  stored [$];   // written, not yet read
  pixel_t  flight [$];   // read, result pending
  int      pop_cycle [$];

  lst1_part1 #(.FIFO_DEPTH(DEPTH)) dut (.*);

  always #5 clock = ~clock;
  always @(posedge clock) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Model of the FIFO side and result checking, at each edge.
  always @(posedge clock) if (!reset) begin
    check(empty_o == (stored.size() == 0) && full_o == (stored.size() == DEPTH), "FIFO flags");
    if (valid_o) begin
      if (flight.size() == 0) check(0, "unexpected result");
      else begin
        pixel_t p;
        real    id;
        p  = flight.pop_front();
        id = lst1_ideal(p.t4, p.t5);
        check(part_ok(longint'(lst1_o), id, 0, 65535), "LST1 value");
        if (!part_ok(longint'(lst1_o), id, 0, 65535))
          $display("  T4=%0d T5=%0d got %0d ideal %f", p.t4, p.t5, lst1_o, id);
        check(sat_o == saturates(id, 0, 65535), "saturation flag");
        check(cycle - pop_cycle.pop_front() == 5, "latency 5");
        if (sat_o) n_sat++;
      end
    end
    if (read_en && stored.size() > 0) begin
      flight.push_back(stored.pop_front());
      pop_cycle.push_back(cycle);
    end
    if (write_en && stored.size() < DEPTH) stored.push_back('{t4: t4_i, t5: t5_i, w: '0, eps: '0});
  end

  task automatic put(logic [15:0] t4, logic [15:0] t5);
    @(negedge clock);
    write_en = 1; t4_i = t4; t5_i = t5;
    @(negedge clock);
    write_en = 0;
  endtask

  initial begin
    int burst_start, burst_seen;
    repeat (3) @(negedge clock);
    reset = 0;
    // Hand-worked values (kelvin x10):
    // T4=3000 T5=2950: 300 + 1.4*5 + 0.32*25 + 0.83 = 315.83 K -> 3158
    put(16'd3000, 16'd2950);
    @(negedge clock) read_en = 1;
    @(negedge clock) read_en = 0;
    repeat (5) @(negedge clock);
    check(lst1_o == 16'd3158, "hand value 3158");
    $display("hand value %0d", lst1_o);
    // Saturation: both ends of the range.
    put(16'd65535, 16'd0);      // far above 65535
    put(16'd0, 16'd22);         // slightly negative kelvin
    put(16'd2900, 16'd2900);    // 290.83 K -> 2908
    read_en = 1;
    repeat (3) @(negedge clock);
    read_en = 0;
    repeat (6) @(negedge clock);
    check(lst1_o == 16'd2908, "hand value 2908");
    // Burst throughput: fill the FIFO, then read continuously.
    for (int i = 0; i < DEPTH; i++) begin
      pixel_t p;
      p = random_pixel();
      put(p.t4, p.t5);
    end
    check(full_o, "FIFO full after DEPTH writes");
    burst_seen = 0;
    read_en = 1;
    burst_start = cycle;
    while (!empty_o) @(negedge clock);
    read_en = 0;
    check(cycle - burst_start == DEPTH, "one read per clock");
    // Random traffic.
    for (int i = 0; i < 3000; i++) begin
      pixel_t p;
      p = random_pixel();
      if ($urandom_range(0, 19) == 0) begin
        p.t4 = 16'($urandom);
        p.t5 = 16'($urandom);
      end
      write_en = ($urandom_range(0, 99) < 60);
      read_en  = ($urandom_range(0, 99) < 55);
      t4_i = p.t4; t5_i = p.t5;
      @(negedge clock);
    end
    write_en = 0;
    read_en  = 1;
    repeat (DEPTH + 10) @(negedge clock);
    check(flight.size() == 0 && stored.size() == 0, "all results delivered");
    check(n_sat >= 2, "saturation exercised");
    $display("saturated results %0d", n_sat);
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
