// tb_lst2_part2: self-checking test of the LST2 part (FIFO3, FIFO4 and the
// emissivity-correction datapath).
//
// Pixels are written into the FIFOs and read out under random enables; every
// result is compared with the double-precision model of
// 10*((57 - 5W)(1 - eps) - (161 - 30W)*0.005), rounded and clamped to 16-bit
// two's complement,
// and with the expected saturation flag. The latency from pop to valid_o must
// be 5 edges, and a burst of reads must give one result per clock.
module tb_lst2_part2;
  import lst_ref_pkg::*;
  localparam int unsigned DEPTH = 16;

  logic clock = 0, reset = 1, write_en = 0, read_en = 0;
  logic [15:0] w_i = '0, eps_i = '0, lst2_o;
  logic valid_o, sat_o, empty_o, full_o;
  logic [$clog2(DEPTH+1)-1:0] count_o;
  int checks = 0, failures = 0, n_sat = 0, cycle = 0;
  pixel_t  stored [$];   // written, not yet read
  pixel_t  flight [$];   // read, result pending
  int      pop_cycle [$];

  lst2_part2 #(.FIFO_DEPTH(DEPTH)) dut (.*);

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
        id = lst2_ideal(p.w, p.eps);
        check(part_ok(longint'($signed(lst2_o)), id, -32768, 32767), "LST2 value");
        if (!part_ok(longint'($signed(lst2_o)), id, -32768, 32767))
          $display("  W=%0d eps=%0d got %0d ideal %f", p.w, p.eps, $signed(lst2_o), id);
        check(sat_o == saturates(id, -32768, 32767), "saturation flag");
        check(cycle - pop_cycle.pop_front() == 5, "latency 5");
        if (sat_o) n_sat++;
      end
    end
    if (read_en && stored.size() > 0) begin
      flight.push_back(stored.pop_front());
      pop_cycle.push_back(cycle);
    end
    if (write_en && stored.size() < DEPTH) stored.push_back('{t4: '0, t5: '0, w: w_i, eps: eps_i});
  end

  task automatic put(logic [15:0] w, logic [15:0] e);
    @(negedge clock);
    write_en = 1; w_i = w; eps_i = e;
    @(negedge clock);
    write_en = 0;
  endtask

  initial begin
    int burst_start, burst_seen;
    repeat (3) @(negedge clock);
    reset = 0;
    // Hand-worked values (kelvin x10):
    // W=2000 eps=980: (57-10)(0.02) - (161-60)(0.005) = 0.435 K -> 4
    put(16'd2000, 16'd980);
    @(negedge clock) read_en = 1;
    @(negedge clock) read_en = 0;
    repeat (5) @(negedge clock);
    check(lst2_o == 16'd4, "hand value 4");
    // Saturation: both ends of the range.
    put(16'd65535, 16'd65535);  // far above 32767
    put(16'd0, 16'd65535);      // far below -32768
    put(16'd0, 16'd1000);       // -161*0.005 = -0.805 K -> -8
    read_en = 1;
    repeat (3) @(negedge clock);
    read_en = 0;
    repeat (6) @(negedge clock);
    check(lst2_o == 16'hfff8, "hand value -8");
    // Burst throughput: fill the FIFO, then read continuously.
    for (int i = 0; i < DEPTH; i++) begin
      pixel_t p;
      p = random_pixel();
      put(p.w, p.eps);
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
        p.w   = 16'($urandom);
        p.eps = 16'($urandom);
      end
      write_en = ($urandom_range(0, 99) < 60);
      read_en  = ($urandom_range(0, 99) < 55);
      w_i = p.w; eps_i = p.eps;
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
