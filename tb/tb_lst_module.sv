// tb_lst_module: end-to-end test of the LST-SW engine.
//
// Pixels (T4, T5, W, epsilon) are pushed and read under random enables while
// the consumer applies a random ready. Every LST that leaves is compared, in
// order, with the double-precision split-window model (sum of both rounded
// parts, modulo 2^16). Directed phases check the 7-cycle latency from a read
// to the result and one result per clock in a continuous stream.
// Each mechanism of the engine is counted and must occur at least once:
// writes refused while the input FIFOs are full, reads ignored while they are
// empty, reads held back because the result FIFOs are nearly full, output
// back-pressure, saturation of a part and negative LST2 corrections.
module tb_lst_module;
  import lst_ref_pkg::*;

  logic clock_i = 0, reset_i = 1, read_en_i = 0, write_en_i = 0, lst_ready_i = 0;
  logic [15:0] t4_i = '0, t5_i = '0, w_i = '0, epsilon_i = '0, lst_o;
  logic lst_valid_o, in_full_o, in_empty_o, stall_o, sat_o;
  int checks = 0, failures = 0, cycle = 0;
  int n_full = 0, n_empty = 0, n_stall = 0, n_bp = 0, n_sat = 0, n_neg = 0, n_out = 0;
  int n_written = 0;
  pixel_t stored [$];

  lst_module dut (.*);

  always #5 clock_i = ~clock_i;
  always @(posedge clock_i) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clock_i) if (!reset_i) begin
    if (write_en_i && in_full_o) n_full++;
    if (read_en_i && in_empty_o) n_empty++;
    if (stall_o) n_stall++;
    if (lst_valid_o && !lst_ready_i) n_bp++;
    if (sat_o) n_sat++;
    if (lst_valid_o && lst_ready_i) begin
      n_out++;
      if (stored.size() == 0) check(0, "result without pixel");
      else begin
        pixel_t p;
        p = stored.pop_front();
        check(lst_matches(p, lst_o), "LST value");
        if (!lst_matches(p, lst_o))
          $display("  T4=%0d T5=%0d W=%0d eps=%0d got %0d ideal %f", p.t4, p.t5, p.w,
                   p.eps, lst_o, lst1_ideal(p.t4, p.t5) + lst2_ideal(p.w, p.eps));
        if (lst2_ideal(p.w, p.eps) < -0.5) n_neg++;
      end
    end
    if (write_en_i && !in_full_o) begin
      stored.push_back('{t4: t4_i, t5: t5_i, w: w_i, eps: epsilon_i});
      n_written++;
    end
  end

  task automatic drive(pixel_t p);
    t4_i = p.t4; t5_i = p.t5; w_i = p.w; epsilon_i = p.eps;
  endtask

  initial begin
    int t0, t1, got;
    pixel_t p;
    repeat (3) @(negedge clock_i);
    reset_i = 0;
    lst_ready_i = 1;

    // Latency: one pixel, read in cycle t0, result must be valid in t0+7.
    p = random_pixel();
    drive(p);
    write_en_i = 1;
    @(negedge clock_i) write_en_i = 0;
    read_en_i = 1;
    t0 = cycle;
    @(negedge clock_i) read_en_i = 0;
    while (!lst_valid_o && cycle < t0 + 20) @(negedge clock_i);
    check(cycle - t0 == 7, "latency of 7 cycles");
    $display("latency %0d cycles", cycle - t0);

    // Throughput: 200 pixels written and read back to back.
    write_en_i = 1;
    read_en_i  = 1;
    got = 0;
    t0 = -1;
    t1 = 0;
    for (int i = 0; i < 200 + 10; i++) begin
      if (i < 200) drive(random_pixel());
      else write_en_i = 0;
      @(negedge clock_i);
      if (lst_valid_o) begin
        if (t0 < 0) t0 = cycle;
        t1 = cycle;
        got++;
      end
    end
    read_en_i = 0;
    check(got == 200 && t1 - t0 == 199, "one result per clock");
    $display("stream: %0d results in %0d cycles", got, t1 - t0 + 1);

    // Saturation and a strongly negative correction, by hand.
    drive('{t4: 16'd65535, t5: 16'd0, w: 16'd0, eps: 16'd1000});
    write_en_i = 1;
    @(negedge clock_i);
    drive('{t4: 16'd2900, t5: 16'd2900, w: 16'd65535, eps: 16'd65535});
    @(negedge clock_i);
    write_en_i = 0;

    // Random traffic, with phases of low consumer readiness to fill the
    // result FIFOs and phases of heavy writing to fill the input FIFOs.
    for (int i = 0; i < 6000; i++) begin
      int unsigned ph;
      ph = (i / 500) % 3;
      p = random_pixel();
      if ($urandom_range(0, 49) == 0) begin
        p.t4  = 16'($urandom);
        p.t5  = 16'($urandom);
        p.w   = 16'($urandom);
        p.eps = 16'($urandom);
      end
      drive(p);
      write_en_i  = ($urandom_range(0, 99) < ((ph == 1) ? 90 : 50));
      read_en_i   = ($urandom_range(0, 99) < ((ph == 2) ? 30 : 70));
      lst_ready_i = ($urandom_range(0, 99) < ((ph == 0) ? 20 : 90));
      @(negedge clock_i);
    end
    write_en_i  = 0;
    read_en_i   = 1;
    lst_ready_i = 1;
    repeat (60) @(negedge clock_i);
    check(stored.size() == 0, "every pixel delivered");
    check(n_out == n_written, "results equal pixels");
    check(n_full > 0, "input FIFOs full");
    check(n_empty > 0, "input FIFOs empty");
    check(n_stall > 0, "read held back for result FIFO room");
    check(n_bp > 0, "output back-pressure");
    check(n_sat > 0, "saturation");
    check(n_neg > 0, "negative emissivity correction");
    $display("pixels %0d; full %0d, empty %0d, stall %0d, back-pressure %0d, saturated %0d, negative LST2 %0d",
             n_written, n_full, n_empty, n_stall, n_bp, n_sat, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clock_i);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
