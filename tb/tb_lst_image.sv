// tb_lst_image: one full AVHRR scene through the LST-SW engine at its default
// parameters.
//
// A synthetic 695 x 316 scene (219,620 pixels, the size of the
// Mediterranean-basin images the engine was sized for) is generated on the
// fly: brightness temperature falls from south to north and rises towards the
// east, the split-window difference, water vapour and emissivity vary smoothly
// across the scene, and each pixel gets a small random perturbation. The
// pixels are streamed with write and read enables held high and the consumer
// always ready; every LST is checked against the double-precision model, and
// the scene must finish in pixels + 7 cycles (one pixel per clock after the
// 7-cycle pipeline fill). The run also reports the processing time that cycle
// count gives at a 190.484 MHz clock.
module tb_lst_image;
  import lst_ref_pkg::*;

  localparam int COLS = 695;
  localparam int ROWS = 316;
  localparam int N    = COLS * ROWS;

  logic clock_i = 0, reset_i = 1, read_en_i = 0, write_en_i = 0, lst_ready_i = 1;
  logic [15:0] t4_i = '0, t5_i = '0, w_i = '0, epsilon_i = '0, lst_o;
  logic lst_valid_o, in_full_o, in_empty_o, stall_o, sat_o;
  int checks = 0, failures = 0, cycle = 0, n_out = 0, first_wr = -1, last_out = 0;
  int n_stall = 0, n_full = 0;
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

  function automatic pixel_t scene(int r, int c);
    pixel_t p;
    int t4;
    t4    = 3150 - (r * 350) / ROWS + (c * 150) / COLS + $urandom_range(0, 40) - 20;
    p.t4  = 16'(t4);
    p.t5  = 16'(t4 - ((c * 60) / COLS) - $urandom_range(0, 20));
    p.w   = 16'(500 + (r * 3000) / ROWS + $urandom_range(0, 200));
    p.eps = 16'(930 + (c * 60) / COLS + $urandom_range(0, 8));
    return p;
  endfunction

  always @(posedge clock_i) if (!reset_i) begin
    if (stall_o) n_stall++;
    if (write_en_i && in_full_o) n_full++;
    if (lst_valid_o) begin
      pixel_t p;
      n_out++;
      last_out = cycle;
      p = stored.pop_front();
      check(lst_matches(p, lst_o), "LST value");
      check(!sat_o, "no saturation in a natural scene");
    end
    if (write_en_i && !in_full_o) begin
      stored.push_back('{t4: t4_i, t5: t5_i, w: w_i, eps: epsilon_i});
      if (first_wr < 0) first_wr = cycle;
    end
  end

  initial begin
    repeat (3) @(negedge clock_i);
    reset_i   = 0;
    read_en_i = 1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        pixel_t p;
        p = scene(r, c);
        t4_i = p.t4; t5_i = p.t5; w_i = p.w; epsilon_i = p.eps;
        write_en_i = 1;
        @(negedge clock_i);
      end
    write_en_i = 0;
    repeat (20) @(negedge clock_i);
    check(n_out == N, "every pixel of the scene delivered");
    check(last_out - first_wr == N + 7, "scene time of pixels + 7 cycles");
    check(n_stall == 0 && n_full == 0, "no stall in a continuous stream");
    $display("scene %0d pixels in %0d cycles: %.3f ms at 190.484 MHz",
             n_out, last_out - first_wr, real'(last_out - first_wr) / 190.484e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clock_i);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
