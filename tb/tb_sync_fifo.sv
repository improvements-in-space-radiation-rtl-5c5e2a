// tb_sync_fifo: self-checking test of the register FIFO.
//
// Random pushes and pops (including pushes while full and pops while empty)
// against a queue model; checks the head word at every pop, the empty and
// full flags and the count every cycle, and that a word written at one edge
// can be popped at the next.
module tb_sync_fifo;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned DEPTH = 16;

  logic clk = 0, reset = 1, wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int n_full_push = 0, n_empty_pop = 0, n_both = 0;
  logic [WIDTH-1:0] model [$];

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    // Directed: write one word, pop it on the very next cycle.
    wr_en = 1; wr_data = 16'hbeef;
    @(negedge clk) wr_en = 0;
    check(!empty && rd_data == 16'hbeef && count == 1, "fall-through head");
    rd_en = 1;
    @(negedge clk) rd_en = 0;
    check(empty && count == 0, "empty after pop");
    // Random traffic with phases that favour filling and draining.
    for (int i = 0; i < 4000; i++) begin
      int unsigned pw;
      pw = ((i / 500) % 2 == 0) ? 80 : 25;
      wr_en   = ($urandom_range(0, 99) < pw);
      rd_en   = ($urandom_range(0, 99) < 100 - pw + 5);
      wr_data = WIDTH'($urandom);
      @(posedge clk);
      // Flags and count before the edge's effects.
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(int'(count) == model.size(), "count");
      if (rd_en && model.size() > 0) check(rd_data == model[0], "head data");
      if (wr_en && full && !rd_en) n_full_push++;
      if (rd_en && empty) n_empty_pop++;
      if (wr_en && rd_en && full) n_both++;
      begin
        bit do_rd, do_wr;
        do_rd = rd_en && model.size() > 0;
        do_wr = wr_en && (model.size() < DEPTH || do_rd);
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
      @(negedge clk);
    end
    check(n_full_push > 0, "push while full exercised");
    check(n_empty_pop > 0, "pop while empty exercised");
    check(n_both > 0, "push and pop while full exercised");
    $display("full pushes %0d, empty pops %0d, full push+pop %0d", n_full_push, n_empty_pop, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
