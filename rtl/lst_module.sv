// lst_module: streaming land surface temperature engine for the split-window
// algorithm
//     LST = T4 + 1.40(T4-T5) + 0.32(T4-T5)^2 + 0.83
//           + (57 - 5W)(1 - eps) - (161 - 30W)*deps,   deps = 0.005,
// computing one 16-bit LST pixel per clock from four 16-bit pixel streams:
// T4 and T5 (brightness temperatures, kelvin x10), W (water vapour,
// g/cm^2 x1000) and epsilon (mean emissivity, x1000). LST is kelvin x10.
//
// Structure: lst1_part1 (FIFO1, FIFO2 and the temperature term LST1) and
// lst2_part2 (FIFO3, FIFO4 and the emissivity correction LST2) work side by
// side on the same pixel; their results go through the result FIFO pair
// lst_fifo and are added by lst_adder.
//
// Interface: clock_i, reset_i (synchronous, active high), write_en_i and
// read_en_i are shared by all blocks as in the design. write_en_i pushes one
// input pixel into the four input FIFOs; it is ignored while they are full
// (in_full_o). read_en_i moves one pixel from the input FIFOs into both
// arithmetic parts; it is ignored while the input FIFOs are empty (in_empty_o)
// and held back (stall_o) while the result FIFOs have too little room for the
// pixels already in the pipeline. Results leave through lst_o/lst_valid_o
// with a ready (lst_ready_i); keep lst_ready_i high for a free-running stream.
// sat_o flags a pixel whose LST1 or LST2 saturated; it is valid with the part
// results, five edges after the pixel was read.
//
// Timing: a pixel read at edge k (read_en_i high, not empty, not stalled)
// appears on lst_o at edge k+7 when lst_ready_i stays high: 5 stages in the
// parts, one edge into the result FIFOs and one edge through the adder
// register. Throughput is one pixel per clock.
// The port list, the two-part split, the FIFOs and the final unsigned adder
// follow the original published design; the handshakes (lst_valid_o, lst_ready_i, the status
// outputs) and the read hold-back are this design's additions.
module lst_module
  import lst_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 16,
  parameter int unsigned OUT_DEPTH = 16
) (
  input  logic              clock_i,
  input  logic              reset_i,
  input  logic              read_en_i,
  input  logic              write_en_i,
  input  logic [DATA_W-1:0] t4_i,
  input  logic [DATA_W-1:0] t5_i,
  input  logic [DATA_W-1:0] w_i,
  input  logic [DATA_W-1:0] epsilon_i,
  output logic [DATA_W-1:0] lst_o,
  output logic              lst_valid_o,
  input  logic              lst_ready_i,
  output logic              in_full_o,
  output logic              in_empty_o,
  output logic              stall_o,
  output logic              sat_o
);

  // Room needed in the result FIFOs before another pixel may enter: every
  // pipeline stage may hold a pixel, plus the one being read.
  localparam int unsigned SLACK = PART_STAGES + 1;
  initial assert (OUT_DEPTH > SLACK) else $error("OUT_DEPTH must exceed %0d", SLACK);

  logic full1, full2, empty1, empty2;
  logic wr, rd, room;
  logic [$clog2(IN_DEPTH+1)-1:0]  cnt1, cnt2;
  logic [$clog2(OUT_DEPTH+1)-1:0] out_cnt;

  logic [DATA_W-1:0] lst1, lst2, a, b;
  logic v1, v2, s1, s2, pair_valid, add_ready;

  assign in_full_o  = full1 || full2;
  assign in_empty_o = empty1 || empty2;
  assign room       = 32'(out_cnt) + SLACK <= OUT_DEPTH;
  assign wr         = write_en_i && !in_full_o;
  assign rd         = read_en_i && !in_empty_o && room;
  assign stall_o    = read_en_i && !in_empty_o && !room;
  assign sat_o      = (v1 && s1) || (v2 && s2);

  lst1_part1 #(.FIFO_DEPTH(IN_DEPTH)) u_lst1 (
    .clock(clock_i), .reset(reset_i), .write_en(wr), .read_en(rd),
    .t4_i(t4_i), .t5_i(t5_i), .lst1_o(lst1), .valid_o(v1), .sat_o(s1),
    .empty_o(empty1), .full_o(full1), .count_o(cnt1));

  lst2_part2 #(.FIFO_DEPTH(IN_DEPTH)) u_lst2 (
    .clock(clock_i), .reset(reset_i), .write_en(wr), .read_en(rd),
    .w_i(w_i), .eps_i(epsilon_i), .lst2_o(lst2), .valid_o(v2), .sat_o(s2),
    .empty_o(empty2), .full_o(full2), .count_o(cnt2));

  lst_fifo #(.DEPTH(OUT_DEPTH)) u_lst_fifo (
    .clock(clock_i), .reset(reset_i),
    .write1_i(v1), .fifo_1_i(lst1), .write2_i(v2), .fifo_2_i(lst2),
    .ready_i(add_ready), .valid_o(pair_valid), .a_o(a), .b_o(b),
    .count_o(out_cnt));

  lst_adder u_adder (
    .clock(clock_i), .reset(reset_i),
    .valid_i(pair_valid), .ready_o(add_ready), .a_i(a), .b_i(b),
    .valid_o(lst_valid_o), .ready_i(lst_ready_i), .s_o(lst_o));

  // The two parts are always read together, so their FIFOs stay in step.
  a_in_fifos_aligned: assert property (@(posedge clock_i) disable iff (reset_i)
    cnt1 == cnt2);

endmodule
