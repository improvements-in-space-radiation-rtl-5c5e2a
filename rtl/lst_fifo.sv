// lst_fifo: result FIFO pair between the two arithmetic parts and the final
// adder.
//
// FIFO_1 collects LST1 results and FIFO_2 collects LST2 results, each written
// when the matching part raises its valid. A pair leaves the block only when
// both FIFOs hold a result, so A and B always belong to the same pixel even if
// the parts delivered them at different times. Both FIFOs are register based
// (sync_fifo), not block RAM.
//
// Interface: valid_o is high while both FIFOs are non-empty; a_o (LST1) and
// b_o (LST2) show the oldest pair; ready_i pops the pair at the clock edge.
// count_o is the larger of the two occupancies, which the caller uses to hold
// back new pixels so that no result can arrive at a full FIFO.
//
// Timing: a result written at edge k is visible after edge k and can be popped
// at edge k+1. The pairing rule and the occupancy output are this design's
// choices; the original design specifies only the two FIFOs and their A and
// B outputs.
module lst_fifo
  import lst_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              write1_i,
  input  logic [DATA_W-1:0] fifo_1_i,
  input  logic              write2_i,
  input  logic [DATA_W-1:0] fifo_2_i,
  input  logic              ready_i,
  output logic              valid_o,
  output logic [DATA_W-1:0] a_o,
  output logic [DATA_W-1:0] b_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  logic e1, e2, f1, f2, pop;
  logic [$clog2(DEPTH+1)-1:0] c1, c2;

  assign valid_o = !e1 && !e2;
  assign pop     = valid_o && ready_i;
  assign count_o = (c1 > c2) ? c1 : c2;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo_1 (
    .clk(clock), .reset(reset), .wr_en(write1_i), .wr_data(fifo_1_i),
    .rd_en(pop), .rd_data(a_o), .full(f1), .empty(e1), .count(c1));

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo_2 (
    .clk(clock), .reset(reset), .wr_en(write2_i), .wr_data(fifo_2_i),
    .rd_en(pop), .rd_data(b_o), .full(f2), .empty(e2), .count(c2));

  // A result must never be offered to a full FIFO: it would be lost.
  a_no_overflow_1: assert property (@(posedge clock) disable iff (reset)
    write1_i |-> (!f1 || pop));
  a_no_overflow_2: assert property (@(posedge clock) disable iff (reset)
    write2_i |-> (!f2 || pop));

endmodule
