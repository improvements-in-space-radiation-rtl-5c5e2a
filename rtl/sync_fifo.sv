// sync_fifo: single-clock first-word-fall-through FIFO built from registers.
//
// Every FIFO of the LST-SW engine (the four input FIFOs for T4, T5, W and
// epsilon and the two result FIFOs for LST1 and LST2) is an instance of this
// module. The storage is a plain register array, so it maps to slice
// flip-flops rather than block RAM, as the engine's FIFOs do.
//
// Interface: wr_en pushes wr_data at the rising clock edge unless the FIFO is
// full (a simultaneous pop makes room, so push and pop on a full FIFO both
// happen). rd_data always shows the oldest entry while empty is low; rd_en
// pops it at the edge, and is ignored while the FIFO is empty. count is the
// number of stored entries. reset (synchronous, active high) empties the FIFO;
// the storage itself is not cleared.
//
// Timing: a word written at edge k is visible on rd_data after edge k, so it
// can be popped at edge k+1. Depth, reset polarity and the drop-on-full rule
// are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) begin
        mem[wr_ptr] <= wr_data;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // The occupancy can never pass the depth.
  a_count_le_depth: assert property (@(posedge clk) disable iff (reset)
    count <= DEPTH[$clog2(DEPTH+1)-1:0]);

endmodule
