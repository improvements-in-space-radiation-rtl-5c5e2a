// lst2_part2: second part of the split-window LST, the emissivity correction
//     LST2 = [(57000 - 5W)(1000 - eps) - (161000 - 30W)*DEPS] * 0.001
// with W in g/cm^2 x1000, eps x1000 and DEPS = 1000*(eps4-eps5) = 5
// (a spectral emissivity difference of 0.005), delivered in kelvin x10 as a
// signed 16-bit value.
//
// The block holds FIFO3 (W) and FIFO4 (epsilon) and the datapath fed by them:
// constant multipliers 5W and 30W, the subtractions 57000-5W, 1000-eps and
// 161000-30W, the product (57000-5W)(1000-eps), the product with DEPS, their
// difference, and a final constant multiplier. The bracket is computed exactly
// in integers (kelvin x10^6); the final multiplication by 1e-5 (the 0.001 of
// the formula times 0.01 for kelvin x1000 -> kelvin x10) uses a constant with
// lst_pkg::LST2_FRAC fractional bits, then the value is rounded to nearest and
// saturated to -32768..32767 (sat_o marks a saturated result).
//
// Interface and timing are those of lst1_part1: write_en pushes (w_i, eps_i),
// read_en pops one pair when both FIFOs hold data, and the result appears on
// lst2_o with valid_o high in cycle n+5 for a read in cycle n, one pixel per
// clock; the output register holds it until the next result.
// The formula and its operator structure follow the original published design; the output unit,
// the fixed-point format of the last scale, the stage split and the
// saturation are this design's.
module lst2_part2
  import lst_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned DEPS       = DEPS_X1000
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              write_en,
  input  logic              read_en,
  input  logic [DATA_W-1:0] w_i,
  input  logic [DATA_W-1:0] eps_i,
  output logic [DATA_W-1:0] lst2_o,
  output logic              valid_o,
  output logic              sat_o,
  output logic              empty_o,
  output logic              full_o,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] count_o
);

  // ---------------- FIFO3 (W) and FIFO4 (epsilon) ----------------
  logic [DATA_W-1:0] w_q, eps_q;
  logic              e3, e4, f3, f4, pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] c4;

  assign pop = read_en && !e3 && !e4;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo3 (
    .clk(clock), .reset(reset), .wr_en(write_en), .wr_data(w_i),
    .rd_en(pop), .rd_data(w_q), .full(f3), .empty(e3), .count(count_o));

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo4 (
    .clk(clock), .reset(reset), .wr_en(write_en), .wr_data(eps_i),
    .rd_en(pop), .rd_data(eps_q), .full(f4), .empty(e4), .count(c4));

  // Both FIFOs are written and read together, so they hold the same count.
  a_fifos_aligned: assert property (@(posedge clock) disable iff (reset)
    count_o == c4);

  assign empty_o = e3 || e4;
  assign full_o  = f3 || f4;

  // ---------------- datapath ----------------
  localparam longint ROUND = 64'd1 <<< (LST2_FRAC - 1);
  localparam longint MAXV  = 64'd32767;
  localparam longint MINV  = -64'sd32768;

  logic [PART_STAGES-1:0] v;
  logic signed [63:0] s1_a, s1_b, s1_c;  // 57000-5W, 1000-eps, 161000-30W
  logic signed [63:0] s2_p, s2_q;        // a*b, c*DEPS
  logic signed [63:0] s3_r;              // bracket, kelvin x10^6
  logic signed [95:0] s4_m;              // bracket * 1e-5 * 2^LST2_FRAC
  logic signed [95:0] rounded;

  assign rounded = (s4_m + 96'(ROUND)) >>> LST2_FRAC;

  always_ff @(posedge clock) begin
    if (reset) v <= '0;
    else       v <= {v[PART_STAGES-2:0], pop};

    s1_a <= C2_A0 - C2_A1 * 64'(w_q);
    s1_b <= C2_B0 - 64'(eps_q);
    s1_c <= C2_C0 - C2_C1 * 64'(w_q);

    s2_p <= s1_a * s1_b;
    s2_q <= s1_c * 64'(DEPS);

    s3_r <= s2_p - s2_q;

    s4_m <= 96'(s3_r) * 96'(C2_OUT);

    // The output register holds the last result between pixels.
    if (v[PART_STAGES-2]) begin
      if (rounded > 96'(MAXV)) begin
        lst2_o <= 16'h7fff;
        sat_o  <= 1'b1;
      end else if (rounded < 96'(MINV)) begin
        lst2_o <= 16'h8000;
        sat_o  <= 1'b1;
      end else begin
        lst2_o <= rounded[DATA_W-1:0];
        sat_o  <= 1'b0;
      end
    end
  end

  assign valid_o = v[PART_STAGES-1];

endmodule
