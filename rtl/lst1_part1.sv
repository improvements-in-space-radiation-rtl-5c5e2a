// lst1_part1: first part of the split-window LST, the brightness-temperature
// term
//     LST1 = 0.1*T4 + 0.14*(T4-T5) + 0.0032*(T4-T5)^2 + 0.83      [kelvin]
// with T4 and T5 in kelvin x10, delivered in kelvin x10.
//
// The block holds FIFO1 (T4) and FIFO2 (T5) and the datapath fed by them:
// one subtractor for T4-T5, a squarer, three constant multipliers for 0.1,
// 0.14 and 0.0032, the sum with 0.83, and a final constant multiplier that
// sets the output scale. The coefficients are fixed point with
// lst_pkg::LST1_FRAC fractional bits; the final step multiplies by 10 so the
// result has the unit of the inputs, then rounds to nearest and saturates to
// 0..65535 (sat_o marks a saturated result).
//
// Interface: write_en pushes (t4_i, t5_i) into both FIFOs unless they are
// full; read_en pops one pair into the datapath when the FIFOs are not empty.
// The caller keeps the two FIFOs in step by writing and reading them together.
//
// Timing: fully pipelined, one pixel per clock, five register stages
// (lst_pkg::PART_STAGES). A pair read in cycle n (read_en high, FIFOs not
// empty) gives lst1_o with valid_o high in cycle n+5; the output register
// then holds that result until the next one.
// The formula, its coefficients and its operator structure follow the original published design;
// the fixed-point format, the x10 output scale (where the operator diagram
// shows a 0.1 scale), the stage split and the saturation are this design's.
module lst1_part1
  import lst_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              write_en,
  input  logic              read_en,
  input  logic [DATA_W-1:0] t4_i,
  input  logic [DATA_W-1:0] t5_i,
  output logic [DATA_W-1:0] lst1_o,
  output logic              valid_o,
  output logic              sat_o,
  output logic              empty_o,
  output logic              full_o,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] count_o
);

  // ---------------- FIFO1 (T4) and FIFO2 (T5) ----------------
  logic [DATA_W-1:0] t4_q, t5_q;
  logic              e1, e2, f1, f2, pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] c2;

  assign pop = read_en && !e1 && !e2;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk(clock), .reset(reset), .wr_en(write_en), .wr_data(t4_i),
    .rd_en(pop), .rd_data(t4_q), .full(f1), .empty(e1), .count(count_o));

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk(clock), .reset(reset), .wr_en(write_en), .wr_data(t5_i),
    .rd_en(pop), .rd_data(t5_q), .full(f2), .empty(e2), .count(c2));

  // Both FIFOs are written and read together, so they hold the same count.
  a_fifos_aligned: assert property (@(posedge clock) disable iff (reset)
    count_o == c2);

  assign empty_o = e1 || e2;
  assign full_o  = f1 || f2;

  // ---------------- datapath ----------------
  localparam longint ROUND = 64'd1 <<< (LST1_FRAC - 1);
  localparam longint MAXV  = (64'd1 <<< DATA_W) - 1;

  logic [PART_STAGES-1:0] v;        // valid bit per stage
  logic signed [17:0] s1_t4, s1_d;  // stage 1: T4, T4-T5
  logic signed [63:0] s2_p1, s2_p2, s2_sq; // stage 2: 0.1T4, 0.14d, d^2
  logic signed [63:0] s3_lin, s3_p4;       // stage 3: 0.1T4+0.14d+0.83, 0.0032d^2
  logic signed [63:0] s4_sum;              // stage 4: LST1 in kelvin
  logic signed [63:0] scaled, rounded;

  always_comb begin
    scaled  = s4_sum * C1_OUT;
    rounded = (scaled + ROUND) >>> LST1_FRAC;
  end

  always_ff @(posedge clock) begin
    if (reset) v <= '0;
    else       v <= {v[PART_STAGES-2:0], pop};

    s1_t4  <= signed'({2'b00, t4_q});
    s1_d   <= signed'({2'b00, t4_q}) - signed'({2'b00, t5_q});

    s2_p1  <= 64'(s1_t4) * C1_T4;
    s2_p2  <= 64'(s1_d) * C1_DIFF;
    s2_sq  <= 64'(s1_d) * 64'(s1_d);

    s3_lin <= s2_p1 + s2_p2 + C1_OFS;
    s3_p4  <= s2_sq * C1_SQ;

    s4_sum <= s3_lin + s3_p4;

    // The output register holds the last result between pixels.
    if (v[PART_STAGES-2]) begin
      if (rounded < 0) begin
        lst1_o <= '0;
        sat_o  <= 1'b1;
      end else if (rounded > MAXV) begin
        lst1_o <= '1;
        sat_o  <= 1'b1;
      end else begin
        lst1_o <= rounded[DATA_W-1:0];
        sat_o  <= 1'b0;
      end
    end
  end

  assign valid_o = v[PART_STAGES-1];

endmodule
