// lst_adder: final stage of the LST-SW engine, LST = LST1 + LST2.
//
// A 16-bit unsigned adder followed by an output register with a valid/ready
// handshake. LST1 is unsigned kelvin x10 and LST2 a two's-complement kelvin
// x10 correction; the sum modulo 2^16 is therefore the correct LST whenever
// the true result lies in 0..65535, so a plain unsigned adder is enough.
//
// Interface: a new sum is taken when valid_i is high and ready_o is high;
// ready_o is high when the output register is empty or is being read in the
// same cycle (ready_i). s_o holds until ready_i takes it.
//
// Timing: the sum appears on s_o with valid_o high one edge after it is taken.
// The adder itself follows the original published design; the output register and the handshake
// are this design's choices.
module lst_adder
  import lst_pkg::*;
(
  input  logic              clock,
  input  logic              reset,
  input  logic              valid_i,
  output logic              ready_o,
  input  logic [DATA_W-1:0] a_i,
  input  logic [DATA_W-1:0] b_i,
  output logic              valid_o,
  input  logic              ready_i,
  output logic [DATA_W-1:0] s_o
);

  assign ready_o = !valid_o || ready_i;

  always_ff @(posedge clock) begin
    if (reset) begin
      valid_o <= 1'b0;
    end else if (ready_o) begin
      valid_o <= valid_i;
    end
    if (ready_o && valid_i) s_o <= a_i + b_i;
  end

endmodule
