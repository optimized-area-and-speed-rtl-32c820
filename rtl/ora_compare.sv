// ora_compare: comparing half of the output response analyser.
//
// The practical result (from the circuit under test) and the theoretical result (from the
// reference copy) are compared with one XOR gate per bit, 128 in all; diff shows which
// bits disagree and fault is the OR of them. Combinational. The XOR comparison follows
// the original description; the OR reduction into a single flag is this design's choice.
module ora_compare #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] practical,
  input  logic [WIDTH-1:0] theoretical,
  output logic [WIDTH-1:0] diff,
  output logic             fault
);
  assign diff  = practical ^ theoretical;
  assign fault = |diff;
endmodule
