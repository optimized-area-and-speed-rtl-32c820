// misr: multiple-input signature register for output response compaction.
//
// Each enabled cycle the signature shifts like the LFSR (polynomial
// x^128 + x^126 + x^101 + x^99 + 1, feedback into bit 0) and the 128-bit response word is
// XORed into all stages in parallel:
//     signature <= {signature[W-2:0], fb} ^ din
// After a test run the signature stands for the whole response sequence; a single wrong
// response bit always changes it. The original description names the register; polynomial, reset value
// (zero, synchronous active-low) and the shift direction are this design's choices.
module misr #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] signature
);
  logic fb;
  assign fb = signature[WIDTH-1] ^ signature[WIDTH-3] ^ signature[WIDTH-28] ^ signature[WIDTH-30];

  always_ff @(posedge clk) begin
    if (!rst_n)  signature <= '0;
    else if (en) signature <= {signature[WIDTH-2:0], fb} ^ din;
  end
endmodule
