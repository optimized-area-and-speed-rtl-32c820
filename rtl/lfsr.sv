// lfsr: test pattern generator, a maximal-length Fibonacci LFSR.
//
// The register shifts left by one bit each enabled cycle; the new bit 0 is the XOR of the
// bits at taps 128, 126, 101 and 99 (polynomial x^128 + x^126 + x^101 + x^99 + 1, a
// primitive polynomial, so all 2^128-1 non-zero states are visited before repeating).
// The all-zero state is never reached from a non-zero seed. The whole register is the
// pattern applied to the circuit under test.
// Timing: state changes on the rising clock edge when en is high; a synchronous active-low
// reset loads SEED (non-zero). Width 128 and the maximal length follow the original description; the
// tap set, the Fibonacci form, the seed and the reset are this design's choices.
module lfsr #(
  parameter int unsigned     WIDTH = 128,
  parameter logic [127:0]    SEED  = 128'h1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state
);
  // Tap positions (1-based) of the feedback polynomial for WIDTH = 128.
  localparam int unsigned T1 = WIDTH;
  localparam int unsigned T2 = WIDTH - 2;
  localparam int unsigned T3 = WIDTH - 27;
  localparam int unsigned T4 = WIDTH - 29;

  logic feedback;
  assign feedback = state[T1-1] ^ state[T2-1] ^ state[T3-1] ^ state[T4-1];

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED[WIDTH-1:0];
    else if (en) state <= {state[WIDTH-2:0], feedback};
  end

  initial assert (WIDTH > 29) else $error("lfsr: WIDTH must exceed 29");
endmodule
