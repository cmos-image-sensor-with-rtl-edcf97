// bs_gen: pseudo-random bit-stream generator BS[1:m] for the signal selectors.
//
// A 64-stage linear-feedback shift register. Its stages are the bit streams:
// bs[0] is BS[1], bs[63] is BS[64]. Each step shifts every stage one place
// (BS[j+1] takes the old BS[j]) and BS[1] takes the feedback bit, so stream
// j+1 is stream j delayed by one ADC clock. Modes with fewer samples per block
// (m = 32 or 16) use BS[1:m] only.
//
// load copies seed into the register (a zero seed, which would lock the
// register, is replaced by all ones); step advances one position. Loading
// the same seed before the reset-level and the signal-level conversion gives
// both the same measurement matrix, which digital CDS requires.
// The 64-bit length follows the design description; the feedback taps
// (stages 64, 63, 61, 60, a maximal-length polynomial) and the seed
// handling are this implementation's choice.
module bs_gen #(
  parameter int unsigned M = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  input  logic [M-1:0] seed,
  output logic [M-1:0] bs
);

  logic fb;
  assign fb = bs[M-1] ^ bs[M-2] ^ bs[M-4] ^ bs[M-5];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    bs <= '1;
    else if (load) bs <= (seed == '0) ? '1 : seed;
    else if (step) bs <= {bs[M-2:0], fb};

endmodule
