// randomizer: noise insertion for one primary input.
//
// A single XOR gate flips the bit coming from the component synthesizer (or
// from a single Hadamard row) whenever the weighted random bit-stream r is 1,
// so a stream of weight W flips on average a fraction W of the bits, e.g. 25 %
// with W = 0.25. The flip rate is meant to be the reciprocal of the average run
// length of the input's test sequence. Structure as in the method;
// combinational, no clock.
module randomizer (
  input  logic d,   // bit-stream to perturb
  input  logic r,   // weighted random bit-stream
  output logic y    // noise-inserted bit-stream
);

  assign y = d ^ r;

endmodule
