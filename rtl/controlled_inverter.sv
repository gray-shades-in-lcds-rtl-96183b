// controlled_inverter: complements the gray-shade data bits on their way
// from the image memory to the column driver while the polarity signal is
// set.
//
// With the simplified common selection block, the voltage a gray shade g
// needs after polarity reversal is the one gray shade -g uses before it.
// Symmetric shades have complementary codes, so inverting every data bit
// performs the polarity reversal of the column waveform. Purely
// combinational: dout = din xor {X{inv}}.
//
// From the document: the block and its control by Q1. The XOR form is this
// design's own (the simplest circuit with that function).
module controlled_inverter #(
  parameter int unsigned X = $clog2(am_pkg::G_DEFAULT)
) (
  input  logic         inv,
  input  logic [X-1:0] din,
  output logic [X-1:0] dout
);

  assign dout = din ^ {X{inv}};

endmodule
