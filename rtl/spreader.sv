// spreader: the spreading function of the DSSS transmitter.
//
// Each data bit is combined with the PN chip stream by exclusive-OR, as in
// the reference design: the output is the data bit while the chip is 0 and
// its inverse while the chip is 1. The result is the BPSK modulating bit.
// Purely combinational.
module spreader (
  input  logic data,
  input  logic chip,
  output logic spread
);
  always_comb spread = data ^ chip;
endmodule
