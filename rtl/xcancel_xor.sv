// Selective XOR network of the X-canceling MISR.
//
// While the scan shift is halted the tester sends one M-bit control word per
// cycle; the word selects a set of MISR bits that Gaussian elimination found
// to be linearly dependent in the X's, and the XOR of those bits is an X-free
// signature bit. For the 6-stage example the two words 101010 and 100100
// (M1^M3^M5 and M1^M4) give the two X-free bits. The network is an AND with
// the control word followed by an XOR reduction; purely combinational.
module xcancel_xor #(
  parameter int unsigned M = xh_pkg::DEF_M
) (
  input  logic [M-1:0] misr_state,  // bit 0 = M1
  input  logic [M-1:0] sel,         // 1 = include that MISR bit
  output logic         xfree
);

  always_comb xfree = ^(misr_state & sel);

endmodule
