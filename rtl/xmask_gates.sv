// X-masking gates at the compactor inputs.
//
// One AND gate per scan chain sits between the chain's scan-out and the MISR.
// A control bit of 1 masks the chain: the gate sees the inverted control bit
// and passes a constant 0, so an unknown value captured in that cell never
// enters the MISR. A control bit of 0 passes the scan-out bit unchanged.
// The AND gates and the "1 = mask" convention follow the described
// architecture; the gates are purely combinational.
module xmask_gates #(
  parameter int unsigned N_CHAINS = xh_pkg::DEF_N_CHAINS
) (
  input  logic [N_CHAINS-1:0] scan_out,  // bits leaving the scan chains
  input  logic [N_CHAINS-1:0] mask,      // 1 = mask this chain this cycle
  output logic [N_CHAINS-1:0] masked     // to the MISR inputs
);

  always_comb masked = scan_out & ~mask;

endmodule
