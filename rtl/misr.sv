// Multiple input signature register (MISR) with internal XOR feedback.
//
// Stage i+1 (bit i) takes the value of stage i+2 XORed with its input bit;
// the last stage takes only its input. The output of stage 1 (bit 0) is fed
// back into every stage whose FB_TAPS bit is set, always including the last.
// With M = 6 and FB_TAPS = 6'b110110 this is the 6-stage example register
// whose symbolic contents after three shifts are
//   M1 = X1^O3^O8^O13, ..., M6 = O2^X3^X4.
// With more inputs than stages, input k enters stage (k mod M); the 32-bit
// feedback polynomial (x^32+x^22+x^2+x+1) and that folding are assumptions.
// clear (synchronous, takes priority) starts a new X-cancel window; en
// compacts one set of input bits per clock. Reset clears the register.
module misr #(
  parameter int unsigned M       = xh_pkg::DEF_M,
  parameter int unsigned N_IN    = xh_pkg::DEF_N_CHAINS,
  parameter logic [M-1:0] FB_TAPS = xh_pkg::DEF_FB_TAPS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            clear,
  input  logic [N_IN-1:0] din,
  output logic [M-1:0]    state
);

  logic [M-1:0] folded;  // inputs XOR-folded onto the M stages
  logic [M-1:0] nxt;

  always_comb begin
    folded = '0;
    for (int unsigned k = 0; k < N_IN; k++) folded[k % M] ^= din[k];
  end

  always_comb begin
    nxt = ({1'b0, state[M-1:1]}) ^ folded ^ (FB_TAPS & {M{state[0]}});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (clear) state <= '0;
    else if (en)    state <= nxt;
  end

endmodule
