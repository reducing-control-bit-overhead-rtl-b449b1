// Hybrid X-masking / X-canceling output response compactor.
//
// Unknown (X) values in scan responses corrupt a MISR signature. This design
// removes most of them with X-masking and cancels the rest in the MISR:
//  * X-masking: the test patterns are grouped into partitions whose X's fall
//    on the same scan cells. One mask (CHAIN_LEN columns of N_CHAINS bits)
//    is loaded per partition into mask_buffer and reused for every pattern
//    of the partition; xmask_gates force masked cells to 0. Only cells that
//    are X in every pattern of the partition are masked, so no observable
//    value is lost.
//  * X-canceling: the remaining X's enter the M-stage misr. When the tester
//    knows that M-Q X's are in the register it asserts cancel_req; scan
//    shifting halts for Q cycles while xcancel_xor XORs the MISR bits chosen
//    by each M-bit control word into one X-free bit (xfree_bit), and the MISR
//    is then cleared.
// Tester channels (chan_in) carry a mask column in each load cycle (low
// N_CHAINS bits) and a selection word in each cancel cycle (low M bits).
// Timing: load_start or pat_start in cycle t starts work in cycle t+1; a
// cancel_req cycle is itself the first of the Q cancel cycles, so its
// selection word must be on chan_in in that cycle. A load takes CHAIN_LEN
// cycles, a pattern CHAIN_LEN shift cycles plus Q cycles per halt.
// The scan chains belong to the circuit under test: scan_shift drives their
// shift enable and scan_out are their serial outputs.
module xhybrid_top #(
  parameter int unsigned N_CHAINS  = xh_pkg::DEF_N_CHAINS,
  parameter int unsigned CHAIN_LEN = xh_pkg::DEF_CHAIN_LEN,
  parameter int unsigned M         = xh_pkg::DEF_M,
  parameter int unsigned Q         = xh_pkg::DEF_Q,
  parameter int unsigned CHANNELS  = xh_pkg::DEF_CHANNELS,
  parameter logic [M-1:0] FB_TAPS  = xh_pkg::DEF_FB_TAPS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load_start,
  input  logic                pat_start,
  input  logic                cancel_req,
  input  logic [CHANNELS-1:0] chan_in,
  input  logic [N_CHAINS-1:0] scan_out,
  output logic                scan_shift,
  output logic                xfree_valid,
  output logic                xfree_bit,
  output logic                pat_done,
  output logic                load_done,
  output logic                busy
);

  localparam int unsigned AW = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1;

  logic          mask_we, cancel_active, misr_clear;
  logic [AW-1:0] mask_waddr, mask_raddr;
  logic [N_CHAINS-1:0] mask_col, masked;
  logic [M-1:0]  misr_state;

  hybrid_ctrl #(.CHAIN_LEN(CHAIN_LEN), .Q(Q)) u_ctrl (
    .clk, .rst_n, .load_start, .pat_start, .cancel_req,
    .mask_we, .mask_waddr, .mask_raddr, .scan_shift, .cancel_active,
    .misr_clear, .pat_done, .load_done, .busy
  );

  mask_buffer #(.N_CHAINS(N_CHAINS), .CHAIN_LEN(CHAIN_LEN)) u_mask (
    .clk, .we(mask_we), .waddr(mask_waddr), .wdata(chan_in[N_CHAINS-1:0]),
    .raddr(mask_raddr), .rdata(mask_col)
  );

  xmask_gates #(.N_CHAINS(N_CHAINS)) u_gates (
    .scan_out, .mask(mask_col), .masked
  );

  misr #(.M(M), .N_IN(N_CHAINS), .FB_TAPS(FB_TAPS)) u_misr (
    .clk, .rst_n, .en(scan_shift), .clear(misr_clear), .din(masked),
    .state(misr_state)
  );

  xcancel_xor #(.M(M)) u_xc (
    .misr_state, .sel(chan_in[M-1:0]), .xfree(xfree_bit)
  );

  always_comb xfree_valid = cancel_active;

  initial begin
    assert (N_CHAINS <= CHANNELS && M <= CHANNELS)
      else $error("mask columns and selection words must fit the channels");
    assert (Q < M) else $error("Q must be below M");
  end

endmodule
