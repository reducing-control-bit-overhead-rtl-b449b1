// Partition mask buffer (the masking logic that feeds the AND gates).
//
// The X-masking control bits of one pattern partition are loaded once and
// then reused for every pattern of that partition, which is what cuts the
// masking control data from (cells x patterns) to (cells x partitions).
// The buffer stores one N_CHAINS-bit column per shift position: column k is
// the mask for the k-th bit to leave every chain (k = 0 is the cell nearest
// scan-out). Writes are synchronous, one column per clock; the read is
// asynchronous so that the column belongs to the same cycle as the bits it
// masks. Memory organisation and timing are this design's choices.
module mask_buffer #(
  parameter int unsigned N_CHAINS  = xh_pkg::DEF_N_CHAINS,
  parameter int unsigned CHAIN_LEN = xh_pkg::DEF_CHAIN_LEN,
  localparam int unsigned AW = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [N_CHAINS-1:0] wdata,
  input  logic [AW-1:0]       raddr,
  output logic [N_CHAINS-1:0] rdata
);

  logic [N_CHAINS-1:0] mem [CHAIN_LEN];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb rdata = mem[raddr];

endmodule
