// damq_storage: the block storage array of one DAMQ input buffer.
//
// NUM_BLOCKS entries of BLOCK_BITS bits (default eight blocks of eight bytes,
// the buffer size quoted for the original single-chip switch). One synchronous
// write port is used by the input link; one asynchronous read port feeds the
// crossbar, so a block written at the end of cycle t can be read during cycle
// t+1, which gives virtual cut-through at block granularity. The array holds no
// reset: the buffer control never reads a block it has not written. The
// document only names this array; the port arrangement is this design's.
module damq_storage #(
  parameter int unsigned NUM_BLOCKS = 8,
  parameter int unsigned BLOCK_BITS = 64,
  localparam int unsigned PW = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [PW-1:0]         waddr,
  input  logic [BLOCK_BITS-1:0] wdata,
  input  logic [PW-1:0]         raddr,
  output logic [BLOCK_BITS-1:0] rdata
);

  logic [BLOCK_BITS-1:0] mem [NUM_BLOCKS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
