// switch_pkg: types and constants shared by the DAMQ switch and the Omega network.
//
// A packet travels as a sequence of blocks. One block is the unit of buffer
// storage (eight bytes, as in the buffer organisation this design follows) and
// also the unit moved over a link in one clock cycle, so a link is 64 data bits
// wide plus a "last block of packet" flag. Byte 0 of the first block of every
// packet is the header byte:
//
//   bit 7      high-priority mark (set by the sender)
//   bit 6      unused
//   bits 5:0   destination node address (64 nodes)
//
// Each switch takes its 2-bit output-port number from a field of the
// destination address selected by a parameter, so the same switch serves every
// stage of a multistage network. The header layout and the block-per-cycle link
// are choices of this design; the priority bit in the header byte and the
// eight-byte block follow the buffer organisation it implements.
package switch_pkg;

  localparam int unsigned BLOCK_BYTES = 8;
  localparam int unsigned BLOCK_BITS  = BLOCK_BYTES * 8;
  localparam int unsigned ADDR_BITS   = 6;
  localparam int unsigned HDR_PRIO_BIT = 7;

  // One link transfer: one buffer block.
  typedef struct packed {
    logic                  last;   // final block of the packet
    logic [BLOCK_BITS-1:0] data;   // byte 0 (bits 7:0) is the header byte in a first block
  } flit_t;

  // Build a header byte.
  function automatic logic [7:0] make_header(input logic prio, input logic [ADDR_BITS-1:0] dest);
    return {prio, 1'b0, dest};
  endfunction

endpackage
