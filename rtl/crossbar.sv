// crossbar: n x n crossbar of the DAMQ switch, with its flow-control return
// path.
//
// Each output port carries the read port of the input buffer selected by the
// arbiter (sel, active). The output's valid is the selected buffer's rd_avail,
// so during virtual cut-through the output simply idles while the next block of
// the packet has not yet arrived. The return path tells each input buffer to
// pop its head block (rd_en) in the cycle the block is accepted downstream
// (valid and ready), and xfer_last marks the cycle the last block of a packet
// crosses an output. Purely combinational. The document names the crossbar;
// the valid/ready handshake on each port is this design's choice.
module crossbar
  import switch_pkg::*;
#(
  parameter int unsigned N_PORTS = 4,
  localparam int unsigned SW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  // from the input buffers
  input  flit_t [N_PORTS-1:0]         in_flit,
  input  logic  [N_PORTS-1:0]         in_avail,
  output logic  [N_PORTS-1:0]         in_rd_en,
  // setting from the arbiter
  input  logic  [N_PORTS-1:0]         active,
  input  logic  [N_PORTS-1:0][SW-1:0] sel,
  // output ports
  output logic  [N_PORTS-1:0]         out_valid,
  input  logic  [N_PORTS-1:0]         out_ready,
  output flit_t [N_PORTS-1:0]         out_flit,
  output logic  [N_PORTS-1:0]         xfer_last
);

  always_comb begin
    in_rd_en = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      out_flit[o]  = in_flit[sel[o]];
      out_valid[o] = active[o] && in_avail[sel[o]];
      xfer_last[o] = out_valid[o] && out_ready[o] && out_flit[o].last;
      if (out_valid[o] && out_ready[o]) in_rd_en[sel[o]] = 1'b1;
    end
  end

endmodule
