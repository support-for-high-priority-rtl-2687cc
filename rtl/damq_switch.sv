// damq_switch: n x n packet switch with DAMQ input buffers and support for
// high-priority traffic.
//
// Each input port has one DAMQ buffer (damq_buffer) holding n normal queues,
// one per output port, and one high-priority queue, all sharing the buffer's
// blocks. A packet whose header byte has the priority bit set goes to the
// high-priority queue. The arbiter (xbar_arbiter) connects buffer queues to
// output ports through the crossbar (crossbar), routing the heads of the
// high-priority queues before any normal queue is considered. A connection
// lasts for one packet; blocks stream through as they arrive (virtual
// cut-through), one block per cycle per port.
//
// Interface: per input port a valid/ready link carrying flit_t blocks, per
// output port the same. ROUTE_LSB selects the header bits giving the output
// port, so the same switch serves each stage of a multistage network.
// Timing: a block that arrives in cycle t is stored at the end of t. If the
// output is idle, the packet is granted in t+1 and its first block leaves in
// t+2 (two cycles through the switch); later blocks follow one per cycle.
// Observation outputs: free blocks per buffer and one-cycle pulses for each new
// connection made by the high-priority or the normal arbitration pass.
// The organisation follows the document; the link protocol and cycle timing are
// this design's.
module damq_switch
  import switch_pkg::*;
#(
  parameter int unsigned N_PORTS    = 4,
  parameter int unsigned NUM_BLOCKS = 8,
  parameter int unsigned ROUTE_LSB  = 0,
  localparam int unsigned CW        = $clog2(NUM_BLOCKS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // input ports
  input  logic  [N_PORTS-1:0]        in_valid,
  output logic  [N_PORTS-1:0]        in_ready,
  input  flit_t [N_PORTS-1:0]        in_flit,
  // output ports
  output logic  [N_PORTS-1:0]        out_valid,
  input  logic  [N_PORTS-1:0]        out_ready,
  output flit_t [N_PORTS-1:0]        out_flit,
  // observation
  output logic  [N_PORTS-1:0][CW-1:0] free_count,
  output logic  [N_PORTS-1:0]        hp_grant,
  output logic  [N_PORTS-1:0]        norm_grant
);

  localparam int unsigned NQ = N_PORTS + 1;
  localparam int unsigned QW = $clog2(NQ + 1);
  localparam int unsigned SW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  logic  [N_PORTS-1:0][NQ-1:0] q_nonempty;
  logic  [N_PORTS-1:0][SW-1:0] hp_port;
  logic  [N_PORTS-1:0][QW-1:0] in_q;
  logic  [N_PORTS-1:0]         in_active;
  logic  [N_PORTS-1:0]         rd_en, rd_avail;
  flit_t [N_PORTS-1:0]         rd_flit;
  logic  [N_PORTS-1:0]         out_active, xfer_last;
  logic  [N_PORTS-1:0][SW-1:0] out_sel;

  for (genvar i = 0; i < N_PORTS; i++) begin : g_buf
    damq_buffer #(
      .N_PORTS   (N_PORTS),
      .NUM_BLOCKS(NUM_BLOCKS),
      .ROUTE_LSB (ROUTE_LSB)
    ) u_buf (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid[i]),
      .in_ready  (in_ready[i]),
      .in_flit   (in_flit[i]),
      .rd_q      (in_q[i]),
      .rd_en     (rd_en[i]),
      .rd_avail  (rd_avail[i]),
      .rd_flit   (rd_flit[i]),
      .q_nonempty(q_nonempty[i]),
      .hp_port   (hp_port[i]),
      .free_count(free_count[i])
    );
  end

  xbar_arbiter #(.N_PORTS(N_PORTS)) u_arb (
    .clk       (clk),
    .rst_n     (rst_n),
    .q_nonempty(q_nonempty),
    .hp_port   (hp_port),
    .xfer_last (xfer_last),
    .out_active(out_active),
    .out_sel   (out_sel),
    .in_active (in_active),
    .in_q      (in_q),
    .hp_grant  (hp_grant),
    .norm_grant(norm_grant)
  );

  crossbar #(.N_PORTS(N_PORTS)) u_xbar (
    .in_flit  (rd_flit),
    .in_avail (rd_avail & in_active),
    .in_rd_en (rd_en),
    .active   (out_active),
    .sel      (out_sel),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_flit (out_flit),
    .xfer_last(xfer_last)
  );

endmodule
