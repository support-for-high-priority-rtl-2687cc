// xbar_arbiter: crossbar arbiter of an n x n DAMQ switch with high-priority
// queues.
//
// It decides which input buffer queue is connected to which output port. A
// connection is made for a whole packet and held until the packet's last block
// has crossed; each input buffer has one read port, so an input feeds at most
// one output at a time. Every cycle the idle outputs are matched to idle inputs
// in two passes:
//   1. high-priority pass: each idle input whose high-priority queue is not
//      empty asks for the output its head packet is routed to (hp_port); the
//      inputs are visited in round-robin order.
//   2. normal pass: only then, each output still idle is offered to the idle
//      inputs whose normal queue for that output is not empty, again in
//      round-robin order, one pointer per output.
// So normal packets get an output only after every high-priority packet at the
// head of a high-priority queue has been tried, as the document requires. The
// round-robin order, the greedy matching and the packet-long connections are
// this design's choices; the document does not describe the arbiter's insides.
//
// Timing: grants are registered. A grant made in cycle t is in effect from
// t+1. A connection ends in the cycle its last block crosses (xfer_last) and
// the output can be granted again in the next cycle, so one idle cycle
// separates two packets on an output.
//
// Outputs: out_active/out_sel per output give the crossbar setting; in_active
// and in_q per input give the queue each input buffer reads (in_q = N_PORTS is
// the high-priority queue). hp_grant/norm_grant pulse for one cycle per new
// connection, marking which pass made it.
module xbar_arbiter #(
  parameter int unsigned N_PORTS = 4,
  localparam int unsigned NQ = N_PORTS + 1,
  localparam int unsigned QW = $clog2(NQ + 1),
  localparam int unsigned SW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // requests from the input buffers
  input  logic [N_PORTS-1:0][NQ-1:0]  q_nonempty,   // [input][queue]
  input  logic [N_PORTS-1:0][SW-1:0]  hp_port,      // output of each HP queue head
  // end of packet on each output
  input  logic [N_PORTS-1:0]          xfer_last,
  // crossbar setting
  output logic [N_PORTS-1:0]          out_active,
  output logic [N_PORTS-1:0][SW-1:0]  out_sel,      // input connected to each output
  output logic [N_PORTS-1:0]          in_active,
  output logic [N_PORTS-1:0][QW-1:0]  in_q,         // queue read by each input
  // new connections this cycle
  output logic [N_PORTS-1:0]          hp_grant,     // per output, made by the HP pass
  output logic [N_PORTS-1:0]          norm_grant    // per output, made by the normal pass
);

  // Connection state, per output.
  logic [N_PORTS-1:0]         conn_v;
  logic [N_PORTS-1:0][SW-1:0] conn_in;
  logic [N_PORTS-1:0]         conn_hp;

  // Round-robin pointers.
  logic [SW-1:0]              rr_hp;
  logic [N_PORTS-1:0][SW-1:0] rr_out;

  // Next-cycle matching.
  logic [N_PORTS-1:0]         out_busy, in_busy;
  logic [N_PORTS-1:0]         g_hp, g_norm;
  logic [N_PORTS-1:0][SW-1:0] g_in;
  logic [SW-1:0]              rr_hp_n;
  logic [N_PORTS-1:0][SW-1:0] rr_out_n;

  always_comb begin
    out_busy = conn_v;
    in_busy  = '0;
    for (int o = 0; o < N_PORTS; o++)
      if (conn_v[o]) in_busy[conn_in[o]] = 1'b1;

    g_hp     = '0;
    g_norm   = '0;
    g_in     = '0;
    rr_hp_n  = rr_hp;
    rr_out_n = rr_out;

    // Pass 1: high-priority queue heads.
    for (int k = 0; k < N_PORTS; k++) begin
      int unsigned i;
      int unsigned o;
      i = (int'(rr_hp) + k) % N_PORTS;
      o = int'(hp_port[i]);
      if (!in_busy[i] && q_nonempty[i][N_PORTS] && !out_busy[o]) begin
        in_busy[i]  = 1'b1;
        out_busy[o] = 1'b1;
        g_hp[o]     = 1'b1;
        g_in[o]     = SW'(i);
        rr_hp_n     = SW'((i + 1) % N_PORTS);
      end
    end

    // Pass 2: normal queues, per idle output.
    for (int o = 0; o < N_PORTS; o++) begin
      for (int k = 0; k < N_PORTS; k++) begin
        int unsigned i;
        i = (int'(rr_out[o]) + k) % N_PORTS;
        if (!out_busy[o] && !in_busy[i] && q_nonempty[i][o]) begin
          in_busy[i]  = 1'b1;
          out_busy[o] = 1'b1;
          g_norm[o]   = 1'b1;
          g_in[o]     = SW'(i);
          rr_out_n[o] = SW'((i + 1) % N_PORTS);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      conn_v  <= '0;
      conn_in <= '0;
      conn_hp <= '0;
      rr_hp   <= '0;
      rr_out  <= '0;
    end else begin
      rr_hp  <= rr_hp_n;
      rr_out <= rr_out_n;
      for (int o = 0; o < N_PORTS; o++) begin
        if (conn_v[o]) begin
          if (xfer_last[o]) conn_v[o] <= 1'b0;
        end else if (g_hp[o] || g_norm[o]) begin
          conn_v[o]  <= 1'b1;
          conn_in[o] <= g_in[o];
          conn_hp[o] <= g_hp[o];
        end
      end
    end
  end

  always_comb begin
    in_active = '0;
    in_q      = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      if (conn_v[o]) begin
        in_active[conn_in[o]] = 1'b1;
        in_q[conn_in[o]]      = conn_hp[o] ? QW'(N_PORTS) : QW'(o);
      end
    end
  end

  assign out_active = conn_v;
  assign out_sel    = conn_in;
  assign hp_grant   = g_hp;
  assign norm_grant = g_norm;

  // An end of packet is only reported on a connected output.
  assert property (@(posedge clk) disable iff (!rst_n) (xfer_last & ~conn_v) == '0)
    else $error("xbar_arbiter: end of packet on an idle output");

endmodule
