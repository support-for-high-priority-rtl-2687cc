// omega_network: multistage Omega interconnection network of DAMQ switches
// with high-priority queues.
//
// NODES = RADIX**STAGES nodes (default 64) are connected through STAGES stages
// (default three) of NODES/RADIX RADIX x RADIX switches (default sixteen 4x4
// switches per stage, 48 in all), the network in which the switch is evaluated.
// Before every stage the lines pass through a RADIX-way perfect shuffle: line x,
// written as base-RADIX digits, moves to the line whose digits are x's rotated
// left by one digit. Switch k of a stage takes lines k*RADIX .. k*RADIX+RADIX-1
// as its input ports and drives the same lines from its output ports. Stage s
// routes on destination digit STAGES-1-s (most significant digit first), which
// after the last stage leaves every packet on the line equal to its
// destination address. The shuffle wiring and digit routing are the standard
// Omega construction; the document names the network, its size and its switch
// size but does not draw it.
//
// Interface: one valid/ready flit_t link into the network per source node and
// one out of it per destination node; the header byte of a packet's first
// block carries the priority bit and the destination address. hp_grant and
// norm_grant bring out, per stage and switch output line, the one-cycle pulses
// of new connections made by each arbitration pass. Timing: each stage adds at
// least two cycles (see damq_switch), so the minimum latency of a packet's first
// block is 2*STAGES cycles.
module omega_network
  import switch_pkg::*;
#(
  parameter int unsigned RADIX      = 4,
  parameter int unsigned STAGES     = 3,
  parameter int unsigned NUM_BLOCKS = 8,
  localparam int unsigned NODES     = RADIX ** STAGES,
  localparam int unsigned SW        = (RADIX > 1) ? $clog2(RADIX) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic  [NODES-1:0]             src_valid,
  output logic  [NODES-1:0]             src_ready,
  input  flit_t [NODES-1:0]             src_flit,
  output logic  [NODES-1:0]             dst_valid,
  input  logic  [NODES-1:0]             dst_ready,
  output flit_t [NODES-1:0]             dst_flit,
  output logic  [STAGES-1:0][NODES-1:0] hp_grant,
  output logic  [STAGES-1:0][NODES-1:0] norm_grant
);

  localparam int unsigned NSW = NODES / RADIX;
  localparam int unsigned CW  = $clog2(NUM_BLOCKS + 1);

  // Line x moves to shuffle(x) in front of every stage.
  function automatic int unsigned shuffle(input int unsigned x);
    return ((x * RADIX) % NODES) + (x / (NODES / RADIX));
  endfunction

  // line_*[s] are the lines entering the shuffle in front of stage s;
  // line_*[STAGES] are the network outputs.
  logic  [STAGES:0][NODES-1:0] line_valid, line_ready;
  flit_t [STAGES:0][NODES-1:0] line_flit;

  // Switch-side lines of each stage (after the shuffle).
  logic  [STAGES-1:0][NODES-1:0] sw_valid, sw_ready;
  flit_t [STAGES-1:0][NODES-1:0] sw_flit;

  assign line_valid[0] = src_valid;
  assign line_flit[0]  = src_flit;
  assign src_ready     = line_ready[0];

  assign dst_valid            = line_valid[STAGES];
  assign dst_flit             = line_flit[STAGES];
  assign line_ready[STAGES]   = dst_ready;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar x = 0; x < NODES; x++) begin : g_shuf
      localparam int unsigned Y = shuffle(x);
      assign sw_valid[s][Y]   = line_valid[s][x];
      assign sw_flit[s][Y]    = line_flit[s][x];
      assign line_ready[s][x] = sw_ready[s][Y];
    end
    for (genvar k = 0; k < NSW; k++) begin : g_sw
      logic [RADIX-1:0][CW-1:0] free_count;
      damq_switch #(
        .N_PORTS   (RADIX),
        .NUM_BLOCKS(NUM_BLOCKS),
        .ROUTE_LSB (SW * (STAGES - 1 - s))
      ) u_sw (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (sw_valid[s][k*RADIX +: RADIX]),
        .in_ready  (sw_ready[s][k*RADIX +: RADIX]),
        .in_flit   (sw_flit[s][k*RADIX +: RADIX]),
        .out_valid (line_valid[s+1][k*RADIX +: RADIX]),
        .out_ready (line_ready[s+1][k*RADIX +: RADIX]),
        .out_flit  (line_flit[s+1][k*RADIX +: RADIX]),
        .free_count(free_count),
        .hp_grant  (hp_grant[s][k*RADIX +: RADIX]),
        .norm_grant(norm_grant[s][k*RADIX +: RADIX])
      );
    end
  end

endmodule
