// damq_buffer: dynamically-allocated multi-queue (DAMQ) input-port buffer with
// a dedicated high-priority queue.
//
// The buffer's storage is a pool of NUM_BLOCKS blocks shared by all queues.
// Every block is on exactly one singly linked list: the free list, one of
// N_PORTS normal queues (one per output port of the switch), or the
// high-priority queue. Each list has a head register, a tail register and a
// block count; one "next" pointer per block links the lists. When the first
// block of a packet arrives, the queue is chosen from the header byte: the
// high-priority queue if the priority bit is set, otherwise the normal queue of
// the output port named by the routing field. Every block of the packet is
// taken from the head of the free list and linked to the rear of that queue.
// A block read out towards the crossbar is unlinked from the head of its queue
// and linked to the rear of the free list. Since only one packet at a time
// arrives at an input port, the blocks of a packet are contiguous in its queue.
//
// High-priority packets for different outputs share one queue, so each block
// also stores the output port of its packet (PORT_BITS extra bits per block);
// the arbiter reads the port of the high-priority head from hp_port.
//
// Interface and timing:
//   input link   in_valid/in_ready/in_flit, one block per cycle; in_ready is
//                high while the free list is not empty.
//   read port    rd_q selects a queue; rd_avail says it holds a block;
//                rd_flit is that queue's head block (combinational from
//                registers and the storage array); rd_en pops it at the clock
//                edge. A block written in cycle t can be read in cycle t+1
//                (virtual cut-through), even before the rest of its packet has
//                arrived.
//   status       q_nonempty (bit N_PORTS is the high-priority queue),
//                hp_port, free_count.
// The list structure (free list, head and tail registers, n+1 queues, per-block
// port bits) follows the document; the block counts, the header layout, the
// single-block-per-cycle link and the reset state are this design's choices.
module damq_buffer
  import switch_pkg::*;
#(
  parameter int unsigned N_PORTS    = 4,
  parameter int unsigned NUM_BLOCKS = 8,
  parameter int unsigned ROUTE_LSB  = 0,   // header bit where the output-port field starts
  localparam int unsigned NQ        = N_PORTS + 1,        // queues: normal 0..N_PORTS-1, HP = N_PORTS
  localparam int unsigned QW        = $clog2(NQ + 1),
  localparam int unsigned PORT_BITS = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  localparam int unsigned PW        = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1,
  localparam int unsigned CW        = $clog2(NUM_BLOCKS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input link
  input  logic                 in_valid,
  output logic                 in_ready,
  input  flit_t                in_flit,
  // read port towards the crossbar
  input  logic [QW-1:0]        rd_q,
  input  logic                 rd_en,
  output logic                 rd_avail,
  output flit_t                rd_flit,
  // status for the arbiter
  output logic [NQ-1:0]        q_nonempty,
  output logic [PORT_BITS-1:0] hp_port,
  output logic [CW-1:0]        free_count
);

  localparam int unsigned FREE = NQ;          // list index of the free list
  localparam int unsigned HPQ  = N_PORTS;     // list index of the high-priority queue

  // List registers: index 0..NQ-1 are queues, NQ is the free list.
  logic [PW-1:0] head  [NQ+1];
  logic [PW-1:0] tail  [NQ+1];
  logic [CW-1:0] count [NQ+1];

  // Per-block registers.
  logic [PW-1:0]        nxt      [NUM_BLOCKS];
  logic                 blk_last [NUM_BLOCKS];
  logic [PORT_BITS-1:0] blk_port [NUM_BLOCKS];

  // Write-side packet state.
  logic                 in_pkt;      // a packet is partly received
  logic [QW-1:0]        cur_q;       // its queue
  logic [PORT_BITS-1:0] cur_port;    // its output port

  // ---------------------------------------------------------------- write side
  logic [7:0]           hdr;
  logic                 do_wr;
  logic [QW-1:0]        wq;
  logic [PORT_BITS-1:0] wport;
  logic [PW-1:0]        f;           // block being allocated

  assign hdr      = in_flit.data[7:0];
  assign in_ready = (count[FREE] != '0);
  assign do_wr    = in_valid && in_ready;
  assign f        = head[FREE];

  always_comb begin
    if (in_pkt) begin
      wq    = cur_q;
      wport = cur_port;
    end else begin
      wport = hdr[ROUTE_LSB +: PORT_BITS];
      wq    = hdr[HDR_PRIO_BIT] ? QW'(HPQ) : QW'(wport);
    end
  end

  // ----------------------------------------------------------------- read side
  logic [PW-1:0] h;                  // block being read

  assign h        = head[rd_q];
  assign rd_avail = (count[rd_q] != '0);
  assign rd_flit.last = blk_last[h];
  assign hp_port  = blk_port[head[HPQ]];
  assign free_count = count[FREE];

  always_comb begin
    for (int q = 0; q < NQ; q++) q_nonempty[q] = (count[q] != '0);
  end

  damq_storage #(.NUM_BLOCKS(NUM_BLOCKS), .BLOCK_BITS(BLOCK_BITS)) u_store (
    .clk   (clk),
    .we    (do_wr),
    .waddr (f),
    .wdata (in_flit.data),
    .raddr (h),
    .rdata (rd_flit.data)
  );

  // ------------------------------------------------------------ list updates
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pkt   <= 1'b0;
      cur_q    <= '0;
      cur_port <= '0;
      for (int l = 0; l < NQ; l++) begin
        head[l]  <= '0;
        tail[l]  <= '0;
        count[l] <= '0;
      end
      // All blocks start on the free list in index order.
      head[FREE]  <= '0;
      tail[FREE]  <= PW'(NUM_BLOCKS - 1);
      count[FREE] <= CW'(NUM_BLOCKS);
      for (int b = 0; b < NUM_BLOCKS; b++) begin
        nxt[b]      <= PW'((b + 1) % NUM_BLOCKS);
        blk_last[b] <= 1'b0;
        blk_port[b] <= '0;
      end
    end else begin
      // Packet framing on the input link.
      if (do_wr) begin
        in_pkt   <= !in_flit.last;
        cur_q    <= wq;
        cur_port <= wport;
        blk_last[f] <= in_flit.last;
        blk_port[f] <= wport;
      end

      // Link the allocated block to the rear of its queue.
      if (do_wr) begin
        if (count[wq] != '0) nxt[tail[wq]] <= f;
        tail[wq] <= f;
      end
      // Link the read block to the rear of the free list.
      if (rd_en) begin
        if (count[FREE] != '0) nxt[tail[FREE]] <= h;
        tail[FREE] <= h;
      end

      // Queue heads.
      for (int q = 0; q < NQ; q++) begin
        if (do_wr && QW'(q) == wq &&
            (count[q] == '0 || (rd_en && rd_q == wq && count[q] == CW'(1))))
          head[q] <= f;
        else if (rd_en && QW'(q) == rd_q)
          head[q] <= nxt[h];
      end
      // Free-list head.
      if (do_wr)
        head[FREE] <= (rd_en && count[FREE] == CW'(1)) ? h : nxt[f];
      else if (rd_en && count[FREE] == '0)
        head[FREE] <= h;

      // Counts.
      for (int q = 0; q < NQ; q++) begin
        count[q] <= count[q] + CW'(do_wr && QW'(q) == wq) - CW'(rd_en && QW'(q) == rd_q);
      end
      count[FREE] <= count[FREE] + CW'(rd_en) - CW'(do_wr);
    end
  end

  // A block is only read from a queue that holds one.
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_avail)
    else $error("damq_buffer: read from an empty queue");
  // The read port never names a list that is not a queue.
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_q < QW'(NQ))
    else $error("damq_buffer: read of a non-queue list");

endmodule
