// tb_damq_buffer: self-checking test of the DAMQ input buffer.
//
// Random packets (1 to 4 blocks, random output port, about a quarter of them
// high priority) are offered on the input link while random queues are read.
// A reference model keeps one queue of blocks per buffer queue; every cycle it
// checks in_ready, free_count, q_nonempty, rd_avail, the block at the head of
// the queue being read and, for the high-priority queue, the stored output
// port. It also checks that a full buffer refuses blocks, that all blocks
// return to the free list once everything is read, and that a block can be read
// the cycle after it was written (cut-through).
module tb_damq_buffer;
  import switch_pkg::*;

  localparam int unsigned N_PORTS    = 4;
  localparam int unsigned NUM_BLOCKS = 8;
  localparam int unsigned NQ         = N_PORTS + 1;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic        in_valid, in_ready;
  flit_t       in_flit;
  logic [2:0]  rd_q;
  logic        rd_en, rd_avail;
  flit_t       rd_flit;
  logic [NQ-1:0] q_nonempty;
  logic [1:0]  hp_port;
  logic [3:0]  free_count;

  damq_buffer dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_flit, .rd_q, .rd_en, .rd_avail,
    .rd_flit, .q_nonempty, .hp_port, .free_count
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Reference model.
  flit_t      mq   [NQ][$];
  logic [1:0] mport[NQ][$];
  int unsigned total;

  // Packet generator state.
  int unsigned left;       // blocks still to send of the current packet
  int unsigned q_cur;
  logic [1:0]  port_cur;
  int unsigned seq;

  function automatic flit_t gen_block(input bit first, input bit last_b, input bit prio,
                                      input logic [1:0] port, input int unsigned s);
    flit_t fl;
    fl.data = {$urandom(), $urandom()};
    fl.data[15:8] = 8'(s);
    if (first) fl.data[7:0] = make_header(prio, {4'($urandom_range(0, 15)), port});
    fl.last = last_b;
    return fl;
  endfunction

  flit_t next_blk;
  int unsigned next_q;
  logic [1:0]  next_port;
  int unsigned full_refusals, cut_through, hp_pkts;

  task automatic new_block();
    bit first, prio;
    if (left == 0) begin
      left     = $urandom_range(1, 4);
      prio     = ($urandom_range(0, 3) == 0);
      port_cur = 2'($urandom_range(0, 3));
      q_cur    = prio ? N_PORTS : int'(port_cur);
      first    = 1'b1;
      if (prio) hp_pkts++;
    end else begin
      first = 1'b0;
      prio  = 1'b0;
    end
    seq++;
    next_blk  = gen_block(first, left == 1, prio, port_cur, seq);
    next_q    = q_cur;
    next_port = port_cur;
    left--;
  endtask

  int unsigned cyc;
  int unsigned last_wr_q;
  bit          last_wr;
  bit          wr;

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_flit = '0; rd_q = '0; rd_en = 1'b0;
    left = 0; seq = 0; total = 0; full_refusals = 0; cut_through = 0; hp_pkts = 0;
    last_wr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    new_block();
    for (cyc = 0; cyc < 6000; cyc++) begin
      // Phases: write-heavy, balanced, read-heavy, so the buffer fills and drains.
      int unsigned ph;
      ph = (cyc / 300) % 3;
      @(negedge clk);
      in_valid = (ph == 0) ? ($urandom_range(0, 9) < 8) :
                 (ph == 1) ? ($urandom_range(0, 1) == 1) : ($urandom_range(0, 9) < 2);
      in_flit  = next_blk;
      // Read queue choice: prefer the one just written now and then (cut-through).
      if (last_wr && $urandom_range(0, 3) == 0) rd_q = 3'(last_wr_q);
      else rd_q = 3'($urandom_range(0, NQ - 1));
      rd_en = (mq[rd_q].size() != 0) &&
              ((ph == 2) ? ($urandom_range(0, 9) < 8) :
               (ph == 1) ? ($urandom_range(0, 1) == 1) : ($urandom_range(0, 9) < 2));
      #1;
      // Combinational checks against the model.
      check(in_ready == (total < NUM_BLOCKS), "in_ready");
      check(free_count == 4'(NUM_BLOCKS - total), "free_count");
      for (int q = 0; q < NQ; q++)
        check(q_nonempty[q] == (mq[q].size() != 0), $sformatf("q_nonempty[%0d]", q));
      check(rd_avail == (mq[rd_q].size() != 0), "rd_avail");
      if (mq[rd_q].size() != 0)
        check(rd_flit == mq[rd_q][0], $sformatf("rd_flit q%0d", rd_q));
      if (mq[N_PORTS].size() != 0)
        check(hp_port == mport[N_PORTS][0], "hp_port");
      wr = in_valid && in_ready;
      if (in_valid && !in_ready) full_refusals++;
      if (rd_en && last_wr && rd_q == 3'(last_wr_q) && mq[rd_q].size() == 1) cut_through++;
      // Model update at the edge.
      @(posedge clk);
      if (rd_en) begin
        void'(mq[rd_q].pop_front());
        void'(mport[rd_q].pop_front());
        total--;
      end
      last_wr = 0;
      if (wr) begin
        mq[next_q].push_back(next_blk);
        mport[next_q].push_back(next_port);
        total++;
        last_wr   = 1;
        last_wr_q = next_q;
        new_block();
      end
    end
    // Drain and check that all blocks are free again.
    in_valid = 1'b0;
    for (int q = 0; q < NQ; q++) begin
      while (mq[q].size() != 0) begin
        @(negedge clk);
        rd_q = 3'(q); rd_en = 1'b1;
        #1;
        check(rd_flit == mq[q][0], "drain rd_flit");
        @(posedge clk);
        void'(mq[q].pop_front());
        void'(mport[q].pop_front());
        total--;
      end
    end
    @(negedge clk);
    rd_en = 1'b0;
    #1;
    check(free_count == 4'(NUM_BLOCKS), "all blocks free after drain");
    check(full_refusals > 0, "buffer filled at least once");
    check(cut_through > 0, "block read the cycle after it was written");
    check(hp_pkts > 0, "high-priority packets sent");
    $display("tb_damq_buffer: refusals when full=%0d cut-through reads=%0d hp packets=%0d",
             full_refusals, cut_through, hp_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
