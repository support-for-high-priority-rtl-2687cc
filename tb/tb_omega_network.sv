// tb_omega_network: end-to-end test of the 64x64 Omega network of DAMQ
// switches, at the default parameters (64 nodes, three stages, eight blocks
// per input buffer).
//
// Part 1 (timing): a one-block packet through the idle network arrives 2 cycles
// per stage after it was accepted; a 12-block packet, longer than a buffer,
// then streams through at one block per cycle, its first block arriving before
// its last block has left the source (cut-through in every stage).
// Part 2 (priority): with destination 5 stalled, source 0 sends two normal
// packets and then a high-priority packet to it; on release the high-priority
// packet must arrive second, overtaking the normal packet sent before it.
// Part 3 (load): every source sends packets of two blocks (four packets fill a
// buffer), 5% of them marked high priority, to uniformly random destinations.
// As in the evaluation of the design, a source creates a packet, waits until
// the network accepts it and then waits an exponentially distributed time
// before creating the next. Latency runs from creation to arrival of the last
// block. A light and a heavy load are run; for each the throughput, average and
// 99th percentile latencies (the smallest latency of the worst 1%) are
// printed. All packets are checked for destination, integrity and per-path
// order. Counted mechanisms: high-priority and normal grants, source
// back-pressure, cut-through, high-priority overtaking; each must occur.
module tb_omega_network;
  import switch_pkg::*;
  localparam int unsigned NODES  = 64;
  localparam int unsigned STAGES = 3;
  localparam int unsigned PKT_BLOCKS = 2;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic  [NODES-1:0]             src_valid, src_ready, dst_valid, dst_ready;
  flit_t [NODES-1:0]             src_flit, dst_flit;
  logic  [STAGES-1:0][NODES-1:0] hp_grant, norm_grant;

  omega_network dut (.clk, .rst_n, .src_valid, .src_ready, .src_flit,
                     .dst_valid, .dst_ready, .dst_flit, .hp_grant, .norm_grant);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  int cyc;
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // Block layout: byte 0 header, byte 1 source, bytes 3:2 sequence number,
  // byte 4 block index, byte 5 length, bytes 7:6 low bits of creation cycle.
  function automatic flit_t blk(input int src, input int seq, input int idx, input int len,
                                input bit prio, input int dst, input int born);
    flit_t f;
    f.data = {16'(born), 8'(len), 8'(idx), 16'(seq), 8'(src), make_header(prio, 6'(dst))};
    if (idx != 0) f.data[7:0] = 8'($urandom());
    f.last = (idx == len - 1);
    return f;
  endfunction

  // Sources.
  flit_t sendq [NODES][$];
  int    seqs  [NODES];
  int    born  [NODES][int];           // creation cycle per [src][seq]
  int    sent_last_cyc [NODES][int];   // cycle the last block was accepted

  task automatic send_pkt(input int src, input int len, input bit prio, input int dst);
    int s;
    s = seqs[src]++;
    born[src][s] = cyc;
    for (int b = 0; b < len; b++) sendq[src].push_back(blk(src, s, b, len, prio, dst, cyc));
  endtask

  always @(negedge clk) begin
    for (int i = 0; i < NODES; i++) begin
      src_valid[i] = (sendq[i].size() != 0);
      if (src_valid[i]) src_flit[i] = sendq[i][0];
    end
  end

  // Statistics.
  int unsigned n_hp_grant, n_norm_grant, n_backpressure, n_cut_through, n_overtake;
  int unsigned delivered, blocks_out;
  int lat_norm [$], lat_hp [$];
  bit stats_on;
  int order_src [$], order_prio [$];
  bit order_on;

  // Destinations.
  bit d_inpkt [NODES];
  int d_src [NODES], d_seq [NODES], d_idx [NODES], d_len [NODES];
  bit d_prio [NODES];
  int last_seq [NODES][NODES][2];

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < STAGES; s++)
      for (int l = 0; l < NODES; l++) begin
        if (hp_grant[s][l])   n_hp_grant++;
        if (norm_grant[s][l]) n_norm_grant++;
      end
    for (int i = 0; i < NODES; i++) begin
      if (src_valid[i] && !src_ready[i]) n_backpressure++;
      if (src_valid[i] && src_ready[i]) begin
        if (src_flit[i].last) sent_last_cyc[i][int'(src_flit[i].data[31:16])] = cyc;
        void'(sendq[i].pop_front());
      end
    end
    for (int d = 0; d < NODES; d++) begin
      if (dst_valid[d] && dst_ready[d]) begin
        flit_t f;
        int src, seq, idx, len;
        f   = dst_flit[d];
        src = int'(f.data[15:8]);
        seq = int'(f.data[31:16]);
        idx = int'(f.data[39:32]);
        len = int'(f.data[47:40]);
        blocks_out++;
        if (!d_inpkt[d]) begin
          bit prio;
          prio = f.data[HDR_PRIO_BIT];
          check(idx == 0, "packet starts with block 0");
          check(int'(f.data[5:0]) == d, $sformatf("packet for %0d delivered to %0d", f.data[5:0], d));
          check(src < NODES, "source field");
          if (src < NODES) begin
            check(seq > last_seq[src][d][prio], "order kept on a path");
            last_seq[src][d][prio] = seq;
            if (!sent_last_cyc[src].exists(seq)) n_cut_through++;
          end
          if (order_on && d == 5) begin order_src.push_back(src); order_prio.push_back(int'(prio)); end
          d_src[d] = src; d_seq[d] = seq; d_idx[d] = 0; d_len[d] = len; d_prio[d] = prio;
        end else begin
          check(src == d_src[d] && seq == d_seq[d] && idx == d_idx[d] + 1, "blocks whole and in order");
          d_idx[d] = idx;
        end
        check(f.last == (idx == d_len[d] - 1), "last flag");
        d_inpkt[d] = !f.last;
        if (f.last) begin
          delivered++;
          if (stats_on && src < NODES) begin
            if (d_prio[d]) lat_hp.push_back(cyc - born[src][seq] + 1);
            else                      lat_norm.push_back(cyc - born[src][seq] + 1);
          end
        end
      end
    end
  end

  function automatic int pct99(input int q [$]);
    int s [$];
    s = q;
    s.sort();
    if (s.size() == 0) return 0;
    return s[s.size() - (s.size() + 99) / 100];
  endfunction
  function automatic real avg(input int q [$]);
    real t;
    t = 0.0;
    foreach (q[k]) t += real'(q[k]);
    return (q.size() == 0) ? 0.0 : t / real'(q.size());
  endfunction

  // One load phase: each source creates PER_SRC packets with mean think time MEAN.
  task automatic load_phase(input string name, input int per_src, input real mean,
                            output int hp99, output int norm99);
    int  wait_left [NODES];
    int  made [NODES];
    int  t0, t1, total;
    bit  busy;
    lat_norm.delete(); lat_hp.delete();
    stats_on = 1;
    for (int i = 0; i < NODES; i++) begin wait_left[i] = 0; made[i] = 0; end
    t0 = cyc;
    total = delivered;
    do begin
      @(negedge clk);
      busy = 0;
      for (int i = 0; i < NODES; i++) begin
        if (made[i] < per_src) begin
          busy = 1;
          if (sendq[i].size() == 0) begin
            if (wait_left[i] == 0) begin
              send_pkt(i, PKT_BLOCKS, ($urandom_range(0, 99) < 5), $urandom_range(0, NODES - 1));
              made[i]++;
              wait_left[i] = int'(-mean * $ln(1.0 - real'($urandom_range(0, 9999)) / 10000.0));
            end else begin
              wait_left[i]--;
            end
          end
        end
      end
    end while (busy);
    t1 = cyc;
    while (delivered - total < NODES * per_src) @(negedge clk);
    stats_on = 0;
    hp99   = pct99(lat_hp);
    norm99 = pct99(lat_norm);
    $display("%s: throughput %0.2f  normal avg %0.1f 99%% %0d  high-priority avg %0.1f 99%% %0d (%0d hp packets)",
             name, real'(NODES * per_src * PKT_BLOCKS) / real'(NODES * (t1 - t0)),
             avg(lat_norm), norm99, avg(lat_hp), hp99, lat_hp.size());
  endtask

  initial begin
    int t_in, t_out, hp99_l, n99_l, hp99_h, n99_h;
    rst_n = 1'b0; src_valid = '0; src_flit = '0; dst_ready = '1;
    stats_on = 0; order_on = 0; delivered = 0; blocks_out = 0;
    n_hp_grant = 0; n_norm_grant = 0; n_backpressure = 0; n_cut_through = 0; n_overtake = 0;
    for (int i = 0; i < NODES; i++) begin
      seqs[i] = 0; d_inpkt[i] = 0;
      for (int d = 0; d < NODES; d++) begin last_seq[i][d][0] = -1; last_seq[i][d][1] = -1; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // ---- Part 1: latency and streaming.
    send_pkt(17, 1, 0, 42);
    @(posedge clk); #1;
    t_in = cyc;
    wait (dst_valid[42]);
    t_out = cyc;
    check(t_out - t_in + 1 == 2 * STAGES,
          $sformatf("one-block packet crosses in %0d cycles, expected %0d", t_out - t_in + 1, 2 * STAGES));
    repeat (4) @(negedge clk);
    send_pkt(33, 12, 0, 9);
    wait (dst_valid[9]);
    for (int b = 0; b < 12; b++) begin
      #1;
      check(dst_valid[9], "long packet streams one block per cycle");
      @(posedge clk);
    end
    repeat (4) @(negedge clk);

    // ---- Part 2: high-priority overtaking across the network.
    dst_ready[5] = 1'b0;
    order_on = 1;
    send_pkt(0, 2, 0, 5);
    repeat (12) @(negedge clk);
    send_pkt(0, 2, 0, 5);
    repeat (12) @(negedge clk);
    send_pkt(0, 2, 1, 5);
    repeat (20) @(negedge clk);
    dst_ready[5] = 1'b1;
    repeat (30) @(negedge clk);
    order_on = 0;
    check(order_prio.size() == 3, "part 2: three packets arrive");
    if (order_prio.size() == 3) begin
      check(order_prio[0] == 0 && order_prio[1] == 1 && order_prio[2] == 0,
            "part 2: high-priority packet overtakes the earlier normal packet");
      if (order_prio[1] == 1) n_overtake++;
    end

    // ---- Part 3: load.
    load_phase("light load", 40, 20.0, hp99_l, n99_l);
    load_phase("heavy load", 60, 0.5, hp99_h, n99_h);
    check(hp99_h < n99_h, $sformatf("heavy load: high-priority 99%% latency %0d below normal %0d",
                                     hp99_h, n99_h));
    for (int i = 0; i < NODES; i++) check(sendq[i].size() == 0, "sources drained");

    check(n_hp_grant > 0, "mechanism: high-priority arbitration pass");
    check(n_norm_grant > 0, "mechanism: normal arbitration pass");
    check(n_backpressure > 0, "mechanism: back-pressure from full buffers");
    check(n_cut_through > 0, "mechanism: cut-through");
    check(n_overtake > 0, "mechanism: high-priority overtaking");
    $display("tb_omega_network: delivered=%0d hp_grants=%0d normal_grants=%0d backpressure=%0d cut_through=%0d overtakes=%0d",
             delivered, n_hp_grant, n_norm_grant, n_backpressure, n_cut_through, n_overtake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
