// tb_damq_switch: self-checking end-to-end test of one 4x4 DAMQ switch.
//
// Part 1 (directed timing): a one-block packet into an idle switch must leave
// two cycles after it was accepted, and a 4-block packet must then stream out
// one block per cycle.
// Part 2 (directed priority): output 0 is stalled while input 0 holds a long
// normal packet for it, input 1 receives a normal packet and then a
// high-priority packet for output 0, and input 2 a normal packet for output 0.
// When output 0 is released, the high-priority packet must be the next packet
// out, ahead of both normal packets, including the one that arrived before it
// on the same input.
// Part 3 (random): every input sends random packets (1 to 4 blocks, random
// output, 10% high priority) while every output's ready toggles at random.
// Every block is checked on arrival: the packet must be routed to that output,
// its blocks must arrive whole and in order without interleaving, and packets of
// the same class from the same input to the same output must keep their order.
// The test counts back-pressure (a full buffer), cut-through (a packet's first
// block leaving before its last block has arrived), high-priority grants and
// packets overtaken by a high-priority packet, and fails if one never occurred.
module tb_damq_switch;
  import switch_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned NB = 8;
  localparam int unsigned PKTS = 400;   // per input, random part

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic  [N-1:0]      in_valid, in_ready, out_valid, out_ready, hp_grant, norm_grant;
  flit_t [N-1:0]      in_flit, out_flit;
  logic  [N-1:0][3:0] free_count;

  damq_switch dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_flit, .out_valid, .out_ready, .out_flit,
    .free_count, .hp_grant, .norm_grant
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Packet content: byte 0 header, byte 1 source input, bytes 3:2 sequence
  // number, byte 4 block index, byte 5 length, bytes 7:6 random.
  function automatic flit_t blk(input int src, input int seq, input int idx, input int len,
                                input bit prio, input int port);
    flit_t f;
    f.data = {16'($urandom()), 8'(len), 8'(idx), 16'(seq), 8'(src),
              make_header(prio, 6'({4'($urandom_range(0, 15)), 2'(port)}))};
    if (idx != 0) f.data[7:0] = 8'($urandom());
    f.last = (idx == len - 1);
    return f;
  endfunction

  // Per-input send queues.
  flit_t sendq [N][$];
  int    cyc;
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // Output-side tracking.
  bit    o_inpkt [N];
  int    o_src [N], o_seq [N], o_idx [N], o_len [N];
  bit    o_prio [N];
  int    last_seq [N][N][2];           // [src][out][prio]
  int    first_out_cyc [N][int];       // [src][seq] cycle of first block out
  int    last_in_cyc [N][int];         // [src][seq] cycle last block accepted
  int    pkts_out, hp_out, hp_grants, refusals, cut_through, overtakes;
  int    log_src [$], log_prio [$];    // packet order on output 0 for part 2
  bit    log_on;

  // Input-side prio and seq of the packet at the head of each send queue.
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && in_ready[i]) begin
        if (in_flit[i].last) last_in_cyc[i][int'(in_flit[i].data[31:16])] = cyc;
      end
      if (in_valid[i] && !in_ready[i]) refusals++;
    end
    for (int o = 0; o < N; o++) begin
      if (hp_grant[o]) hp_grants++;
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        int src, seq, idx, len;
        f   = out_flit[o];
        src = int'(f.data[15:8]);
        seq = int'(f.data[31:16]);
        idx = int'(f.data[39:32]);
        len = int'(f.data[47:40]);
        if (!o_inpkt[o]) begin
          bit prio;
          prio = f.data[HDR_PRIO_BIT];
          check(idx == 0, $sformatf("out %0d: packet starts with block 0", o));
          check(int'(f.data[1:0]) == o, $sformatf("out %0d: routed to the right port", o));
          check(src < N, "source field");
          if (src < N) begin
            check(seq > last_seq[src][o][prio], $sformatf("out %0d: order from input %0d", o, src));
            last_seq[src][o][prio] = seq;
            first_out_cyc[src][seq] = cyc;
          end
          o_src[o] = src; o_seq[o] = seq; o_len[o] = len; o_idx[o] = 0; o_prio[o] = prio;
          if (log_on && o == 0) begin log_src.push_back(src); log_prio.push_back(int'(prio)); end
          pkts_out++;
          if (prio) hp_out++;
        end else begin
          check(src == o_src[o] && seq == o_seq[o] && idx == o_idx[o] + 1,
                $sformatf("out %0d: blocks whole and in order", o));
          o_idx[o] = idx;
        end
        check(f.last == (idx == o_len[o] - 1), $sformatf("out %0d: last flag", o));
        o_inpkt[o] = !f.last;
      end
    end
  end

  // Input drivers.
  bit drive_random;
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (sendq[i].size() != 0 && (!drive_random || $urandom_range(0, 9) < 8)) begin
        in_valid[i] = 1'b1;
        in_flit[i]  = sendq[i][0];
      end else begin
        in_valid[i] = 1'b0;
      end
    end
  end
  always @(posedge clk) begin
    for (int i = 0; i < N; i++)
      if (in_valid[i] && in_ready[i]) void'(sendq[i].pop_front());
  end

  task automatic send_pkt(input int src, input int seq, input int len, input bit prio,
                          input int port);
    for (int b = 0; b < len; b++) sendq[src].push_back(blk(src, seq, b, len, prio, port));
  endtask

  int seqs [N];
  initial begin
    rst_n = 1'b0; in_valid = '0; in_flit = '0; out_ready = '1;
    drive_random = 0; log_on = 0;
    pkts_out = 0; hp_out = 0; hp_grants = 0; refusals = 0; cut_through = 0; overtakes = 0;
    for (int i = 0; i < N; i++) begin
      seqs[i] = 0; o_inpkt[i] = 0;
      for (int o = 0; o < N; o++) begin last_seq[i][o][0] = -1; last_seq[i][o][1] = -1; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // ---- Part 1: latency and streaming rate on an idle switch.
    begin
      int t_in, t_out;
      send_pkt(2, seqs[2]++, 1, 0, 1);
      @(posedge clk); #1;
      t_in = cyc;
      wait (out_valid[1]);
      t_out = cyc;
      check(t_out - t_in == 1, $sformatf("first block leaves 2 cycles after arrival (%0d)", t_out - t_in + 1));
      repeat (3) @(posedge clk);
      send_pkt(3, seqs[3]++, 4, 0, 2);
      wait (out_valid[2]);
      for (int b = 0; b < 4; b++) begin
        #1;
        check(out_valid[2], "packet streams one block per cycle");
        @(posedge clk);
      end
      repeat (5) @(posedge clk);
    end

    // ---- Part 2: a high-priority packet overtakes normal ones.
    @(negedge clk);
    out_ready[0] = 1'b0;
    log_on = 1;
    send_pkt(0, seqs[0]++, 3, 0, 0);      // takes output 0, stalled
    repeat (6) @(negedge clk);
    send_pkt(1, seqs[1]++, 2, 0, 0);      // normal, input 1
    send_pkt(2, seqs[2]++, 2, 0, 0);      // normal, input 2
    repeat (6) @(negedge clk);
    send_pkt(1, seqs[1]++, 2, 1, 0);      // high priority, input 1, behind its normal packet
    repeat (6) @(negedge clk);
    out_ready[0] = 1'b1;
    repeat (30) @(negedge clk);
    log_on = 0;
    check(log_src.size() == 4, $sformatf("part 2: four packets out (%0d)", log_src.size()));
    if (log_src.size() == 4) begin
      check(log_src[0] == 0 && log_prio[0] == 0, "part 2: packet in progress finishes first");
      check(log_src[1] == 1 && log_prio[1] == 1, "part 2: high-priority packet next");
      if (log_src[1] == 1 && log_prio[1] == 1) overtakes += 2;
    end

    // ---- Part 3: random traffic.
    drive_random = 1;
    for (int i = 0; i < N; i++)
      for (int p = 0; p < PKTS; p++)
        send_pkt(i, seqs[i]++, $urandom_range(1, 4), ($urandom_range(0, 9) == 0),
                 $urandom_range(0, 3));
    while (sendq[0].size() + sendq[1].size() + sendq[2].size() + sendq[3].size() != 0) begin
      @(negedge clk);
      for (int o = 0; o < N; o++) out_ready[o] = ($urandom_range(0, 9) < (((cyc / 500) % 2) != 0 ? 9 : 5));
    end
    out_ready = '1;
    repeat (50) @(negedge clk);

    for (int i = 0; i < N; i++)
      foreach (first_out_cyc[i][s])
        if (last_in_cyc[i].exists(s) && first_out_cyc[i][s] <= last_in_cyc[i][s]) cut_through++;
    check(pkts_out == 4 * PKTS + 2 + 4, $sformatf("all packets delivered (%0d)", pkts_out));
    for (int i = 0; i < N; i++) check(free_count[i] == 4'(NB), "all blocks free at the end");
    check(refusals > 0, "back-pressure: a full buffer refused a block");
    check(cut_through > 0, "cut-through: packet left before it fully arrived");
    check(hp_grants > 0, "high-priority arbitration pass granted");
    check(overtakes > 0, "high-priority packet overtook normal ones");
    $display("tb_damq_switch: packets=%0d hp=%0d hp_grants=%0d refusals=%0d cut_through=%0d overtakes=%0d",
             pkts_out, hp_out, hp_grants, refusals, cut_through, overtakes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
