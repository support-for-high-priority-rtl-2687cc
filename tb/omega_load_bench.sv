// omega_load_bench: one Omega network of DAMQ switches under uniform random
// load, for the workload testbench.
//
// Holds an omega_network with NUM_BLOCKS blocks per input buffer, 64 sources
// and 64 always-ready destinations. Each source creates two-block packets for
// uniformly random destinations; after the network accepts a packet it waits an
// exponentially distributed number of cycles (mean MEAN_WAIT) before creating
// the next. It runs 5% high-priority packets, and with SWEEP also 1%, 10%, 20%,
// 30%, 40% and 50%. For each percentage it runs PER_SRC
// packets per source and prints throughput and the average and 99th-percentile
// latency of normal and high-priority packets (creation to last block, in
// cycles). Every delivered packet is checked for destination, integrity and
// per-path order. done rises when all runs are over; checks and failures are
// the running totals. Where high-priority packets are at most 10% of the
// traffic, their 99th-percentile latency must be below that of normal packets.
module omega_load_bench
  import switch_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 8,
  parameter bit          SWEEP      = 1'b0,   // also run 1% to 50% high priority
  parameter int unsigned PER_SRC    = 60,
  parameter real         MEAN_WAIT  = 0.5
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NODES = 64;
  localparam int unsigned PKT_BLOCKS = 2;

  logic                     rst_n;
  logic  [NODES-1:0]        src_valid, src_ready, dst_valid, dst_ready;
  flit_t [NODES-1:0]        src_flit, dst_flit;
  logic  [2:0][NODES-1:0]   hp_grant, norm_grant;

  omega_network #(.NUM_BLOCKS(NUM_BLOCKS)) u_net (
    .clk, .rst_n, .src_valid, .src_ready, .src_flit, .dst_valid, .dst_ready, .dst_flit,
    .hp_grant, .norm_grant
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t [%0d blocks]: %s", $time, NUM_BLOCKS, what);
    end
  endtask

  int cyc;
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  flit_t sendq [NODES][$];
  int    seqs  [NODES];
  int    born  [NODES][int];
  int    delivered;
  int    lat_norm [$], lat_hp [$];
  bit    d_inpkt [NODES], d_prio [NODES];
  int    d_src [NODES], d_seq [NODES], d_idx [NODES];
  int    last_seq [NODES][NODES][2];

  always @(negedge clk) begin
    for (int i = 0; i < NODES; i++) begin
      src_valid[i] = (sendq[i].size() != 0);
      if (src_valid[i]) src_flit[i] = sendq[i][0];
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NODES; i++)
      if (src_valid[i] && src_ready[i]) void'(sendq[i].pop_front());
    for (int d = 0; d < NODES; d++) begin
      if (dst_valid[d] && dst_ready[d]) begin
        flit_t f;
        int src, seq, idx;
        f   = dst_flit[d];
        src = int'(f.data[15:8]);
        seq = int'(f.data[31:16]);
        idx = int'(f.data[39:32]);
        if (!d_inpkt[d]) begin
          check(idx == 0 && int'(f.data[5:0]) == d && src < NODES, "packet head and destination");
          if (src < NODES) begin
            check(seq > last_seq[src][d][f.data[HDR_PRIO_BIT]], "order kept on a path");
            last_seq[src][d][f.data[HDR_PRIO_BIT]] = seq;
          end
          d_src[d] = src; d_seq[d] = seq; d_idx[d] = 0; d_prio[d] = f.data[HDR_PRIO_BIT];
        end else begin
          check(src == d_src[d] && seq == d_seq[d] && idx == d_idx[d] + 1, "blocks whole and in order");
          d_idx[d] = idx;
        end
        d_inpkt[d] = !f.last;
        if (f.last) begin
          delivered++;
          if (src < NODES && born[src].exists(seq)) begin
            if (d_prio[d]) lat_hp.push_back(cyc - born[src][seq] + 1);
            else           lat_norm.push_back(cyc - born[src][seq] + 1);
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

  task automatic run(input int hp_pct);
    int wait_left [NODES];
    int made [NODES];
    int t0, t1, base;
    bit busy;
    lat_norm.delete(); lat_hp.delete();
    for (int i = 0; i < NODES; i++) begin wait_left[i] = 0; made[i] = 0; end
    t0 = cyc;
    base = delivered;
    do begin
      @(negedge clk);
      busy = 0;
      for (int i = 0; i < NODES; i++) begin
        if (made[i] < int'(PER_SRC)) begin
          busy = 1;
          if (sendq[i].size() == 0) begin
            if (wait_left[i] == 0) begin
              int s, dst;
              bit prio;
              s    = seqs[i]++;
              dst  = $urandom_range(0, NODES - 1);
              prio = ($urandom_range(0, 99) < hp_pct);
              born[i][s] = cyc;
              for (int b = 0; b < PKT_BLOCKS; b++) begin
                flit_t f;
                f.data = {16'($urandom()), 8'(PKT_BLOCKS), 8'(b), 16'(s), 8'(i), make_header(prio, 6'(dst))};
                if (b != 0) f.data[7:0] = 8'($urandom());
                f.last = (b == PKT_BLOCKS - 1);
                sendq[i].push_back(f);
              end
              made[i]++;
              wait_left[i] = int'(-MEAN_WAIT * $ln(1.0 - real'($urandom_range(0, 9999)) / 10000.0));
            end else begin
              wait_left[i]--;
            end
          end
        end
      end
    end while (busy);
    t1 = cyc;
    while (delivered - base < int'(NODES * PER_SRC)) @(negedge clk);
    $display("%0d slots (%0d blocks), %2d%% high priority: throughput %0.2f  normal avg %0.1f 99%% %0d  high-priority avg %0.1f 99%% %0d",
             NUM_BLOCKS / PKT_BLOCKS, NUM_BLOCKS, hp_pct,
             real'(NODES * PER_SRC * PKT_BLOCKS) / real'(NODES * (t1 - t0)),
             avg(lat_norm), pct99(lat_norm), avg(lat_hp), pct99(lat_hp));
    check(lat_hp.size() + lat_norm.size() == int'(NODES * PER_SRC), "every packet delivered");
    if (hp_pct <= 10 && lat_hp.size() > 0)
      check(pct99(lat_hp) < pct99(lat_norm), "high-priority 99th percentile below normal");
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; delivered = 0;
    rst_n = 1'b0; src_valid = '0; src_flit = '0; dst_ready = '1;
    for (int i = 0; i < NODES; i++) begin
      seqs[i] = 0; d_inpkt[i] = 0; d_prio[i] = 0;
      for (int d = 0; d < NODES; d++) begin last_seq[i][d][0] = -1; last_seq[i][d][1] = -1; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run(5);
    if (SWEEP) begin
      run(1);
      for (int p = 10; p <= 50; p += 10) run(p);
    end
    done = 1'b1;
  end
endmodule
