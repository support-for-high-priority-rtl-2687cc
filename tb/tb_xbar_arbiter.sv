// tb_xbar_arbiter: self-checking test of the crossbar arbiter.
//
// Random requests (queue occupancy and high-priority head ports) and random
// ends of packets are applied for many cycles. Each cycle the testbench checks
// the rules the arbiter must keep, computed from its own record of the
// connections:
//   - a new connection is only made on an idle output, from an idle input that
//     asked for that output (normal queue for it, or high-priority head routed
//     to it);
//   - an input feeds at most one output; connections hold until their packet
//     ends and then free the output;
//   - a normal packet never takes an output that an idle, unserved
//     high-priority head was asking for (high priority first);
//   - no output stays idle while an idle, unserved input asks for it;
//   - in_q/in_active give each connected input the right queue.
// A directed part then checks round-robin sharing of one output by two inputs
// and that a high-priority head wins over a normal queue that asked first.
module tb_xbar_arbiter;
  localparam int unsigned N  = 4;
  localparam int unsigned NQ = N + 1;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [N-1:0][NQ-1:0] q_nonempty;
  logic [N-1:0][1:0]    hp_port;
  logic [N-1:0]         xfer_last, out_active, in_active, hp_grant, norm_grant;
  logic [N-1:0][1:0]    out_sel;
  logic [N-1:0][2:0]    in_q;

  xbar_arbiter dut (.clk, .rst_n, .q_nonempty, .hp_port, .xfer_last,
    .out_active, .out_sel, .in_active, .in_q, .hp_grant, .norm_grant);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Model of the connections.
  bit       m_v   [N];
  int       m_in  [N];
  bit       m_hp  [N];
  int unsigned n_hp, n_norm, n_hp_beats_norm;

  initial begin
    rst_n = 1'b0; q_nonempty = '0; hp_port = '0; xfer_last = '0;
    for (int o = 0; o < N; o++) begin m_v[o] = 0; m_in[o] = 0; m_hp[o] = 0; end
    n_hp = 0; n_norm = 0; n_hp_beats_norm = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      bit in_busy [N];
      bit served  [N];
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        q_nonempty[i] = 5'($urandom_range(0, 31)) & 5'($urandom_range(0, 31));
        hp_port[i]    = 2'($urandom_range(0, 3));
      end
      for (int o = 0; o < N; o++)
        xfer_last[o] = m_v[o] && ($urandom_range(0, 3) == 0);
      #1;
      // Current state against the model.
      for (int i = 0; i < N; i++) begin in_busy[i] = 0; served[i] = 0; end
      for (int o = 0; o < N; o++) begin
        check(out_active[o] == m_v[o], $sformatf("out_active[%0d]", o));
        if (m_v[o]) begin
          check(out_sel[o] == 2'(m_in[o]), $sformatf("out_sel[%0d] held", o));
          check(in_active[m_in[o]], "in_active");
          check(in_q[m_in[o]] == (m_hp[o] ? 3'(N) : 3'(o)), "in_q");
          in_busy[m_in[o]] = 1;
        end
      end
      // New grants this cycle.
      for (int o = 0; o < N; o++) begin
        check(!(hp_grant[o] && norm_grant[o]), "one pass per grant");
        if (hp_grant[o] || norm_grant[o]) check(!m_v[o], "grant on an idle output only");
      end
      @(posedge clk);
      #1;
      // Inputs that got a new connection at this edge.
      for (int o = 0; o < N; o++)
        if (!m_v[o] && out_active[o]) served[out_sel[o]] = 1;
      // Check the grants using the registered result.
      for (int o = 0; o < N; o++) begin
        if (!m_v[o]) begin
          if (out_active[o]) begin
            int i;
            i = int'(out_sel[o]);
            check(!in_busy[i], "granted input was idle");
            if (in_q[i] == 3'(N)) begin
              n_hp++;
              check(q_nonempty[i][N] && hp_port[i] == 2'(o), "HP grant matches request");
            end else begin
              n_norm++;
              check(q_nonempty[i][o], "normal grant matches request");
              for (int j = 0; j < N; j++)
                if (!in_busy[j] && !served[j] && q_nonempty[j][N] && hp_port[j] == 2'(o))
                  check(0, "normal packet took an output an HP head wanted");
            end
          end else begin
            for (int j = 0; j < N; j++)
              if (!in_busy[j] && !served[j] &&
                  (q_nonempty[j][o] || (q_nonempty[j][N] && hp_port[j] == 2'(o))))
                check(0, $sformatf("output %0d left idle with input %0d asking", o, j));
          end
        end else begin
          check(out_active[o] == !xfer_last[o], "connection ends with its packet");
        end
      end
      // At most one output per input.
      for (int i = 0; i < N; i++) begin
        int c;
        c = 0;
        for (int o = 0; o < N; o++) if (out_active[o] && out_sel[o] == 2'(i)) c++;
        check(c <= 1, "input feeds at most one output");
      end
      // Update the model from the now-checked state.
      for (int o = 0; o < N; o++) begin
        m_v[o]  = out_active[o];
        m_in[o] = int'(out_sel[o]);
        m_hp[o] = out_active[o] && (in_q[out_sel[o]] == 3'(N));
      end
    end

    // Directed: inputs 1 and 2 both always want output 0 (normal), one-block packets.
    @(negedge clk);
    rst_n = 1'b0; q_nonempty = '0; xfer_last = '0;
    @(negedge clk);
    rst_n = 1'b1;
    begin
      int last_winner, alternations;
      last_winner = -1; alternations = 0;
      for (int n = 0; n < 20; n++) begin
        @(negedge clk);
        q_nonempty[1][0] = 1'b1;
        q_nonempty[2][0] = 1'b1;
        xfer_last[0] = out_active[0];
        #1;
        if (out_active[0]) begin
          if (last_winner >= 0 && int'(out_sel[0]) != last_winner) alternations++;
          last_winner = int'(out_sel[0]);
        end
      end
      check(alternations >= 8, $sformatf("round robin alternates (%0d)", alternations));
    end
    // Directed: output 3 idle; input 0 normal for 3, input 3 HP head for 3.
    @(negedge clk);
    rst_n = 1'b0; q_nonempty = '0; xfer_last = '0;
    @(negedge clk);
    rst_n = 1'b1;
    q_nonempty[0][3] = 1'b1;
    q_nonempty[3][N] = 1'b1;
    hp_port[3] = 2'd3;
    @(negedge clk);
    #1;
    check(out_active[3] && out_sel[3] == 2'd3 && in_q[3] == 3'(N), "HP head wins output 3");
    if (out_active[3] && out_sel[3] == 2'd3) n_hp_beats_norm++;
    check(!in_active[0], "normal queue waits");

    check(n_hp > 100 && n_norm > 100, "both passes exercised");
    $display("tb_xbar_arbiter: hp grants=%0d normal grants=%0d", n_hp, n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
