// tb_crossbar: self-checking test of the crossbar and its flow-control return
// path.
//
// Random settings (a random assignment of distinct inputs to active outputs),
// random input blocks, availabilities and downstream ready signals; each
// output's block and valid, each input's pop signal and each output's
// end-of-packet signal are compared with values computed in the testbench.
module tb_crossbar;
  import switch_pkg::*;
  localparam int unsigned N = 4;

  flit_t [N-1:0]       in_flit, out_flit;
  logic  [N-1:0]       in_avail, in_rd_en, active, out_valid, out_ready, xfer_last;
  logic  [N-1:0][1:0]  sel;

  crossbar dut (.in_flit, .in_avail, .in_rd_en, .active, .sel,
                               .out_valid, .out_ready, .out_flit, .xfer_last);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    int perm [N];
    for (int n = 0; n < 3000; n++) begin
      logic [N-1:0] exp_rd;
      // Random permutation: an input drives at most one output.
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        in_flit[i].data = {$urandom(), $urandom()};
        in_flit[i].last = 1'($urandom_range(0, 1));
        sel[i]          = 2'(perm[i]);
      end
      in_avail  = 4'($urandom_range(0, 15));
      active    = 4'($urandom_range(0, 15));
      out_ready = 4'($urandom_range(0, 15));
      #1;
      exp_rd = '0;
      for (int o = 0; o < N; o++) begin
        bit v;
        v = active[o] && in_avail[perm[o]];
        check(out_valid[o] == v, $sformatf("out_valid[%0d]", o));
        if (v) check(out_flit[o] == in_flit[perm[o]], $sformatf("out_flit[%0d]", o));
        check(xfer_last[o] == (v && out_ready[o] && in_flit[perm[o]].last),
              $sformatf("xfer_last[%0d]", o));
        if (v && out_ready[o]) exp_rd[perm[o]] = 1'b1;
      end
      check(in_rd_en == exp_rd, "in_rd_en");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
