// tb_omega_workloads: the 64x64 Omega network under the buffer sizes and
// high-priority fractions the design was evaluated with.
//
// Three networks run side by side at heavy load (a source waits on average half
// a cycle between packets), with two-block packets:
//   - 2, 3 and 4 packet slots per input buffer (NUM_BLOCKS 4, 6, 8) with 5%
//     high-priority packets;
//   - the 4-slot network also with 1%, 10%, 20%, 30%, 40% and 50%
//     high-priority packets.
// Each run prints throughput and per-class average and 99th-percentile latency;
// omega_load_bench checks every packet, and that the high-priority 99th
// percentile stays below the normal one when at most 10% of packets are high
// priority.
module tb_omega_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done2, done3, done4;
  int   c2, c3, c4, f2, f3, f4;

  omega_load_bench #(.NUM_BLOCKS(4)) u_slots2 (.clk, .done(done2), .checks(c2), .failures(f2));
  omega_load_bench #(.NUM_BLOCKS(6)) u_slots3 (.clk, .done(done3), .checks(c3), .failures(f3));
  omega_load_bench #(.NUM_BLOCKS(8), .SWEEP(1'b1))
    u_slots4 (.clk, .done(done4), .checks(c4), .failures(f4));

  initial begin
    wait (done2 && done3 && done4);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c4, f2 + f3 + f4);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c4, f2 + f3 + f4 + 1);
    $finish;
  end
endmodule
