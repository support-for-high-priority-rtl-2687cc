// tb_damq_storage: self-checking test of the buffer storage array.
//
// Writes random blocks to random addresses and reads random addresses back
// through the asynchronous read port, comparing with a shadow copy. Also checks
// that a block written at one clock edge is readable right after it, and that
// a cycle without write enable leaves the array unchanged.
module tb_damq_storage;
  localparam int unsigned NUM_BLOCKS = 8;
  localparam int unsigned BLOCK_BITS = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  we;
  logic [2:0]            waddr, raddr;
  logic [BLOCK_BITS-1:0] wdata, rdata;

  damq_storage dut (
    .clk, .we, .waddr, .wdata, .raddr, .rdata
  );

  int checks = 0, failures = 0;
  logic [BLOCK_BITS-1:0] shadow [NUM_BLOCKS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // Fill every block once.
    for (int b = 0; b < NUM_BLOCKS; b++) begin
      @(negedge clk);
      we = 1'b1; waddr = 3'(b); wdata = {$urandom(), $urandom()};
      shadow[b] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      waddr = 3'($urandom_range(0, NUM_BLOCKS - 1));
      wdata = {$urandom(), $urandom()};
      raddr = 3'($urandom_range(0, NUM_BLOCKS - 1));
      #1;
      check(rdata == shadow[raddr], "read before edge");
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      raddr = waddr;
      #1;
      check(rdata == shadow[waddr], "read right after the write edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
