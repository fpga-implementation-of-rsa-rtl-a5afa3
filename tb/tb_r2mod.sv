// tb_r2mod: self-checking testbench for the mapping-constant generator.
//
// For every modulus M from 1 to 255 (odd and even) the block's output is
// compared with 2^(2n) mod M computed directly in 64-bit arithmetic, n = K+2,
// and the start-to-done latency is checked to be 2n cycles. A watchdog ends
// the run with a failure if it hangs.
module tb_r2mod;

  localparam int unsigned K = 8;
  localparam int unsigned N = K + 2;

  logic         clk = 1'b0;
  logic         rst;
  logic         start;
  logic [K-1:0] m;
  logic [K-1:0] c;
  logic         busy, done;

  int checks = 0;
  int failures = 0;

  r2mod dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300 * (2 * N + 4)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    longint unsigned expected;
    rst = 1'b1; start = 1'b0; m = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int mv = 1; mv < 256; mv++) begin
      @(negedge clk);
      m = K'(mv);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      m = '0;               // the block must use the value captured at start
      cycles = 0;
      while (!done && cycles < 8 * N) begin
        @(negedge clk);
        cycles++;
      end
      expected = (64'd1 << (2 * N)) % longint'(mv);
      check(cycles == 2 * N, $sformatf("M=%0d latency %0d, expected %0d", mv, cycles, 2 * N));
      check(longint'(c) == expected, $sformatf("M=%0d: C=%0d, expected %0d", mv, c, expected));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
