// tb_monexp2_wide: the exponentiator at RSA key lengths.
//
// The reference configuration uses an 8-bit key; the RTL is generic in K.
// This testbench runs monexp2 with K = 1024 (the key length usually taken
// as the minimum for practical RSA security) on random odd 1024-bit moduli
// with the top bit set, random messages and random full-length exponents,
// and compares h_cryp with mess^clef mod m from a square-and-multiply
// reference in 2048-bit arithmetic. Two instances run the same operands side
// by side, one with the plain multiplier loop and one with the shifted-A loop.
// The start-to-done latency is checked for both: 2n + 1 + (n+1)(K+2) and
// 2n + 1 + (n+2)(K+2) cycles with n = K+2. One exponentiation takes about a
// million clock cycles. A watchdog ends a hung run with a failure.
module tb_monexp2_wide;

  localparam int unsigned K    = 1024;
  localparam int unsigned N    = K + 2;
  localparam int unsigned LAT  = 2 * N + 1 + (N + 1) * (K + 2);
  localparam int unsigned LATS = 2 * N + 1 + (N + 2) * (K + 2);
  localparam int unsigned RUNS = 3;

  logic         clk = 1'b0;
  logic         rst;
  logic         start;
  logic [K-1:0] mess, clef, m;
  logic [K-1:0] h_cryp, h_cryp_s;
  logic         busy, done, busy_s, done_s;

  int checks = 0;
  int failures = 0;

  monexp2 #(.K(K)) dut (.*);

  monexp2 #(.K(K), .SHIFT_A(1'b1)) dut_s (
    .clk, .rst, .start, .mess, .clef, .m, .h_cryp(h_cryp_s), .busy(busy_s), .done(done_s)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [K-1:0] modexp(logic [K-1:0] p, e, md);
    logic [2*K-1:0] res  = (2 * K)'(1) % (2 * K)'(md);
    logic [2*K-1:0] base = (2 * K)'(p) % (2 * K)'(md);
    for (int i = 0; i < K; i++) begin
      if (e[i]) res = (res * base) % (2 * K)'(md);
      base = (base * base) % (2 * K)'(md);
    end
    return res[K-1:0];
  endfunction

  function automatic logic [K-1:0] random_word();
    logic [K-1:0] w;
    for (int i = 0; i < K / 32; i++) w[32*i +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    repeat (RUNS * (LATS + 10) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] pv, ev, mv, expected;
    int cycles, cycles_s;
    rst = 1'b1; start = 1'b0; mess = '0; clef = '0; m = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < RUNS; t++) begin
      mv = random_word();
      mv[K-1] = 1'b1;
      mv[0] = 1'b1;
      pv = random_word();
      ev = random_word();
      @(negedge clk);
      mess = pv; clef = ev; m = mv;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      expected = modexp(pv, ev, mv);
      fork
        begin
          cycles = 0;
          while (!done) begin
            @(negedge clk);
            cycles++;
          end
          check(cycles == LAT, $sformatf("plain: latency %0d, expected %0d", cycles, LAT));
          check(h_cryp == expected, $sformatf("plain: run %0d: wrong %0d-bit result", t, K));
        end
        begin
          cycles_s = 0;
          while (!done_s) begin
            @(negedge clk);
            cycles_s++;
          end
          check(cycles_s == LATS, $sformatf("shifted: latency %0d, expected %0d", cycles_s, LATS));
          check(h_cryp_s == expected, $sformatf("shifted: run %0d: wrong %0d-bit result", t, K));
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
