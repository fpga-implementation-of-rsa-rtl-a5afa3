// tb_monexp2: end-to-end testbench of the RSA modular exponentiator.
//
// Runs monexp2 at its default size (8-bit key) through complete
// exponentiations and compares h_cryp with mess^clef mod m computed by plain
// square-and-multiply in 64-bit arithmetic. Cases: the worked example
// 2^17 mod 21 = 11, a textbook RSA key pair (M = 187 = 11*17, E = 7, D = 23)
// encrypting and decrypting every message, exponents 0 and all-ones, messages
// that are multiples of M, and random odd moduli. The latency from the start
// edge to done is checked against 2n + 1 + (n+1)(K+2) cycles, n = K+2.
// It also counts how often each mechanism of the design occurred - key bits
// with the multiply performed beside the square, key bits with the multiply
// skipped, the final correction of a re-mapped value equal to M - and fails
// if one never did. A watchdog ends a hung run with a failure.
module tb_monexp2;

  localparam int unsigned K   = rsa_pkg::KEY_BITS;
  localparam int unsigned N   = K + 2;
  localparam int unsigned LAT = 2 * N + 1 + (N + 1) * (K + 2);

  logic         clk = 1'b0;
  logic         rst;
  logic         start;
  logic [K-1:0] mess, clef, m;
  logic [K-1:0] h_cryp;
  logic         busy, done;

  int checks = 0;
  int failures = 0;
  int runs = 0;
  int n_parallel = 0;     // cycles with square and multiply running together
  int n_skipped = 0;      // key-bit steps with the multiply skipped
  int n_corrected = 0;    // re-mapped values equal to M, corrected to 0

  monexp2 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint unsigned modexp(longint unsigned p, e, md);
    longint unsigned res = 1 % md;
    longint unsigned base = p % md;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) res = (res * base) % md;
      base = (base * base) % md;
    end
    return res;
  endfunction

  // Mechanism monitors, observed on the multipliers inside the design.
  always @(posedge clk) if (!rst) begin
    if (dut.u_mul_p.busy && dut.u_mul_r.busy && dut.state_q == rsa_pkg::EXP_LOOP)
      n_parallel++;
    if (dut.p_load && !dut.r_load && dut.state_q inside {rsa_pkg::EXP_MAP, rsa_pkg::EXP_LOOP})
      n_skipped++;
    if (dut.state_q == rsa_pkg::EXP_REMAP && dut.r_done && dut.r_res == {1'b0, dut.m_q})
      n_corrected++;
  end

  task automatic run_one(input longint unsigned pv, ev, mv);
    int cycles;
    longint unsigned expected;
    @(negedge clk);
    mess = K'(pv);
    clef = K'(ev);
    m = K'(mv);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    mess = '0; clef = '0; m = '0;   // inputs are captured at start
    cycles = 0;
    while (!done && cycles < 2 * LAT) begin
      @(negedge clk);
      cycles++;
    end
    runs++;
    expected = modexp(pv, ev, mv);
    check(cycles == LAT, $sformatf("latency %0d, expected %0d", cycles, LAT));
    check(longint'(h_cryp) == expected,
          $sformatf("%0d^%0d mod %0d = %0d, expected %0d", pv, ev, mv, h_cryp, expected));
  endtask

  initial begin
    repeat (1200 * (LAT + 3)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned c, mv;
    rst = 1'b1; start = 1'b0; mess = '0; clef = '0; m = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Worked example: message 2, key 17, modulus 21 gives 11.
    run_one(2, 17, 21);
    check(h_cryp == 8'd11, "2^17 mod 21 must be 11");

    // RSA round trip with M = 11*17, E = 7, D = 23 (7*23 = 161 = 1 mod 160).
    for (int p = 0; p < 187; p += 3) begin
      run_one(longint'(p), 7, 187);
      c = longint'(h_cryp);
      run_one(c, 23, 187);
      check(longint'(h_cryp) == longint'(p), $sformatf("round trip of %0d gave %0d", p, h_cryp));
    end

    // Edge cases: exponent 0 and all ones, messages >= M and multiples of M.
    run_one(5, 0, 21);
    run_one(200, 255, 255);
    run_one(0, 9, 33);
    run_one(21, 3, 21);
    run_one(42, 5, 21);
    run_one(254, 1, 3);
    run_one(255, 255, 1);

    // Random odd moduli, messages and keys.
    for (int t = 0; t < 300; t++) begin
      mv = longint'($urandom_range(255, 3)) | 1;
      run_one(longint'($urandom_range(255, 0)), longint'($urandom_range(255, 0)), mv);
    end

    $display("mechanisms: runs=%0d parallel_square_multiply_cycles=%0d skipped_multiplies=%0d corrections=%0d",
             runs, n_parallel, n_skipped, n_corrected);
    check(n_parallel > 0, "square and multiply never ran in parallel");
    check(n_skipped > 0, "a multiply was never skipped");
    check(n_corrected > 0, "the final correction never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
