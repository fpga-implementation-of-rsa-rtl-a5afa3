// tb_monpro2: self-checking testbench for the bit-serial Montgomery multiplier.
//
// Drives random odd moduli and operands A, B below 2M (the range the
// exponentiator feeds back), plus the worked example MonPro2(11, 11, 21),
// into both forms of the multiplier side by side: the plain double-adder loop
// (default) and the shifted-A loop. Each result r is checked against the
// definition of the Montgomery product, r * 2^n == A * B (mod M), and against
// the bound r < 2M; the latency from the load edge to done is checked to be
// n = K+2 cycles (plain) and n+1 cycles (shifted). A watchdog ends the run
// with a failure if it hangs.
module tb_monpro2;

  localparam int unsigned K = 8;
  localparam int unsigned N = K + 2;

  logic         clk = 1'b0;
  logic         rst;
  logic         load;
  logic [K:0]   a, b;
  logic [K-1:0] m;
  logic [K:0]   r, r_s;
  logic         busy, done, busy_s, done_s;

  int checks = 0;
  int failures = 0;

  monpro2 dut (.*);

  monpro2 #(.K(K), .SHIFT_A(1'b1)) dut_s (
    .clk, .rst, .load, .a, .b, .m, .r(r_s), .busy(busy_s), .done(done_s)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_result(input logic [K:0] res, input longint unsigned av, bv, mv,
                             input string form);
    longint unsigned rv = longint'(res);
    check(((rv << N) % mv) == ((av * bv) % mv),
          $sformatf("%s: MonPro(%0d,%0d,%0d) = %0d not congruent", form, av, bv, mv, rv));
    check(rv < 2 * mv,
          $sformatf("%s: MonPro(%0d,%0d,%0d) = %0d not below 2M", form, av, bv, mv, rv));
  endtask

  task automatic run_one(input longint unsigned av, bv, mv);
    int cycles, cycles_s;
    @(negedge clk);
    a = (K + 1)'(av);
    b = (K + 1)'(bv);
    m = K'(mv);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    fork
      begin
        cycles = 0;
        while (!done && cycles < 4 * N) begin
          @(negedge clk);
          cycles++;
        end
        check(cycles == N, $sformatf("plain: latency %0d, expected %0d", cycles, N));
        check_result(r, av, bv, mv, "plain");
      end
      begin
        cycles_s = 0;
        while (!done_s && cycles_s < 4 * N) begin
          @(negedge clk);
          cycles_s++;
        end
        check(cycles_s == N + 1, $sformatf("shifted: latency %0d, expected %0d", cycles_s, N + 1));
        check_result(r_s, av, bv, mv, "shifted");
      end
    join
  endtask

  initial begin
    repeat (400 * N + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned mv, av, bv;
    rst = 1'b1; load = 1'b0; a = '0; b = '0; m = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Worked example: MonPro2(11, 11, 21); 11*11*2^-10 mod 21 = 1.
    run_one(11, 11, 21);
    check(r == 1 || r == 22, $sformatf("MonPro2(11,11,21) = %0d, expected 1 (or 22)", r));
    check(r_s == 1 || r_s == 22, $sformatf("shifted MonPro2(11,11,21) = %0d, expected 1 (or 22)", r_s));
    // Extremes: largest modulus, operands at 2M-1.
    run_one(509, 509, 255);
    run_one(0, 300, 201);
    run_one(1, 1, 3);
    for (int t = 0; t < 150; t++) begin
      mv = longint'($urandom_range(255, 3)) | 1;
      av = longint'($urandom_range(32'(2 * mv - 1), 0));
      bv = longint'($urandom_range(32'(2 * mv - 1), 0));
      run_one(av, bv, mv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
