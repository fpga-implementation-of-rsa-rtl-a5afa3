// monpro2: bit-serial radix-2 Montgomery multiplier, R = A*B*2^(-n) mod M.
//
// Implements the MonPro2 loop with a "double adder" datapath and a right
// shift, one bit b_i of B per clock, n = K+2 iterations. No final
// subtraction is performed: because 4M < 2^n, operands below 2M give a result
// below 2M, so results can be fed straight back as operands of the next
// product (the exponentiator relies on this).
//
// Two arrangements of the same loop are selectable with SHIFT_A:
//   SHIFT_A = 0 (default, the plain double-adder loop): the first adder forms
//     S + b_i*A, its least significant bit is q_i, the second adder adds
//     q_i*M, and the (even) sum is halved. q_i waits for the first adder.
//     n iterations.
//   SHIFT_A = 1 (A shifted up one bit): the first adder forms S + q_i*M with
//     q_i = LSB of S, the second adds b_i*2A, which is always even, so q_i no
//     longer depends on an addition. The extra factor 2 is removed by one
//     extra iteration (B's extra top bit is 0): n+1 iterations.
// Both loops, the two adders, the b_i*A and q_i*M selections, n = k+2 and the
// n+1 iterations of the shifted form follow the reference description. The
// K+1 bit operands, the internal widths (partial result K+2 or K+3 bits,
// adders one bit wider) and the load/busy/done handshake are this design's.
//
// Interface: on a clock edge with load=1, a, b and m are captured and S is
// cleared. One iteration runs on each following edge; done pulses for one
// cycle together with the last iteration, i.e. r is valid n (SHIFT_A=1:
// n+1) cycles after the load edge, and holds until the next load. busy is
// high while iterating. rst is synchronous and active high. m must be odd;
// a and b must be below 2M.
module monpro2 #(
  parameter int unsigned K       = rsa_pkg::KEY_BITS,
  parameter bit          SHIFT_A = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [K:0]   a,
  input  logic [K:0]   b,
  input  logic [K-1:0] m,
  output logic [K:0]   r,
  output logic         busy,
  output logic         done
);

  localparam int unsigned N     = rsa_pkg::monpro_iters(K);
  localparam int unsigned ITERS = N + int'(SHIFT_A);
  localparam int unsigned CW    = $clog2(ITERS + 1);
  // Partial result bound while iterating: S < M + A < 3M (plain) or
  // S < M + 2A < 5M (shifted), i.e. K+2 or K+3 bits; sums are one bit wider.
  localparam int unsigned SW    = K + 2 + int'(SHIFT_A);

  logic [K:0]    a_q;
  logic [K:0]    b_q;      // shifted right each iteration; bit 0 is b_i
  logic [K-1:0]  m_q;
  logic [SW-1:0] s_q;      // partial result, below 2M after the last step
  logic [CW-1:0] cnt_q;

  logic [SW:0]   a_add;    // A, or 2A in the shifted form
  logic [SW:0]   m_add;
  logic [SW:0]   sum1, sum2;
  logic          qi;

  always_comb begin
    a_add = SHIFT_A ? (SW + 1)'({a_q, 1'b0}) : (SW + 1)'(a_q);
    m_add = (SW + 1)'(m_q);
    if (SHIFT_A) begin
      // q_i from S alone; first adder + q_i*M, second adder + b_i*2A.
      qi   = s_q[0];
      sum1 = {1'b0, s_q} + (qi ? m_add : '0);
      sum2 = sum1 + (b_q[0] ? a_add : '0);
    end else begin
      // First adder + b_i*A, q_i from its LSB, second adder + q_i*M.
      sum1 = {1'b0, s_q} + (b_q[0] ? a_add : '0);
      qi   = sum1[0];
      sum2 = sum1 + (qi ? m_add : '0);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q   <= '0;
      b_q   <= '0;
      m_q   <= '0;
      s_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        a_q   <= a;
        b_q   <= b;
        m_q   <= m;
        s_q   <= '0;
        cnt_q <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        s_q   <= sum2[SW:1];
        b_q   <= b_q >> 1;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CW'(ITERS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign r = s_q[K:0];

  // The Montgomery reduction needs an odd modulus.
  a_odd_modulus: assert property (@(posedge clk) disable iff (rst) load |-> m[0])
    else $error("monpro2: even modulus loaded");
  // The final result fits in K+1 bits (below 2M).
  a_result_range: assert property (@(posedge clk) disable iff (rst)
    done |-> (s_q >> (K + 1)) == '0);
  // The adders always leave an even sum, so the shift loses nothing.
  a_even_sum: assert property (@(posedge clk) disable iff (rst) busy && !load |-> !sum2[0]);

endmodule
