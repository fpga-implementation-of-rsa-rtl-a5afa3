// monexp2: RSA modular exponentiator, h_cryp = mess^clef mod m (top level).
//
// Right-to-left binary exponentiation on Montgomery products (MonExp2), in
// three stages:
//   1. Mapping: C = 2^(2n) mod M is computed (r2mod), then, on two Montgomery
//      multipliers in parallel, P = MonPro(C, mess) = mess*2^n mod M and
//      R = MonPro(C, 1) = 2^n mod M.
//   2. Exponentiation: for each key bit e_i, i = 0 .. K-1, the square
//      P = MonPro(P, P) runs on one multiplier while, if e_i = 1, the multiply
//      R = MonPro(R, P) runs on the other, so both products of a key bit take
//      the time of one. When e_i = 0 the R multiplier simply holds R.
//   3. Re-mapping: R = MonPro(R, 1) removes the 2^n factor. Because the
//      multipliers return values below 2M, a last compare subtracts M once if
//      the re-mapped value is M (it can only be M when mess is a multiple of M).
// The R-L method, the two parallel multipliers, the mapping and re-mapping
// products and C = 2^(2n) mod M follow the reference algorithm. The on-chip
// computation of C, the start/busy/done handshake, the operand order of the
// products (C and R on the full-operand side) and the final correction are
// this design's choices.
//
// Interface: on a clock edge with start=1 (while not busy), mess, clef and m
// are captured; m must be odd. The result appears on h_cryp with a one-cycle
// done pulse 2n + 1 + (n+1)*(K+2) cycles after that edge (n = K+2; 131 cycles
// for K = 8) and holds until the next start. With SHIFT_A = 1 the multipliers
// use the shifted-A loop, one cycle longer per product:
// 2n + 1 + (n+2)*(K+2) cycles. rst is synchronous, active high.
module monexp2 #(
  parameter int unsigned K       = rsa_pkg::KEY_BITS,
  parameter bit          SHIFT_A = 1'b0   // multiplier loop form, see monpro2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [K-1:0] mess,
  input  logic [K-1:0] clef,
  input  logic [K-1:0] m,
  output logic [K-1:0] h_cryp,
  output logic         busy,
  output logic         done
);

  import rsa_pkg::*;

  localparam int unsigned BW = $clog2(K + 1);

  exp_state_t    state_q;
  logic [K-1:0]  mess_q;
  logic [K-1:0]  e_q;        // key, shifted right once per key bit
  logic [K-1:0]  m_q;
  logic [BW-1:0] bit_q;      // key bits processed so far

  // Constant C = 2^(2n) mod M.
  logic         c_start, c_busy, c_done;
  logic [K-1:0] c_val;

  // Multiplier on the R chain (map 1, multiply, re-map) and on the P chain
  // (map message, square).
  logic         r_load, r_busy, r_done;
  logic [K:0]   r_a, r_b, r_res;
  logic         p_load, p_busy, p_done;
  logic [K:0]   p_a, p_b, p_res;

  logic         accept;      // start taken this cycle
  logic         last_bit;
  logic [K-1:0] fixed;       // re-mapped value, corrected to below M

  assign accept   = start && (state_q == EXP_IDLE);
  assign last_bit = (bit_q == BW'(K - 1));
  assign c_start  = accept;

  r2mod #(.K(K)) u_r2mod (
    .clk, .rst, .start(c_start), .m,
    .c(c_val), .busy(c_busy), .done(c_done)
  );

  monpro2 #(.K(K), .SHIFT_A(SHIFT_A)) u_mul_r (
    .clk, .rst, .load(r_load), .a(r_a), .b(r_b), .m(m_q),
    .r(r_res), .busy(r_busy), .done(r_done)
  );

  monpro2 #(.K(K), .SHIFT_A(SHIFT_A)) u_mul_p (
    .clk, .rst, .load(p_load), .a(p_a), .b(p_b), .m(m_q),
    .r(p_res), .busy(p_busy), .done(p_done)
  );

  // Operand routing and load strobes. Products are started in the cycle in
  // which the previous stage reports done, so each stage costs n+1 cycles.
  always_comb begin
    r_load = 1'b0;
    p_load = 1'b0;
    r_a    = p_res;
    r_b    = p_res;
    p_a    = p_res;
    p_b    = p_res;
    unique case (state_q)
      EXP_CONST: begin
        // Mapping: R = MonPro(C, 1), P = MonPro(C, mess).
        r_load = c_done;
        p_load = c_done;
        r_a    = {1'b0, c_val};
        r_b    = (K + 1)'(1);
        p_a    = {1'b0, c_val};
        p_b    = {1'b0, mess_q};
      end
      EXP_MAP, EXP_LOOP: begin
        // Key bit step: P = MonPro(P, P); if e_i, R = MonPro(R, P).
        // Leaving EXP_LOOP after the last bit starts the re-mapping instead.
        if (state_q == EXP_LOOP && last_bit) begin
          r_load = p_done;
          r_a    = r_res;
          r_b    = (K + 1)'(1);
        end else begin
          p_load = p_done;
          p_a    = p_res;
          p_b    = p_res;
          r_load = p_done && (state_q == EXP_MAP ? e_q[0] : e_q[1]);
          r_a    = r_res;
          r_b    = p_res;
        end
      end
      default: ;
    endcase
  end

  assign fixed = K'((r_res >= {1'b0, m_q}) ? r_res - {1'b0, m_q} : r_res);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= EXP_IDLE;
      mess_q  <= '0;
      e_q     <= '0;
      m_q     <= '0;
      bit_q   <= '0;
      h_cryp  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        EXP_IDLE: if (accept) begin
          mess_q  <= mess;
          e_q     <= clef;
          m_q     <= m;
          bit_q   <= '0;
          state_q <= EXP_CONST;
        end
        EXP_CONST: if (c_done) state_q <= EXP_MAP;
        EXP_MAP:   if (p_done) state_q <= EXP_LOOP;   // bit 0 step started
        EXP_LOOP: if (p_done) begin
          if (last_bit) begin
            state_q <= EXP_REMAP;
          end else begin
            e_q   <= e_q >> 1;
            bit_q <= bit_q + 1'b1;
          end
        end
        EXP_REMAP: if (r_done) begin
          h_cryp  <= fixed;
          done    <= 1'b1;
          state_q <= EXP_IDLE;
        end
        default: state_q <= EXP_IDLE;
      endcase
    end
  end

  assign busy = (state_q != EXP_IDLE);

  // Both multipliers of a key bit step are started on the same edge, so the
  // multiply never outlasts the square it runs beside.
  a_mult_within_square: assert property (@(posedge clk) disable iff (rst)
    (state_q == EXP_LOOP && p_done) |-> !r_busy);
  // A product is only started on an idle multiplier, after C is ready.
  a_square_idle: assert property (@(posedge clk) disable iff (rst)
    p_load |-> !p_busy && !c_busy);
  a_odd_modulus: assert property (@(posedge clk) disable iff (rst) accept |-> m[0])
    else $error("monexp2: even modulus");

endmodule
