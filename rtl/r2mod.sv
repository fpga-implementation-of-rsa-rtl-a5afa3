// r2mod: computes the Montgomery mapping constant C = 2^(2n) mod M, n = K+2.
//
// The exponentiator needs C to move its operands into the Montgomery domain
// (MonPro(C, X) = X*2^n mod M). The reference design only states the formula,
// so this block uses the plainest sequential circuit: a K-bit register starts
// at 1 mod M and is doubled modulo M once per clock (shift left, subtract M if
// the result is not below M), 2n times.
//
// Interface: on a clock edge with start=1, m is captured. After 2n further
// edges c holds 2^(2n) mod M (below M) and done pulses for one cycle; c holds
// until the next start. busy is high in between. rst is synchronous, active
// high. m must be nonzero.
module r2mod #(
  parameter int unsigned K = rsa_pkg::KEY_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [K-1:0] m,
  output logic [K-1:0] c,
  output logic         busy,
  output logic         done
);

  localparam int unsigned STEPS = 2 * rsa_pkg::monpro_iters(K);
  localparam int unsigned CW    = $clog2(STEPS + 1);

  logic [K-1:0]  m_q;
  logic [K-1:0]  x_q;
  logic [CW-1:0] cnt_q;
  logic [K:0]    dbl;
  logic [K-1:0]  dbl_red;    // below M, so K bits suffice

  // One modular doubling: 2x < 2M, so a single conditional subtraction
  // brings it back below M.
  always_comb begin
    dbl     = {x_q, 1'b0};
    dbl_red = K'((dbl >= {1'b0, m_q}) ? dbl - {1'b0, m_q} : dbl);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m_q   <= '0;
      x_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        m_q   <= m;
        x_q   <= (m == K'(1)) ? '0 : K'(1);   // 1 mod M
        cnt_q <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        x_q   <= dbl_red;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CW'(STEPS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign c = x_q;

  a_nonzero_modulus: assert property (@(posedge clk) disable iff (rst) start |-> m != '0)
    else $error("r2mod: zero modulus");

endmodule
