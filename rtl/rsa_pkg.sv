// rsa_pkg: constants and types shared by the RSA exponentiator blocks.
//
// KEY_BITS is the key length k of the reference configuration (8 bits, as in
// the implemented MonPro2/MonExp2 results). A radix-2 Montgomery product with
// no final subtraction needs n = k+2 iterations so that results stay below 2M
// and can be fed straight back into the next product; monpro_iters() gives n.
// exp_state_t enumerates the controller stages of monexp2: constant
// computation, mapping, the per-key-bit square/multiply loop and re-mapping.
package rsa_pkg;

  localparam int unsigned KEY_BITS = 8;

  // Number of Montgomery iterations for a k-bit modulus (n = k + 2).
  function automatic int unsigned monpro_iters(int unsigned k);
    return k + 2;
  endfunction

  typedef enum logic [2:0] {
    EXP_IDLE,
    EXP_CONST,
    EXP_MAP,
    EXP_LOOP,
    EXP_REMAP
  } exp_state_t;

endpackage
