// polydiv_pkg: types shared by the left-shift-register polynomial division
// blocks. All arithmetic is over GF(2); a polynomial of degree below n is held
// as an n-bit vector with bit i the coefficient of x^i.
//
// mod_op_e lists the operations the MOD circuit datapath (mod_circuit)
// performs in one clock cycle. The sequencers around it (polymod_mul, gf_mult,
// cyclic_encoder, syndrome_gen) drive one of these each cycle.
package polydiv_pkg;

  typedef enum logic [2:0] {
    MOD_IDLE   = 3'd0,  // hold all registers
    MOD_LOAD_P = 3'd1,  // P <= low coefficients of the divisor p(x)
    MOD_INIT   = 3'd2,  // C <= (0, P) = x^n mod p(x);  R <= r_in
    MOD_STEP   = 3'd3,  // if bit_in: R <= R + C;  C <= x*C mod p(x)
    MOD_LOAD_C = 3'd4,  // C <= x*R mod p(x);  if !bit_in: R <= 0
    MOD_ADD_R  = 3'd5   // R <= R + r_in
  } mod_op_e;

endpackage
