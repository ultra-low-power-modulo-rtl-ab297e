// Shared constants and the carry-merge operator of the modulo 2^n+1 multiplier.
//
// The multiplier computes X*Y mod (2^N_MOD + 1) for X, Y in [0, 2^N_MOD]. Its
// reduction tree takes NUM_OPS = N_MOD + 1 operands: the constant PP_CONST followed
// by the N_MOD partial product rows. The constant 2 is the value given for this
// algorithm; the +1 that completes the correction comes from the inverted
// end-around carry of the final adder. The prefix operator below is the usual
// (g,p) o (g',p') = (g | p&g', p&p') carry-merge cell of a parallel prefix adder.
package modmul_pkg;

  localparam int unsigned N_MOD    = 16;        // modulus 2^16 + 1
  localparam int unsigned NUM_OPS  = 17;        // operands into the compressor tree
  localparam int unsigned SPARSE_K = 4;         // sparseness of the final adder
  localparam int unsigned PP_CONST = 2;         // correction constant, operand 0

  // Generate/propagate pair of a bit or of a group of bits.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Carry merge: hi is the more significant group, lo the less significant one.
  function automatic gp_t gp_merge(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
