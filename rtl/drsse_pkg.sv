// drsse_pkg: constants and helpers shared by the blocks of the differential
// recursive soft sequential estimation (DRSSE) acquisition datapath.
//
// The default generator is the thirteen-stage polynomial
// g(D) = 1 + D + D^3 + D^4 + D^13 used for the 8191-chip m-sequence, encoded
// as a tap mask whose bit k-1 is the coefficient g_k of D^k. Chips are carried
// as one bit: 0 stands for the chip value +1 and 1 for -1, so the product of
// chips in the generator recursion becomes an exclusive-or of bits.
//
// Log-likelihood ratios (LLRs) are two's complement integers that saturate
// symmetrically to +/-(2^(W-1)-1), so that a magnitude always fits in W-1 bits
// and negation never overflows. Word widths are this design's own choice.
package drsse_pkg;

  // Generator stages and tap mask of the default m-sequence (S = 13).
  localparam int unsigned DEF_S = 13;
  localparam logic [DEF_S-1:0] DEF_TAPS = 13'h100D;  // D^1, D^3, D^4, D^13

  // Default fixed-point widths.
  localparam int unsigned DEF_W_Z   = 8;   // received I and Q sample
  localparam int unsigned DEF_W_LC  = 8;   // channel reliability L_c, unsigned
  localparam int unsigned DEF_LC_SHIFT = 8; // right shift after L_c * U
  localparam int unsigned DEF_W_LLR = 16;  // soft values in the decoder

  // Chip value as a bit: CHIP_P1 is +1, CHIP_M1 is -1.
  typedef enum logic {CHIP_P1 = 1'b0, CHIP_M1 = 1'b1} chip_e;

  // Acquisition state of the receiver.
  typedef enum logic [1:0] {
    ST_SEARCH  = 2'd0,  // decoder runs, generator not yet (re)loaded
    ST_VERIFY  = 2'd1,  // generator loaded, waiting for the filter to settle
    ST_LOCKED  = 2'd2   // correlation above threshold
  } acq_state_e;

endpackage
