// Shared constants and codes of the scalable radix-4 Montgomery multiplier.
//
// The multiplier works on operands cut into p "extended chunks" of c' = c + w/2 bits,
// where w is the width of the shared data memory's bus and c a multiple of w.  The
// default sizes (w = 32, c up to 512, p up to 4, a 2-KB memory) are those of the
// reference implementation; the two select codes below are this design's own choice,
// built so that SEL_PP for +A is the bit inverse of SEL_PP for +2A and SEL_PP for -A the
// inverse of SEL_PP for -2A, which keeps the number of toggles on the select lines low
// (Booth recoding never lets +2A follow +A/+2A, nor -2A follow -A/-2A).
package mm_pkg;

  localparam int unsigned W_DEF    = 32;   // memory data bus width w
  localparam int unsigned CMAX_DEF = 512;  // largest chunk length c
  localparam int unsigned PMAX_DEF = 4;    // largest precision p (quadruple)
  localparam int unsigned MEM_BYTES_DEF = 2048;

  // Partial product select, meaningful only while EN_PP is 1.
  // bit 1 set: |PP| = A, clear: |PP| = 2A.  bit1 ^ bit0: PP is negative.
  typedef enum logic [1:0] {
    SELPP_P2A = 2'b00,
    SELPP_N2A = 2'b01,
    SELPP_N1A = 2'b10,
    SELPP_P1A = 2'b11
  } sel_pp_e;

  // Modulus multiple select, meaningful only while EN_MM is 1.
  typedef enum logic [1:0] {
    SELMM_SI  = 2'b00,
    SELMM_P1M = 2'b01,
    SELMM_P2M = 2'b10,
    SELMM_N1M = 2'b11
  } sel_mm_e;

  // States of the multiplier's controller (see montmul_core).
  typedef enum logic [3:0] {
    S_IDLE, S_PFWAIT, S_SETUP, S_SILOAD, S_DIGIT, S_COLEND, S_CPA, S_CPAEND, S_DONE
  } mm_state_e;

  // A quotient digit qm in {-1, 0, +1, +2} is stored as qm mod 4 (2 bits):
  // 0 -> 0, 1 -> +1, 2 -> +2, 3 -> -1.

endpackage
