// occ_pkg - shared constants of the octa-phase clock correctors.
// Eight clock phases are corrected. The phase comparator sees pairs of clocks
// spaced M_SPACING = 3 phases apart (3T/8), because 3 is coprime to 8: stepping
// through all eight pairs still reaches every phase. The duty-cycle path compares
// a clock with its complement, 4 phases away. The helpers give the partner
// indices used by the selection MUXes and the loop filters.
package occ_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N_PH       = 8;  // number of clock phases
  localparam int unsigned M_SPACING  = 3;  // coprime comparison spacing
  localparam int unsigned COMP_SPACE = 4;  // complementary clock spacing (DCC)

  typedef logic [2:0] ph_idx_t;

  // Phase index a + b modulo 8.
  function automatic ph_idx_t ph_add(input ph_idx_t a, input int unsigned b);
    return ph_idx_t'((int'(a) + int'(b)) % int'(N_PH));
  endfunction

  // One update decision of a loop filter.
  typedef enum logic [1:0] {UPD_NONE = 2'd0, UPD_DN = 2'd1, UPD_UP = 2'd2} upd_t;
endpackage
