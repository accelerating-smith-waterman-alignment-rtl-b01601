// sw_pkg: types and constants shared by the Smith-Waterman block-kernel RTL.
//
// Nucleotides travel as 3-bit residue codes. Codes 0..3 are the bases A, C,
// G and T. Code 4 is the padding ("dummy") symbol that extends S2 to a
// multiple of the block width; it never matches anything, not even itself,
// so padded columns can never raise the best score. Codes 5..7 are treated
// like the padding symbol (for example an unknown base N). The residue code
// assignment is this design's own choice.
//
// Global memory is addressed in elements (one residue or one score per
// address), not in bytes; a real memory interface would scale the address
// by the element size.
package sw_pkg;

  typedef logic [2:0] residue_t;

  localparam residue_t RES_A     = 3'd0;
  localparam residue_t RES_C     = 3'd1;
  localparam residue_t RES_G     = 3'd2;
  localparam residue_t RES_T     = 3'd3;
  localparam residue_t RES_DUMMY = 3'd4;

  // Width of a residue word in global memory (an OpenCL char).
  localparam int unsigned RES_MEM_W = 8;

  // True when two residues score as a match: both must be real bases.
  function automatic logic res_match(residue_t a, residue_t b);
    return (a == b) && (a < RES_DUMMY);
  endfunction

  // Kernel states of sw_kernel.
  typedef enum logic [2:0] {
    K_IDLE,
    K_LOAD_S2,
    K_ROWS,
    K_MAX,
    K_MAX_WR,
    K_FINISH
  } kstate_e;

endpackage
