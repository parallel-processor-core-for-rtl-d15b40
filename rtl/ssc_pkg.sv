// ssc_pkg: constants and types shared by the semantic comparison core.
//
// The core compares two meaning tensors. Each tensor is a table of basis
// vector strings with a 16-bit fixed-point weight per row. The widths here are
// fixed by the architecture: the vector ID is the 64-bit FNV hash of the
// string, a coefficient is 16 bits, and a Bloom filter index is 17 bits
// (a 131,072-bit filter). The FNV constants are the published 64-bit FNV
// offset basis and prime; the choice of the FNV-1a variant is this design's.
package ssc_pkg;

  localparam int ID_W   = 64;   // vector ID = 64-bit FNV hash
  localparam int COEF_W = 16;   // fixed-point coefficient width
  localparam int PROD_W = 2 * COEF_W;

  localparam logic [ID_W-1:0] FNV64_OFFSET = 64'hcbf2_9ce4_8422_2325;
  localparam logic [ID_W-1:0] FNV64_PRIME  = 64'h0000_0100_0000_01b3;

  // One pair of coefficients of a common basis vector: w(D1), w(D2).
  typedef struct packed {
    logic [COEF_W-1:0] coef_a;
    logic [COEF_W-1:0] coef_b;
  } coef_pair_t;

  // Phases of one comparison, in the order the controller runs them.
  typedef enum logic [3:0] {
    PH_IDLE,
    PH_HASH2,   // stage A on D2: FNV over the strings
    PH_WRBF,    // stage B: write K BF bits of every D2 row, one per cycle
    PH_OR,      // consolidate the per-row BFs
    PH_DIST,    // interconnect 1: load the BF copies of stage C
    PH_HASH1,   // stage A on D1
    PH_WRIDX,   // write the K indices of every D1 row into stage C
    PH_TEST,    // stage C: membership test, one index per cycle
    PH_LOOKUP,  // interconnect 2 issues up to B rows per cycle to RAM/CAM
    PH_CAM,     // last CAM lookup completes (E)
    PH_APPEND,  // interconnect 3 stores the last confirmed pairs (S)
    PH_MULT,    // up to P pairs per cycle issued to the multipliers
    PH_DRAIN    // multiplier pipeline (L) and final accumulation (A)
  } phase_t;

  // FNV-1a step on one byte.
  function automatic logic [ID_W-1:0] fnv1a_step(input logic [ID_W-1:0] h,
                                                 input logic [7:0] b);
    return (h ^ {{(ID_W-8){1'b0}}, b}) * FNV64_PRIME;
  endfunction

endpackage
