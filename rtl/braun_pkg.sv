// braun_pkg: shared types of the Braun multiplier family.
//
// The family consists of five unsigned carry-save array multipliers that differ
// in how they skip additions whose partial product is zero (none, by row, by
// column, two-dimensional, row-and-column with simplified cells), each of which
// can end in one of three last-stage adders (ripple-carry, carry-lookahead,
// Kogge-Stone). The enums below name those choices; their order is the order
// used for the arrays of results in braun_compare_top.
package braun_pkg;

  // Last-stage (vector-merging) adder of a multiplier.
  typedef enum logic [1:0] {
    ADD_RCA = 2'd0,  // ripple-carry adder (the original multipliers)
    ADD_CLA = 2'd1,  // carry-lookahead adder
    ADD_KSA = 2'd2   // Kogge-Stone parallel-prefix adder
  } final_adder_e;

  localparam int unsigned NUM_ADDERS = 3;

  // Array architecture.
  typedef enum logic [2:0] {
    ARCH_BRAUN = 3'd0,  // standard Braun array
    ARCH_ROW   = 3'd1,  // row bypassing
    ARCH_COL   = 3'd2,  // column bypassing
    ARCH_2D    = 3'd3,  // two-dimensional bypassing
    ARCH_RC    = 3'd4   // row and column bypassing with A+1 / A+B+1 cells
  } arch_e;

  localparam int unsigned NUM_ARCHS = 5;

  // Group width of the carry-lookahead adder.
  localparam int unsigned CLA_GROUP = 4;

endpackage
