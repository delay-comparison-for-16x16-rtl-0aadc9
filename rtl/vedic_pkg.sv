// vedic_pkg: types shared by the adders and the Vedic multiplier.
//
// adder_kind_e selects the carry scheme of generic_adder and, through it,
// of the addition tree inside vedic_mult16: a ripple carry chain, 4-bit
// carry look-ahead groups, or a Kogge-Stone parallel prefix network.
// Kogge-Stone is the default everywhere because it is the fastest of the
// three and the one this design is built to show off.
package vedic_pkg;

  typedef enum logic [1:0] {
    ADDER_RCA = 2'd0,  // ripple carry adder
    ADDER_CLA = 2'd1,  // chained 4-bit carry look-ahead groups
    ADDER_KSA = 2'd2   // Kogge-Stone parallel prefix adder
  } adder_kind_e;

endpackage : vedic_pkg
