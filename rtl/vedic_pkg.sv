// Shared types for the Vedic multiplier family.
//
// adder_kind_e selects which adder the 4-, 8- and 16-bit multipliers use to
// sum their four partial products. Both are described in the design: the
// ripple-carry adder is the default, being the build for which figures of
// delay and area are reported; the Kogge-Stone parallel prefix adder is the
// faster alternative.
package vedic_pkg;

  typedef enum logic [0:0] {
    ADDER_RCA = 1'b0,  // ripple-carry adder, rca_adder
    ADDER_KSA = 1'b1   // Kogge-Stone parallel prefix adder, ks_adder
  } adder_kind_e;

endpackage : vedic_pkg
