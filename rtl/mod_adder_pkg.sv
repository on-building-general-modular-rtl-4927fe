// Shared constants of the excess-delta modular adder.
//
// The adder works on residues modulo m = 2^N - delta. A residue is carried as
// a (flag, magnitude) pair (phi, mu) whose value is mu - phi*delta, so a
// pending subtraction of delta is recorded in one flag bit instead of being
// carried out. The defaults below are the worked example of the design
// (N = 5, delta = 3, modulus 29); every module takes N as a parameter.
package mod_adder_pkg;

  // Word width n of a residue magnitude.
  parameter int unsigned N_DEFAULT = 5;

  // Value loaded into the delta register at reset (modulus 2^5 - 3 = 29).
  // The reset value is this design's choice.
  parameter int unsigned DELTA_RESET_DEFAULT = 3;

endpackage
