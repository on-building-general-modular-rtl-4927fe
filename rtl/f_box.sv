// F box: builds the correction term F = (1 - phi_a - phi_b) * delta.
//
// F takes only the values +delta (both flags 0), 0 (one flag set) and
// -delta (both flags 1). It is produced as an N-bit 1's-complement word
// f_{N-1}..f_0: the sign bit is f_{N-1} = phi_a & phi_b, and each lower bit
// is d_i when both flags are 0, the inverse of d_i when both are 1, and 0
// otherwise. The missing +1 of the 1's-complement negation is added later
// by the adder (it enters as the weight-1 carry bit v_0 = f_{N-1}).
// These equations are those of the design; nothing here is a local choice.
//
// Purely combinational.
module f_box
  import mod_adder_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [N-2:0] delta,
  input  logic         phi_a,
  input  logic         phi_b,
  output logic [N-1:0] f
);

  logic both_set, none_set;

  always_comb begin
    both_set = phi_a & phi_b;
    none_set = ~phi_a & ~phi_b;
    f[N-1]   = both_set;
    for (int i = 0; i < N-1; i++)
      f[i] = (both_set & ~delta[i]) | (none_set & delta[i]);
  end

endmodule
