// N-bit carry-save adder: a row of N independent full adders.
//
// Reduces three N-bit addends to two: x + y + z = sum + 2*carry, where
// sum[i] is u_i and carry[i] is v_{i+1} (weight 2^(i+1)). In the modular
// adder x and y are the magnitudes of the operands and z is the F word, so
// carry[N-1] is v_N, which feeds the flag logic, and carry[N-2:0] feeds the
// carry-propagate adder. No carry travels between the cells, so the delay
// is that of one full adder whatever N is.
//
// Purely combinational.
module csa
  import mod_adder_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a (x[i]),
      .b (y[i]),
      .ci(z[i]),
      .s (sum[i]),
      .co(carry[i])
    );
  end

endmodule
