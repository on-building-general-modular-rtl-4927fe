// Sum-flag logic: phi_s = not w_N.
//
// The bit of weight 2^N of the interim sum W = A + B + delta is
// w_N = v_N - f_{N-1} + c_N, which is 0 or 1 for every operand pair the
// adder accepts. Its complement, the flag of the result, is
//   phi_s = (~c_N & (~v_N | f_{N-1})) | (~v_N & f_{N-1}).
// phi_s = 1 means W < 2^N, so delta has still to be subtracted from the
// magnitude; the flag records that instead of doing it. The equation is the
// design's.
//
// Purely combinational.
module flag_logic (
  input  logic c_n,
  input  logic v_n,
  input  logic f_msb,
  output logic phi_s
);

  always_comb
    phi_s = (~c_n & (~v_n | f_msb)) | (~v_n & f_msb);

endmodule
