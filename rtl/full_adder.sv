// One-bit full adder: s + 2*co = a + b + ci.
//
// The building cell of the carry-save adder. The method only asks for a
// standard full adder; the parity/majority form here is the textbook one,
// and a library cell can replace it. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
