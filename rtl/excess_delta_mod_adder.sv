// Unified modulo-(2^N - delta) adder on excess-delta residues.
//
// Residue encoding: a residue X mod m, m = 2^N - delta, travels as a flag
// phi and an N-bit magnitude mu with X = mu - phi*delta (mod m). A set flag
// means "delta still has to be subtracted". Keeping that subtraction pending
// is what lets the adder get by with one carry-propagate adder and no final
// correction stage: the sum is
//   W     = A + B + delta = mu_a + mu_b + (1 - phi_a - phi_b)*delta
//   phi_s = not w_N,   mu_s = W mod 2^N.
// If W >= 2^N the result is W - 2^N = A + B - m; otherwise it is W with a
// pending -delta, i.e. A + B.
//
// Datapath (one N-bit carry-propagate adder on the critical path):
//   delta_reg   writable register holding delta (N-1 bits)
//   f_box       F = (1 - phi_a - phi_b)*delta as N-bit 1's complement f
//   csa         mu_a + mu_b + f  ->  sum u, carries v_N..v_1
//   kspp_adder  u + {v_{N-1}..v_1, f_{N-1}}  ->  w_{N-1}..w_0, carry c_N
//               (f_{N-1} in the weight-1 slot completes the 1's complement)
//   flag_logic  phi_s = ~w_N from c_N, v_N and f_{N-1}
// The structure and equations are the design's. The clock, reset and write
// port of the delta register and the domain assertion below are this
// implementation's.
//
// Operand domain: the result is right whenever 0 <= W < 2^(N+1). That holds
// whenever both operand values mu - phi*delta lie in [0, m-1] (in [0, m]
// when delta > 0; m is then a second code for zero), and the sum value
// mu_s - phi_s*delta lies in that same range again, so results can be fed
// back as operands without conversion. With operands in [0, m-1] the sum is
// in [0, m-1] too.
// delta must satisfy 0 <= delta < 2^(N-1); the register width enforces it.
//
// Timing: the sum is combinational from phi_a, mu_a, phi_b, mu_b and the
// register output delta_q. A delta written at a clock edge applies to the
// sum from that edge on.
module excess_delta_mod_adder
  import mod_adder_pkg::*;
#(
  parameter int unsigned N           = N_DEFAULT,
  parameter int unsigned DELTA_RESET = DELTA_RESET_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  // delta register write port
  input  logic         delta_we,
  input  logic [N-2:0] delta_wdata,
  output logic [N-2:0] delta_q,
  // operands
  input  logic         phi_a,
  input  logic [N-1:0] mu_a,
  input  logic         phi_b,
  input  logic [N-1:0] mu_b,
  // sum
  output logic         phi_s,
  output logic [N-1:0] mu_s
);

  if (N < 2) begin : g_bad_n
    $error("excess_delta_mod_adder: N must be at least 2");
  end

  logic [N-1:0] f;      // F word, f_{N-1}..f_0
  logic [N-1:0] u;      // CSA sum bits u_{N-1}..u_0
  logic [N-1:0] v;      // CSA carries, v[i] = v_{i+1}
  logic [N-1:0] cpa_b;  // second CPA addend {v_{N-1}..v_1, v_0 = f_{N-1}}
  logic         c_n;    // CPA carry out

  delta_reg #(.N(N), .DELTA_RESET(DELTA_RESET)) u_delta_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (delta_we),
    .wdata(delta_wdata),
    .delta(delta_q)
  );

  f_box #(.N(N)) u_f_box (
    .delta(delta_q),
    .phi_a(phi_a),
    .phi_b(phi_b),
    .f    (f)
  );

  csa #(.N(N)) u_csa (
    .x    (mu_a),
    .y    (mu_b),
    .z    (f),
    .sum  (u),
    .carry(v)
  );

  assign cpa_b = {v[N-2:0], f[N-1]};

  kspp_adder #(.N(N)) u_cpa (
    .a   (u),
    .b   (cpa_b),
    .sum (mu_s),
    .cout(c_n)
  );

  flag_logic u_flag (
    .c_n  (c_n),
    .v_n  (v[N-1]),
    .f_msb(f[N-1]),
    .phi_s(phi_s)
  );

  // w_N = v_N - f_{N-1} + c_N must be 0 or 1: it is 2 when W >= 2^(N+1)
  // and -1 when W < 0, both outside the operand domain.
  a_w_n_in_range : assert property (
    @(posedge clk) disable iff (!rst_n)
      !((v[N-1] & c_n & ~f[N-1]) | (~v[N-1] & ~c_n & f[N-1]))
  ) else $error("excess_delta_mod_adder: operands outside the adder's domain");

endmodule
