// N-bit Kogge-Stone parallel-prefix adder: {cout, sum} = a + b.
//
// This is the carry-propagate adder of the modular adder. Any N-bit adder
// would do there; Kogge-Stone is the one the design is evaluated with.
// Structure:
//   - pg boxes: p_i = a_i | b_i, g_i = a_i & b_i, half-sum h_i = p_i & ~g_i
//     (an OR propagate is enough for carries, and h_i gives the sum bit).
//   - prefix network: ceil(log2 N) levels; at level k every position i with
//     i >= 2^(k-1) merges its (G, P) pair with that of position i - 2^(k-1):
//     G = G_hi | (P_hi & G_lo), P = P_hi & P_lo. After the last level G_i is
//     the carry out of bit i.
//   - sum: s_i = h_i ^ c_i with c_0 = 0 and c_{i+1} = G_i; cout = G_{N-1}.
// There is no carry-in: in the modular adder the extra weight-1 bit rides
// in b[0]. Both top carries (into bit N-1 and out of it) leave the last
// prefix level together, so cout is ready as early as the top sum bit.
//
// Purely combinational.
module kspp_adder
  import mod_adder_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  logic [N-1:0] p, g, h;  // pg boxes: propagate, generate, half sum
  logic [N-1:0] gp;       // group generate = carry out of each bit
  logic [N:0]   c;        // carry into each bit, c[N] = carry out

  always_comb begin
    logic [N-1:0] g_cur, p_cur, g_nxt, p_nxt;

    // pg boxes
    p = a | b;
    g = a & b;
    h = p & ~g;

    // prefix network, level k merges with the node 2^(k-1) places lower
    g_cur = g;
    p_cur = p;
    for (int unsigned k = 1; k <= LEVELS; k++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (i >= (1 << (k - 1))) begin
          g_nxt[i] = g_cur[i] | (p_cur[i] & g_cur[i - (1 << (k - 1))]);
          p_nxt[i] = p_cur[i] & p_cur[i - (1 << (k - 1))];
        end else begin
          g_nxt[i] = g_cur[i];
          p_nxt[i] = p_cur[i];
        end
      end
      g_cur = g_nxt;
      p_cur = p_nxt;
    end
    gp = g_cur;

    // final sums
    c    = {gp, 1'b0};
    sum  = h ^ c[N-1:0];
    cout = c[N];
  end

endmodule
