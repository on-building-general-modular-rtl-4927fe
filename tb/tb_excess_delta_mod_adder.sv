// End-to-end self-checking testbench of excess_delta_mod_adder at its
// default parameters (N = 5, delta = 3 after reset).
//
// 1. Reset: delta_q must come up as 3 (modulus 29).
// 2. The six worked mod-29 examples, with the flag and magnitude of each
//    sum given explicitly.
// 3. For every delta the register can hold (0..2^(N-1)-1): write it, check
//    that the sum still uses the old delta before the clock edge and the new
//    one after it, then apply every operand pair whose values lie in the
//    accepted domain. The reference computes W = A + B + delta with plain
//    integers: phi_s must be (W < 2^N), mu_s must be W mod 2^N, and the
//    result value mu_s - phi_s*delta must lie in the domain again and be
//    congruent to A + B mod m.
// 4. Accumulation chains: the sum is fed back as operand A many times and
//    compared with an integer running sum mod m.
// Each mechanism is counted: the three F cases (+delta, 0, -delta), both
// values of the result flag, delta reconfiguration and result feedback; a
// mechanism that never happened counts as a failure.
module tb_excess_delta_mod_adder;
  import mod_adder_pkg::*;
  localparam int N = N_DEFAULT;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         delta_we = 1'b0;
  logic [N-2:0] delta_wdata = '0;
  logic [N-2:0] delta_q;
  logic         phi_a = 1'b0, phi_b = 1'b0, phi_s;
  logic [N-1:0] mu_a = '0, mu_b = '0, mu_s;

  int checks = 0, failures = 0;
  int n_f_pos = 0, n_f_zero = 0, n_f_neg = 0;
  int n_flag0 = 0, n_flag1 = 0, n_reconf = 0, n_feedback = 0;

  excess_delta_mod_adder dut (.*);

  always #5 clk = ~clk;

  function automatic int modp(int x, int m);
    int r = x % m;
    return (r < 0) ? r + m : r;
  endfunction

  // Largest operand value the adder accepts: m, or m - 1 when delta = 0.
  function automatic int vmax_of(int d);
    return (d == 0) ? (1 << N) - 1 : (1 << N) - d;
  endfunction

  // Apply one operand pair and compare with the integer reference.
  task automatic apply(int d, bit pa, int ma, bit pb, int mb);
    int m, w, va, vb, vs;
    bit exp_phi;
    int exp_mu;
    m = (1 << N) - d;
    phi_a = pa; mu_a = N'(ma); phi_b = pb; mu_b = N'(mb);
    #1;
    va = ma - int'(pa) * d;
    vb = mb - int'(pb) * d;
    w  = va + vb + d;
    exp_phi = (w < (1 << N));
    exp_mu  = w % (1 << N);
    vs = int'(mu_s) - int'(phi_s) * d;
    checks++;
    if (phi_s !== exp_phi || int'(mu_s) != exp_mu || vs < 0 || vs > vmax_of(d) ||
        modp(vs, m) != modp(va + vb, m)) begin
      failures++;
      if (failures < 20)
        $display("FAIL d=%0d A=(%0d,%0d) B=(%0d,%0d): S=(%0d,%0d) expected (%0d,%0d)",
                 d, pa, ma, pb, mb, phi_s, mu_s, exp_phi, exp_mu);
    end
    if (!pa && !pb) n_f_pos++;
    else if (pa && pb) n_f_neg++;
    else n_f_zero++;
    if (phi_s) n_flag1++; else n_flag0++;
  endtask

  task automatic write_delta(int d);
    int old_d;
    old_d = int'(delta_q);
    @(negedge clk);
    delta_we = 1'b1;
    delta_wdata = (N-1)'(d);
    // before the edge the old delta still applies: 0 + 0 gives mu_s = delta
    phi_a = 1'b0; mu_a = '0; phi_b = 1'b0; mu_b = '0;
    #1;
    checks++;
    if (int'(mu_s) != old_d || phi_s !== 1'b1) begin
      failures++;
      $display("FAIL delta %0d applied before the clock edge", d);
    end
    @(posedge clk);
    #1;
    delta_we = 1'b0;
    checks++;
    if (int'(delta_q) != d || int'(mu_s) != d) begin
      failures++;
      $display("FAIL delta %0d not applied one edge after the write", d);
    end
    n_reconf++;
  endtask

  initial begin
    int d;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (int'(delta_q) != DELTA_RESET_DEFAULT) begin
      failures++;
      $display("FAIL reset delta %0d", delta_q);
    end

    // Worked mod-29 examples: A=(phi,mu), B=(phi,mu), S=(phi,mu).
    begin
      automatic int tab [6][6] = '{'{0, 28, 1,  4, 0,  0},
                         '{0, 29, 0,  0, 0,  0},
                         '{1,  6, 1, 31, 0,  2},
                         '{0,  3, 1, 28, 1, 31},
                         '{1, 31, 1, 31, 0, 27},
                         '{0,  1, 0,  2, 1,  6}};
      for (int r = 0; r < 6; r++) begin
        phi_a = tab[r][0][0]; mu_a = N'(tab[r][1]);
        phi_b = tab[r][2][0]; mu_b = N'(tab[r][3]);
        #1;
        checks++;
        if (int'(phi_s) != tab[r][4] || int'(mu_s) != tab[r][5]) begin
          failures++;
          $display("FAIL example %0d: S=(%0d,%0d)", r, phi_s, mu_s);
        end
      end
    end

    // Every delta, every operand pair in the domain.
    for (d = 0; d < (1 << (N - 1)); d++) begin
      int m, vmax;
      write_delta(d);
      m = (1 << N) - d;
      vmax = (d == 0) ? m - 1 : m;
      for (int pa = 0; pa < 2; pa++)
        for (int ma = 0; ma < (1 << N); ma++)
          for (int pb = 0; pb < 2; pb++)
            for (int mb = 0; mb < (1 << N); mb++) begin
              int va, vb;
              va = ma - pa * d;
              vb = mb - pb * d;
              if (va < 0 || va > vmax || vb < 0 || vb > vmax) continue;
              apply(d, pa[0], ma, pb[0], mb);
            end
    end

    // Accumulation chains with the sum fed back as operand A.
    for (int t = 0; t < 8; t++) begin
      int m, acc, vb;
      bit pacc, pb;
      int macc, mb;
      d = (t == 0) ? DELTA_RESET_DEFAULT : int'($urandom_range(0, (1 << (N - 1)) - 1));
      write_delta(d);
      m = (1 << N) - d;
      pacc = 1'b0; macc = 0; acc = 0;
      for (int k = 0; k < 200; k++) begin
        vb = int'($urandom_range(0, m - 1));
        pb = (vb + d < (1 << N)) ? 1'($urandom_range(0, 1)) : 1'b0;
        mb = vb + int'(pb) * d;
        apply(d, pacc, macc, pb, mb);
        acc = (acc + vb) % m;
        checks++;
        if (modp(int'(mu_s) - int'(phi_s) * d, m) != acc) begin
          failures++;
          if (failures < 20) $display("FAIL chain d=%0d step %0d", d, k);
        end
        pacc = phi_s; macc = int'(mu_s);
        n_feedback++;
      end
    end

    $display("mechanisms: F=+delta %0d, F=0 %0d, F=-delta %0d, flag=0 %0d, flag=1 %0d, delta writes %0d, feedback %0d",
             n_f_pos, n_f_zero, n_f_neg, n_flag0, n_flag1, n_reconf, n_feedback);
    if (n_f_pos == 0 || n_f_zero == 0 || n_f_neg == 0 || n_flag0 == 0 ||
        n_flag1 == 0 || n_reconf == 0 || n_feedback == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
