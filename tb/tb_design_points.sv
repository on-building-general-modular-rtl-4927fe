// Testbench of excess_delta_mod_adder at the four synthesis design points:
// (m, N, delta) = (17, 5, 15), (29, 5, 3), (131, 8, 125), (191, 8, 65).
//
// One 5-bit and one 8-bit adder are instantiated. For each point the delta
// register is written, then every operand pair is applied whose values
// A = mu - phi*delta lie in [0, m-1], in both encodings of a value where the
// magnitude fits (phi = 1 needs A + delta < 2^N). The flag and magnitude
// of the sum must match W = A + B + delta computed with integers, and the
// sum value must equal (A + B) mod m.
module tb_design_points;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       we5 = 1'b0, we8 = 1'b0;
  logic [3:0] wd5 = '0, dq5;
  logic [6:0] wd8 = '0, dq8;
  logic       pa5 = 1'b0, pb5 = 1'b0, ps5, pa8 = 1'b0, pb8 = 1'b0, ps8;
  logic [4:0] ma5 = '0, mb5 = '0, ms5;
  logic [7:0] ma8 = '0, mb8 = '0, ms8;

  int checks = 0, failures = 0;

  excess_delta_mod_adder #(.N(5)) dut5 (
    .clk(clk), .rst_n(rst_n), .delta_we(we5), .delta_wdata(wd5), .delta_q(dq5),
    .phi_a(pa5), .mu_a(ma5), .phi_b(pb5), .mu_b(mb5), .phi_s(ps5), .mu_s(ms5));
  excess_delta_mod_adder #(.N(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .delta_we(we8), .delta_wdata(wd8), .delta_q(dq8),
    .phi_a(pa8), .mu_a(ma8), .phi_b(pb8), .mu_b(mb8), .phi_s(ps8), .mu_s(ms8));

  task automatic run_point(int n, int d);
    automatic int m = (1 << n) - d;
    automatic int pairs = 0;
    @(negedge clk);
    if (n == 5) begin we5 = 1'b1; wd5 = 4'(d); end
    else        begin we8 = 1'b1; wd8 = 7'(d); end
    @(negedge clk);
    we5 = 1'b0; we8 = 1'b0;
    checks++;
    if ((n == 5 && int'(dq5) != d) || (n == 8 && int'(dq8) != d)) begin
      failures++;
      $display("FAIL delta register of the %0d-bit adder", n);
    end
    for (int a = 0; a < m; a++)
      for (int b = 0; b < m; b++)
        for (int e = 0; e < 4; e++) begin
          bit pa, pb, ps, exp_phi;
          int ma, mb, ms, w;
          pa = e[1]; pb = e[0];
          if ((pa && a + d >= (1 << n)) || (pb && b + d >= (1 << n))) continue;
          ma = a + int'(pa) * d;
          mb = b + int'(pb) * d;
          if (n == 5) begin
            pa5 = pa; ma5 = 5'(ma); pb5 = pb; mb5 = 5'(mb);
            #1; ps = ps5; ms = int'(ms5);
          end else begin
            pa8 = pa; ma8 = 8'(ma); pb8 = pb; mb8 = 8'(mb);
            #1; ps = ps8; ms = int'(ms8);
          end
          w = a + b + d;
          exp_phi = (w < (1 << n));
          checks++;
          pairs++;
          if (ps != exp_phi || ms != w % (1 << n) || ms - int'(ps) * d != (a + b) % m) begin
            failures++;
            if (failures < 20)
              $display("FAIL m=%0d A=(%0d,%0d) B=(%0d,%0d): S=(%0d,%0d)", m, pa, ma, pb, mb, ps, ms);
          end
        end
    $display("design point m=%0d n=%0d delta=%0d: %0d operand pairs", m, n, d, pairs);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run_point(5, 15);
    run_point(5, 3);
    run_point(8, 125);
    run_point(8, 65);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
