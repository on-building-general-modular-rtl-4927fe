// Self-checking testbench of f_box.
//
// For every delta and both flags, the N-bit output read as a 1's-complement
// number (value f - (2^N - 1) * f[N-1]) must equal (1 - phi_a - phi_b) *
// delta. Runs at N = 5 and N = 8.
module tb_f_box;
  int checks = 0, failures = 0;

  logic [3:0] d5;  logic [4:0] f5;
  logic [6:0] d8;  logic [7:0] f8;
  logic       pa, pb;

  f_box #(.N(5)) dut5 (.delta(d5), .phi_a(pa), .phi_b(pb), .f(f5));
  f_box #(.N(8)) dut8 (.delta(d8), .phi_a(pa), .phi_b(pb), .f(f8));

  function automatic int ones_value(int unsigned f, int n);
    return int'(f) - ((f >> (n - 1)) & 1) * ((1 << n) - 1);
  endfunction

  initial begin
    for (int d = 0; d < 128; d++)
      for (int fl = 0; fl < 4; fl++) begin
        int exp;
        d5 = 4'(d); d8 = 7'(d);
        pa = fl[1]; pb = fl[0];
        #1;
        exp = (1 - int'(pa) - int'(pb)) * d;
        checks++;
        if (ones_value(int'(f8), 8) != exp) begin
          failures++;
          $display("FAIL N=8 d=%0d pa=%0d pb=%0d f=%b", d, pa, pb, f8);
        end
        if (d < 16) begin
          checks++;
          if (ones_value(int'(f5), 5) != exp) begin
            failures++;
            $display("FAIL N=5 d=%0d pa=%0d pb=%0d f=%b", d, pa, pb, f5);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
