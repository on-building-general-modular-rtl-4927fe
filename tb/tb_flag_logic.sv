// Self-checking testbench of flag_logic.
//
// w_N = v_N - f_{N-1} + c_N; for the six input combinations where that is 0
// or 1 (the only ones a valid addition produces) the flag must be 1 - w_N.
module tb_flag_logic;
  int checks = 0, failures = 0;
  logic c_n, v_n, f_msb, phi_s;

  flag_logic dut (.c_n(c_n), .v_n(v_n), .f_msb(f_msb), .phi_s(phi_s));

  initial begin
    for (int i = 0; i < 8; i++) begin
      int w_n;
      {c_n, v_n, f_msb} = 3'(i);
      #1;
      w_n = int'(v_n) - int'(f_msb) + int'(c_n);
      if (w_n == 0 || w_n == 1) begin
        checks++;
        if (int'(phi_s) != 1 - w_n) begin
          failures++;
          $display("FAIL c_n=%0d v_n=%0d f=%0d phi_s=%0d", c_n, v_n, f_msb, phi_s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
