// Self-checking testbench of csa.
//
// Exhaustive at N = 5: at every bit position the number of ones among
// x[i], y[i], z[i] must equal sum[i] + 2*carry[i], and the words must
// satisfy x + y + z = sum + 2*carry.
module tb_csa;
  localparam int unsigned N = 5;
  int checks = 0, failures = 0;

  logic [N-1:0] x, y, z, s, c;

  csa #(.N(N)) dut (.x(x), .y(y), .z(z), .sum(s), .carry(c));

  initial begin
    for (int i = 0; i < (1 << (3 * N)); i++) begin
      {x, y, z} = (3 * N)'(i);
      #1;
      for (int b = 0; b < N; b++) begin
        int cnt;
        cnt = int'(x[b]) + int'(y[b]) + int'(z[b]);
        checks++;
        if (int'(s[b]) != cnt % 2 || int'(c[b]) != cnt / 2) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d x=%b y=%b z=%b s=%b c=%b", b, x, y, z, s, c);
        end
      end
      checks++;
      if (int'(x) + int'(y) + int'(z) != int'(s) + 2 * int'(c)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
