// Self-checking testbench of kspp_adder.
//
// Exhaustive at N = 5 and N = 8, random at N = 13 (a width that is not a
// power of two, so the last prefix level is only partly populated) and at
// N = 32. {cout, sum} must equal a + b.
module tb_kspp_adder;
  int checks = 0, failures = 0;

  logic [4:0]  a5, b5, s5;    logic c5;
  logic [7:0]  a8, b8, s8;    logic c8;
  logic [12:0] a13, b13, s13; logic c13;
  logic [31:0] a32, b32, s32; logic c32;

  kspp_adder #(.N(5))  dut5  (.a(a5),  .b(b5),  .sum(s5),  .cout(c5));
  kspp_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .sum(s8),  .cout(c8));
  kspp_adder #(.N(13)) dut13 (.a(a13), .b(b13), .sum(s13), .cout(c13));
  kspp_adder #(.N(32)) dut32 (.a(a32), .b(b32), .sum(s32), .cout(c32));

  task automatic check(string w, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", w, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      {a5, b5} = 10'(i);
      a13 = 13'($urandom); b13 = 13'($urandom);
      a32 = $urandom;      b32 = $urandom;
      #1;
      check("N=8", longint'({c8, s8}), longint'(a8) + longint'(b8));
      if (i < 1024) check("N=5", longint'({c5, s5}), longint'(a5) + longint'(b5));
      check("N=13", longint'({c13, s13}), longint'(a13) + longint'(b13));
      check("N=32", longint'({c32, s32}), longint'(a32) + longint'(b32));
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
