// Self-checking testbench of delta_reg.
//
// Checks the reset value, that a write lands one clock edge later, that the
// register holds while the write enable is low, and that reset clears it
// asynchronously. Expected values come from a shadow variable kept by the
// testbench.
module tb_delta_reg;
  localparam int unsigned N  = 5;
  localparam int unsigned DR = 3;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         we = 1'b0;
  logic [N-2:0] wdata = '0;
  logic [N-2:0] delta;

  int checks = 0, failures = 0;
  logic [N-2:0] shadow;

  delta_reg #(.N(N), .DELTA_RESET(DR)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [N-2:0] exp);
    checks++;
    if (delta !== exp) begin
      failures++;
      $display("FAIL %s: delta=%0d expected %0d", what, delta, exp);
    end
  endtask

  initial begin
    #12;
    check("reset value", (N-1)'(DR));
    rst_n = 1'b1;
    shadow = (N-1)'(DR);
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      wdata = (N-1)'($urandom);
      @(posedge clk);
      if (we) shadow = wdata;
      #1 check("write/hold", shadow);
    end
    // asynchronous reset between clock edges
    @(negedge clk);
    we = 1'b1; wdata = '1;
    @(posedge clk); #1 check("write all ones", '1);
    #2 rst_n = 1'b0;
    #1 check("async reset", (N-1)'(DR));
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
