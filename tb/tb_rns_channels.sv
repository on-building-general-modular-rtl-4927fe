// Residue-number-system testbench: eight identical 5-bit adders, one per
// modulus of the set {32, 31, 29, 27, 25, 23, 19, 17} (delta = 0, 1, 3, 5,
// 7, 9, 13, 15), together form an RNS whose dynamic range is their product
// (about 2^37). Only the value written into each channel's delta register
// differs. Random non-negative integers X and Y below the dynamic range are
// converted to residues by the testbench, added channel by channel, and
// every channel's sum must equal (X + Y) mod m_i. A running sum is also
// accumulated by feeding each channel's result back as its next operand.
module tb_rns_channels;
  localparam int N = 5;
  localparam int K = 8;
  localparam int DELTAS [K] = '{0, 1, 3, 5, 7, 9, 13, 15};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         we = 1'b0;
  logic [N-2:0] wd [K];
  logic [N-2:0] dq [K];
  logic         pa [K], pb [K], ps [K];
  logic [N-1:0] ma [K], mb [K], ms [K];

  int checks = 0, failures = 0;

  for (genvar k = 0; k < K; k++) begin : g_ch
    excess_delta_mod_adder #(.N(N)) u_add (
      .clk(clk), .rst_n(rst_n), .delta_we(we), .delta_wdata(wd[k]), .delta_q(dq[k]),
      .phi_a(pa[k]), .mu_a(ma[k]), .phi_b(pb[k]), .mu_b(mb[k]),
      .phi_s(ps[k]), .mu_s(ms[k]));
  end

  initial begin
    automatic longint range = 1;
    automatic longint acc = 0;
    for (int k = 0; k < K; k++) begin
      range *= longint'((1 << N) - DELTAS[k]);
      wd[k] = (N-1)'(DELTAS[k]);
      pa[k] = 1'b0; pb[k] = 1'b0; ma[k] = '0; mb[k] = '0;
    end
    $display("dynamic range %0d", range);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk) we = 1'b1;
    @(negedge clk) we = 1'b0;
    for (int k = 0; k < K; k++) begin
      checks++;
      if (int'(dq[k]) != DELTAS[k]) failures++;
    end

    // independent additions X + Y
    for (int t = 0; t < 2000; t++) begin
      longint x, y;
      x = ((longint'($urandom) << 16) ^ longint'($urandom)) % (range / 2);
      y = ((longint'($urandom) << 16) ^ longint'($urandom)) % (range / 2);
      for (int k = 0; k < K; k++) begin
        automatic int m = (1 << N) - DELTAS[k];
        automatic int rx = int'(x % m);
        automatic int ry = int'(y % m);
        // use the flagged encoding whenever it fits
        pa[k] = (rx + DELTAS[k] < (1 << N)) && t[0];
        pb[k] = (ry + DELTAS[k] < (1 << N)) && t[1];
        ma[k] = N'(rx + int'(pa[k]) * DELTAS[k]);
        mb[k] = N'(ry + int'(pb[k]) * DELTAS[k]);
      end
      #1;
      for (int k = 0; k < K; k++) begin
        automatic int m = (1 << N) - DELTAS[k];
        checks++;
        if (int'(ms[k]) - int'(ps[k]) * DELTAS[k] != int'((x + y) % m)) begin
          failures++;
          if (failures < 20) $display("FAIL channel m=%0d X=%0d Y=%0d", m, x, y);
        end
      end
    end

    // running sum with the result fed back as operand A
    for (int k = 0; k < K; k++) begin pa[k] = 1'b0; ma[k] = '0; end
    for (int t = 0; t < 2000; t++) begin
      longint y;
      y = longint'($urandom % 1000000);
      for (int k = 0; k < K; k++) begin
        automatic int m = (1 << N) - DELTAS[k];
        pb[k] = 1'b0;
        mb[k] = N'(int'(y % m));
      end
      #1;
      acc = (acc + y) % range;
      for (int k = 0; k < K; k++) begin
        automatic int m = (1 << N) - DELTAS[k];
        automatic int v = int'(ms[k]) - int'(ps[k]) * DELTAS[k];
        checks++;
        if (((v % m) + m) % m != int'(acc % m)) begin
          failures++;
          if (failures < 20) $display("FAIL running sum channel m=%0d step %0d", m, t);
        end
        pa[k] = ps[k]; ma[k] = ms[k];
      end
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
