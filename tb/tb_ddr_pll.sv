// tb_ddr_pll: checks the clock generator model: clk follows the reference
// period, clk2x has half that period with rising edges on every clk edge,
// ddr_clkn is the complement of ddr_clk, and locked rises LOCK_CYCLES
// reference cycles after reset and falls with reset.
module tb_ddr_pll;
  localparam int unsigned P = 40;
  int checks = 0, failures = 0;
  logic ref_clk = 1'b0, rst_n = 1'b0;
  logic clk, clk2x, ddr_clk, ddr_clkn, locked;
  time t_clk [$], t_2x [$];
  int n_ref = 0;

  always #(P / 2) ref_clk = ~ref_clk;
  always @(posedge ref_clk) n_ref <= n_ref + 1;
  always @(posedge clk) if (locked) t_clk.push_back($time);
  always @(posedge clk2x) if (locked) t_2x.push_back($time);

  ddr_pll #(.REF_PERIOD(P), .LOCK_CYCLES(8)) dut (.ref_clk, .rst_n, .clk, .clk2x, .ddr_clk, .ddr_clkn, .locked);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(clk2x or ddr_clk or ddr_clkn) begin
    #1;
    checks++;
    if (ddr_clkn !== ~ddr_clk || ddr_clk !== clk) begin
      failures++; $display("FAIL: ddr_clk/ddr_clkn/clk relation");
    end
  end

  initial begin
    int n0;
    repeat (3) @(posedge ref_clk);
    check(!locked, "not locked in reset");
    rst_n = 1'b1; n0 = n_ref;
    @(posedge locked);
    check(n_ref - n0 >= 8 && n_ref - n0 <= 10, $sformatf("lock after %0d ref cycles", n_ref - n0));
    repeat (20) @(posedge ref_clk);
    for (int i = 1; i < t_clk.size(); i++)
      check(t_clk[i] - t_clk[i-1] == time'(P), "clk period");
    for (int i = 1; i < t_2x.size(); i++)
      check(t_2x[i] - t_2x[i-1] == time'(P) / 2, "clk2x period");
    foreach (t_clk[i]) begin
      bit found;
      found = 0;
      foreach (t_2x[j]) if (t_2x[j] == t_clk[i]) found = 1;
      check(found, "clk2x rising edge on each clk rising edge");
    end
    rst_n = 1'b0; #1;
    check(!locked, "lock lost on reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(P * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
