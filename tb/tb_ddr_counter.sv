// tb_ddr_counter: checks the wait-state counter. After a load of N the
// done flag must stay low for exactly N cycles and then stay high; a load
// while counting restarts the count; a load of 0 gives done at once.
module tb_ddr_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, done;
  logic [7:0] load_val = '0;

  always #5 clk = ~clk;

  ddr_counter #(.WIDTH(8)) dut (.clk, .rst_n, .load, .load_val, .done);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(int n);
    int lows = 0;
    @(negedge clk); load = 1'b1; load_val = 8'(n);
    @(negedge clk); load = 1'b0;
    while (!done && lows < 300) begin lows++; @(negedge clk); end
    check(lows == n, $sformatf("load %0d: done after %0d cycles", n, lows));
    repeat (3) begin @(negedge clk); check(done, "done holds at zero"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(done, "done after reset");
    rst_n = 1'b1;
    run(0); run(1); run(5); run(200);
    for (int i = 0; i < 20; i++) run($urandom_range(0, 40));
    // reload in mid-count
    @(negedge clk); load = 1'b1; load_val = 8'd10;
    @(negedge clk); load = 1'b0;
    repeat (4) @(negedge clk);
    load = 1'b1; load_val = 8'd6;
    @(negedge clk); load = 1'b0;
    for (int i = 0; i < 6; i++) begin check(!done, "restarted count"); @(negedge clk); end
    check(done, "restarted count ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
