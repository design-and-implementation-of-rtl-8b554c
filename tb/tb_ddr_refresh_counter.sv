// tb_ddr_refresh_counter: checks the refresh interval timer with a short
// interval. No request while disabled; the first request exactly REF_INT
// cycles after enable; the request holds until acknowledged; requests keep
// the REF_INT period whatever the acknowledge delay.
module tb_ddr_refresh_counter;
  localparam int unsigned REF_INT = 13;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, ref_ack = 1'b0, ref_req;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ddr_refresh_counter #(.REF_INT(REF_INT)) dut (.clk, .rst_n, .enable, .ref_ack, .ref_req);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int t0, t;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) begin @(negedge clk); check(!ref_req, "no request while disabled"); end
    enable = 1'b1; t0 = cyc;
    for (int r = 1; r <= 6; r++) begin
      int wait_ack;
      while (!ref_req) @(negedge clk);
      t = cyc;
      check(t - t0 == r * int'(REF_INT),
            $sformatf("request %0d at %0d cycles, expected %0d", r, t - t0, r * REF_INT));
      wait_ack = $urandom_range(0, 8);
      repeat (wait_ack) begin @(negedge clk); check(ref_req, "request held until ack"); end
      ref_ack = 1'b1; @(negedge clk); ref_ack = 1'b0;
      check(!ref_req, "ack clears the request");
    end
    enable = 1'b0;
    repeat (30) begin @(negedge clk); check(!ref_req, "no request after disable"); end
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
