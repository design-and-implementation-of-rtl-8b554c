// tb_ddr_main_ctrl: checks the main control module as a whole (both FSMs,
// their counters and the refresh counter) with a short refresh interval.
// It checks the initialization latency after sys_dly_200us, that refresh
// requests are served every REF_INT cycles once initialized (and never
// before), that read and write requests are acknowledged and walk through
// the expected cState sequence, and that a request arriving with a refresh
// due waits for the refresh.
module tb_ddr_main_ctrl;
  import ddr_pkg::*;
  localparam int unsigned REF_INT = 60;
  localparam int unsigned INIT_LAT = 24;   // 2 + T_RP + 2*T_RFC + 2*T_MRD at defaults
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, sys_dly_200us = 1'b0, sys_req = 1'b0, sys_r_wn = 1'b1;
  logic sys_ack, sys_init_done, sys_ref_ack;
  istate_e istate;
  cstate_e cstate;
  int cyc = 0;
  int ref_at [$];
  int n_wait = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (sys_ref_ack) begin
    ref_at.push_back(cyc);
    if (sys_req) n_wait++;
  end

  ddr_main_ctrl #(.REF_INT(REF_INT)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(bit rd);
    cstate_e want [$];
    int guard = 0;
    @(negedge clk); sys_req = 1'b1; sys_r_wn = rd;
    while (!sys_ack && guard < 100) begin @(negedge clk); guard++; end
    check(guard < 100, "request acknowledged");
    @(negedge clk); sys_req = 1'b0;
    want = rd ? '{C_ACTIVE, C_TRCD, C_READA, C_CL, C_CL, C_RDATA, C_RDATA, C_IDLE}
              : '{C_ACTIVE, C_TRCD, C_WRITEA, C_WDATA, C_WDATA, C_TDAL, C_TDAL, C_TDAL, C_TDAL, C_IDLE};
    foreach (want[i]) begin
      check(cstate == want[i], $sformatf("%s access step %0d: %s, expected %s",
            rd ? "read" : "write", i, cstate.name(), want[i].name()));
      @(negedge clk);
    end
  endtask

  initial begin
    int t_d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sys_req = 1'b1;
    repeat (300) begin
      @(negedge clk);
      check(!sys_init_done && !sys_ack && !sys_ref_ack, "idle before the 200 us delay");
    end
    sys_req = 1'b0;
    sys_dly_200us = 1'b1; t_d = cyc;
    while (!sys_init_done) @(negedge clk);
    check(cyc - t_d == INIT_LAT, $sformatf("init took %0d cycles", cyc - t_d));
    for (int i = 0; i < 30; i++) begin
      access(1'($urandom_range(0, 1)));
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    // a request raised while a refresh is due: the refresh goes first
    wait (dut.ref_req);
    @(negedge clk);
    sys_req = 1'b1; sys_r_wn = 1'b1;
    #1 check(sys_ref_ack && !sys_ack, "refresh served before a waiting request");
    @(negedge clk);
    while (!sys_ack) @(negedge clk);
    // AR, the T_RFC - 1 wait cycles, then the accepting idle cycle
    check(cyc - ref_at[$] == 9, $sformatf("request accepted %0d cycles after the refresh", cyc - ref_at[$]));
    @(negedge clk); sys_req = 1'b0;
    repeat (3 * REF_INT) @(negedge clk);
    check(ref_at.size() >= 5, $sformatf("%0d refreshes", ref_at.size()));
    for (int i = 1; i < ref_at.size(); i++)
      check(ref_at[i] - ref_at[i-1] <= 2 * REF_INT && ref_at[i] - ref_at[i-1] >= REF_INT - 12,
            $sformatf("refresh spacing %0d", ref_at[i] - ref_at[i-1]));
    check(ref_at.size() > 0 && ref_at[0] - t_d - INIT_LAT <= REF_INT + 12, "first refresh one interval after init (plus at most one access)");
    check(n_wait > 0, "a request waited for a refresh");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
