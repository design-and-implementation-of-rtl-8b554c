// tb_ddr_init_fsm: checks the power-up sequence of the initialization FSM
// (with its ddr_counter). It records iState every cycle and compares the
// run-length list of states with the expected sequence and wait lengths:
// I_IDLE until sys_dly_200us, then NOP, PRE, tRP wait, AR1, tRFC wait,
// AR2, tRFC wait, EMRS, tMRD wait, MRS, tMRD wait and I_READY, which must
// hold with sys_init_done high. It then resets the FSM in mid-sequence and
// checks that it returns to I_IDLE and waits for sys_dly_200us again.
module tb_ddr_init_fsm;
  import ddr_pkg::*;
  localparam int unsigned T_RP = 3, T_RFC = 7, T_MRD = 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, sys_dly_200us = 1'b0;
  logic cnt_done, cnt_load, sys_init_done;
  logic [7:0] cnt_val;
  istate_e istate;

  always #5 clk = ~clk;

  ddr_init_fsm #(.T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD)) dut (
    .clk, .rst_n, .sys_dly_200us, .cnt_done, .cnt_load, .cnt_val, .istate, .sys_init_done);
  ddr_counter #(.WIDTH(8)) u_cnt (.clk, .rst_n, .load(cnt_load), .load_val(cnt_val), .done(cnt_done));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  istate_e st_q [$];
  int      len_q [$];
  bit      rec = 0;

  always @(negedge clk) if (rec) begin
    if (st_q.size() > 0 && st_q[$] == istate) len_q[$]++;
    else begin st_q.push_back(istate); len_q.push_back(1); end
  end

  initial begin
    istate_e exp_s [13];
    int      exp_l [13];
    exp_s = '{I_IDLE, I_NOP, I_PRE, I_TRP, I_AR1, I_TRFC1, I_AR2, I_TRFC2,
              I_EMRS, I_TEMRD, I_MRS, I_TMRD, I_READY};
    exp_l = '{10, 1, 1, T_RP - 1, 1, T_RFC - 1, 1, T_RFC - 1, 1, T_MRD - 1, 1, T_MRD - 1, 20};
    repeat (2) @(negedge clk);
    check(istate == I_IDLE && !sys_init_done, "idle in reset");
    rst_n = 1'b1;
    rec = 1;
    repeat (9) @(negedge clk);
    sys_dly_200us = 1'b1;
    @(negedge clk);
    repeat (40) @(negedge clk);
    rec = 0;
    #1;
    check(st_q.size() == 13, $sformatf("%0d distinct states, expected 13", st_q.size()));
    for (int i = 0; i < 13 && i < st_q.size(); i++) begin
      check(st_q[i] == exp_s[i], $sformatf("state %0d is %s, expected %s", i, st_q[i].name(), exp_s[i].name()));
      if (i < 12)
        check(len_q[i] == exp_l[i], $sformatf("%s lasted %0d, expected %0d", st_q[i].name(), len_q[i], exp_l[i]));
    end
    check(sys_init_done, "sys_init_done in I_READY");
    // reset from the middle of the sequence
    sys_dly_200us = 1'b0;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    sys_dly_200us = 1'b1;
    repeat (8) @(negedge clk);
    check(istate == I_TRFC1, "restarted sequence reaches tRFC wait");
    rst_n = 1'b0; #1;
    check(istate == I_IDLE && !sys_init_done, "asynchronous reset to I_IDLE");
    sys_dly_200us = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    repeat (10) begin @(negedge clk); check(istate == I_IDLE, "waits for sys_dly_200us"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
