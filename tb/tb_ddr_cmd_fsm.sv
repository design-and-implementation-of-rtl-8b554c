// tb_ddr_cmd_fsm: checks the command FSM (with its ddr_counter). For a
// read, a write and a refresh it records cState from the accepting cycle
// on and compares the state run lengths with the expected ones: tRCD, CAS
// latency, burst length, write recovery plus precharge, tRFC. It also
// checks that nothing is accepted before init_done, that a refresh request
// wins over a waiting bus request, and the sys_ack/ref_ack pulses.
module tb_ddr_cmd_fsm;
  import ddr_pkg::*;
  localparam int unsigned T_RCD = 3, T_RP = 2, T_RFC = 6, T_WR = 2, CL = 3, BL = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, init_done = 1'b0, ref_req = 1'b0;
  logic sys_req = 1'b0, sys_r_wn = 1'b1, cnt_done, cnt_load, sys_ack, ref_ack;
  logic [7:0] cnt_val;
  cstate_e cstate;

  always #5 clk = ~clk;

  ddr_cmd_fsm #(.T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC), .T_WR(T_WR), .CAS_LAT(CL), .BURST_LEN(BL)) dut (
    .clk, .rst_n, .init_done, .ref_req, .sys_req, .sys_r_wn, .cnt_done,
    .cnt_load, .cnt_val, .cstate, .sys_ack, .ref_ack);
  ddr_counter #(.WIDTH(8)) u_cnt (.clk, .rst_n, .load(cnt_load), .load_val(cnt_val), .done(cnt_done));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // run the FSM from C_IDLE back to C_IDLE and compare the state runs
  task automatic expect_seq(cstate_e s [], int l []);
    cstate_e st [$];
    int      ln [$];
    int      guard = 0;
    @(negedge clk);  // first state after the accepting cycle
    while (cstate != C_IDLE && guard < 200) begin
      if (st.size() > 0 && st[$] == cstate) ln[$]++;
      else begin st.push_back(cstate); ln.push_back(1); end
      guard++;
      @(negedge clk);
    end
    check(st.size() == s.size(), $sformatf("%0d states, expected %0d", st.size(), s.size()));
    for (int i = 0; i < s.size() && i < st.size(); i++) begin
      check(st[i] == s[i], $sformatf("state %0d is %s, expected %s", i, st[i].name(), s[i].name()));
      check(ln[i] == l[i], $sformatf("%s lasted %0d, expected %0d", st[i].name(), ln[i], l[i]));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sys_req = 1'b1; sys_r_wn = 1'b1;
    repeat (5) begin @(negedge clk); check(cstate == C_IDLE && !sys_ack, "nothing before init_done"); end
    init_done = 1'b1;
    #1 check(sys_ack && !ref_ack, "read accepted");
    sys_r_wn = 1'b1;
    expect_seq('{C_ACTIVE, C_TRCD, C_READA, C_CL, C_RDATA},
               '{1, T_RCD - 1, 1, CL, BL / 2});
    // write; sys_r_wn changes after acceptance must not matter
    sys_r_wn = 1'b0;
    #1 check(sys_ack, "write accepted");
    @(posedge clk); #1 sys_r_wn = 1'b1; sys_req = 1'b0;
    @(negedge clk);
    begin
      cstate_e st [$]; int ln [$]; int guard;
      guard = 0;
      while (cstate != C_IDLE && guard < 200) begin
        if (st.size() > 0 && st[$] == cstate) ln[$]++;
        else begin st.push_back(cstate); ln.push_back(1); end
        guard++; @(negedge clk);
      end
      check(st.size() == 5 && st[0] == C_ACTIVE && st[1] == C_TRCD && st[2] == C_WRITEA &&
            st[3] == C_WDATA && st[4] == C_TDAL, "write state sequence");
      if (st.size() == 5)
        check(ln[1] == T_RCD - 1 && ln[3] == BL / 2 && ln[4] == T_WR + T_RP,
              $sformatf("write wait lengths %0d %0d %0d", ln[1], ln[3], ln[4]));
    end
    // refresh has priority over a waiting request
    repeat (3) @(negedge clk);
    ref_req = 1'b1; sys_req = 1'b1; sys_r_wn = 1'b1;
    #1 check(ref_ack && !sys_ack, "refresh wins over a bus request");
    @(posedge clk); #1 ref_req = 1'b0;
    expect_seq('{C_AR, C_TRFC}, '{1, T_RFC - 1});
    #1 check(sys_ack, "waiting request served after refresh");
    expect_seq('{C_ACTIVE, C_TRCD, C_READA, C_CL, C_RDATA},
               '{1, T_RCD - 1, 1, CL, BL / 2});
    sys_req = 1'b0;
    repeat (5) begin @(negedge clk); check(cstate == C_IDLE && !sys_ack && !ref_ack, "idle without requests"); end
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
