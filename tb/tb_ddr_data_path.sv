// tb_ddr_data_path: checks the DDR data path on its own, with clk and
// clk2x generated here (rising edges aligned). cState is stepped as the
// command FSM would. Write: the words offered while sys_wdata_req is high
// must appear on DQ, low byte first, sampled at every DQS edge; the first
// DQS rising edge must come 3 clocks after the C_WRITEA cycle starts (2 to
// reach the SDRAM, 1 of tDQSS), with a half-clock preamble and postamble,
// and DQ driven at every DQS edge. Read: the testbench drives edge-aligned
// bytes CAS_LAT clocks after the READ reaches the SDRAM; the words on
// sys_rdata must be those bytes paired, flagged by sys_rvalid exactly
// CAS_LAT + 3 cycles after C_READA, and nowhere else. The SDRAM's DQS
// toggles with the read bytes; one burst is sent without DQS and must
// produce no read word.
module tb_ddr_data_path;
  import ddr_pkg::*;
  localparam int unsigned CL = 2, BL = 4, W = BL / 2, P = 40;
  int checks = 0, failures = 0;
  logic clk = 1'b0, clk2x = 1'b0, rst_n = 1'b0;
  cstate_e cstate = C_IDLE;
  logic [15:0] sys_wdata, sys_rdata;
  logic sys_wdata_req, sys_rvalid;
  logic [7:0] ddr_dq_o, ddr_dq_i = '0;
  logic ddr_dqs_i = 1'b0;
  bit   dqs_on = 1'b1;      // the SDRAM toggles DQS with its read data
  logic ddr_dq_oe, ddr_dqs_o, ddr_dqs_oe;

  initial forever begin
    clk = 1'b1; clk2x = 1'b1; #(P / 4);
    clk2x = 1'b0;             #(P / 4);
    clk = 1'b0; clk2x = 1'b1; #(P / 4);
    clk2x = 1'b0;             #(P / 4);
  end

  ddr_data_path #(.CAS_LAT(CL), .BURST_LEN(BL)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // write data source
  logic [15:0] wwords [$];
  int wdx = 0;
  always_comb sys_wdata = (wdx < wwords.size()) ? wwords[wdx] : 16'h0;
  always @(posedge clk) if (sys_wdata_req) wdx <= wdx + 1;

  // pin monitor
  logic [7:0] seen [$];
  time t_dqs [$];
  time t_pre;
  always @(posedge ddr_dqs_o or negedge ddr_dqs_o) if (rst_n && ddr_dqs_oe) begin
    seen.push_back(ddr_dq_o);
    t_dqs.push_back($time);
    checks++;
    if (!ddr_dq_oe) begin failures++; $display("FAIL: DQ not driven at DQS edge"); end
  end
  always @(posedge ddr_dqs_oe) t_pre = $time;

  // read data monitor
  logic [15:0] rexp [$];
  int rv_cyc [$];
  always @(posedge clk) if (rst_n && sys_rvalid) rv_cyc.push_back(cyc);
  always @(posedge clk) if (rst_n && sys_rvalid) begin
    checks++;
    if (rexp.size() == 0 || sys_rdata != rexp[0]) begin
      failures++; $display("FAIL: read word %h", sys_rdata);
    end
    if (rexp.size() > 0) void'(rexp.pop_front());
  end

  task automatic step(cstate_e s);
    cstate <= s;
    @(posedge clk);
  endtask

  initial begin
    time t_wr;
    int rd_c;
    logic [7:0] bytes [];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    for (int rep = 0; rep < 5; rep++) begin
      dqs_on = (rep != 3);        // one read burst comes without DQS
      // ---- write burst ----
      seen.delete(); t_dqs.delete();
      for (int k = 0; k < W; k++) wwords.push_back(16'($urandom));
      #0 t_wr = $time;            // C_WRITEA cycle starts here
      step(C_WRITEA);
      for (int k = 0; k < W; k++) begin
        check(sys_wdata_req == 0 || k > 0, "no data request in C_WRITEA");
        step(C_WDATA);
      end
      repeat (4) step(C_TDAL);
      step(C_IDLE);
      repeat (3) @(posedge clk);
      check(seen.size() == BL, $sformatf("%0d DQS edges, expected %0d", seen.size(), BL));
      for (int k = 0; k < BL && k < seen.size(); k++) begin
        logic [15:0] wv;
        wv = wwords[wwords.size() - W + k / 2];
        check(seen[k] == ((k % 2 != 0) ? wv[15:8] : wv[7:0]),
              $sformatf("write beat %0d: %h", k, seen[k]));
      end
      if (t_dqs.size() > 0) begin
        check(t_dqs[0] - t_wr == 3 * time'(P), $sformatf("first DQS edge %0t after C_WRITEA", t_dqs[0] - t_wr));
        check(t_dqs[0] - t_pre == time'(P) / 2, "half-clock write preamble");
      end
      check(!ddr_dqs_oe && !ddr_dq_oe, "DQ and DQS released after the burst");
      // ---- read burst ----
      bytes = new[BL];
      foreach (bytes[k]) bytes[k] = 8'($urandom);
      if (dqs_on) for (int k = 0; k < W; k++) rexp.push_back({bytes[2 * k + 1], bytes[2 * k]});
      rd_c = cyc + 1;     // index of the C_READA cycle
      fork
        begin
          step(C_READA);
          repeat (CL) step(C_CL);
          repeat (W) step(C_RDATA);
          step(C_IDLE);
        end
        begin
          // READ reaches the SDRAM 2 clocks later, data CL clocks after that
          repeat (2 + CL) @(posedge clk);
          for (int k = 0; k < BL; k++) begin
            ddr_dq_i  = bytes[k];
            ddr_dqs_i = dqs_on && (k % 2 == 0);
            #(P / 2);
          end
          ddr_dq_i  = 8'($urandom);
          ddr_dqs_i = 1'b0;
        end
      join
      repeat (6) @(posedge clk);
      check(rexp.size() == 0, "all read words delivered");
      check(rv_cyc.size() == (dqs_on ? W : 0), $sformatf("%0d sys_rvalid cycles", rv_cyc.size()));
      for (int k = 0; k < W && k < rv_cyc.size(); k++)
        check(rv_cyc[k] - rd_c == CL + 3 + k,
              $sformatf("read word %0d at %0d cycles after C_READA", k, rv_cyc[k] - rd_c));
      rv_cyc.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(P * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
