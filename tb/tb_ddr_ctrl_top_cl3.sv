// tb_ddr_ctrl_top_cl3: end-to-end test of the DDR SDRAM controller with
// non-default parameters: CAS latency 3, burst length 8, slower tRCD, tRP
// and tRFC, and a short refresh interval, against the behavioural DDR
// SDRAM model set up with the same timings.
//
// It runs the same bus-master sequence as the default-parameter test: PLL
// lock hold-off, a shortened power-up delay, the power-up sequence and its
// length, a known write checked byte by byte in the model, random burst
// writes and reads over all four banks checked against a reference copy,
// the request-to-data latencies, refreshes, and a request kept waiting by
// a refresh. A mechanism never seen is a failure.
module tb_ddr_ctrl_top_cl3;
  import ddr_pkg::*;

  localparam int unsigned REF_PERIOD = 40;
  localparam int unsigned T_RP       = 3;
  localparam int unsigned T_RFC      = 10;
  localparam int unsigned T_MRD      = 2;
  localparam int unsigned T_RCD      = 3;
  localparam int unsigned T_WR       = 3;
  localparam int unsigned CL         = 3;
  localparam int unsigned BL         = 8;
  localparam int unsigned REF_INT    = 300;
  localparam int unsigned DLY_CYCLES = 200;
  localparam int unsigned N_OPS      = 300;
  localparam int unsigned WORDS      = BL / 2;
  localparam int unsigned INIT_LAT   = 2 + T_RP + 2 * T_RFC + 2 * T_MRD;
  localparam int unsigned RD_LAT     = T_RCD + CL + 4;   // sys_ack -> sys_rvalid
  localparam int unsigned WR_LAT     = T_RCD + 2;        // sys_ack -> sys_wdata_req

  int checks = 0, failures = 0;

  logic ref_clk = 1'b0;
  logic sys_rst_n = 1'b0;
  logic sys_clk, sys_dly_200us, sys_init_done, sys_req, sys_r_wn, sys_ack;
  logic sys_wdata_req, sys_rvalid, sys_ref_ack;
  logic [ADDR_W-1:0]  sys_addr;
  logic [SYS_W-1:0]   sys_wdata, sys_rdata;
  logic ddr_clk, ddr_clkn, ddr_cke, ddr_csn, ddr_rasn, ddr_casn, ddr_wen, ddr_dm;
  logic [1:0]  ddr_ba;
  logic [12:0] ddr_add;
  logic [7:0]  ddr_dq_o, ddr_dq_i;
  logic ddr_dq_oe, ddr_dqs_o, ddr_dqs_oe, ddr_dqs_i;

  int m_errors, n_act, n_read, n_write, n_ar, n_pre, n_mrs, n_emrs, mode_bl, mode_cl;

  always #(REF_PERIOD / 2) ref_clk = ~ref_clk;

  ddr_ctrl_top #(
    .T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD), .T_RCD(T_RCD), .T_WR(T_WR),
    .CAS_LAT(CL), .BURST_LEN(BL), .REF_INT(REF_INT), .REF_PERIOD(REF_PERIOD)
  ) dut (.*);

  ddr_sdram_model #(
    .T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD), .T_RCD(T_RCD), .T_WR(T_WR),
    .REF_MAX(2 * REF_INT)
  ) u_mem (
    .ddr_clk, .ddr_clkn, .cke(ddr_cke), .csn(ddr_csn), .rasn(ddr_rasn),
    .casn(ddr_casn), .wen(ddr_wen), .ba(ddr_ba), .add(ddr_add), .dm(ddr_dm),
    .dq_o(ddr_dq_o), .dq_oe(ddr_dq_oe), .dqs_o(ddr_dqs_o), .dqs_oe(ddr_dqs_oe),
    .dq_i(ddr_dq_i), .dqs_i(ddr_dqs_i), .errors(m_errors), .n_act, .n_read, .n_write, .n_ar,
    .n_pre, .n_mrs, .n_emrs, .mode_bl, .mode_cl
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- bus master ----------------
  logic [SYS_W-1:0] ref_mem [logic [ADDR_W-1:0]];  // word address -> data
  logic [SYS_W-1:0] wq [$];
  logic [ADDR_W-1:0] rq_addr [$];
  int   wdx;
  int cyc = 0;
  int ack_cyc, first_wreq_cyc, rv_cyc;
  int   mech_lock = 0, mech_init = 0, mech_wr = 0, mech_rd = 0, mech_ref = 0;
  int   mech_ref_wait = 0;
  int   bank_hits [4] = '{0, 0, 0, 0};
  int   rd_words = 0;

  always_comb sys_wdata = (wdx < wq.size()) ? wq[wdx] : '0;

  always @(posedge sys_clk) cyc <= cyc + 1;

  // read data checker
  bit started = 0;   // set once the controller is out of reset

  always @(posedge sys_clk) if (started) begin
    if (sys_rvalid) begin
      logic [ADDR_W-1:0] a;
      if (rq_addr.size() == 0) begin
        check(0, "read data with no read outstanding");
      end else begin
        a = rq_addr.pop_front();
        check(ref_mem.exists(a) && sys_rdata == ref_mem[a],
              $sformatf("read %h: got %h expected %h", a, sys_rdata,
                        ref_mem.exists(a) ? ref_mem[a] : 16'hxxxx));
        rd_words++;
      end
    end
    if (sys_ref_ack) mech_ref++;
    // a request waiting while an AUTO REFRESH is in progress
    if (sys_req && (dut.cstate == C_AR || dut.cstate == C_TRFC)) mech_ref_wait++;
  end

  task automatic do_access(bit rd, logic [ADDR_W-1:0] addr, int gap);
    logic [ADDR_W-1:0] base;
    base = addr & ~ADDR_W'(BL - 1);
    @(posedge sys_clk);
    sys_req  <= 1'b1;
    sys_r_wn <= rd;
    sys_addr <= addr;
    if (!rd) begin
      for (int k = 0; k < WORDS; k++) wq.push_back(16'($urandom));
    end
    do @(posedge sys_clk); while (!sys_ack);
    ack_cyc = cyc;
    bank_hits[addr[ADDR_W-1 -: 2]]++;
    sys_req <= 1'b0;
    if (rd) begin
      for (int k = 0; k < WORDS; k++) rq_addr.push_back(base + ADDR_W'(2 * k));
      // the first read word must come RD_LAT cycles after the acknowledge
      while (!sys_rvalid) @(posedge sys_clk);
      check(cyc - ack_cyc == RD_LAT,
            $sformatf("read latency %0d, expected %0d", cyc - ack_cyc, RD_LAT));
      mech_rd++;
      // with longer bursts the next request can be acknowledged while this
      // burst is still returning; let it finish so the next latency is clean
      while (rq_addr.size() != 0) @(posedge sys_clk);
    end else begin
      while (!sys_wdata_req) @(posedge sys_clk);
      check(cyc - ack_cyc == WR_LAT,
            $sformatf("write data request %0d cycles after ack, expected %0d",
                      cyc - ack_cyc, WR_LAT));
      for (int k = 0; k < WORDS; k++) begin
        check(sys_wdata_req, "sys_wdata_req held for the burst");
        ref_mem[base + ADDR_W'(2 * k)] = wq[wdx];
        wdx <= wdx + 1;
        @(posedge sys_clk);
      end
      check(!sys_wdata_req, "sys_wdata_req ends after the burst");
      mech_wr++;
    end
    repeat (gap) @(posedge sys_clk);
  endtask

  initial begin
    int d_cyc;
    logic [ADDR_W-1:0] used [$];
    logic [ADDR_W-1:0] a;
    sys_dly_200us = 1'b0;
    sys_req = 1'b0; sys_r_wn = 1'b1; sys_addr = '0; wdx = 0;
    #(REF_PERIOD * 5);
    sys_rst_n = 1'b1;
    // controller is held in reset until the PLL locks
    repeat (3) @(posedge ref_clk);
    check(dut.rst_n == 1'b0, "controller held in reset before PLL lock");
    wait (dut.locked);
    mech_lock++;
    @(posedge sys_clk);
    started = 1;
    check(ddr_cke == 1'b0, "CKE low during the power-up delay");
    repeat (DLY_CYCLES) @(posedge sys_clk);
    check(!sys_init_done, "no init_done before the 200 us delay");
    sys_dly_200us <= 1'b1;
    @(posedge sys_clk);
    d_cyc = cyc;
    while (!sys_init_done) @(posedge sys_clk);
    check(cyc - d_cyc == INIT_LAT,
          $sformatf("initialization took %0d cycles, expected %0d", cyc - d_cyc, INIT_LAT));
    check(n_pre == 1 && n_ar == 2 && n_emrs == 1 && n_mrs == 1,
          "power-up sequence PRE, AR, AR, EMRS, MRS");
    check(mode_bl == int'(BL) && mode_cl == int'(CL), "mode register BL=8 CL=3");
    check(ddr_cke == 1'b1, "CKE high after initialization");
    mech_init++;

    // one known write to check byte order on the pins
    wq.push_back(16'hA1B2); wq.push_back(16'hC3D4);
    wq.push_back(16'hE5F6); wq.push_back(16'h0718);
    begin
      a = {2'd2, 13'd77, 10'd40};
      @(posedge sys_clk);
      sys_req <= 1'b1; sys_r_wn <= 1'b0; sys_addr <= a;
      do @(posedge sys_clk); while (!sys_ack);
      sys_req <= 1'b0;
      while (!sys_wdata_req) @(posedge sys_clk);
      for (int k = 0; k < WORDS; k++) begin
        ref_mem[a + ADDR_W'(2 * k)] = wq[wdx]; wdx <= wdx + 1; @(posedge sys_clk);
      end
      repeat (10) @(posedge sys_clk);
      check(u_mem.mem.exists(a) && u_mem.mem[a] == 8'hB2 && u_mem.mem[a + 1] == 8'hA1 &&
            u_mem.mem[a + 2] == 8'hD4 && u_mem.mem[a + 3] == 8'hC3 &&
            u_mem.mem[a + 4] == 8'hF6 && u_mem.mem[a + 5] == 8'hE5 &&
            u_mem.mem[a + 6] == 8'h18 && u_mem.mem[a + 7] == 8'h07,
            "write burst bytes land in the SDRAM low byte first");
      used.push_back(a);
      do_access(1'b1, a, 0);
    end

    for (int i = 0; i < N_OPS; i++) begin
      bit rd;
      rd = (used.size() > 0) && ($urandom_range(0, 1) == 1);
      if (rd) a = used[$urandom_range(0, used.size() - 1)];
      else begin
        a = ADDR_W'($urandom) & ~ADDR_W'(BL - 1);
        // some rows are reused so reads hit both fresh and rewritten data
        if ($urandom_range(0, 3) == 0) a[9:0] = 10'(BL * $urandom_range(0, 7));
        used.push_back(a);
      end
      do_access(rd, a, $urandom_range(0, 3));
    end
    // a read that arrives just as a refresh falls due must wait for it
    wait (dut.u_main.ref_req);
    do_access(1'b1, used[0], 0);
    repeat (50) @(posedge sys_clk);

    check(rq_addr.size() == 0, "every read word returned");
    check(m_errors == 0, $sformatf("SDRAM model found %0d protocol errors", m_errors));
    check(n_ar >= 2 + int'(cyc - d_cyc) / int'(REF_INT) - 1, $sformatf("refresh count %0d", n_ar));
    check(mech_lock > 0,     "mechanism: PLL lock hold-off");
    check(mech_init > 0,     "mechanism: power-up sequence");
    check(mech_wr > 0,       "mechanism: burst write");
    check(mech_rd > 0,       "mechanism: burst read");
    check(mech_ref > 0,      "mechanism: auto refresh");
    check(mech_ref_wait > 0, "mechanism: request delayed by refresh");
    foreach (bank_hits[b]) check(bank_hits[b] > 0, $sformatf("mechanism: access to bank %0d", b));
    $display("writes=%0d reads=%0d read_words=%0d refreshes=%0d refresh_waits=%0d lock=%0d init=%0d",
             mech_wr, mech_rd, rd_words, mech_ref, mech_ref_wait, mech_lock, mech_init);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(REF_PERIOD * 200000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
