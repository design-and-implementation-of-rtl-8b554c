// ddr_sdram_model: behavioural model of an x8, quad-bank DDR SDRAM for
// testbenches. Not synthesizable.
//
// Commands are sampled on rising ddr_clk edges while CKE is high. The model
// stores written bytes in a sparse array and checks the rules a controller
// must keep: the power-up order (PRECHARGE all, two AUTO REFRESH, EMRS, MRS
// before the first ACTIVE), bank open/closed state, tRCD, tRAS, tRP
// (including auto precharge), tRFC, tMRD, the refresh interval, and that
// the first write DQS edge comes one clock after WRITE. Every broken rule
// adds one to `errors` and prints a message.
//
// Writes are captured on both edges of DQS while it is driven. Reads return
// BURST bytes with CAS latency CL, edge aligned with ddr_clk, on dq_i,
// with DQS on dqs_i (low outside bursts, so the preamble is included);
// bytes never written read as a hash of their address.
module ddr_sdram_model #(
  parameter int unsigned T_RP    = 2,
  parameter int unsigned T_RFC   = 8,
  parameter int unsigned T_MRD   = 2,
  parameter int unsigned T_RCD   = 2,
  parameter int unsigned T_RAS   = 4,
  parameter int unsigned T_WR    = 2,
  parameter int unsigned REF_MAX = 1560   // longest gap between refreshes
) (
  input  logic        ddr_clk,
  input  logic        ddr_clkn,
  input  logic        cke,
  input  logic        csn,
  input  logic        rasn,
  input  logic        casn,
  input  logic        wen,
  input  logic [1:0]  ba,
  input  logic [12:0] add,
  input  logic        dm,
  input  logic [7:0]  dq_o,
  input  logic        dq_oe,
  input  logic        dqs_o,
  input  logic        dqs_oe,
  output logic [7:0]  dq_i,
  output logic        dqs_i,
  output int          errors,
  output int          n_act,
  output int          n_read,
  output int          n_write,
  output int          n_ar,
  output int          n_pre,
  output int          n_mrs,
  output int          n_emrs,
  output int          mode_bl,
  output int          mode_cl
);

  logic [7:0] mem [logic [24:0]];

  int cyc;
  bit     bank_open  [4];
  int     bank_row   [4];
  int act_cyc    [4];
  int ready_cyc  [4];
  int glob_ready;
  int last_ar;
  int     init_step;            // 0 PRE, 1 AR, 2 AR, 3 EMRS, 4 MRS, 5 done
  time    t_last_clk, period;

  // read burst: dq_pos/dq_neg hold the bytes of the high and low clock
  // phase; DQS is high in the high phase of each burst cycle
  logic [7:0] dq_pos, dq_neg;
  logic       dqs_pos;
  bit     rd_busy;
  int rd_start;
  logic [24:0] rd_addr;
  int     rd_k;
  // write burst
  bit     wr_busy;
  logic [24:0] wr_addr;
  int     wr_beat;
  time    t_write;
  bit     wr_first;

  function automatic logic [7:0] rd_byte(logic [24:0] a);
    if (mem.exists(a)) return mem[a];
    return a[7:0] ^ a[15:8] ^ a[23:16] ^ 8'h5a;
  endfunction

  task automatic fail(string msg);
    errors++;
    $display("DDR model error at cycle %0d: %s", cyc, msg);
  endtask

  initial begin
    errors = 0; n_act = 0; n_read = 0; n_write = 0; n_ar = 0; n_pre = 0;
    n_mrs = 0; n_emrs = 0; mode_bl = 0; mode_cl = 0;
    cyc = 0; glob_ready = 0; last_ar = -1; init_step = 0;
    t_last_clk = 0; period = 0;
    rd_busy = 0; wr_busy = 0; rd_k = -1; dq_pos = 8'h00; dq_neg = 8'h00; dqs_pos = 1'b0;
    foreach (bank_open[b]) begin
      bank_open[b] = 0; bank_row[b] = 0; act_cyc[b] = 0; ready_cyc[b] = 0;
    end
  end

  always @(posedge ddr_clk) begin
    logic [3:0] cmd;
    cyc++;
    if (t_last_clk != 0) period = $time - t_last_clk;
    t_last_clk = $time;
    cmd = {csn, rasn, casn, wen};
    if (init_step == 5 && last_ar >= 0 && cyc - last_ar > REF_MAX) begin
      fail("refresh interval exceeded");
      last_ar = cyc;
    end
    if (cke && !csn) begin
      case (cmd)
        4'b0011: begin // ACTIVE
          n_act++;
          if (init_step != 5) fail("ACTIVE before initialization");
          if (bank_open[ba]) fail("ACTIVE to open bank");
          if (cyc < ready_cyc[ba]) fail("tRP violated before ACTIVE");
          if (cyc < glob_ready) fail("tRFC/tMRD violated before ACTIVE");
          bank_open[ba] = 1; bank_row[ba] = int'(add); act_cyc[ba] = cyc;
        end
        4'b0101, 4'b0100: begin // READ / WRITE
          int pre_at;
          if (!bank_open[ba]) fail("READ/WRITE to closed bank");
          if (cyc - act_cyc[ba] < T_RCD) fail("tRCD violated");
          if (!add[10]) fail("expected auto precharge");
          if (cmd == 4'b0101) begin
            n_read++;
            if (rd_busy) fail("overlapping reads");
            rd_busy  = 1;
            rd_start = cyc + mode_cl;
            rd_addr  = {ba, 13'(bank_row[ba]), add[9:0]};
            pre_at   = cyc + mode_bl / 2;
          end else begin
            n_write++;
            if (wr_busy) fail("overlapping writes");
            wr_busy  = 1;
            wr_beat  = 0;
            wr_first = 1;
            t_write  = $time;
            wr_addr  = {ba, 13'(bank_row[ba]), add[9:0]};
            pre_at   = cyc + 1 + mode_bl / 2 + T_WR;
          end
          if (pre_at < act_cyc[ba] + T_RAS) pre_at = act_cyc[ba] + T_RAS;
          bank_open[ba] = 0;
          ready_cyc[ba] = pre_at + T_RP;
        end
        4'b0010: begin // PRECHARGE
          n_pre++;
          if (add[10]) begin
            foreach (bank_open[b]) begin
              bank_open[b] = 0;
              if (ready_cyc[b] < cyc + T_RP) ready_cyc[b] = cyc + T_RP;
            end
          end else begin
            bank_open[ba] = 0; ready_cyc[ba] = cyc + T_RP;
          end
          if (init_step == 0) init_step = 1;
        end
        4'b0001: begin // AUTO REFRESH
          n_ar++;
          foreach (bank_open[b]) begin
            if (bank_open[b]) fail("AUTO REFRESH with an open bank");
            if (cyc < ready_cyc[b]) fail("tRP violated before AUTO REFRESH");
          end
          if (cyc < glob_ready) fail("tRFC violated before AUTO REFRESH");
          glob_ready = cyc + T_RFC;
          last_ar = cyc;
          if (init_step == 1 || init_step == 2) init_step++;
          else if (init_step == 0) fail("AUTO REFRESH before PRECHARGE in power-up");
        end
        4'b0000: begin // MODE REGISTER SET
          foreach (bank_open[b]) if (bank_open[b]) fail("MRS with an open bank");
          if (cyc < glob_ready) fail("tRFC/tMRD violated before MRS");
          glob_ready = cyc + T_MRD;
          if (ba == 2'b01) begin
            n_emrs++;
            if (init_step == 3) init_step = 4; else fail("EMRS out of order");
          end else if (ba == 2'b00) begin
            n_mrs++;
            mode_bl = 1 << add[2:0];
            mode_cl = int'(add[6:4]);
            if (init_step == 4) init_step = 5; else fail("MRS out of order");
          end
        end
        default: ;
      endcase
      if (cmd != 4'b0111 && cmd != 4'b0000 && cmd != 4'b0001 && cmd != 4'b0010
          && cyc < glob_ready) fail("command during tRFC/tMRD");
    end
    // read data, first beat of each cycle
    if (rd_busy && cyc >= rd_start && cyc < rd_start + mode_bl / 2) begin
      rd_k = int'(cyc - rd_start);
      dq_pos  <= rd_byte(rd_addr + 25'(2 * rd_k));
      dqs_pos <= 1'b1;
    end else begin
      dqs_pos <= 1'b0;
      rd_k = -1;
      dq_pos <= 8'($urandom);
      if (rd_busy && cyc >= rd_start + mode_bl / 2) rd_busy = 0;
    end
  end

  always @(negedge ddr_clk) begin
    if (rd_k >= 0) dq_neg <= rd_byte(rd_addr + 25'(2 * rd_k + 1));
    else           dq_neg <= 8'($urandom);
  end

  assign dq_i  = ddr_clk ? dq_pos : dq_neg;
  assign dqs_i = ddr_clk && dqs_pos;

  always @(posedge dqs_o or negedge dqs_o) begin
    if (dqs_oe && wr_busy) begin
      if (wr_first) begin
        wr_first = 0;
        if (!dqs_o) fail("write burst starts with a falling DQS edge");
        if ($time != t_write + period)
          fail($sformatf("tDQSS: first DQS edge %0t after WRITE", $time - t_write));
      end
      if (!dq_oe) fail("DQ not driven at a write DQS edge");
      if (!dm) mem[wr_addr + 25'(wr_beat)] = dq_o;
      wr_beat++;
      if (wr_beat == mode_bl) wr_busy = 0;
    end
  end

endmodule
