// ddr_data_path: data path module. It moves data between the 16-bit bus
// master and the 8-bit double-data-rate DQ bus of the SDRAM, steered by
// cState from the command FSM. Each 16-bit word is one clock cycle at the
// bus master and two 8-bit beats at the pins (low byte first), which is
// the 2n-prefetch relation the description relies on.
//
// Clocks: clk (100 MHz) and clk2x (200 MHz), both from the PLL, rising
// edges aligned. clk2x places the half-cycle events: a clk-domain toggle,
// resampled on clk2x, tells each clk2x edge whether it is in the first or
// second half of a clk cycle.
//
// Write: in every C_WDATA cycle sys_wdata_req is high and the word on
// sys_wdata is taken at the next clk edge. The WRITE command (C_WRITEA)
// reaches the SDRAM two cycles after its state, and the word is sent so
// that the first DQS rising edge comes one clock after that command (tDQSS
// = 1 tCK). DQ changes on clk2x falling edges, a quarter clock before the
// DQS edges (which come on clk2x rising edges), so every DQS edge is in the
// middle of its data beat. DQS is driven low for half a clock before the
// first edge (preamble) and after the last one (postamble).
//
// Read: the SDRAM sends DQ and DQS edge aligned, DQS high with the first
// beat of each clock and low with the second. Every clk2x falling edge
// (the middle of each beat) samples DQ and DQS; at the next clk edge the
// two beats of the past cycle become one word on sys_rdata. A word is
// flagged on sys_rvalid when the DQS samples of that cycle read high then
// low (a DQS period carried it) and the cycle lies in the window where
// the command timing expects read data: the SDRAM sees the READ two cycles
// after C_READA and answers CAS_LAT cycles later, so words appear
// CAS_LAT + 3 cycles after C_READA. The fixed clk2x sampling phases assume
// the board's round-trip delay is well inside a quarter clock.
//
// The module's role, the clk2x clock and the 16/8-bit widths come from the
// description; the handshake, timing and capture scheme are this design's.
module ddr_data_path
  import ddr_pkg::*;
#(
  parameter int unsigned CAS_LAT   = 2,
  parameter int unsigned BURST_LEN = 4
) (
  input  logic             clk,
  input  logic             clk2x,
  input  logic             rst_n,
  input  cstate_e          cstate,
  // bus master side
  input  logic [SYS_W-1:0] sys_wdata,
  output logic             sys_wdata_req,
  output logic [SYS_W-1:0] sys_rdata,
  output logic             sys_rvalid,
  // DDR side (pad drivers are outside: *_o value, *_oe enable, *_i input)
  output logic [DQ_W-1:0]  ddr_dq_o,
  output logic             ddr_dq_oe,
  input  logic [DQ_W-1:0]  ddr_dq_i,
  output logic             ddr_dqs_o,
  output logic             ddr_dqs_oe,
  input  logic             ddr_dqs_i
);

  localparam int unsigned WORDS  = BURST_LEN / 2;
  localparam int unsigned RD_LAT = CAS_LAT + 2;      // C_READA -> sys_rvalid, minus 1
  localparam int unsigned SR_LEN = RD_LAT - 1 + WORDS;

  // ---------------- phase of clk seen from clk2x ----------------
  logic tgl, tgl_d, first_half;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tgl <= 1'b0;
    else        tgl <= ~tgl;

  always_ff @(posedge clk2x or negedge rst_n)
    if (!rst_n) tgl_d <= 1'b0;
    else        tgl_d <= tgl;

  // High from a rising clk edge until the next rising clk2x edge.
  assign first_half = (tgl != tgl_d);

  // ---------------- write path ----------------
  logic [SYS_W-1:0] wr_word;
  logic             wr_valid;
  logic [DQ_W-1:0]  hi_hold;
  logic             hi_pend;

  assign sys_wdata_req = (cstate == C_WDATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_word  <= '0;
      wr_valid <= 1'b0;
    end else begin
      wr_valid <= sys_wdata_req;
      if (sys_wdata_req) wr_word <= sys_wdata;
    end
  end

  // DQ: low byte at the falling clk2x edge in the second half of the cycle
  // that holds the word, high byte half a clock later.
  always_ff @(negedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      ddr_dq_o  <= '0;
      ddr_dq_oe <= 1'b0;
      hi_hold   <= '0;
      hi_pend   <= 1'b0;
    end else if (!first_half) begin
      if (wr_valid) begin
        ddr_dq_o  <= wr_word[DQ_W-1:0];
        hi_hold   <= wr_word[SYS_W-1:DQ_W];
        hi_pend   <= 1'b1;
        ddr_dq_oe <= 1'b1;
      end else begin
        hi_pend   <= 1'b0;
        ddr_dq_oe <= 1'b0;
      end
    end else begin
      if (hi_pend) ddr_dq_o <= hi_hold;
      ddr_dq_oe <= hi_pend;
      hi_pend   <= 1'b0;
    end
  end

  // DQS: rising at the clk edge after the word's cycle began, falling half
  // a clock later; preamble and postamble are driven low.
  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      ddr_dqs_o  <= 1'b0;
      ddr_dqs_oe <= 1'b0;
    end else if (first_half) begin      // mid-cycle edge
      ddr_dqs_o  <= 1'b0;
      ddr_dqs_oe <= wr_valid || ddr_dqs_oe;
    end else begin                      // edge aligned with clk
      ddr_dqs_o  <= wr_valid;
      ddr_dqs_oe <= wr_valid;
    end
  end

  // ---------------- read path ----------------
  logic [DQ_W-1:0]   beat_a, beat_b;    // latest and previous sampled beats
  logic              dqs_a, dqs_b;      // DQS sampled with them
  logic [SR_LEN-1:0] rd_sr;

  always_ff @(negedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      beat_a <= '0;
      beat_b <= '0;
      dqs_a  <= 1'b0;
      dqs_b  <= 1'b0;
    end else begin
      beat_a <= ddr_dq_i;
      beat_b <= beat_a;
      dqs_a  <= ddr_dqs_i;
      dqs_b  <= dqs_a;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_sr      <= '0;
      sys_rdata  <= '0;
      sys_rvalid <= 1'b0;
    end else begin
      rd_sr      <= {rd_sr[SR_LEN-2:0], (cstate == C_READA)};
      sys_rdata  <= {beat_a, beat_b};
      sys_rvalid <= (|rd_sr[RD_LAT-1 +: WORDS]) && dqs_b && !dqs_a;
    end
  end

  // The controller never drives DQ while read data is due.
  assert property (@(posedge clk) disable iff (!rst_n) sys_rvalid |-> !ddr_dq_oe);

endmodule
