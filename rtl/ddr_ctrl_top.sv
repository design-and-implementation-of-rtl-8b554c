// ddr_ctrl_top: DDR SDRAM controller between a 16-bit bus master and an
// 8-bit, quad-bank DDR SDRAM.
//
// The four modules of the controller are wired as in its block diagram:
// ddr_pll makes clk (100 MHz), clk2x (200 MHz) and ddr_clk/ddr_clkn;
// ddr_main_ctrl (INIT_FSM, CMD_FSM, counters, refresh counter) produces
// iState and cState; ddr_sig_gen turns them into command and address pins;
// ddr_data_path moves the data under control of cState. The controller is
// held in reset until sys_rst_n is high and the PLL has locked.
//
// Bus master interface, synchronous to sys_clk (= clk):
//   sys_dly_200us  high once the 200 us power-up delay has passed
//   sys_init_done  high once the SDRAM is initialized
//   sys_req, sys_r_wn, sys_addr  request (held until sys_ack); sys_addr is
//                  {bank[1:0], row[12:0], column[9:0]} in bytes, aligned
//                  down to a burst
//   sys_ack        one-cycle pulse: request taken
//   sys_wdata_req  high in the BURST_LEN/2 cycles in which sys_wdata is
//                  taken (one 16-bit word per cycle, low byte first to the
//                  SDRAM)
//   sys_rdata, sys_rvalid  read words, T_RCD + CAS_LAT + 4 cycles after
//                  sys_ack (8 at the defaults)
//   sys_ref_ack    pulse when an AUTO REFRESH is issued
// Each burst moves BURST_LEN bytes (BURST_LEN/2 words). The bidirectional
// DQ and DQS pins are brought out as value, output-enable and input
// signals for the pad buffers; ddr_dm is held low (all bytes written).
// The module split and the clock frequencies follow the published design;
// the bus handshake, timing values and pin-level waveforms are this
// design's own choices.
module ddr_ctrl_top
  import ddr_pkg::*;
#(
  parameter int unsigned T_RP       = 2,
  parameter int unsigned T_RFC      = 8,
  parameter int unsigned T_MRD      = 2,
  parameter int unsigned T_RCD      = 2,
  parameter int unsigned T_WR       = 2,
  parameter int unsigned CAS_LAT    = 2,
  parameter int unsigned BURST_LEN  = 4,
  parameter int unsigned REF_INT    = 780,
  parameter int unsigned REF_PERIOD = 40,
  parameter int unsigned LOCK_CYCLES = 8
) (
  input  logic                ref_clk,
  input  logic                sys_rst_n,
  // bus master
  output logic                sys_clk,
  input  logic                sys_dly_200us,
  output logic                sys_init_done,
  input  logic                sys_req,
  input  logic                sys_r_wn,
  input  logic [ADDR_W-1:0]   sys_addr,
  output logic                sys_ack,
  input  logic [SYS_W-1:0]    sys_wdata,
  output logic                sys_wdata_req,
  output logic [SYS_W-1:0]    sys_rdata,
  output logic                sys_rvalid,
  output logic                sys_ref_ack,
  // DDR SDRAM
  output logic                ddr_clk,
  output logic                ddr_clkn,
  output logic                ddr_cke,
  output logic                ddr_csn,
  output logic                ddr_rasn,
  output logic                ddr_casn,
  output logic                ddr_wen,
  output logic [BA_W-1:0]     ddr_ba,
  output logic [DDR_A_W-1:0]  ddr_add,
  output logic                ddr_dm,
  output logic [DQ_W-1:0]     ddr_dq_o,
  output logic                ddr_dq_oe,
  input  logic [DQ_W-1:0]     ddr_dq_i,
  output logic                ddr_dqs_o,
  output logic                ddr_dqs_oe,
  input  logic                ddr_dqs_i
);

  logic    clk, clk2x, locked, rst_n;
  istate_e istate;
  cstate_e cstate;

  ddr_pll #(.REF_PERIOD(REF_PERIOD), .LOCK_CYCLES(LOCK_CYCLES)) u_pll (
    .ref_clk, .rst_n(sys_rst_n), .clk, .clk2x, .ddr_clk, .ddr_clkn, .locked
  );

  assign rst_n   = sys_rst_n && locked;
  assign sys_clk = clk;
  assign ddr_dm  = 1'b0;

  ddr_main_ctrl #(
    .T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD), .T_RCD(T_RCD), .T_WR(T_WR),
    .CAS_LAT(CAS_LAT), .BURST_LEN(BURST_LEN), .REF_INT(REF_INT)
  ) u_main (
    .clk, .rst_n, .sys_dly_200us, .sys_req, .sys_r_wn, .sys_ack,
    .sys_init_done, .sys_ref_ack, .istate, .cstate
  );

  ddr_sig_gen #(.CAS_LAT(CAS_LAT), .BURST_LEN(BURST_LEN)) u_sig (
    .clk, .rst_n, .istate, .cstate, .cmd_accept(sys_ack), .sys_addr,
    .ddr_cke, .ddr_csn, .ddr_rasn, .ddr_casn, .ddr_wen, .ddr_ba, .ddr_add
  );

  ddr_data_path #(.CAS_LAT(CAS_LAT), .BURST_LEN(BURST_LEN)) u_dp (
    .clk, .clk2x, .rst_n, .cstate,
    .sys_wdata, .sys_wdata_req, .sys_rdata, .sys_rvalid,
    .ddr_dq_o, .ddr_dq_oe, .ddr_dq_i, .ddr_dqs_o, .ddr_dqs_oe, .ddr_dqs_i
  );

endmodule
