// ddr_main_ctrl: main control module of the DDR SDRAM controller.
//
// It holds the two state machines and their timers, as the description
// lays it out: ddr_init_fsm (INIT_FSM) brings the SDRAM up after power-on,
// ddr_cmd_fsm (CMD_FSM) then serves read, write and refresh, each FSM has
// its own ddr_counter for wait states, and ddr_refresh_counter requests an
// AUTO REFRESH every REF_INT cycles once initialization is done. Its outputs
// are iState and cState, which drive the signal generation and data path
// modules, plus the bus master handshake (sys_ack, sys_init_done,
// sys_ref_ack).
//
// Interface timing: sys_req/sys_r_wn are sampled every cycle; sys_ack is a
// combinational one-cycle pulse in the cycle the request is taken, and the
// address must be valid in that cycle. All timing parameters are in cycles
// of the 100 MHz controller clock; their values are common DDR-266 figures
// rounded up, not numbers from the description.
module ddr_main_ctrl
  import ddr_pkg::*;
#(
  parameter int unsigned T_RP      = 2,    // 20 ns
  parameter int unsigned T_RFC     = 8,    // 75 ns
  parameter int unsigned T_MRD     = 2,    // 2 tCK
  parameter int unsigned T_RCD     = 2,    // 20 ns
  parameter int unsigned T_WR      = 2,    // 15 ns
  parameter int unsigned CAS_LAT   = 2,
  parameter int unsigned BURST_LEN = 4,
  parameter int unsigned REF_INT   = 780   // 7.8 us
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sys_dly_200us,
  input  logic    sys_req,
  input  logic    sys_r_wn,
  output logic    sys_ack,
  output logic    sys_init_done,
  output logic    sys_ref_ack,
  output istate_e istate,
  output cstate_e cstate
);

  localparam int unsigned CNT_W = 8;

  logic             i_load, i_done, c_load, c_done, ref_req;
  logic [CNT_W-1:0] i_val, c_val;

  ddr_init_fsm #(.T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD), .CNT_W(CNT_W)) u_init (
    .clk, .rst_n, .sys_dly_200us,
    .cnt_done(i_done), .cnt_load(i_load), .cnt_val(i_val),
    .istate, .sys_init_done
  );

  ddr_counter #(.WIDTH(CNT_W)) u_icnt (
    .clk, .rst_n, .load(i_load), .load_val(i_val), .done(i_done)
  );

  ddr_cmd_fsm #(
    .T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC), .T_WR(T_WR),
    .CAS_LAT(CAS_LAT), .BURST_LEN(BURST_LEN), .CNT_W(CNT_W)
  ) u_cmd (
    .clk, .rst_n, .init_done(sys_init_done), .ref_req, .sys_req, .sys_r_wn,
    .cnt_done(c_done), .cnt_load(c_load), .cnt_val(c_val),
    .cstate, .sys_ack, .ref_ack(sys_ref_ack)
  );

  ddr_counter #(.WIDTH(CNT_W)) u_ccnt (
    .clk, .rst_n, .load(c_load), .load_val(c_val), .done(c_done)
  );

  ddr_refresh_counter #(.REF_INT(REF_INT)) u_ref (
    .clk, .rst_n, .enable(sys_init_done), .ref_ack(sys_ref_ack), .ref_req
  );

endmodule
