// ddr_init_fsm: initialization state machine (INIT_FSM) of the main control.
//
// After reset it waits in I_IDLE until the bus master reports, on
// sys_dly_200us, that the 200 us power-up and clock-stabilization delay has
// passed. It then walks the power-up sequence: one NOP, PRECHARGE all banks,
// two AUTO REFRESH commands, LOAD EXTENDED MODE REGISTER, LOAD MODE
// REGISTER, and finally I_READY, where it stays and holds sys_init_done
// high. Every command state is followed by a wait state timed by an
// external ddr_counter: the FSM loads the counter as a Mealy output of the
// transition out of the command state and leaves the wait state when the
// counter reports done. Reset (rst_n low, asynchronous) returns it to
// I_IDLE from any state, as described.
//
// The state names, the sys_dly_200us/sys_init_done handshake and the order
// PRE, AR1, AR2, MRS follow the design description. Where the EMRS goes is
// not stated; it is placed right before the MRS. Wait lengths are in
// controller clock cycles (100 MHz): T_RP, T_RFC and T_MRD; each must be at
// least 2. The command that each state puts on the DDR pins is decided by
// ddr_sig_gen from iState.
module ddr_init_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned T_RP  = 2,   // PRECHARGE period
  parameter int unsigned T_RFC = 8,   // AUTO REFRESH period
  parameter int unsigned T_MRD = 2,   // LOAD MODE REGISTER cycle time
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sys_dly_200us,
  input  logic             cnt_done,
  output logic             cnt_load,
  output logic [CNT_W-1:0] cnt_val,
  output istate_e          istate,
  output logic             sys_init_done
);

  istate_e next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) istate <= I_IDLE;
    else        istate <= next;
  end

  always_comb begin
    next     = istate;
    cnt_load = 1'b0;
    cnt_val  = '0;
    unique case (istate)
      I_IDLE:  if (sys_dly_200us) next = I_NOP;
      I_NOP:   next = I_PRE;
      I_PRE:   begin next = I_TRP;   cnt_load = 1'b1; cnt_val = CNT_W'(T_RP - 2);  end
      I_TRP:   if (cnt_done) next = I_AR1;
      I_AR1:   begin next = I_TRFC1; cnt_load = 1'b1; cnt_val = CNT_W'(T_RFC - 2); end
      I_TRFC1: if (cnt_done) next = I_AR2;
      I_AR2:   begin next = I_TRFC2; cnt_load = 1'b1; cnt_val = CNT_W'(T_RFC - 2); end
      I_TRFC2: if (cnt_done) next = I_EMRS;
      I_EMRS:  begin next = I_TEMRD; cnt_load = 1'b1; cnt_val = CNT_W'(T_MRD - 2); end
      I_TEMRD: if (cnt_done) next = I_MRS;
      I_MRS:   begin next = I_TMRD;  cnt_load = 1'b1; cnt_val = CNT_W'(T_MRD - 2); end
      I_TMRD:  if (cnt_done) next = I_READY;
      I_READY: next = I_READY;
      default: next = I_IDLE;
    endcase
  end

  assign sys_init_done = (istate == I_READY);

  initial begin
    assert (T_RP >= 2 && T_RFC >= 2 && T_MRD >= 2)
      else $error("ddr_init_fsm: wait periods must be at least 2 cycles");
  end

endmodule
