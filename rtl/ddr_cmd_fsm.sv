// ddr_cmd_fsm: command state machine (CMD_FSM) of the main control.
//
// Once initialization is done it serves two kinds of work from C_IDLE:
//   * a refresh request from ddr_refresh_counter, which has priority:
//     C_AR (AUTO REFRESH) then C_TRFC, with ref_ack high in the C_IDLE cycle
//     that accepts it;
//   * a bus master request (sys_req with sys_r_wn and an address), accepted
//     with a one-cycle sys_ack: C_ACTIVE (open the row), C_TRCD, then either
//     C_READA (READ with auto precharge), C_CL for CAS_LAT cycles and C_RDATA
//     for the BURST_LEN/2 cycles of read data, or C_WRITEA (WRITE with auto
//     precharge), C_WDATA for the BURST_LEN/2 cycles in which write data is
//     taken from the bus master, and C_TDAL (write recovery plus precharge,
//     T_WR + T_RP cycles).
// Every access closes its row by auto precharge, so all banks are idle in
// C_IDLE and a refresh can always be issued there. The waits use an
// external ddr_counter that the FSM loads as a Mealy output of the
// transition into a wait state.
//
// The description gives only the role of this FSM (issue the commands and
// drive cState); the closed-page policy, the state list and the
// sys_req/sys_ack handshake are this design's own choices. Timing values
// are in 100 MHz cycles; T_RCD must be at least 2.
module ddr_cmd_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned T_RCD     = 2,
  parameter int unsigned T_RP      = 2,
  parameter int unsigned T_RFC     = 8,
  parameter int unsigned T_WR      = 2,
  parameter int unsigned CAS_LAT   = 2,
  parameter int unsigned BURST_LEN = 4,
  parameter int unsigned CNT_W     = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init_done,
  input  logic             ref_req,
  input  logic             sys_req,
  input  logic             sys_r_wn,
  input  logic             cnt_done,
  output logic             cnt_load,
  output logic [CNT_W-1:0] cnt_val,
  output cstate_e          cstate,
  output logic             sys_ack,
  output logic             ref_ack
);

  localparam int unsigned WORDS = BURST_LEN / 2;

  cstate_e next;
  logic    rd_q;   // latched sys_r_wn of the accepted request

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate <= C_IDLE;
      rd_q   <= 1'b1;
    end else begin
      cstate <= next;
      if (sys_ack) rd_q <= sys_r_wn;
    end
  end

  always_comb begin
    next     = cstate;
    cnt_load = 1'b0;
    cnt_val  = '0;
    sys_ack  = 1'b0;
    ref_ack  = 1'b0;
    unique case (cstate)
      C_IDLE: begin
        if (init_done) begin
          if (ref_req) begin
            next    = C_AR;
            ref_ack = 1'b1;
          end else if (sys_req) begin
            next    = C_ACTIVE;
            sys_ack = 1'b1;
          end
        end
      end
      C_ACTIVE: begin next = C_TRCD; cnt_load = 1'b1; cnt_val = CNT_W'(T_RCD - 2); end
      C_TRCD:   if (cnt_done) next = rd_q ? C_READA : C_WRITEA;
      C_READA:  begin next = C_CL; cnt_load = 1'b1; cnt_val = CNT_W'(CAS_LAT - 1); end
      C_CL:     if (cnt_done) begin
                  next = C_RDATA; cnt_load = 1'b1; cnt_val = CNT_W'(WORDS - 1);
                end
      C_RDATA:  if (cnt_done) next = C_IDLE;
      C_WRITEA: begin next = C_WDATA; cnt_load = 1'b1; cnt_val = CNT_W'(WORDS - 1); end
      C_WDATA:  if (cnt_done) begin
                  next = C_TDAL; cnt_load = 1'b1; cnt_val = CNT_W'(T_WR + T_RP - 1);
                end
      C_TDAL:   if (cnt_done) next = C_IDLE;
      C_AR:     begin next = C_TRFC; cnt_load = 1'b1; cnt_val = CNT_W'(T_RFC - 2); end
      C_TRFC:   if (cnt_done) next = C_IDLE;
      default:  next = C_IDLE;
    endcase
  end

  // A request is only acknowledged while it is being made.
  assert property (@(posedge clk) disable iff (!rst_n) sys_ack |-> sys_req);
  // Refresh and a bus access are never accepted in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(sys_ack && ref_ack));

  initial begin
    assert (T_RCD >= 2 && T_RFC >= 2 && CAS_LAT >= 1 && WORDS >= 1)
      else $error("ddr_cmd_fsm: unsupported timing parameters");
  end

endmodule
