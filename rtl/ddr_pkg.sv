// ddr_pkg: types and constants shared by the DDR SDRAM controller.
//
// It defines the state encodings of the two controller state machines
// (iState of the initialization FSM, cState of the command FSM), the
// DDR command encoding on {csn, rasn, casn, wen}, and the geometry of the
// assumed memory device (a x8, quad-bank part with 13 row and 10 column
// address bits). The state names follow the design description (i_IDLE,
// i_NOP, i_PRE, i_AR1, i_AR2, i_EMRS, i_MRS, i_tMRD, i_ready); the wait
// states between them, the command FSM states and all widths are this
// design's own choices.
package ddr_pkg;

  // Device geometry (x8 DDR SDRAM, 4 banks).
  localparam int unsigned BA_W   = 2;
  localparam int unsigned ROW_W  = 13;
  localparam int unsigned COL_W  = 10;
  localparam int unsigned ADDR_W = BA_W + ROW_W + COL_W;  // bus master address
  localparam int unsigned DDR_A_W = 13;                   // ddr_add pins
  localparam int unsigned DQ_W   = 8;                     // DDR data pins
  localparam int unsigned SYS_W  = 2 * DQ_W;              // bus master word

  // Initialization FSM states (iState).
  typedef enum logic [3:0] {
    I_IDLE   = 4'd0,
    I_NOP    = 4'd1,
    I_PRE    = 4'd2,
    I_TRP    = 4'd3,
    I_AR1    = 4'd4,
    I_TRFC1  = 4'd5,
    I_AR2    = 4'd6,
    I_TRFC2  = 4'd7,
    I_EMRS   = 4'd8,
    I_TEMRD  = 4'd9,
    I_MRS    = 4'd10,
    I_TMRD   = 4'd11,
    I_READY  = 4'd12
  } istate_e;

  // Command FSM states (cState).
  typedef enum logic [3:0] {
    C_IDLE   = 4'd0,
    C_ACTIVE = 4'd1,
    C_TRCD   = 4'd2,
    C_READA  = 4'd3,
    C_CL     = 4'd4,
    C_RDATA  = 4'd5,
    C_WRITEA = 4'd6,
    C_WDATA  = 4'd7,
    C_TDAL   = 4'd8,
    C_AR     = 4'd9,
    C_TRFC   = 4'd10
  } cstate_e;

  // DDR command: {csn, rasn, casn, wen}.
  typedef enum logic [3:0] {
    CMD_DESEL = 4'b1111,
    CMD_NOP   = 4'b0111,
    CMD_ACT   = 4'b0011,
    CMD_READ  = 4'b0101,
    CMD_WRITE = 4'b0100,
    CMD_PRE   = 4'b0010,
    CMD_AR    = 4'b0001,
    CMD_MRS   = 4'b0000
  } ddr_cmd_e;

  // Mode register burst-length field (A2..A0) for BL = 2, 4, 8.
  function automatic logic [2:0] bl_code(int unsigned bl);
    case (bl)
      2:       return 3'b001;
      4:       return 3'b010;
      default: return 3'b011;
    endcase
  endfunction

endpackage
