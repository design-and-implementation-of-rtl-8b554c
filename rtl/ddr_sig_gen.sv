// ddr_sig_gen: signal generation module. It turns iState (initialization
// FSM) and cState (command FSM) into the DDR command and address pins:
// ddr_cke, ddr_csn, ddr_rasn, ddr_casn, ddr_wen, ddr_ba and ddr_add.
//
// The command for the current state is decoded combinationally and
// registered, so it reaches the pins one clock after the state and the
// SDRAM samples it at the following rising edge of ddr_clk. The bus master
// address {bank, row, column} is latched in the cycle the command FSM
// accepts a request (cmd_accept); ACTIVE drives the bank and row, READ and
// WRITE the bank and the burst-aligned column with A10 high (auto
// precharge). During initialization: deselect with CKE low in I_IDLE, then
// NOP, PRECHARGE all (A10 high), AUTO REFRESH, LOAD EXTENDED MODE REGISTER
// (BA = 01, DLL enabled, normal drive) and LOAD MODE REGISTER (BA = 00,
// sequential bursts of BURST_LEN, CAS latency CAS_LAT, no DLL reset).
// Every wait state sends NOP.
//
// The module's role and pin names (ddr_add, ddr_rasn, ddr_casn) follow the
// description; the encodings are the standard DDR SDRAM ones, while the
// address split and mode register contents are this design's choices.
module ddr_sig_gen
  import ddr_pkg::*;
#(
  parameter int unsigned CAS_LAT   = 2,
  parameter int unsigned BURST_LEN = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  istate_e             istate,
  input  cstate_e             cstate,
  input  logic                cmd_accept,
  input  logic [ADDR_W-1:0]   sys_addr,
  output logic                ddr_cke,
  output logic                ddr_csn,
  output logic                ddr_rasn,
  output logic                ddr_casn,
  output logic                ddr_wen,
  output logic [BA_W-1:0]     ddr_ba,
  output logic [DDR_A_W-1:0]  ddr_add
);

  localparam int unsigned BL_BITS = $clog2(BURST_LEN);

  logic [ADDR_W-1:0]  addr_q;
  logic [BA_W-1:0]    bank;
  logic [ROW_W-1:0]   row;
  logic [COL_W-1:0]   col;
  ddr_cmd_e           cmd;
  logic [BA_W-1:0]    ba_n;
  logic [DDR_A_W-1:0] add_n;
  logic [DDR_A_W-1:0] mode_word;

  assign {bank, row, col} = addr_q;

  // Mode register: A6..A4 CAS latency, A3 sequential, A2..A0 burst length.
  assign mode_word = DDR_A_W'({3'(CAS_LAT), 1'b0, bl_code(BURST_LEN)});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          addr_q <= '0;
    else if (cmd_accept) addr_q <= sys_addr;
  end

  always_comb begin
    cmd   = CMD_NOP;
    ba_n  = '0;
    add_n = '0;
    if (istate != I_READY) begin
      unique case (istate)
        I_IDLE:        cmd = CMD_DESEL;
        I_PRE:         begin cmd = CMD_PRE; add_n[10] = 1'b1; end
        I_AR1, I_AR2:  cmd = CMD_AR;
        I_EMRS:        begin cmd = CMD_MRS; ba_n = 2'b01; end
        I_MRS:         begin cmd = CMD_MRS; ba_n = 2'b00; add_n = mode_word; end
        default:       cmd = CMD_NOP;
      endcase
    end else begin
      unique case (cstate)
        C_ACTIVE: begin
          cmd   = CMD_ACT;
          ba_n  = bank;
          add_n = DDR_A_W'(row);
        end
        C_READA, C_WRITEA: begin
          cmd   = (cstate == C_READA) ? CMD_READ : CMD_WRITE;
          ba_n  = bank;
          add_n = DDR_A_W'({col[COL_W-1:BL_BITS], BL_BITS'(0)});
          add_n[10] = 1'b1;
        end
        C_AR:    cmd = CMD_AR;
        default: cmd = CMD_NOP;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ddr_cke <= 1'b0;
      {ddr_csn, ddr_rasn, ddr_casn, ddr_wen} <= CMD_DESEL;
      ddr_ba  <= '0;
      ddr_add <= '0;
    end else begin
      ddr_cke <= (istate != I_IDLE);
      {ddr_csn, ddr_rasn, ddr_casn, ddr_wen} <= cmd;
      ddr_ba  <= ba_n;
      ddr_add <= add_n;
    end
  end

endmodule
