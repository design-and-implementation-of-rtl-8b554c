// tb_ddr_sig_gen: checks the command and address pins produced from
// iState and cState. Each state is applied for one cycle; one cycle later
// the pins must carry the matching DDR command {csn, rasn, casn, wen},
// bank and address: deselect with CKE low in I_IDLE, PRECHARGE all with
// A10, AUTO REFRESH, EMRS on bank 1, MRS with the burst length and CAS
// latency fields, ACTIVE with the latched bank and row, READ/WRITE with the
// burst-aligned column and A10 set, and NOP in every wait state.
module tb_ddr_sig_gen;
  import ddr_pkg::*;
  localparam int unsigned CL = 3, BL = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, cmd_accept = 1'b0;
  istate_e istate = I_IDLE;
  cstate_e cstate = C_IDLE;
  logic [ADDR_W-1:0] sys_addr = '0;
  logic ddr_cke, ddr_csn, ddr_rasn, ddr_casn, ddr_wen;
  logic [1:0] ddr_ba;
  logic [12:0] ddr_add;

  always #5 clk = ~clk;

  ddr_sig_gen #(.CAS_LAT(CL), .BURST_LEN(BL)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic apply_i(istate_e s, logic [3:0] cmd, logic [1:0] ba, logic [12:0] add, bit cke);
    @(negedge clk); istate = s;
    @(negedge clk);
    check({ddr_csn, ddr_rasn, ddr_casn, ddr_wen} == cmd && ddr_ba == ba && ddr_add == add && ddr_cke == cke,
          $sformatf("%s: cmd %b ba %0d add %h cke %b", s.name(),
                    {ddr_csn, ddr_rasn, ddr_casn, ddr_wen}, ddr_ba, ddr_add, ddr_cke));
  endtask

  task automatic apply_c(cstate_e s, logic [3:0] cmd, logic [1:0] ba, logic [12:0] add);
    @(negedge clk); cstate = s;
    @(negedge clk);
    check({ddr_csn, ddr_rasn, ddr_casn, ddr_wen} == cmd && ddr_ba == ba && ddr_add == add && ddr_cke,
          $sformatf("%s: cmd %b ba %0d add %h", s.name(), {ddr_csn, ddr_rasn, ddr_casn, ddr_wen}, ddr_ba, ddr_add));
  endtask

  initial begin
    logic [1:0] b; logic [12:0] r; logic [9:0] c;
    @(negedge clk);
    check(ddr_cke == 0 && ddr_csn == 1, "reset: CKE low, deselected");
    rst_n = 1'b1;
    apply_i(I_IDLE,  4'b1111, 0, 0, 0);
    apply_i(I_NOP,   4'b0111, 0, 0, 1);
    apply_i(I_PRE,   4'b0010, 0, 13'h0400, 1);
    apply_i(I_TRP,   4'b0111, 0, 0, 1);
    apply_i(I_AR1,   4'b0001, 0, 0, 1);
    apply_i(I_TRFC1, 4'b0111, 0, 0, 1);
    apply_i(I_AR2,   4'b0001, 0, 0, 1);
    apply_i(I_TRFC2, 4'b0111, 0, 0, 1);
    apply_i(I_EMRS,  4'b0000, 1, 0, 1);
    apply_i(I_TEMRD, 4'b0111, 0, 0, 1);
    // CAS latency 3 in A6..A4, burst length 8 (011) in A2..A0
    apply_i(I_MRS,   4'b0000, 0, 13'h033, 1);
    apply_i(I_TMRD,  4'b0111, 0, 0, 1);
    // in I_READY, cState decides; an ACTIVE state before READY is ignored
    @(negedge clk); istate = I_TMRD; cstate = C_ACTIVE;
    @(negedge clk); check({ddr_csn, ddr_rasn, ddr_casn, ddr_wen} == 4'b0111, "cState ignored before READY");
    @(negedge clk); istate = I_READY; cstate = C_IDLE;
    for (int i = 0; i < 20; i++) begin
      b = 2'($urandom); r = 13'($urandom); c = 10'($urandom);
      @(negedge clk); sys_addr = {b, r, c}; cmd_accept = 1'b1;
      @(negedge clk); cmd_accept = 1'b0; sys_addr = ADDR_W'($urandom);  // address may change
      apply_c(C_ACTIVE, 4'b0011, b, r);
      apply_c(C_TRCD,   4'b0111, 0, 0);
      apply_c((i % 2 != 0) ? C_READA : C_WRITEA, (i % 2 != 0) ? 4'b0101 : 4'b0100, b,
              13'h0400 | 13'({c[9:3], 3'b000}));
      apply_c((i % 2 != 0) ? C_CL : C_WDATA, 4'b0111, 0, 0);
      apply_c(C_IDLE, 4'b0111, 0, 0);
    end
    apply_c(C_AR,   4'b0001, 0, 0);
    apply_c(C_TRFC, 4'b0111, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
