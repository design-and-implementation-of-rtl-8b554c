// ddr_pll: behavioural model of the clock generator (PLL module). It is a
// simulation model, not synthesizable logic; on an FPGA it is replaced by
// the device's PLL/DCM primitive with the same ports.
//
// From the reference clock it makes the controller clock clk (same
// frequency, 100 MHz in the intended use), clk2x at twice that frequency
// with its rising edges aligned to those of clk, and the differential SDRAM
// clock ddr_clk / ddr_clkn (ddr_clk in phase with clk). `locked` rises
// after LOCK_CYCLES reference cycles and falls when rst_n is low; the
// controller is held in reset until then. clk, ddr_clk and ddr_clkn are
// the reference itself (a zero-phase PLL); clk2x rises at both reference
// edges and falls REF_PERIOD/4 time units later (it is the reference XOR
// a quarter-period delayed copy of it), so REF_PERIOD must match
// the period of ref_clk in the simulator's time unit and the reference
// must have a 50% duty cycle.
//
// A synthesis tool ignores the delay, so it sees clk2x as the reference
// XOR itself, a constant 0. Synthesizing the whole controller with this
// model therefore removes the clk2x data path; use the device PLL there.
//
// The four outputs and their frequencies follow the description; lock
// behaviour and its timing are this model's assumptions.
module ddr_pll #(
  parameter int unsigned REF_PERIOD  = 40,
  parameter int unsigned LOCK_CYCLES = 8
) (
  input  logic ref_clk,
  input  logic rst_n,
  output logic clk,
  output logic clk2x,
  output logic ddr_clk,
  output logic ddr_clkn,
  output logic locked
);

  localparam int unsigned QUARTER = REF_PERIOD / 4;

  int unsigned lock_cnt;

  initial begin
    locked   = 1'b0;
    lock_cnt = 0;
  end

  // clk and the SDRAM clock pair follow the reference with zero phase.
  assign clk      = ref_clk;
  assign ddr_clk  = ref_clk;
  assign ddr_clkn = ~ref_clk;

  // clk2x is the reference XOR a copy of it delayed by a quarter period:
  // high for the first quarter after each reference edge, low for the
  // second. Being a continuous assignment like clk, it changes in the same
  // scheduling step as clk, so both clock domains sample together.
  logic ref_q;

  assign #(QUARTER) ref_q = ref_clk;
  assign clk2x = ref_clk ^ ref_q;

  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_cnt <= 0;
      locked   <= 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
    end else begin
      locked   <= 1'b1;
    end
  end

endmodule
