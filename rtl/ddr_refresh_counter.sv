// ddr_refresh_counter: refresh interval timer of the main control.
//
// While `enable` is high (after initialization) it counts clock cycles and,
// every REF_INT cycles, raises `ref_req`. The request stays high until the
// command FSM answers with `ref_ack` (the cycle it issues AUTO REFRESH); the
// interval keeps running meanwhile, so refreshes keep their average rate
// even if one is served late. If a new interval expires while a request is
// still pending, the request simply stays high. REF_INT = 780 cycles is
// 7.8 us at the 100 MHz controller clock, the usual DDR tREFI; the
// description names a refresh counter but gives no interval.
module ddr_refresh_counter #(
  parameter int unsigned REF_INT = 780
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic ref_ack,
  output logic ref_req
);

  localparam int unsigned CW = $clog2(REF_INT + 1);

  logic [CW-1:0] cnt;
  logic          expire;

  assign expire = enable && (cnt == CW'(REF_INT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (!enable)  cnt <= '0;
    else if (expire)   cnt <= '0;
    else               cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ref_req <= 1'b0;
    else if (expire)   ref_req <= 1'b1;
    else if (ref_ack)  ref_req <= 1'b0;
  end

endmodule
