// ddr_counter: loadable down-counter that times the wait states of the
// controller state machines (the "Counter module" of the main control).
//
// A state machine that issues a DDR command pulses `load` with a count N in
// the same cycle (a Mealy output of its transition); the counter then holds
// N, N-1, ... 0 in the following cycles and `done` is high while it reads 0.
// A wait state that leaves on `done` therefore lasts N+1 cycles. The counter
// stays at 0 until it is loaded again. Reset (active low, asynchronous)
// clears it. Width and the load/done handshake are this design's choices.
module ddr_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] load_val,
  output logic             done
);

  logic [WIDTH-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              count <= '0;
    else if (load)           count <= load_val;
    else if (count != '0)    count <= count - 1'b1;
  end

  assign done = (count == '0);

endmodule
