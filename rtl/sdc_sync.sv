// Synchronous stop down counter (SDC).
//
// On reset the counter loads START (199) and then, at every rising clk edge,
// counts down by one until it reaches 0, where it stays until the next reset.
// All CNT_W flip-flops share clk, so each of them is clocked every cycle: this is
// the fully synchronous starting point of the low-power development.
//
// Interface: clk (1 MHz bit clock), rst (asynchronous, active high, from the
// power-on reset), cnt = ROM address. Timing: cnt = START while rst is high and
// START - k after the k-th rising edge, down to 0; 0 is reached after START edges.
// The count range and the "decrement if cnt > 0 else 0" next-state rule follow the
// original design; the asynchronous, active-high reset is this design's choice.
module sdc_sync #(
  parameter int unsigned CNT_W = bitgen_pkg::CNT_W,
  parameter int unsigned START = bitgen_pkg::N_BITS - 1
) (
  input  logic             clk,
  input  logic             rst,
  output logic [CNT_W-1:0] cnt
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)           cnt <= CNT_W'(START);
    else if (cnt != 0) cnt <= cnt - 1'b1;
  end

endmodule
