// Asynchronous done generator (DG).
//
// A single flip-flop with D tied to 1 is clocked by the zero decode (cnt == 0)
// instead of clk. It therefore stores only once, when cnt reaches 0 for the first
// time, and is otherwise idle; reset clears it.
//
// Interface: cnt (counter value, may come from a ripple counter), rst
// (asynchronous, active high). Timing: done rises as soon as cnt becomes 0, in the
// same clock period, and stays high until reset. No clock input is needed.
// The structure follows the original design. The zero decode is used as a clock; this is
// safe with the down counter used here because no intermediate state of its ripple
// (bits settling from the least significant one upwards) is ever 0 on the way
// from 1..START to the next value, so the decode cannot pulse early.
module dg_async #(
  parameter int unsigned CNT_W = bitgen_pkg::CNT_W
) (
  input  logic             rst,
  input  logic [CNT_W-1:0] cnt,
  output logic             done
);

  logic zero;

  assign zero = (cnt == '0);

  always_ff @(posedge zero or posedge rst) begin
    if (rst) done <= 1'b0;
    else     done <= 1'b1;
  end

endmodule
