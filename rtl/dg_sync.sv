// Synchronous done generator (DG).
//
// done goes high once cnt has been 0 at a rising clk edge and then holds itself
// high (D = (cnt == 0) | done) until reset. The flip-flop is clocked every cycle.
//
// Interface: cnt (counter value), clk, rst (asynchronous, active high).
// Timing: done rises at the first rising clk edge at which cnt == 0, i.e. one
// clock after the counter reached 0. Structure as in the original design; reset polarity
// is this design's choice.
module dg_sync #(
  parameter int unsigned CNT_W = bitgen_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] cnt,
  output logic             done
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) done <= 1'b0;
    else     done <= (cnt == '0) | done;
  end

endmodule
