// Synchronised output stage.
//
// A single flip-flop between the ROM output and the tx pin. Hazards that the ROM
// decode and the rippling counter bits produce on the ROM output die at the D input
// and never reach the pin and its load capacitance.
//
// Interface: clk, rst (asynchronous, active high, clears tx), d (ROM output),
// tx (to the switchable oscillator). Timing: tx takes d at every rising clk edge,
// one clock after the address was applied. Structure as in the original design; the reset
// value 0 is this design's choice.
module out_sync (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic tx
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) tx <= 1'b0;
    else     tx <= d;
  end

endmodule
