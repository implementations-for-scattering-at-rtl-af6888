// Toggle flip-flop output stage with clock enable.
//
// tx is the Q output of a toggle flip-flop (D = not Q). Its clock is clk gated by
// enclk, the output of ROM_b, which holds a 1 at every address where the message bit
// differs from the previous one (D_ROM_b = (D_ROM >> 1) ^ D_ROM). The flip-flop is
// therefore clocked only at the edges where tx really changes, instead of at every
// edge as in the plain synchronised output, and tx follows the same waveform.
//
// Once the counter has stopped at address 0, the address and hence enclk no longer
// change, and enclk = ROM_b[0] would keep toggling tx. at_end (high once the counter
// has reached its last address) therefore sets a stop flag at the next rising clk
// edge, the one that sends the last bit, and the stop flag blocks the gated clock
// from then on. The stop flag, and the latch in the clock gate, are this design's
// additions; the toggle flip-flop, ROM_b coding and clock gating follow the original design.
//
// Interface: clk, rst (asynchronous, active high; tx resets to 0, the level that the
// ROM_b coding assumes before the first bit), enclk (from ROM_b), at_end, tx.
// Timing: identical to the synchronised output stage: tx takes the bit of the
// address that was applied before each rising clk edge.
module out_toggle (
  input  logic clk,
  input  logic rst,
  input  logic enclk,
  input  logic at_end,
  output logic tx
);

  logic stop;
  logic gclk;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         stop <= 1'b0;
    else if (at_end) stop <= 1'b1;
  end

  clk_gate u_cg (.clk(clk), .en(enclk & ~stop), .gclk(gclk));

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) tx <= 1'b0;
    else     tx <= ~tx;
  end

endmodule
