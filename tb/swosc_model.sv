// Behavioural model of the switchable sub-carrier oscillator (simulation only).
//
// scat is a square wave of F0_MHZ (swt = 0) or F1_MHZ (swt = 1). The frequency is
// switched without a phase jump: the half period in progress finishes and the next
// one takes the new length. swt = 1 selects the higher frequency, which shifts the
// scattered carrier up (a '1' bit in frequency-shift keying). Needs a 1 ns time unit.
module swosc_model #(
  parameter real F0_MHZ = 4.0,
  parameter real F1_MHZ = 4.5
) (
  input  logic swt,
  output logic scat
);
  initial scat = 1'b0;
  always begin
    #((swt ? 500.0 / F1_MHZ : 500.0 / F0_MHZ));
    scat = ~scat;
  end
endmodule
