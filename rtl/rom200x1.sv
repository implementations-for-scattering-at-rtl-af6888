// 200 x 1 bit read-only memory.
//
// Holds one bit per address; do_o = DATA[addr], combinationally. Addresses at or
// above DEPTH read 0. The same block serves as ROM (the message itself, read by the
// plain and the synchronised output) and as ROM_b (its toggle code, read by the
// toggle output stage); the contents come in through the DATA parameter.
//
// Interface: addr (8 bits, from the stop down counter), do_o (data out).
// Timing: purely combinational, no clock.
// Size and use follow the original design; the contents are this design's own example
// message (see bitgen_pkg), which the original design does not list.
module rom200x1 #(
  parameter int unsigned         DEPTH = bitgen_pkg::N_BITS,
  parameter int unsigned         AW    = bitgen_pkg::CNT_W,
  parameter logic [DEPTH-1:0]    DATA  = bitgen_pkg::BLE_MESSAGE
) (
  input  logic [AW-1:0] addr,
  output logic          do_o
);

  always_comb begin
    if (int'(addr) < DEPTH) do_o = DATA[addr];
    else                    do_o = 1'b0;
  end

endmodule
