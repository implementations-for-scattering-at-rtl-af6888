// Bit-stream generator of a battery-less back-scattering transponder.
//
// After the power-on reset the generator sends one 200-bit message at 1 Mbit/s on
// tx and then stops. tx drives the switch input of an external oscillator that moves
// the sub-carrier between 4 and 4.5 MHz, which a modulator turns into a frequency
// shift of the back-scattered Bluetooth signal. The oscillator, the 1 MHz
// temperature-compensated crystal oscillator and the power-on reset are outside this
// module.
//
// Structure: a stop down counter (SDC) runs from 199 to 0 and stops; its value is the
// address of a 200 x 1 bit ROM whose output becomes tx. STEP selects one of the five
// development steps that lowered the switching activity:
//   STEP_FULL_SYNC   synchronous counter, ROM output drives tx directly
//   STEP_ASYNC_SDC   ripple counter with a clocked done generator
//   STEP_ASYNC_DG    ripple counter with a self-clocked done generator
//   STEP_SYNC_OUT    as before, plus a flip-flop between ROM and tx
//   STEP_TOGGLE_OUT  as before, but the flip-flop is a toggle flip-flop whose clock is
//                    enabled by a second ROM (ROM_b) holding the bit changes
// The default is STEP_TOGGLE_OUT, the optimised design.
//
// Interface: clk (1 MHz bit clock), rst (asynchronous, active high, power-on reset),
// tx (bit-stream = oscillator switch input swt), cnt (current ROM address), done
// (counter has reached 0; in STEP_FULL_SYNC it is the zero decode of cnt).
// Timing: without an output flip-flop (steps 0-2) tx shows ROM[199] while rst is
// high and ROM[199-k] after the k-th rising clk edge. With an output flip-flop (steps
// 3-4) tx is 0 during reset and ROM[200-k] after the k-th edge, k = 1..200. In both
// cases tx then holds ROM[0]. The message is 200 bit periods (200 us) long.
// The block structure and steps follow the original design; the message contents
// (MESSAGE) are this design's example.
module bitstream_generator
  import bitgen_pkg::*;
#(
  parameter dev_step_e         STEP    = STEP_TOGGLE_OUT,
  parameter int unsigned       N       = N_BITS,
  parameter int unsigned       W       = CNT_W,
  parameter logic [N-1:0]      MESSAGE = BLE_MESSAGE
) (
  input  logic         clk,
  input  logic         rst,
  output logic         tx,
  output logic [W-1:0] cnt,
  output logic         done
);

  logic rom_do;

  // ---- stop down counter ---------------------------------------------------
  if (STEP == STEP_FULL_SYNC) begin : g_sdc_sync
    sdc_sync #(.CNT_W(W), .START(N - 1)) u_sdc (.clk(clk), .rst(rst), .cnt(cnt));
    assign done = (cnt == '0);
  end else begin : g_sdc_async
    sdc_async #(.CNT_W(W), .START(N - 1), .DG_ASYNC(STEP != STEP_ASYNC_SDC))
      u_sdc (.clk(clk), .rst(rst), .cnt(cnt), .done(done));
  end

  // ---- ROM and output stage ------------------------------------------------
  if (STEP == STEP_TOGGLE_OUT) begin : g_toggle
    rom200x1 #(.DEPTH(N), .AW(W), .DATA(toggle_code(MESSAGE)))
      u_rom_b (.addr(cnt), .do_o(rom_do));
    out_toggle u_out (.clk(clk), .rst(rst), .enclk(rom_do), .at_end(done), .tx(tx));
  end else if (STEP == STEP_SYNC_OUT) begin : g_sync_out
    rom200x1 #(.DEPTH(N), .AW(W), .DATA(MESSAGE)) u_rom (.addr(cnt), .do_o(rom_do));
    out_sync u_out (.clk(clk), .rst(rst), .d(rom_do), .tx(tx));
  end else begin : g_comb_out
    rom200x1 #(.DEPTH(N), .AW(W), .DATA(MESSAGE)) u_rom (.addr(cnt), .do_o(rom_do));
    assign tx = rom_do;
  end

endmodule
