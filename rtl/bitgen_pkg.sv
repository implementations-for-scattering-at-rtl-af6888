// Shared constants, types and ROM-content functions of the bit-stream generator.
//
// The generator sends one fixed message of N_BITS = 200 bits at one bit per
// 1 MHz clock. An 8-bit stop down counter runs from N_BITS-1 = 199 to 0 and
// addresses a 200x1 ROM; the bit at ROM address 199 leaves first.
//
// dev_step_e names the five development steps of the low-power CPLD design,
// from the fully synchronous circuit to the optimised one with a ripple counter,
// a self-clocked done flag and a clock-enabled toggle flip-flop at the output.
//
// ble_adv_message() builds the default ROM contents. The message content itself is
// this design's own choice (only its length and its channel, 39, are given): a
// Bluetooth LE advertising packet, ADV_NONCONN_IND, of exactly 25 bytes:
//   preamble 0xAA | access address 0x8E89BED6 | header 0x42, length 15 |
//   AdvA C0:FF:EE:00:00:01 (random static) | AdvData 08 FF FF FF "TAG01" | CRC-24
// Bytes go out least significant bit first. The CRC uses x^24+x^10+x^9+x^6+x^4+x^3+x+1,
// preset 0x555555 (bit 0 in register position 0), and is sent from position 23 down
// to 0. Header, payload and CRC are whitened with x^7+x^4+1, preset from channel
// index 39. The packet has not been checked against a Bluetooth receiver.
//
// toggle_code() turns ROM contents into the contents of ROM_b for the toggle output
// stage: D_ROM_b = (D_ROM >> 1) ^ D_ROM. Because the address counts down, bit a of
// ROM_b is 1 exactly when the bit sent at address a differs from the one sent before it
// (address a+1); above address N_BITS-1 the output is taken as 0, the reset level of tx.
package bitgen_pkg;

  localparam int unsigned N_BITS = 200;              // message length, bits
  localparam int unsigned CNT_W  = 8;                // counter / address width
  localparam int unsigned BLE_CHANNEL = 39;          // whitening channel index

  // Development steps, in the order they were applied to the CPLD design.
  typedef enum logic [2:0] {
    STEP_FULL_SYNC    = 3'd0, // synchronous counter, ROM output straight to tx
    STEP_ASYNC_SDC    = 3'd1, // ripple counter, clocked done generator
    STEP_ASYNC_DG     = 3'd2, // ripple counter, self-clocked done generator
    STEP_SYNC_OUT     = 3'd3, // ... plus an output flip-flop on tx
    STEP_TOGGLE_OUT   = 3'd4  // ... with a clock-enabled toggle flip-flop instead
  } dev_step_e;

  // The default message as ROM contents: ROM[N_BITS-1-j] holds serial bit j.
  function automatic logic [N_BITS-1:0] ble_adv_message();
    logic [7:0]  pre_aa [5];
    logic [7:0]  pdu [17];
    logic [23:0] crc;
    logic [6:0]  wht;
    logic [N_BITS-1:0] s;
    logic [N_BITS-1:0] rom;
    logic        fb;
    logic        d;
    int unsigned n;
    int unsigned first_w;
    pre_aa = '{8'hAA, 8'hD6, 8'hBE, 8'h89, 8'h8E};
    pdu = '{8'h42, 8'd15,                                     // header
            8'h01, 8'h00, 8'h00, 8'hEE, 8'hFF, 8'hC0,         // AdvA
            8'h08, 8'hFF, 8'hFF, 8'hFF,                       // AD: len, type, company
            8'h54, 8'h41, 8'h47, 8'h30, 8'h31};               // "TAG01"
    s = '0;
    n = 0;
    for (int k = 0; k < 5; k++) begin                         // preamble, access address
      for (int i = 0; i < 8; i++) begin
        s[n] = pre_aa[k][i];
        n++;
      end
    end
    first_w = n;
    // PDU and CRC-24
    crc = 24'h555555;
    for (int k = 0; k < 17; k++) begin
      for (int i = 0; i < 8; i++) begin
        d = pdu[k][i];
        s[n] = d;
        n++;
        fb = d ^ crc[23];
        crc = {crc[22:0], fb} ^ ({24{fb}} & 24'h00065A);
      end
    end
    for (int i = 23; i >= 0; i--) begin
      s[n] = crc[i];
      n++;
    end
    // whitening of PDU and CRC; wht[0] = position 0
    wht[0] = 1'b1;
    for (int i = 1; i <= 6; i++) wht[i] = 1'((BLE_CHANNEL >> (6 - i)) & 1);
    for (int j = first_w; j < N_BITS; j++) begin
      fb = wht[6];
      s[j] = s[j] ^ fb;
      wht = {wht[5], wht[4], wht[3] ^ fb, wht[2], wht[1], wht[0], fb};
    end
    for (int j = 0; j < N_BITS; j++) rom[N_BITS-1-j] = s[j];
    return rom;
  endfunction

  // ROM_b contents for the toggle output stage.
  function automatic logic [N_BITS-1:0] toggle_code(input logic [N_BITS-1:0] rom);
    return (rom >> 1) ^ rom;
  endfunction

  localparam logic [N_BITS-1:0] BLE_MESSAGE = ble_adv_message();

endpackage
