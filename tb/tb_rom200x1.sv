// Testbench for rom200x1. The expected contents come from an independent reference
// model of the default message (the advertising packet described in bitgen_pkg) and
// of its toggle code, computed outside SystemVerilog. Every address is read; the
// addresses 200..255 must read 0. A third instance with a fixed pattern checks the
// address decoding.
module tb_rom200x1;
  localparam logic [199:0] EXP_MSG  = 200'h556b7d9171ba1cd2faa118c65a93945cdd2e18998b7decb9e2;
  localparam logic [199:0] EXP_TOGG = 200'h7fdec359c96712bb87f194a577da5e72b3b914d54ec31ae513;
  localparam logic [199:0] PAT = {25{8'b1011_0010}};

  logic [7:0] addr;
  logic d_msg, d_tog, d_pat;
  int checks = 0, failures = 0;

  rom200x1                                           u_msg (.addr(addr), .do_o(d_msg));
  rom200x1 #(.DATA(bitgen_pkg::toggle_code(bitgen_pkg::BLE_MESSAGE)))
                                                     u_tog (.addr(addr), .do_o(d_tog));
  rom200x1 #(.DATA(PAT))                             u_pat (.addr(addr), .do_o(d_pat));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #10;
      if (a < 200) begin
        check(d_msg == EXP_MSG[a],  $sformatf("message addr %0d", a));
        check(d_tog == EXP_TOGG[a], $sformatf("toggle code addr %0d", a));
        check(d_pat == PAT[a],      $sformatf("pattern addr %0d", a));
      end else begin
        check(!d_msg && !d_tog && !d_pat, $sformatf("addr %0d out of range", a));
      end
    end
    // the first 8 bits sent (addresses 199..192) are the preamble 0xAA, LSB first
    for (int j = 0; j < 8; j++) begin
      addr = 8'(199 - j);
      #10;
      check(d_msg == j[0], $sformatf("preamble bit %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
