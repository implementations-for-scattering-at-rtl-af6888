// Testbench for out_toggle. A random 200-bit message is coded as
// enclk[a] = msg[a+1] ^ msg[a] (msg[200] = 0) and applied with the address counting
// down from 199, the address changing 100 ns after each rising clk edge as a ripple
// counter would (so enclk also changes while clk is high). tx must equal msg[a] after
// the edge that follows address a, and must hold msg[0] once at_end has been raised.
// The number of changes of tx is counted and must
// equal the number of changes in the message.
module tb_out_toggle;
  logic clk = 1'b0;
  logic rst, enclk, at_end, tx;
  logic [199:0] msg;
  logic [199:0] code;
  int checks = 0, failures = 0;
  int tx_changes = 0;
  int exp_changes;

  out_toggle dut (.clk(clk), .rst(rst), .enclk(enclk), .at_end(at_end), .tx(tx));

  always #500 clk = ~clk;

  bit armed = 1'b0;            // count only once reset has been released
  always @(tx) if (armed) tx_changes++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < 200; i += 32) msg[i +: 32] = $urandom;
    msg[1] = ~msg[0];                 // make the halt at address 0 matter
    code[199] = msg[199];
    for (int i = 0; i < 199; i++) code[i] = msg[i+1] ^ msg[i];
    exp_changes = 0;
    for (int i = 0; i < 200; i++) if (code[i]) exp_changes++;
    rst = 1'b0; #10; rst = 1'b1;   // a clean rising edge, as from a power-on reset
    at_end = 1'b0;
    a = 199;
    enclk = code[a];
    #1300;
    check(!tx, "reset");
    rst = 1'b0;
    armed = 1'b1;
    for (int k = 1; k <= 230; k++) begin
      @(posedge clk);
      #10;
      check(tx == msg[200 - ((k <= 200) ? k : 200)], $sformatf("edge %0d tx=%0b", k, tx));
      #90;
      if (a > 0) a--;
      enclk = code[a];
      at_end = (a == 0);
    end
    check(tx_changes == exp_changes,
          $sformatf("tx changed %0d times, expected %0d", tx_changes, exp_changes));
    rst = 1'b1; #10;
    check(!tx, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
