// Testbench for dg_async: there is no clock. done must rise as soon as cnt becomes
// 0, stay high whatever cnt does afterwards, and clear only on reset; non-zero
// values must never set it.
module tb_dg_async;
  logic rst;
  logic [7:0] cnt;
  logic done;
  int checks = 0, failures = 0;

  dg_async dut (.rst(rst), .cnt(cnt), .done(done));

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
    rst = 1'b0; #10; rst = 1'b1;   // a clean rising edge, as from a power-on reset
    cnt = 8'd199;
    #100;
    check(!done, "reset");
    rst = 1'b0;
    for (int k = 0; k < 100; k++) begin
      cnt = 8'($urandom_range(1, 255));
      #100;
      check(!done, $sformatf("non-zero cnt=%0d set done", cnt));
    end
    cnt = 8'd0;
    #1;
    check(done, "done on zero");
    for (int k = 0; k < 20; k++) begin
      cnt = 8'($urandom);
      #100;
      check(done, "done holds");
    end
    rst = 1'b1; #10;
    check(!done, "reset clears");
    cnt = 8'd7; #10; rst = 1'b0; #10;
    check(!done, "stays low after reset");
    cnt = 8'd0; #10;
    check(done, "sets again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
