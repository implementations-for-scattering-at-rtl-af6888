// Testbench for sdc_sync: after reset the count must be 199 - k after the k-th
// rising edge, reach 0 after exactly 199 edges and then hold 0. A second reset in
// the middle of the count must reload 199.
module tb_sdc_sync;
  logic clk = 1'b0;
  logic rst;
  logic [7:0] cnt;
  int checks = 0, failures = 0;
  int first_zero = -1;

  sdc_sync dut (.clk(clk), .rst(rst), .cnt(cnt));

  always #500 clk = ~clk;   // 1 MHz

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
    rst = 1'b0; #10; rst = 1'b1;   // a clean rising edge, as from a power-on reset
    #1300;
    check(cnt == 8'd199, "reset value");
    rst = 1'b0;
    for (int k = 1; k <= 230; k++) begin
      @(posedge clk);
      #10;
      check(cnt == ((k <= 199) ? 8'(199 - k) : 8'd0),
            $sformatf("edge %0d cnt=%0d", k, cnt));
      if (cnt == 0 && first_zero < 0) first_zero = k;
    end
    check(first_zero == 199, $sformatf("zero reached after %0d edges", first_zero));
    // reset in the middle of a count
    rst = 1'b1; #700; rst = 1'b0;
    for (int k = 1; k <= 20; k++) @(posedge clk);
    #10;
    check(cnt == 8'd179, $sformatf("after re-reset cnt=%0d", cnt));
    rst = 1'b1; #100;
    check(cnt == 8'd199, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
