// Testbench for dg_sync: done must rise at the first rising clk edge at which
// cnt == 0, stay high when cnt leaves 0 again, and clear only on reset.
module tb_dg_sync;
  logic clk = 1'b0;
  logic rst;
  logic [7:0] cnt;
  logic done;
  int checks = 0, failures = 0;

  dg_sync dut (.clk(clk), .rst(rst), .cnt(cnt), .done(done));

  always #500 clk = ~clk;

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
    bit seen;
    rst = 1'b0; #10; rst = 1'b1;   // a clean rising edge, as from a power-on reset
    cnt = 8'd5;
    #1300;
    check(!done, "reset");
    rst = 1'b0;
    seen = 1'b0;
    for (int k = 0; k < 60; k++) begin
      // random non-zero values, a zero at step 30
      @(negedge clk);
      cnt = (k == 30) ? 8'd0 : 8'($urandom_range(1, 255));
      @(posedge clk);
      if (k == 30) seen = 1'b1;
      #10;
      check(done == seen, $sformatf("step %0d cnt=%0d done=%0b", k, cnt, done));
    end
    // zero while cnt briefly 0 between edges must not count
    rst = 1'b1; #100; rst = 1'b0;
    @(negedge clk); cnt = 8'd0; #100; cnt = 8'd3;
    @(posedge clk); #10;
    check(!done, "zero between edges ignored");
    rst = 1'b1; #100;
    check(!done, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
