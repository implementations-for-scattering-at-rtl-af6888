// Testbench for sdc_async, with the self-clocked (DG_ASYNC = 1) and the clocked
// (DG_ASYNC = 0) done generator side by side. Both must count 199, 198, ... 0 one
// step per rising clk edge, stop at 0 without wrapping, and raise done: the
// self-clocked generator as soon as cnt is 0 (after edge 199), the clocked one at
// the next edge (200). The test also counts how often each ripple stage toggles,
// against the number a binary down count implies.
module tb_sdc_async;
  logic clk = 1'b0;
  logic rst;
  logic [7:0] cnt_a, cnt_s;
  logic done_a, done_s;
  int checks = 0, failures = 0;
  int toggles [8];
  logic [7:0] prev;

  sdc_async                  dut_a (.clk(clk), .rst(rst), .cnt(cnt_a), .done(done_a));
  sdc_async #(.DG_ASYNC(0))  dut_s (.clk(clk), .rst(rst), .cnt(cnt_s), .done(done_s));

  always #500 clk = ~clk;

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
    int exp;
    int exp_toggles;
    rst = 1'b0; #10; rst = 1'b1;   // a clean rising edge, as from a power-on reset
    #1300;
    check(cnt_a == 8'd199 && cnt_s == 8'd199, "reset value");
    check(!done_a && !done_s, "done low in reset");
    rst = 1'b0;
    prev = cnt_a;
    for (int i = 0; i < 8; i++) toggles[i] = 0;
    for (int k = 1; k <= 230; k++) begin
      @(posedge clk);
      #10;
      exp = (k <= 199) ? 199 - k : 0;
      check(cnt_a == 8'(exp), $sformatf("async DG edge %0d cnt=%0d", k, cnt_a));
      check(cnt_s == 8'(exp), $sformatf("sync DG edge %0d cnt=%0d", k, cnt_s));
      check(done_a == (k >= 199), $sformatf("async DG edge %0d done=%0b", k, done_a));
      check(done_s == (k >= 200), $sformatf("sync DG edge %0d done=%0b", k, done_s));
      for (int i = 0; i < 8; i++) if (cnt_a[i] != prev[i]) toggles[i]++;
      prev = cnt_a;
    end
    // bit i changes on the step v -> v-1 exactly when 2^i divides v: 199 >> i times
    for (int i = 0; i < 8; i++) begin
      exp_toggles = 199 >> i;
      check(toggles[i] == exp_toggles,
            $sformatf("stage %0d toggled %0d times, expected %0d", i, toggles[i], exp_toggles));
    end
    rst = 1'b1; #100;
    check(cnt_a == 8'd199 && !done_a && !done_s, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
