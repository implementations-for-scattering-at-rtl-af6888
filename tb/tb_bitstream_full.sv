// Full-size testbench of bitstream_generator with every parameter at its default
// (the optimised design with the example advertising message). One power-on reset,
// one complete 200-bit message at 1 Mbit/s, then 30 idle clocks: tx must carry the
// expected message (from an independent reference model) one bit per clock starting
// after the first rising edge, finish after 200 edges (200 us) and hold the last bit.
module tb_bitstream_full;
  localparam logic [199:0] EXP_MSG = 200'h556b7d9171ba1cd2faa118c65a93945cdd2e18998b7decb9e2;

  logic clk = 1'b0;
  logic rst;
  logic tx, done;
  logic [7:0] cnt;
  int checks = 0, failures = 0;
  int changes = 0;
  int exp_changes = 0;

  bitstream_generator dut (.clk(clk), .rst(rst), .tx(tx), .cnt(cnt), .done(done));

  always #500 clk = ~clk;
  bit armed = 1'b0;            // count only once reset has been released
  always @(tx) if (armed) changes++;

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
    logic prev;
    time t_start, t_done;
    prev = 1'b0;
    for (int a = 199; a >= 0; a--) begin
      if (EXP_MSG[a] != prev) exp_changes++;
      prev = EXP_MSG[a];
    end
    rst = 1'b0; #10; rst = 1'b1;   // a clean rising edge, as from a power-on reset
    #1300;
    check(!tx && cnt == 8'd199 && !done, "reset state");
    @(negedge clk);
    rst = 1'b0;
    armed = 1'b1;
    t_start = $time;
    for (int k = 1; k <= 230; k++) begin
      @(posedge clk);
      #100;
      check(tx == EXP_MSG[(k <= 200) ? 200 - k : 0], $sformatf("edge %0d tx=%0b", k, tx));
      if (k == 199) t_done = $time;
    end
    check(done, "done after the message");
    check(cnt == 8'd0, "counter stopped at 0");
    check(t_done - t_start > 198_000 && t_done - t_start < 200_000,
          $sformatf("count took %0t", t_done - t_start));
    check(changes == exp_changes, $sformatf("tx changed %0d times, expected %0d", changes, exp_changes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
