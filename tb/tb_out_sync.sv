// Testbench for out_sync: tx must show, after each rising clk edge, the d value
// present before that edge, ignore pulses on d between edges (hazards), and be 0
// in reset.
module tb_out_sync;
  logic clk = 1'b0;
  logic rst, d, tx;
  int checks = 0, failures = 0;

  out_sync dut (.clk(clk), .rst(rst), .d(d), .tx(tx));

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
    logic v;
    rst = 1'b0; #10; rst = 1'b1;   // a clean rising edge, as from a power-on reset
    d = 1'b1;
    #1300;
    check(!tx, "reset");
    rst = 1'b0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      v = 1'($urandom);
      d = ~v; #50; d = v; #50; d = ~v; #50; d = v;   // hazard pulses before settling
      @(posedge clk);
      #10;
      check(tx == v, $sformatf("bit %0d", k));
      d = ~v; #100;                                // hazard after the edge
      check(tx == v, $sformatf("bit %0d held", k));
    end
    rst = 1'b1; #10;
    check(!tx, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
