// End-to-end testbench of bitstream_generator: all five development steps side by
// side, fed by one 1 MHz clock and one power-on reset. For every step the tx bit
// sequence is compared with the expected 200-bit message, which comes from an
// independent reference model, with the timing of that step: steps 0-2 show the ROM
// output directly (ROM[199] in reset, ROM[199-k] after edge k), steps 3-4 have an
// output flip-flop (0 in reset, ROM[200-k] after edge k). The count must stop at 0
// after 199 edges, done must rise, and the message must restart after a second reset.
// The toggle step (the default) also drives a model of the switchable oscillator,
// whose output must carry 4 cycles per '0' bit and 4.5 per '1' bit.
// Mechanisms counted: counter stopped at 0, done raised, toggle flip-flop skipped
// an edge (clock gated off), toggle flip-flop clocked, restart after reset.
module tb_bitstream_generator;
  import bitgen_pkg::*;
  localparam logic [199:0] EXP_MSG = 200'h556b7d9171ba1cd2faa118c65a93945cdd2e18998b7decb9e2;

  logic clk = 1'b0;
  logic rst;
  logic       tx   [5];
  logic [7:0] cnt  [5];
  logic       done [5];
  logic scat;
  int checks = 0, failures = 0;
  int n_stopped = 0, n_done = 0, n_gated = 0, n_toggled = 0, n_restart = 0;
  int scat_edges = 0;

  bitstream_generator #(.STEP(STEP_FULL_SYNC))  u0 (.clk, .rst, .tx(tx[0]), .cnt(cnt[0]), .done(done[0]));
  bitstream_generator #(.STEP(STEP_ASYNC_SDC))  u1 (.clk, .rst, .tx(tx[1]), .cnt(cnt[1]), .done(done[1]));
  bitstream_generator #(.STEP(STEP_ASYNC_DG))   u2 (.clk, .rst, .tx(tx[2]), .cnt(cnt[2]), .done(done[2]));
  bitstream_generator #(.STEP(STEP_SYNC_OUT))   u3 (.clk, .rst, .tx(tx[3]), .cnt(cnt[3]), .done(done[3]));
  bitstream_generator                           u4 (.clk, .rst, .tx(tx[4]), .cnt(cnt[4]), .done(done[4]));

  swosc_model u_osc (.swt(tx[4]), .scat(scat));

  always #500 clk = ~clk;
  always @(posedge scat) scat_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one message from reset; k = edges after reset release
  task automatic run_message(input int edges);
    logic prev4;
    int ones, e0, e1;
    rst = 1'b0; #10; rst = 1'b1;   // a clean rising edge, as from a power-on reset
    #1300;
    for (int s = 0; s < 5; s++) begin
      check(cnt[s] == 8'd199, $sformatf("step %0d reset count", s));
      check(tx[s] == ((s < 3) ? EXP_MSG[199] : 1'b0), $sformatf("step %0d reset tx", s));
    end
    @(negedge clk);
    rst = 1'b0;
    prev4 = tx[4];
    ones = 0;
    for (int k = 1; k <= edges; k++) begin
      @(posedge clk);
      if (k == 1) e0 = scat_edges;
      if (k == 201) e1 = scat_edges;
      #200;
      for (int s = 0; s < 5; s++) begin
        int a;
        a = (s < 3) ? ((k <= 199) ? 199 - k : 0) : ((k <= 200) ? 200 - k : 0);
        check(tx[s] == EXP_MSG[a], $sformatf("step %0d edge %0d tx=%0b", s, k, tx[s]));
        check(cnt[s] == 8'((k <= 199) ? 199 - k : 0), $sformatf("step %0d edge %0d cnt", s, k));
        if (s > 0) check(done[s] == ((s == 1) ? (k >= 200) : (k >= 199)),
                         $sformatf("step %0d edge %0d done", s, k));
      end
      if (k <= 200 && tx[4] != prev4) n_toggled++;
      if (tx[4] == prev4) n_gated++;
      prev4 = tx[4];
      if (k > 200 && cnt[4] == 0 && cnt[0] == 0) n_stopped++;
      if (k == 200 && done[4]) n_done++;
      if (k <= 200 && tx[4]) ones++;
    end
    // 200 bit periods on the oscillator: 4 cycles per 0, 4.5 per 1 (bits sent after
    // edges 1..200, so counted from edge 1 to edge 201)
    if (edges >= 201) begin
      int exp2;
      exp2 = 2 * (4 * (200 - ones)) + 9 * ones;   // twice the expected count
      check((2 * (e1 - e0) >= exp2 - 2) && (2 * (e1 - e0) <= exp2 + 2),
            $sformatf("oscillator cycles %0d, expected %0d/2", e1 - e0, exp2));
    end
  endtask

  initial begin
    rst = 1'b0; #10; rst = 1'b1;   // a clean rising edge, as from a power-on reset
    run_message(230);
    // reset in the middle of a message, then a complete one again
    run_message(57);
    n_restart++;
    run_message(215);
    check(n_stopped > 0,  "counter never stopped");
    check(n_done > 0,     "done never raised");
    check(n_gated > 0,    "toggle clock never gated off");
    check(n_toggled > 0,  "toggle flip-flop never clocked");
    check(n_restart > 0,  "no restart");
    $display("mechanisms: stopped=%0d done=%0d gated=%0d toggled=%0d restart=%0d",
             n_stopped, n_done, n_gated, n_toggled, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
