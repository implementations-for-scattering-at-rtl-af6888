// Asynchronous (ripple) stop down counter (SDC) with its done generator.
//
// Each of the CNT_W stages is a toggle flip-flop (D = not Q). Only the least
// significant stage is clocked by clk; stage i is clocked by the rising edge of
// stage i-1. A 0 -> 1 transition of a lower bit is a borrow, so the chain counts
// down. A stage is clocked only when its bit has to change, which lowers the
// switching activity compared with the synchronous counter.
//
// Reset sets or clears each stage to the bits of START (199 = 8'b1100_0111).
// The done generator DG watches cnt; once done is high the first stage is no longer
// clocked and the counter stays at 0. DG_ASYNC selects the self-clocked done
// generator (1) or the clocked one (0). The clocked one raises done only one clock
// after cnt reached 0, too late to stop the count at that edge, so in that variant
// the zero decode also blocks the first stage.
//
// Interface: clk (1 MHz), rst (asynchronous, active high), cnt = ROM address,
// done = counter has reached 0. Timing: as the synchronous counter, cnt = START - k
// after the k-th rising clk edge down to 0; the upper bits settle one stage delay
// after another, so cnt is not a synchronous bus.
// The ripple structure, the DG and the 199..0 range follow the original design; how done
// stops the chain (an enable on the first stage) is this design's choice.
module sdc_async #(
  parameter int unsigned CNT_W    = bitgen_pkg::CNT_W,
  parameter int unsigned START    = bitgen_pkg::N_BITS - 1,
  parameter bit          DG_ASYNC = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  output logic [CNT_W-1:0] cnt,
  output logic             done
);

  localparam logic [CNT_W-1:0] START_V = CNT_W'(START);

  logic run;

  // Stage 0 is clocked by clk while the counter runs; stage i > 0 is clocked by
  // the rising edge of stage i-1. Each stage is its own flip-flop q.
  for (genvar i = 0; i < CNT_W; i++) begin : g_stage
    logic q;
    if (i == 0) begin : g_first
      always_ff @(posedge clk or posedge rst) begin
        if (rst)      q <= START_V[i];
        else if (run) q <= ~q;
      end
    end else begin : g_next
      always_ff @(posedge cnt[i-1] or posedge rst) begin
        if (rst) q <= START_V[i];
        else     q <= ~q;
      end
    end
    assign cnt[i] = q;
  end

  if (DG_ASYNC) begin : g_dg_async
    dg_async #(.CNT_W(CNT_W)) u_dg (.rst(rst), .cnt(cnt), .done(done));
    assign run = ~done;
  end else begin : g_dg_sync
    dg_sync #(.CNT_W(CNT_W)) u_dg (.clk(clk), .rst(rst), .cnt(cnt), .done(done));
    assign run = ~done & (cnt != '0);
  end

endmodule
