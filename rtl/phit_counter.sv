// phit_counter: Rx FIFO positions freed and not yet reported to the far side.
//
// Following the document: every phit the network takes out of the Rx FIFO
// increments the counter (freed gives how many in this cycle, as seen in the
// Ethernet clock domain). When the count reaches the trigger value TRIGGER,
// credit_tx_request asks the serializer to send the count as credits as soon
// as possible; the serializer may also send it earlier when it has nothing
// else to send. A credit byte carries at most 63 credits, so credit_value is
// the count clipped to 63. When the serializer sends a credit byte (sent),
// the sent value is subtracted (the document says "reset to zero"; a
// subtraction gives the same result and keeps phits freed in the same cycle
// or beyond 63).
// The document says both "reaches a preset trigger value" and "over a
// predefined trigger value"; this design uses count >= TRIGGER.
// Timing: single clock (Ethernet domain), registered count.
module phit_counter #(
  parameter int unsigned DEPTH   = 64,
  parameter int unsigned TRIGGER = 16,
  parameter int unsigned VAL_W   = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(DEPTH):0]      freed,
  input  logic                        sent,
  output logic [$clog2(DEPTH):0]      count,
  output logic                        credit_tx_request,
  output logic                        credit_pending,
  output logic [VAL_W-1:0]            credit_value
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;
  localparam int unsigned VMAX = (1 << VAL_W) - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + freed - (sent ? CW'(credit_value) : CW'(0));
  end

  assign credit_value      = (count > CW'(VMAX)) ? VAL_W'(VMAX) : count[VAL_W-1:0];
  assign credit_tx_request = (count >= CW'(TRIGGER));
  assign credit_pending    = (count != '0);

  a_bounded: assert property (@(posedge clk) disable iff (!rst_n)
                              {1'b0, count} + (CW+1)'(freed) <= (CW+1)'(DEPTH))
    else $error("phit_counter: more freed positions than the FIFO holds");

  initial begin
    assert (TRIGGER >= 1 && TRIGGER < DEPTH)
      else $error("phit_counter: TRIGGER must be below the Rx FIFO depth");
  end

endmodule
