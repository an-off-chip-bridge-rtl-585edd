// credit_counter: credits of one connection's transmit direction.
//
// Holds how many phits the far bridge's Rx FIFO can still take for this
// connection. Following the document: it starts at the far Rx FIFO depth,
// is decremented by one for every phit that leaves the Tx FIFO towards the
// link (dec), and credit values received from the far side (add_valid,
// add_value) are added to it. Phits may only be sent while has_credit is
// high, so the far Rx FIFO can never overflow. Reset loads INIT (this
// design's choice: the far FIFO is empty after reset).
// Timing: single clock (Ethernet domain), count updates one cycle after the
// event; dec and add in the same cycle are both applied.
module credit_counter #(
  parameter int unsigned MAX_CREDITS = 64,
  parameter int unsigned INIT        = 64,
  parameter int unsigned ADD_W       = 6
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               dec,
  input  logic                               add_valid,
  input  logic [ADD_W-1:0]                   add_value,
  output logic [$clog2(MAX_CREDITS+1)-1:0]   count,
  output logic                               has_credit
);
  localparam int unsigned CW = $clog2(MAX_CREDITS + 1);

  logic [CW:0] next;

  always_comb begin
    next = {1'b0, count};
    if (add_valid) next = next + (CW+1)'(add_value);
    if (dec && has_credit) next = next - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= CW'(INIT);
    else        count <= next[CW-1:0];
  end

  assign has_credit = (count != '0);

  // The far side never returns more credits than it has space.
  a_no_excess: assert property (@(posedge clk) disable iff (!rst_n)
                                next <= (CW+1)'(MAX_CREDITS))
    else $error("credit_counter: credits exceed MAX_CREDITS");

endmodule
