// bridge_port: flow-control stage of one connection across the bridge.
//
// One instance per bidirectional connection, as in the document's receive
// and transmit block diagrams. It holds
//   - the Tx FIFO: phits from the network waiting for a slot on the link,
//   - the credit counter: free space left in the far bridge's Rx FIFO,
//   - the Rx FIFO: phits from the link waiting for the network,
//   - the phit counter: Rx FIFO space freed and not yet reported.
// phit_valid is raised when the Tx FIFO holds a phit and at least one credit
// is left; phit_accept (from the serializer) removes the phit and spends one
// credit. Received credit values (credit_valid) are added to the credit
// counter. Received phits (in_phit_valid) are pushed into the Rx FIFO, which
// always has room for them because of the credits; an assertion checks it.
//
// Clocks: the network-side handshakes run on noc_clk, all link-side signals
// on eth_clk. The two FIFOs are the only crossing between them.
// The phit counter's own count is not brought out; lint reports it unused.
module bridge_port
  import bridge_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned TRIGGER    = 16
) (
  // network side (noc_clk)
  input  logic               noc_clk,
  input  logic               noc_rst_n,
  input  logic               tx_valid,      // network -> bridge
  output logic               tx_accept,
  input  logic [PHIT_W-1:0]  tx_data,
  output logic               rx_valid,      // bridge -> network
  input  logic               rx_accept,
  output logic [PHIT_W-1:0]  rx_data,
  // link side (eth_clk)
  input  logic               eth_clk,
  input  logic               eth_rst_n,
  output logic               phit_valid,
  output logic [PHIT_W-1:0]  phit_data,
  input  logic               phit_accept,
  output logic               credit_tx_request,
  output logic               credit_pending,
  output logic [CREDIT_W-1:0] credit_value,
  input  logic               credit_sent,
  input  logic               in_phit_valid,
  input  logic [PHIT_W-1:0]  in_phit_data,
  input  logic               in_credit_valid,
  input  logic [CREDIT_W-1:0] in_credit_value,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] credits
);
  localparam int unsigned PW = $clog2(FIFO_DEPTH) + 1;

  logic txf_valid, has_credit;
  logic [PW-1:0] txf_freed_unused, rx_freed, phit_count;
  logic rxf_accept;

  async_fifo #(.WIDTH(PHIT_W), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .wr_clk   (noc_clk),  .wr_rst_n (noc_rst_n),
    .wr_valid (tx_valid), .wr_accept(tx_accept), .wr_data(tx_data),
    .wr_freed (txf_freed_unused),
    .rd_clk   (eth_clk),  .rd_rst_n (eth_rst_n),
    .rd_valid (txf_valid), .rd_accept(phit_accept && has_credit),
    .rd_data  (phit_data)
  );

  credit_counter #(.MAX_CREDITS(FIFO_DEPTH), .INIT(FIFO_DEPTH), .ADD_W(CREDIT_W)) u_credit (
    .clk       (eth_clk), .rst_n(eth_rst_n),
    .dec       (phit_accept && txf_valid),
    .add_valid (in_credit_valid), .add_value(in_credit_value),
    .count     (credits), .has_credit(has_credit)
  );

  assign phit_valid = txf_valid && has_credit;

  async_fifo #(.WIDTH(PHIT_W), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .wr_clk   (eth_clk),  .wr_rst_n (eth_rst_n),
    .wr_valid (in_phit_valid), .wr_accept(rxf_accept), .wr_data(in_phit_data),
    .wr_freed (rx_freed),
    .rd_clk   (noc_clk),  .rd_rst_n (noc_rst_n),
    .rd_valid (rx_valid), .rd_accept(rx_accept),
    .rd_data  (rx_data)
  );

  phit_counter #(.DEPTH(FIFO_DEPTH), .TRIGGER(TRIGGER), .VAL_W(CREDIT_W)) u_phit_cnt (
    .clk   (eth_clk), .rst_n(eth_rst_n),
    .freed (rx_freed), .sent(credit_sent),
    .count (phit_count),
    .credit_tx_request (credit_tx_request),
    .credit_pending    (credit_pending),
    .credit_value      (credit_value)
  );

  // Credit flow control guarantees the Rx FIFO never refuses a phit.
  a_no_overflow: assert property (@(posedge eth_clk) disable iff (!eth_rst_n)
                                  in_phit_valid |-> rxf_accept)
    else $error("bridge_port: Rx FIFO overflow, phit dropped");
  a_take_ready: assert property (@(posedge eth_clk) disable iff (!eth_rst_n)
                                 phit_accept |-> phit_valid)
    else $error("bridge_port: phit taken without data or credit");

endmodule
