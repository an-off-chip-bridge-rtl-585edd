// offchip_bridge: transport-layer bridge that carries NUM_PORTS network-on-chip
// streaming connections over one Ethernet link.
//
// On the network side every connection has a streaming port pair with
// valid/accept handshakes on noc_clk: tx_* carries phits into the bridge,
// rx_* carries phits received from the far bridge out to the network. On the
// link side the bridge talks to an Ethernet MAC client interface on eth_clk
// (125 MHz for gigabit Ethernet): mac_tx_* for frames sent, mac_rx_* for
// frames received.
//
// Transmit path: bridge_port (Tx FIFO, credit counter) -> connection
// multiplexer, steered by the tdm_scheduler -> serializer -> frame_sender ->
// MAC. Receive path: MAC -> frame_receiver -> deserializer -> demultiplexer,
// steered by the received connection byte -> bridge_port (Rx FIFO, phit
// counter). Credits for the far side's transmit direction are returned in
// this side's slots of the same connection, so a connection needs slots in
// both bridges. The far bridge must use the same FIFO_DEPTH, because the
// credit counters start at the far Rx FIFO's depth.
//
// Frames are sent back to back, each with NUM_SLOTS slots of SLOT_BYTES
// bytes, as long as enable is high. The scheduler's slot table and policy
// are written and read through the cfg_* port (eth_clk, see tdm_scheduler);
// INIT_TABLE gives the table's contents after reset.
// The current slot number, the sent frame number and the receiver's
// end-of-frame pulse are left unconnected here; lint reports them as unused.
// The structure, byte format, credit scheme and TDM table are the
// document's; port handshakes, the MAC client timing, the trigger value and
// the configuration register map are this design's choices.
module offchip_bridge
  import bridge_pkg::*;
#(
  parameter int unsigned NUM_PORTS  = 12,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned NUM_SLOTS  = 14,
  parameter int unsigned SLOT_BYTES = 100,
  parameter int unsigned TRIGGER    = 16,
  parameter slot_table_t INIT_TABLE = spread_table(NUM_PORTS),
  parameter logic [47:0] DST_MAC    = 48'h02_00_00_00_00_02,
  parameter logic [47:0] SRC_MAC    = 48'h02_00_00_00_00_01
) (
  // network side
  input  logic                                noc_clk,
  input  logic                                noc_rst_n,
  input  logic [NUM_PORTS-1:0]                tx_valid,
  output logic [NUM_PORTS-1:0]                tx_accept,
  input  logic [NUM_PORTS-1:0][PHIT_W-1:0]    tx_data,
  output logic [NUM_PORTS-1:0]                rx_valid,
  input  logic [NUM_PORTS-1:0]                rx_accept,
  output logic [NUM_PORTS-1:0][PHIT_W-1:0]    rx_data,
  // link side
  input  logic                                eth_clk,
  input  logic                                eth_rst_n,
  input  logic                                enable,
  output logic [7:0]                          mac_tx_data,
  output logic                                mac_tx_valid,
  input  logic                                mac_tx_ack,
  input  logic [7:0]                          mac_rx_data,
  input  logic                                mac_rx_valid,
  // configuration port (eth_clk)
  input  logic                                cfg_valid,
  input  logic                                cfg_write,
  input  logic [7:0]                          cfg_addr,
  input  logic [31:0]                         cfg_wdata,
  output logic [31:0]                         cfg_rdata,
  // status
  output logic [NUM_PORTS-1:0][$clog2(FIFO_DEPTH+1)-1:0] credits,
  output logic [7:0]                          rx_frame_num
);
  // per-port link-side signals
  logic [NUM_PORTS-1:0]               p_phit_valid, p_phit_accept;
  logic [NUM_PORTS-1:0][PHIT_W-1:0]   p_phit_data;
  logic [NUM_PORTS-1:0]               p_cred_req, p_cred_pend, p_cred_sent;
  logic [NUM_PORTS-1:0][CREDIT_W-1:0] p_cred_val;
  logic [NUM_PORTS-1:0]               p_in_phit, p_in_cred;

  // transmit path
  logic [CONN_W-1:0]   sel;
  logic                sel_active;
  logic [$clog2(NUM_SLOTS)-1:0] cur_slot;
  logic                frame_start, pl_take, slot_done;
  logic [7:0]          pl_data, tx_frame_num;
  logic                s_phit_valid, s_phit_accept, s_cred_req, s_cred_pend, s_cred_sent;
  logic [PHIT_W-1:0]   s_phit_data;
  logic [CREDIT_W-1:0] s_cred_val;

  // receive path
  logic                r_frame_start, r_pl_valid, r_frame_done;
  logic [7:0]          r_pl_data;
  logic [CONN_W-1:0]   r_conn;
  logic                r_phit_valid, r_cred_valid;
  logic [PHIT_W-1:0]   r_phit_data;
  logic [CREDIT_W-1:0] r_cred_val;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    bridge_port #(.FIFO_DEPTH(FIFO_DEPTH), .TRIGGER(TRIGGER)) u_port (
      .noc_clk (noc_clk), .noc_rst_n(noc_rst_n),
      .tx_valid(tx_valid[p]), .tx_accept(tx_accept[p]), .tx_data(tx_data[p]),
      .rx_valid(rx_valid[p]), .rx_accept(rx_accept[p]), .rx_data(rx_data[p]),
      .eth_clk (eth_clk), .eth_rst_n(eth_rst_n),
      .phit_valid(p_phit_valid[p]), .phit_data(p_phit_data[p]), .phit_accept(p_phit_accept[p]),
      .credit_tx_request(p_cred_req[p]), .credit_pending(p_cred_pend[p]),
      .credit_value(p_cred_val[p]), .credit_sent(p_cred_sent[p]),
      .in_phit_valid(p_in_phit[p]), .in_phit_data(r_phit_data),
      .in_credit_valid(p_in_cred[p]), .in_credit_value(r_cred_val),
      .credits(credits[p])
    );
    assign p_phit_accept[p] = s_phit_accept && (sel == CONN_W'(p));
    assign p_cred_sent[p]   = s_cred_sent   && (sel == CONN_W'(p));
    assign p_in_phit[p]     = r_phit_valid  && (r_conn == CONN_W'(p));
    assign p_in_cred[p]     = r_cred_valid  && (r_conn == CONN_W'(p));
  end

  tdm_scheduler #(.NUM_PORTS(NUM_PORTS), .NUM_SLOTS(NUM_SLOTS), .INIT_TABLE(INIT_TABLE)) u_sched (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .frame_start(frame_start), .slot_next(slot_done),
    .has_data(p_phit_valid), .has_credit_ret(p_cred_pend),
    .conn(sel), .slot(cur_slot),
    .cfg_valid(cfg_valid), .cfg_write(cfg_write), .cfg_addr(cfg_addr),
    .cfg_wdata(cfg_wdata), .cfg_rdata(cfg_rdata)
  );

  // connection multiplexer in front of the serializer
  always_comb begin
    sel_active   = (sel < CONN_W'(NUM_PORTS));
    s_phit_valid = 1'b0;
    s_phit_data  = '0;
    s_cred_req   = 1'b0;
    s_cred_pend  = 1'b0;
    s_cred_val   = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (sel == CONN_W'(p)) begin
        s_phit_valid = p_phit_valid[p];
        s_phit_data  = p_phit_data[p];
        s_cred_req   = p_cred_req[p];
        s_cred_pend  = p_cred_pend[p];
        s_cred_val   = p_cred_val[p];
      end
    end
  end

  serializer #(.SLOT_BYTES(SLOT_BYTES)) u_ser (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .frame_start(frame_start), .take(pl_take), .data(pl_data), .slot_done(slot_done),
    .conn(sel), .conn_active(sel_active),
    .phit_valid(s_phit_valid), .phit_data(s_phit_data), .phit_accept(s_phit_accept),
    .credit_tx_request(s_cred_req), .credit_pending(s_cred_pend),
    .credit_value(s_cred_val), .credit_sent(s_cred_sent)
  );

  frame_sender #(.NUM_SLOTS(NUM_SLOTS), .SLOT_BYTES(SLOT_BYTES),
                 .DST_MAC(DST_MAC), .SRC_MAC(SRC_MAC)) u_fsend (
    .clk(eth_clk), .rst_n(eth_rst_n), .enable(enable),
    .tx_data(mac_tx_data), .tx_valid(mac_tx_valid), .tx_ack(mac_tx_ack),
    .frame_start(frame_start), .pl_take(pl_take), .pl_data(pl_data),
    .frame_num(tx_frame_num)
  );

  frame_receiver #(.NUM_SLOTS(NUM_SLOTS), .SLOT_BYTES(SLOT_BYTES)) u_frecv (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .rx_data(mac_rx_data), .rx_valid(mac_rx_valid),
    .frame_start(r_frame_start), .pl_valid(r_pl_valid), .pl_data(r_pl_data),
    .frame_num(rx_frame_num), .frame_done(r_frame_done)
  );

  deserializer u_deser (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .frame_start(r_frame_start), .in_valid(r_pl_valid), .in_data(r_pl_data),
    .conn(r_conn),
    .phit_valid(r_phit_valid), .phit_data(r_phit_data),
    .credit_valid(r_cred_valid), .credit_value(r_cred_val)
  );

endmodule
