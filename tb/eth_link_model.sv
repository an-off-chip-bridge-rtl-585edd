// eth_link_model: behavioural model of one direction of the Ethernet path
// between two bridges (MAC, transceiver, PHY and cable). Not synthesizable.
//
// Transmit client side: when tx_valid rises the model waits until GAP cycles
// have passed since the end of the previous frame (standing for preamble,
// FCS and inter-frame gap), answers tx_ack for one cycle and then takes one
// byte per cycle while tx_valid stays high. Every byte appears on the
// receive client side (rx_valid, rx_data) LATENCY cycles after it was taken,
// so rx_valid is high for a whole frame and low between frames. The FCS is
// neither added nor checked, and the link loses no frames.
module eth_link_model #(
  parameter int LATENCY = 40,
  parameter int GAP     = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ack,
  output logic [7:0] rx_data,
  output logic       rx_valid
);
  logic [8:0] line [LATENCY];
  logic       in_frame;
  int         idle;

  assign tx_ack = tx_valid && !in_frame && (idle >= GAP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame <= 1'b0;
      idle     <= GAP;
      for (int i = 0; i < LATENCY; i++) line[i] <= '0;
    end else begin
      if (tx_ack) in_frame <= 1'b1;
      else if (!tx_valid) in_frame <= 1'b0;
      idle <= (tx_ack || in_frame) ? 0 : idle + 1;
      line[0] <= {(tx_ack || (in_frame && tx_valid)), tx_data};
      for (int i = 1; i < LATENCY; i++) line[i] <= line[i-1];
    end
  end

  assign rx_valid = line[LATENCY-1][8];
  assign rx_data  = line[LATENCY-1][7:0];

endmodule
