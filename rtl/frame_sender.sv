// frame_sender: frame sender state machine of the bridge's transmit side.
//
// Sends fixed-length Ethernet frames back to back for as long as enable is
// high, whether or not there is data, as the document prescribes: a frame
// always leaves with all its slots, so a phit never waits for a frame to
// fill up. A frame is
//   6 bytes destination MAC, 6 bytes source MAC, 2 bytes length
//   (= payload length), 1 byte frame number, NUM_SLOTS * SLOT_BYTES slot bytes.
// The header fields and the frame-number byte are the document's; the MAC
// then adds preamble, padding and FCS. The length field carries the payload
// length (this design's choice; it is at most 1500, a valid 802.3 length).
//
// MAC handshake (client side of the Ethernet MAC, this design's reading of
// it): tx_valid rises with the first byte on tx_data, which is held until the
// MAC answers tx_ack; from the cycle after the ack one byte is taken every
// cycle until the last byte, after which tx_valid falls for one cycle.
// frame_start pulses when a frame begins so that the serializer and the
// scheduler restart at slot 0; pl_take tells the serializer that the slot
// byte on pl_data was consumed.
module frame_sender
  import bridge_pkg::*;
#(
  parameter int unsigned NUM_SLOTS  = 14,
  parameter int unsigned SLOT_BYTES = 100,
  parameter logic [47:0] DST_MAC    = 48'h02_00_00_00_00_02,
  parameter logic [47:0] SRC_MAC    = 48'h02_00_00_00_00_01
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  // MAC transmit client
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ack,
  // serializer
  output logic       frame_start,
  output logic       pl_take,
  input  logic [7:0] pl_data,
  output logic [7:0] frame_num
);
  localparam int unsigned PAYLOAD   = 1 + NUM_SLOTS * SLOT_BYTES;
  localparam int unsigned FRAME_LEN = HDR_BYTES + PAYLOAD;
  localparam int unsigned IW        = $clog2(FRAME_LEN);

  typedef enum logic [1:0] {S_IDLE, S_FIRST, S_STREAM} state_e;
  state_e        state;
  logic [IW-1:0] idx;
  logic          take;

  assign tx_valid    = (state != S_IDLE);
  assign take        = (state == S_FIRST && tx_ack) || (state == S_STREAM);
  assign frame_start = (state == S_IDLE) && enable;
  assign pl_take     = take && (idx > IW'(HDR_BYTES));

  always_comb begin
    if (idx < IW'(6))                    tx_data = DST_MAC[8*(5 - idx) +: 8];
    else if (idx < IW'(12))              tx_data = SRC_MAC[8*(11 - idx) +: 8];
    else if (idx == IW'(12))             tx_data = 8'((PAYLOAD >> 8) & 8'hFF);
    else if (idx == IW'(13))             tx_data = 8'(PAYLOAD & 8'hFF);
    else if (idx == IW'(HDR_BYTES))      tx_data = frame_num;
    else                                 tx_data = pl_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      frame_num <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (enable) begin
          state <= S_FIRST;
          idx   <= '0;
        end
        S_FIRST: if (tx_ack) begin
          state <= S_STREAM;
          idx   <= idx + 1'b1;
        end
        S_STREAM: begin
          if (idx == IW'(FRAME_LEN - 1)) begin
            state     <= S_IDLE;
            idx       <= '0;
            frame_num <= frame_num + 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (PAYLOAD <= ETH_MAX_PAYLOAD) else $error("frame_sender: payload exceeds 1500 bytes");
  end

endmodule
