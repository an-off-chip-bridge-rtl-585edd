// frame_receiver: frame receiver state machine of the bridge's receive side.
//
// Takes the bytes of a received frame from the MAC (rx_valid high for the
// whole frame, one byte per cycle on rx_data, low between frames), skips the
// 14-byte header and the frame-number byte and hands the NUM_SLOTS *
// SLOT_BYTES slot bytes to the deserializer (pl_valid, pl_data). Bytes after
// them (an FCS the MAC passes on) are dropped. frame_start pulses on the
// first byte of every frame so the deserializer forgets any half phit.
// A frame whose length field differs from the bridge's payload length is not
// forwarded (this design's choice, to ignore foreign traffic); the document
// does not filter on the destination address, nor does this design.
// Timing: pl_valid/pl_data are registered, one cycle after the byte arrives.
module frame_receiver
  import bridge_pkg::*;
#(
  parameter int unsigned NUM_SLOTS  = 14,
  parameter int unsigned SLOT_BYTES = 100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       frame_start,
  output logic       pl_valid,
  output logic [7:0] pl_data,
  output logic [7:0] frame_num,
  output logic       frame_done
);
  localparam int unsigned PAYLOAD = 1 + NUM_SLOTS * SLOT_BYTES;
  localparam int unsigned LAST    = HDR_BYTES + PAYLOAD - 1;
  localparam int unsigned IW      = $clog2(HDR_BYTES + PAYLOAD + 1);
  localparam logic [15:0] LEN     = 16'(PAYLOAD);

  logic [IW-1:0] idx;
  logic          in_frame, len_ok;

  assign frame_start = rx_valid && !in_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= '0;
      in_frame   <= 1'b0;
      len_ok     <= 1'b0;
      pl_valid   <= 1'b0;
      pl_data    <= '0;
      frame_num  <= '0;
      frame_done <= 1'b0;
    end else begin
      pl_valid   <= 1'b0;
      frame_done <= 1'b0;
      if (!rx_valid) begin
        in_frame <= 1'b0;
        idx      <= '0;
      end else begin
        in_frame <= 1'b1;
        if (idx != IW'(LAST + 1)) idx <= (frame_start ? '0 : idx) + 1'b1;
        if (frame_start) len_ok <= 1'b0;
        if (idx == IW'(12)) len_ok <= (rx_data == LEN[15:8]);
        if (idx == IW'(13)) len_ok <= len_ok && (rx_data == LEN[7:0]);
        if (idx == IW'(HDR_BYTES) && len_ok) frame_num <= rx_data;
        if (idx > IW'(HDR_BYTES) && idx <= IW'(LAST) && len_ok) begin
          pl_valid <= 1'b1;
          pl_data  <= rx_data;
          if (idx == IW'(LAST)) frame_done <= 1'b1;
        end
      end
    end
  end

endmodule
