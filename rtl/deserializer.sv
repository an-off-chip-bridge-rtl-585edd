// deserializer: rebuilds connection labels, credits and phits from slot bytes.
//
// Reads the payload bytes of a frame and decodes them with the document's
// byte tags (see bridge_pkg). A connection byte sets the connection that the
// following bytes belong to. A credit byte produces a credit_valid pulse with
// its 6-bit value for that connection. A byte starting with 11 starts a
// phit (the sender sets a third 1 bit, which is not checked, as in the
// document): its low 5 bits and the next 4 bytes (taken whatever their value) are
// the 37-bit phit, delivered with a phit_valid pulse. Garbage bytes are
// skipped. The receiver needs no knowledge of the sender's slot table or
// slot size. Until the first connection byte of a frame nothing is
// delivered; frame_start discards a half-received phit.
// Timing: phit_valid / credit_valid and their data are registered, one cycle
// after the byte that completes them; conn is stable with them.
// Only the low 29 bits of the phit accumulator are read: the last byte is
// appended below them on output. Lint reports the top 8 bits as unused.
module deserializer
  import bridge_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_start,
  input  logic                in_valid,
  input  logic [7:0]          in_data,
  output logic [CONN_W-1:0]   conn,
  output logic                phit_valid,
  output logic [PHIT_W-1:0]   phit_data,
  output logic                credit_valid,
  output logic [CREDIT_W-1:0] credit_value
);
  logic [2:0]        body_left;
  logic [PHIT_W-1:0] acc;
  logic              conn_known;
  byte_tag_e         tag;

  assign tag = byte_tag_e'(in_data[7:6]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      body_left    <= '0;
      acc          <= '0;
      conn_known   <= 1'b0;
      conn         <= '0;
      phit_valid   <= 1'b0;
      phit_data    <= '0;
      credit_valid <= 1'b0;
      credit_value <= '0;
    end else begin
      phit_valid   <= 1'b0;
      credit_valid <= 1'b0;
      if (frame_start) begin
        body_left  <= '0;
        conn_known <= 1'b0;
      end else if (in_valid) begin
        if (body_left != '0) begin
          acc       <= {acc[PHIT_W-9:0], in_data};
          body_left <= body_left - 1'b1;
          if (body_left == 3'd1) begin
            phit_valid <= conn_known;
            phit_data  <= {acc[PHIT_W-9:0], in_data};
          end
        end else begin
          unique case (tag)
            TAG_CONN: begin
              conn       <= in_data[CONN_W-1:0];
              conn_known <= 1'b1;
            end
            TAG_CREDIT: begin
              credit_valid <= conn_known;
              credit_value <= in_data[CREDIT_W-1:0];
            end
            TAG_PHIT: begin
              acc       <= PHIT_W'(in_data[4:0]);
              body_left <= 3'(PHIT_BYTES - 1);
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
