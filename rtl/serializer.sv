// serializer: turns the selected connection's phits and credits into the
// bytes of one slot.
//
// The slot format is the document's (see bridge_pkg): byte 0 is the
// connection byte of the connection that owns the slot, byte 1 is its credit
// byte (the phit counter value, which may be zero), and the remaining bytes
// carry 5-byte phits, extra credit bytes and garbage bytes. At every byte
// position that is not inside a phit the serializer chooses, in this order:
//   1. a credit byte if the phit counter reached its trigger (credit_tx_request),
//   2. a phit if one is ready (data and credit) and it fits in the slot,
//   3. a credit byte if any credits are waiting and the link is otherwise free,
//   4. a garbage byte.
// A phit never crosses a slot boundary (this design's choice; the receiver
// would otherwise attribute its tail to the next slot's connection).
// With SLOT_BYTES = 150 this gives the document's 29 phits per slot.
//
// Interface: data is the byte for the current position, valid every cycle
// (combinational from the state and the selected connection's signals). take
// says the byte was consumed; on take of a phit's first byte the phit is
// taken from the Tx FIFO (phit_accept), on take of a credit byte the phit
// counter is told (credit_sent). slot_done pulses with the take of a slot's
// last byte. frame_start restarts at byte 0 of slot 0. conn_active is low for
// a slot left unused; such a slot carries only its connection byte, a zero
// credit byte and garbage.
module serializer
  import bridge_pkg::*;
#(
  parameter int unsigned SLOT_BYTES = 100
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_start,
  input  logic                take,
  output logic [7:0]          data,
  output logic                slot_done,
  // selected connection
  input  logic [CONN_W-1:0]   conn,
  input  logic                conn_active,
  input  logic                phit_valid,
  input  logic [PHIT_W-1:0]   phit_data,
  output logic                phit_accept,
  input  logic                credit_tx_request,
  input  logic                credit_pending,
  input  logic [CREDIT_W-1:0] credit_value,
  output logic                credit_sent
);
  localparam int unsigned PW = $clog2(SLOT_BYTES + 1);

  typedef enum logic [2:0] {
    B_CONN, B_CREDIT, B_PHIT_HEAD, B_PHIT_BODY, B_GARBAGE
  } byte_kind_e;

  logic [PW-1:0] pos;          // byte index within the slot
  logic [2:0]    phit_left;    // body bytes of the current phit still to send
  logic [31:0]   shreg;
  byte_kind_e    kind;
  logic [PW-1:0] remaining;

  assign remaining = PW'(SLOT_BYTES) - pos;

  always_comb begin
    if (pos == '0)                                   kind = B_CONN;
    else if (pos == PW'(1))                          kind = B_CREDIT;
    else if (phit_left != '0)                        kind = B_PHIT_BODY;
    else if (conn_active && credit_tx_request)       kind = B_CREDIT;
    else if (conn_active && phit_valid &&
             remaining >= PW'(PHIT_BYTES))           kind = B_PHIT_HEAD;
    else if (conn_active && credit_pending)          kind = B_CREDIT;
    else                                             kind = B_GARBAGE;

    unique case (kind)
      B_CONN:      data = conn_byte(conn);
      B_CREDIT:    data = credit_byte(conn_active ? credit_value : '0);
      B_PHIT_HEAD: data = {PHIT_HDR, phit_data[PHIT_W-1:32]};
      B_PHIT_BODY: data = shreg[31:24];
      default:     data = 8'h00;
    endcase

    phit_accept = take && (kind == B_PHIT_HEAD);
    credit_sent = take && (kind == B_CREDIT) && conn_active;
    slot_done   = take && (pos == PW'(SLOT_BYTES - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      phit_left <= '0;
      shreg     <= '0;
    end else if (frame_start) begin
      pos       <= '0;
      phit_left <= '0;
    end else if (take) begin
      pos <= (pos == PW'(SLOT_BYTES - 1)) ? '0 : pos + 1'b1;
      if (kind == B_PHIT_HEAD) begin
        shreg     <= phit_data[31:0];
        phit_left <= 3'(PHIT_BYTES - 1);
      end else if (kind == B_PHIT_BODY) begin
        shreg     <= {shreg[23:0], 8'h00};
        phit_left <= phit_left - 1'b1;
      end
    end
  end

  initial begin
    assert (SLOT_BYTES >= 2 + PHIT_BYTES) else $error("serializer: slot too small for one phit");
  end

endmodule
