// async_fifo: dual-clock first-word-fall-through FIFO.
//
// Each bridge connection has two of these: the Tx FIFO (network clock in,
// Ethernet clock out) and the Rx FIFO (Ethernet clock in, network clock out).
// Dual-clock FIFOs that decouple the bridge from the network clock are the
// document's; the construction (Gray-coded pointers with one extra wrap bit,
// two-stage synchronisers) is a standard one chosen here.
//
// Interface: valid/accept streaming handshake on both sides.
//   write side: wr_valid, wr_data in; wr_accept = not full. A word is stored
//               in a cycle with wr_valid && wr_accept.
//   read side:  rd_valid = not empty, rd_data = oldest word (shown ahead);
//               the word is removed in a cycle with rd_valid && rd_accept.
//   wr_freed:   in the write clock domain, the number of words the read side
//               has removed since the previous write-clock cycle, as seen
//               through the synchroniser. The Rx FIFO uses it to feed the
//               phit counter in the Ethernet clock domain.
// Timing: a written word becomes visible to the reader after 2-3 read clocks;
// freed space becomes visible to the writer after 2-3 write clocks. The full
// DEPTH words can be stored. DEPTH must be a power of two.
module async_fifo #(
  parameter int unsigned WIDTH = 37,
  parameter int unsigned DEPTH = 64
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_valid,
  output logic             wr_accept,
  input  logic [WIDTH-1:0] wr_data,
  output logic [$clog2(DEPTH):0] wr_freed,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic             rd_valid,
  input  logic             rd_accept,
  output logic [WIDTH-1:0] rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr_bin, wptr_gray, rptr_bin, rptr_gray;
  logic [AW:0] rptr_gray_s1, rptr_gray_s2;   // read pointer in write domain
  logic [AW:0] wptr_gray_s1, wptr_gray_s2;   // write pointer in read domain
  logic [AW:0] rptr_seen_bin, rptr_seen_prev;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic do_write;
  assign wr_accept = (wptr_gray != {~rptr_gray_s2[AW:AW-1], rptr_gray_s2[AW-2:0]});
  assign do_write  = wr_valid && wr_accept;

  always_ff @(posedge wr_clk) begin
    if (do_write) mem[wptr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr_bin       <= '0;
      wptr_gray      <= '0;
      rptr_gray_s1   <= '0;
      rptr_gray_s2   <= '0;
      rptr_seen_prev <= '0;
    end else begin
      if (do_write) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= bin2gray(wptr_bin + 1'b1);
      end
      rptr_gray_s1   <= rptr_gray;
      rptr_gray_s2   <= rptr_gray_s1;
      rptr_seen_prev <= rptr_seen_bin;
    end
  end

  assign rptr_seen_bin = gray2bin(rptr_gray_s2);
  assign wr_freed      = rptr_seen_bin - rptr_seen_prev;

  // ---------------- read domain ----------------
  logic do_read;
  assign rd_valid = (rptr_gray != wptr_gray_s2);
  assign do_read  = rd_valid && rd_accept;
  assign rd_data  = mem[rptr_bin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr_bin     <= '0;
      rptr_gray    <= '0;
      wptr_gray_s1 <= '0;
      wptr_gray_s2 <= '0;
    end else begin
      if (do_read) begin
        rptr_bin  <= rptr_bin + 1'b1;
        rptr_gray <= bin2gray(rptr_bin + 1'b1);
      end
      wptr_gray_s1 <= wptr_gray;
      wptr_gray_s2 <= wptr_gray_s1;
    end
  end

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("async_fifo: DEPTH must be a power of two, at least 4");
  end

endmodule
