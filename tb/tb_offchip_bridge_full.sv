// tb_offchip_bridge_full: two bridges at their default size, end to end.
//
// Both bridges use every default: 12 connections, 64-deep FIFOs, frames of
// 14 slots of 100 bytes. Every connection carries 120 numbered phits in
// each direction, more than the 64 credits, so credits must come back
// during the run. Checked: every phit arrives once and in order on its own
// connection; after the run every credit counter is back at 64; the frame
// on the wire is 14 + 1 + 1400 bytes long. Then connection 0 is given all
// 14 of A's slots and kept busy: a full slot must carry floor((100-2)/5) = 19
// phits, no slot more, and the 64 credits must be reused, because a round
// trip over the modelled link is longer than 64 phits take to send.
module tb_offchip_bridge_full;
  import bridge_pkg::*;
  localparam int P = 12, N = 120;
  localparam int FL = 14 + 1 + 14 * 100;

  logic eclk = 0, anclk = 0, bnclk = 0, rst_n = 0;
  always #4 eclk = ~eclk;
  always #5 anclk = ~anclk;
  always #3 bnclk = ~bnclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [1:0][P-1:0]             tx_valid, tx_accept, rx_valid, rx_accept;
  logic [1:0][P-1:0][PHIT_W-1:0] tx_data, rx_data;
  logic [1:0][7:0]               mtx_data, mrx_data;
  logic [1:0]                    mtx_valid, mtx_ack, mrx_valid;
  logic [1:0]                    cfg_valid, cfg_write;
  logic [1:0][7:0]               cfg_addr;
  logic [1:0][31:0]              cfg_wdata, cfg_rdata;
  logic [1:0][P-1:0][6:0]        credits;
  logic [1:0][7:0]               rx_fnum;
  logic [1:0]                    nclk;
  assign nclk = {bnclk, anclk};

  offchip_bridge u_a (.noc_clk(anclk), .noc_rst_n(rst_n),
    .tx_valid(tx_valid[0]), .tx_accept(tx_accept[0]), .tx_data(tx_data[0]),
    .rx_valid(rx_valid[0]), .rx_accept(rx_accept[0]), .rx_data(rx_data[0]),
    .eth_clk(eclk), .eth_rst_n(rst_n), .enable(1'b1),
    .mac_tx_data(mtx_data[0]), .mac_tx_valid(mtx_valid[0]), .mac_tx_ack(mtx_ack[0]),
    .mac_rx_data(mrx_data[0]), .mac_rx_valid(mrx_valid[0]),
    .cfg_valid(cfg_valid[0]), .cfg_write(cfg_write[0]), .cfg_addr(cfg_addr[0]),
    .cfg_wdata(cfg_wdata[0]), .cfg_rdata(cfg_rdata[0]),
    .credits(credits[0]), .rx_frame_num(rx_fnum[0]));

  offchip_bridge u_b (.noc_clk(bnclk), .noc_rst_n(rst_n),
    .tx_valid(tx_valid[1]), .tx_accept(tx_accept[1]), .tx_data(tx_data[1]),
    .rx_valid(rx_valid[1]), .rx_accept(rx_accept[1]), .rx_data(rx_data[1]),
    .eth_clk(eclk), .eth_rst_n(rst_n), .enable(1'b1),
    .mac_tx_data(mtx_data[1]), .mac_tx_valid(mtx_valid[1]), .mac_tx_ack(mtx_ack[1]),
    .mac_rx_data(mrx_data[1]), .mac_rx_valid(mrx_valid[1]),
    .cfg_valid(cfg_valid[1]), .cfg_write(cfg_write[1]), .cfg_addr(cfg_addr[1]),
    .cfg_wdata(cfg_wdata[1]), .cfg_rdata(cfg_rdata[1]),
    .credits(credits[1]), .rx_frame_num(rx_fnum[1]));

  eth_link_model #(.LATENCY(220), .GAP(24)) u_ab (.clk(eclk), .rst_n(rst_n),
    .tx_data(mtx_data[0]), .tx_valid(mtx_valid[0]), .tx_ack(mtx_ack[0]),
    .rx_data(mrx_data[1]), .rx_valid(mrx_valid[1]));
  eth_link_model #(.LATENCY(220), .GAP(24)) u_ba (.clk(eclk), .rst_n(rst_n),
    .tx_data(mtx_data[1]), .tx_valid(mtx_valid[1]), .tx_ack(mtx_ack[1]),
    .rx_data(mrx_data[0]), .rx_valid(mrx_valid[0]));

  int seq_tx [2][P];
  int seq_rx [2][P];
  int limit = N;
  bit saturate0 = 0;

  for (genvar s = 0; s < 2; s++) begin : g_side
    for (genvar p = 0; p < P; p++) begin : g_conn
      always @(posedge nclk[s]) begin
        if (!rst_n) begin
          tx_valid[s][p] <= 1'b0;
          tx_data[s][p]  <= '0;
          rx_accept[s][p] <= 1'b0;
        end else begin
          if (tx_valid[s][p] && tx_accept[s][p]) seq_tx[s][p]++;
          if ((!tx_valid[s][p] || tx_accept[s][p]) &&
              (seq_tx[s][p] < limit || (saturate0 && s == 0 && p == 0)) && ($urandom % 4) == 0) begin
            tx_valid[s][p] <= 1'b1;
            tx_data[s][p]  <= {5'(p), 16'(seq_tx[s][p]), 16'(s)};
          end else if (tx_accept[s][p]) begin
            tx_valid[s][p] <= 1'b0;
          end
          rx_accept[s][p] <= ($urandom % 4) != 0;
          if (rx_valid[s][p] && rx_accept[s][p]) begin
            check(rx_data[s][p] == {5'(p), 16'(seq_rx[s][p]), 16'(1 - s)},
                  $sformatf("side %0d conn %0d: phit %h, expected seq %0d", s, p, rx_data[s][p], seq_rx[s][p]));
            seq_rx[s][p]++;
          end
        end
      end
    end
  end

  // frame length on the wire and phits leaving A on connection 0
  int cur_len = 0, a_frames = 0, a_sent0 = 0, in_slot = 0, max_slot = 0;
  always @(posedge eclk) if (rst_n) begin
    if (u_a.slot_done || u_a.frame_start) begin
      if (in_slot > max_slot) max_slot = in_slot;
      in_slot = 0;
    end
    if (u_a.p_phit_accept[0]) in_slot++;
    if (mtx_valid[0] && (mtx_ack[0] || cur_len > 0)) cur_len++;
    if (!mtx_valid[0] && cur_len > 0) begin
      check(cur_len == FL, $sformatf("frame of %0d bytes, expected %0d", cur_len, FL));
      cur_len = 0;
    end
    if (u_a.frame_start) a_frames++;
    if (u_a.p_phit_accept[0]) a_sent0++;
  end

  task automatic wait_frames(input int n);
    automatic int f0 = a_frames;
    while (a_frames < f0 + n) @(posedge eclk);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge eclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int done, s0;
  initial begin
    cfg_valid = '0; cfg_write = '0; cfg_addr = '0; cfg_wdata = '0;
    for (int s = 0; s < 2; s++) for (int p = 0; p < P; p++) begin
      seq_tx[s][p] = 0; seq_rx[s][p] = 0;
    end
    repeat (5) @(posedge eclk);
    rst_n = 1;
    // all connections, both directions
    do begin
      wait_frames(1);
      done = 1;
      for (int s = 0; s < 2; s++) for (int p = 0; p < P; p++)
        if (seq_rx[s][p] < N) done = 0;
    end while (!done);
    wait_frames(4);
    for (int s = 0; s < 2; s++) for (int p = 0; p < P; p++) begin
      check(seq_rx[1-s][p] == N && seq_tx[s][p] == N,
            $sformatf("side %0d conn %0d: sent %0d received %0d", s, p, seq_tx[s][p], seq_rx[1-s][p]));
      check(credits[s][p] == 7'd64, $sformatf("side %0d conn %0d: %0d credits at the end", s, p, credits[s][p]));
    end
    $display("all %0d connections delivered %0d phits each way after %0d frames", P, N, a_frames);
    // saturated connection owning all of A's slots
    for (int i = 0; i < 14; i++) begin
      @(negedge eclk); cfg_valid[0] = 1; cfg_write[0] = 1; cfg_addr[0] = 8'(i); cfg_wdata[0] = 0;
      @(negedge eclk); cfg_valid[0] = 0; cfg_write[0] = 0;
    end
    wait_frames(1);
    max_slot = 0;
    s0 = a_sent0;
    saturate0 = 1;
    wait_frames(6);
    check(max_slot == (100 - 2) / 5, $sformatf("fullest slot held %0d phits, expected %0d", max_slot, (100 - 2) / 5));
    check(a_sent0 - s0 > 2 * 64, $sformatf("busy connection sent %0d phits in 6 frames: credits not reused", a_sent0 - s0));
    $display("busy connection: %0d phits in 6 frames, fullest slot %0d phits", a_sent0 - s0, max_slot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
