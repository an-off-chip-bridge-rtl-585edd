// tb_mm_write_latency: latency of single-word memory-mapped writes carried
// across two bridges at their default size, against the number of slots.
//
// The network's shells turn a memory-mapped write of one word into 3 phits;
// their content does not matter to the bridge, so numbered phits stand in. The
// initiator here issues one write at a time: after a random pause it offers
// the 3 phits back to back on connection 0 of bridge A. The write counts as
// done when the third phit leaves connection 0 of bridge B, where a target
// takes every phit at once. The latency is measured from the cycle bridge A
// accepts the first phit. Everything runs at 125 MHz; the link model adds
// 220 cycles of fixed latency and a 24-byte gap between frames.
//
// Connection 0 gets n of the 14 slots (n = 1, 2, 4, 6, 8, 10, 14, spread
// evenly, the same in both bridges; the rest go to the idle connection 1).
// For each n, 40 writes are timed. Checked: every phit arrives in order with
// its content; no write takes less than the link latency; no write takes
// more than one frame period plus link latency plus one slot plus 60 cycles;
// with all 14 slots the mean stays within the link latency plus two slots;
// and the mean latency falls from 1 to 2 to 4 slots and is no higher at 14
// slots than at 4. Mean, minimum and maximum per n are printed.
module tb_mm_write_latency;
  import bridge_pkg::*;
  localparam int P = 12;
  localparam int NS = 14, SB = 100, LAT = 220, GAP = 24;
  localparam int FRAME_CYC = HDR_BYTES + 1 + NS * SB + GAP;
  localparam int NTR = 40, REQ_PHITS = 3, NSLOTS = 7;
  localparam int SLOTS [NSLOTS] = '{1, 2, 4, 6, 8, 10, 14};

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

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

  for (genvar s = 0; s < 2; s++) begin : g_br
    offchip_bridge u_br (.noc_clk(clk), .noc_rst_n(rst_n),
      .tx_valid(tx_valid[s]), .tx_accept(tx_accept[s]), .tx_data(tx_data[s]),
      .rx_valid(rx_valid[s]), .rx_accept(rx_accept[s]), .rx_data(rx_data[s]),
      .eth_clk(clk), .eth_rst_n(rst_n), .enable(1'b1),
      .mac_tx_data(mtx_data[s]), .mac_tx_valid(mtx_valid[s]), .mac_tx_ack(mtx_ack[s]),
      .mac_rx_data(mrx_data[s]), .mac_rx_valid(mrx_valid[s]),
      .cfg_valid(cfg_valid[s]), .cfg_write(cfg_write[s]), .cfg_addr(cfg_addr[s]),
      .cfg_wdata(cfg_wdata[s]), .cfg_rdata(cfg_rdata[s]),
      .credits(credits[s]), .rx_frame_num(rx_fnum[s]));
    eth_link_model #(.LATENCY(LAT), .GAP(GAP)) u_link (.clk(clk), .rst_n(rst_n),
      .tx_data(mtx_data[s]), .tx_valid(mtx_valid[s]), .tx_ack(mtx_ack[s]),
      .rx_data(mrx_data[1-s]), .rx_valid(mrx_valid[1-s]));
  end

  int timer = 0;
  always @(posedge clk) timer <= timer + 1;

  // initiator: drives connection 0 of bridge A from the main process
  logic             i_valid = 0;
  logic [PHIT_W-1:0] i_data = '0;
  always_comb begin
    tx_valid = '0;
    tx_data  = '0;
    tx_valid[0][0] = i_valid;
    tx_data[0][0]  = i_data;
    rx_accept = '1;
  end

  // target: counts phits of connection 0 at bridge B and checks their content
  int rx_cnt = 0, done_time = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid[1][0]) begin
      check(rx_data[1][0] == {5'(rx_cnt % REQ_PHITS), 32'(rx_cnt / REQ_PHITS)},
            $sformatf("phit %0d: got %h", rx_cnt, rx_data[1][0]));
      rx_cnt++;
      if (rx_cnt % REQ_PHITS == 0) done_time = timer;
    end
    if (rx_valid[1][1] || rx_valid[0][1]) check(1'b0, "phit on the idle connection");
  end

  task automatic cfg_write_both(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_valid = '1; cfg_write = '1; cfg_addr = {a, a}; cfg_wdata = {d, d};
    @(negedge clk);
    cfg_valid = '0; cfg_write = '0;
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mean [NSLOTS];
  int  minl [NSLOTS], maxl [NSLOTS];
  int  tr = 0, t0, lat;
  longint sum;
  initial begin
    cfg_valid = '0; cfg_write = '0; cfg_addr = '0; cfg_wdata = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int si = 0; si < NSLOTS; si++) begin
      for (int i = 0; i < NS; i++)
        cfg_write_both(8'(i), ((i + 1) * SLOTS[si] / NS != i * SLOTS[si] / NS) ? 0 : 1);
      repeat (2 * FRAME_CYC) @(posedge clk);
      sum = 0; minl[si] = 1 << 30; maxl[si] = 0;
      for (int k = 0; k < NTR; k++) begin
        repeat ($urandom % FRAME_CYC) @(posedge clk);
        // the write: 3 phits back to back, timed from the first acceptance
        t0 = -1;
        for (int ph = 0; ph < REQ_PHITS; ph++) begin
          @(negedge clk);
          i_valid = 1'b1;
          i_data  = {5'(ph), 32'(tr)};
          do begin
            @(posedge clk);
            if (tx_accept[0][0] && t0 < 0) t0 = timer;
          end while (!tx_accept[0][0]);
        end
        @(negedge clk);
        i_valid = 1'b0;
        // wait for completion at the target
        while (rx_cnt < (tr + 1) * REQ_PHITS) @(posedge clk);
        lat = done_time - t0;
        tr++;
        sum += lat;
        if (lat < minl[si]) minl[si] = lat;
        if (lat > maxl[si]) maxl[si] = lat;
        check(lat >= LAT, $sformatf("%0d slots: write took %0d cycles, less than the link", SLOTS[si], lat));
        check(lat <= FRAME_CYC + LAT + SB + 60,
              $sformatf("%0d slots: write took %0d cycles, above %0d", SLOTS[si], lat, FRAME_CYC + LAT + SB + 60));
      end
      mean[si] = real'(sum) / NTR;
    end
    check(mean[0] > mean[1] && mean[1] > mean[2] && mean[6] <= mean[2],
          "mean latency does not fall with more slots");
    check(mean[6] <= real'(LAT + 2 * SB), $sformatf("all slots: mean %0.0f above %0d", mean[6], LAT + 2 * SB));
    $display("write latency in cycles (mean / min / max) against slots owned");
    for (int si = 0; si < NSLOTS; si++)
      $display("%3d slots: %6.0f %6d %6d", SLOTS[si], mean[si], minl[si], maxl[si]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
