// tb_streaming_latency: streaming latency against injection rate and number
// of slots, with two bridges at their default size (14 slots of 100 bytes,
// 64-deep FIFOs, 12 connections).
//
// A traffic generator feeds connection 0 of bridge A with uniform traffic at
// a set rate; the phit carries the value of a shared timer taken in the cycle
// the bridge accepts it. A measurement unit on connection 0 of bridge B
// subtracts that stamp from the timer when it takes the phit, giving the
// latency in cycles. All clocks run at 125 MHz. The link model adds 220
// cycles of fixed latency and a 24-byte gap between frames.
//
// Connection 0 gets n of the 14 slots in both bridges (n = 1, 2, 4, 7, 14,
// spread evenly); the other slots go to the idle connection 1. For each n
// the rate is swept over 83 ... 31250 thousand phits per second. The
// capacity of n slots is n * 19 phits per frame of 1415 + 24 cycles. Checked:
// * below 0.9 of the capacity the latency never exceeds one frame period
//   plus the link latency plus one slot plus a margin of 60 cycles,
// * above 1.1 of the capacity the mean latency is at least twice the mean
//   at the lowest rate (the FIFOs fill up),
// * at the lowest rate more slots never give a higher mean latency.
// The results are printed as a table, one row per slot count.
module tb_streaming_latency;
  import bridge_pkg::*;
  localparam int P = 12;
  localparam int NS = 14, SB = 100, LAT = 220, GAP = 24;
  localparam int FRAME_CYC = HDR_BYTES + 1 + NS * SB + GAP;
  localparam int NRATES = 10, NSLOTS = 5;
  localparam int RATES [NRATES] = '{83, 156, 312, 625, 1250, 2500, 5000, 12500, 25000, 31250};
  localparam int SLOTS [NSLOTS] = '{1, 2, 4, 7, 14};

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

  // traffic generator: a fractional accumulator turns thousands of phits per
  // second into requests at 125 MHz; requests wait in a backlog until taken
  int        timer = 0, rate_k = 0, acc = 0, backlog = 0;
  bit        gen_on = 0;
  int        n_sent = 0, n_recv = 0;
  longint    lat_sum = 0;
  int        lat_max = 0, lat_n = 0;
  bit        measure = 0;

  always @(posedge clk) timer <= timer + 1;

  always_comb begin
    tx_valid = '0;
    tx_data  = '0;
    tx_valid[0][0] = (backlog > 0);
    tx_data[0][0]  = {5'd0, 32'(timer)};
    rx_accept = '1;
  end

  always @(posedge clk) if (rst_n) begin
    if (tx_valid[0][0] && tx_accept[0][0]) begin
      backlog <= backlog - 1 + ((gen_on && acc + rate_k >= 125000) ? 1 : 0);
      n_sent++;
    end else if (gen_on && acc + rate_k >= 125000) begin
      backlog <= backlog + 1;
    end
    if (gen_on) acc <= (acc + rate_k >= 125000) ? acc + rate_k - 125000 : acc + rate_k;
    if (rx_valid[1][0]) begin
      n_recv++;
      if (measure) begin
        lat_sum += timer - int'(rx_data[1][0][31:0]);
        lat_n++;
        if (timer - int'(rx_data[1][0][31:0]) > lat_max) lat_max = timer - int'(rx_data[1][0][31:0]);
      end
    end
    if (rx_valid[1][1] || rx_valid[0][1]) check(1'b0, "phit on the idle connection");
  end

  int frames = 0;
  always @(posedge clk) if (rst_n && g_br[0].u_br.frame_start) frames++;

  task automatic wait_frames(input int n);
    automatic int f0 = frames;
    while (frames < f0 + n) @(posedge clk);
  endtask

  task automatic cfg_write_both(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_valid = '1; cfg_write = '1; cfg_addr = {a, a}; cfg_wdata = {d, d};
    @(negedge clk);
    cfg_valid = '0; cfg_write = '0;
  endtask

  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mean [NSLOTS][NRATES];
  int  maxl [NSLOTS][NRATES];
  real cap;
  string row;
  initial begin
    cfg_valid = '0; cfg_write = '0; cfg_addr = '0; cfg_wdata = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int si = 0; si < NSLOTS; si++) begin
      for (int i = 0; i < NS; i++)
        cfg_write_both(8'(i), ((i + 1) * SLOTS[si] / NS != i * SLOTS[si] / NS) ? 0 : 1);
      cap = real'(SLOTS[si] * ((SB - 2) / PHIT_BYTES)) / real'(FRAME_CYC) * 125.0e3;
      for (int ri = 0; ri < NRATES; ri++) begin
        rate_k = RATES[ri]; acc = 0;
        gen_on = 1;
        wait_frames(24);
        lat_sum = 0; lat_n = 0; lat_max = 0; measure = 1;
        wait_frames(12);
        measure = 0; gen_on = 0;
        // drain before the next point
        while (backlog > 0 || n_recv != n_sent) @(posedge clk);
        wait_frames(2);
        mean[si][ri] = lat_n ? real'(lat_sum) / lat_n : 0.0;
        maxl[si][ri] = lat_max;
        check(lat_n > 0, $sformatf("%0d slots, %0d kphit/s: nothing measured", SLOTS[si], RATES[ri]));
        if (real'(RATES[ri]) < 0.9 * cap)
          check(lat_max <= FRAME_CYC + LAT + SB + 60,
                $sformatf("%0d slots, %0d kphit/s: latency %0d above the bound %0d",
                          SLOTS[si], RATES[ri], lat_max, FRAME_CYC + LAT + SB + 60));
        if (real'(RATES[ri]) > 1.1 * cap)
          check(mean[si][ri] >= 2.0 * mean[si][0],
                $sformatf("%0d slots, %0d kphit/s: mean %0.0f not above twice %0.0f",
                          SLOTS[si], RATES[ri], mean[si][ri], mean[si][0]));
      end
      if (si > 0)
        check(mean[si][0] <= mean[si-1][0],
              $sformatf("%0d slots slower than %0d at the lowest rate", SLOTS[si], SLOTS[si-1]));
    end
    $display("mean latency in cycles; columns: injection rate in thousand phits/s");
    row = "slots";
    for (int ri = 0; ri < NRATES; ri++) row = {row, $sformatf(" %7d", RATES[ri])};
    $display("%s", row);
    for (int si = 0; si < NSLOTS; si++) begin
      row = $sformatf("%5d", SLOTS[si]);
      for (int ri = 0; ri < NRATES; ri++) row = {row, $sformatf(" %7.0f", mean[si][ri])};
      $display("%s", row);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
