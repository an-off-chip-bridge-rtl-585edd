// tb_offchip_bridge: two bridges joined by an Ethernet link model, end to end.
//
// Bridge A and bridge B (4 connections, 4 slots of 30 bytes, 64-deep FIFOs)
// run their network sides on different clocks (10 ns and 6 ns) and share a
// 125 MHz link clock. Each connection has a traffic generator on each side
// that sends numbered, time-stamped phits and a measurement unit on the
// other side that checks order and contents and measures the latency in link
// clock cycles. Traffic runs in both directions. The phases are
//   1. uniform low-rate traffic with the reset slot tables; every latency
//      must stay under the bound worked out below;
//   2. back-pressure: the receiver of connection 1 on B stops; A must stop
//      sending after 64 phits (credit stall) and resume afterwards;
//   3. rate: A gives all slots to connection 0, which is saturated; exactly
//      4 slots * floor((30-2)/5) = 20 phits must leave per frame; then A's
//      receiver, blocked so far, drains a full Rx FIFO at once, so credits
//      reach the trigger in the middle of A's busy slots;
//   4. one of A's slots is left unused at run time;
//   5. round-robin and then priority scheduling on A;
//   6. drain: every phit sent must have arrived and all credits be back.
// Mechanism counters (credit stall, trigger and idle credit returns, garbage
// bytes, unused slots, run-time table writes, policy switches, receiver
// back-pressure) must each be non-zero.
module tb_offchip_bridge;
  import bridge_pkg::*;
  localparam int P = 4, D = 64, NS = 4, SB = 30, TRIG = 16;
  localparam int LAT = 40, GAP = 24;
  localparam int FL = 14 + 1 + NS * SB;          // frame length in bytes
  localparam int FP = FL + GAP + 1;              // frame period in link cycles
  localparam int PHITS_PER_SLOT = (SB - 2) / 5;
  // Worst latency of a lone phit: up to one frame period waiting for a slot
  // of its connection, one slot to be sent, the link latency, and the two
  // clock-domain crossings and pipeline stages (a margin of 30 cycles).
  localparam int LAT_BOUND = FP + SB + LAT + 30;

  logic eclk = 0, anclk = 0, bnclk = 0, rst_n = 0;
  always #4 eclk = ~eclk;
  always #5 anclk = ~anclk;
  always #3 bnclk = ~bnclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- the two bridges and the link ----------------
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

  offchip_bridge #(.NUM_PORTS(P), .FIFO_DEPTH(D), .NUM_SLOTS(NS), .SLOT_BYTES(SB), .TRIGGER(TRIG))
    u_a (.noc_clk(anclk), .noc_rst_n(rst_n),
         .tx_valid(tx_valid[0]), .tx_accept(tx_accept[0]), .tx_data(tx_data[0]),
         .rx_valid(rx_valid[0]), .rx_accept(rx_accept[0]), .rx_data(rx_data[0]),
         .eth_clk(eclk), .eth_rst_n(rst_n), .enable(1'b1),
         .mac_tx_data(mtx_data[0]), .mac_tx_valid(mtx_valid[0]), .mac_tx_ack(mtx_ack[0]),
         .mac_rx_data(mrx_data[0]), .mac_rx_valid(mrx_valid[0]),
         .cfg_valid(cfg_valid[0]), .cfg_write(cfg_write[0]), .cfg_addr(cfg_addr[0]),
         .cfg_wdata(cfg_wdata[0]), .cfg_rdata(cfg_rdata[0]),
         .credits(credits[0]), .rx_frame_num(rx_fnum[0]));

  offchip_bridge #(.NUM_PORTS(P), .FIFO_DEPTH(D), .NUM_SLOTS(NS), .SLOT_BYTES(SB), .TRIGGER(TRIG))
    u_b (.noc_clk(bnclk), .noc_rst_n(rst_n),
         .tx_valid(tx_valid[1]), .tx_accept(tx_accept[1]), .tx_data(tx_data[1]),
         .rx_valid(rx_valid[1]), .rx_accept(rx_accept[1]), .rx_data(rx_data[1]),
         .eth_clk(eclk), .eth_rst_n(rst_n), .enable(1'b1),
         .mac_tx_data(mtx_data[1]), .mac_tx_valid(mtx_valid[1]), .mac_tx_ack(mtx_ack[1]),
         .mac_rx_data(mrx_data[1]), .mac_rx_valid(mrx_valid[1]),
         .cfg_valid(cfg_valid[1]), .cfg_write(cfg_write[1]), .cfg_addr(cfg_addr[1]),
         .cfg_wdata(cfg_wdata[1]), .cfg_rdata(cfg_rdata[1]),
         .credits(credits[1]), .rx_frame_num(rx_fnum[1]));

  eth_link_model #(.LATENCY(LAT), .GAP(GAP)) u_ab (.clk(eclk), .rst_n(rst_n),
    .tx_data(mtx_data[0]), .tx_valid(mtx_valid[0]), .tx_ack(mtx_ack[0]),
    .rx_data(mrx_data[1]), .rx_valid(mrx_valid[1]));
  eth_link_model #(.LATENCY(LAT), .GAP(GAP)) u_ba (.clk(eclk), .rst_n(rst_n),
    .tx_data(mtx_data[1]), .tx_valid(mtx_valid[1]), .tx_ack(mtx_ack[1]),
    .rx_data(mrx_data[0]), .rx_valid(mrx_valid[0]));

  // ---------------- traffic generators and measurement units ----------------
  logic [15:0] timer = '0;                 // link clock cycles
  always @(posedge eclk) timer <= timer + 1'b1;

  int rate   [2][P];    // generator offers a phit with probability rate/256 per cycle
  int acc_pr [2][P];    // measurement unit accepts with probability acc_pr/256
  int seq_tx [2][P];
  int seq_rx [2][P];    // indexed by the receiving side
  int max_lat = 0, min_lat = 1 << 30, lat_sum = 0, lat_n = 0;
  bit measure_lat = 0;
  int n_rx_backpressure = 0;

  for (genvar s = 0; s < 2; s++) begin : g_side
    for (genvar p = 0; p < P; p++) begin : g_conn
      // generator on side s, connection p
      always @(posedge nclk[s]) begin
        if (!rst_n) begin
          tx_valid[s][p] <= 1'b0;
        end else begin
          if (tx_valid[s][p] && tx_accept[s][p]) seq_tx[s][p]++;
          if ((!tx_valid[s][p] || tx_accept[s][p]) && (int'($urandom % 256) < rate[s][p])) begin
            tx_valid[s][p] <= 1'b1;
            tx_data[s][p]  <= {5'(p), 16'(seq_tx[s][p]), timer};
          end else if (tx_accept[s][p]) begin
            tx_valid[s][p] <= 1'b0;
          end
        end
      end
      // measurement unit on side s, connection p (phits sent by side 1-s)
      always @(posedge nclk[s]) begin
        if (!rst_n) begin
          rx_accept[s][p] <= 1'b0;
        end else begin
          rx_accept[s][p] <= int'($urandom % 256) < acc_pr[s][p];
          if (rx_valid[s][p] && !rx_accept[s][p]) n_rx_backpressure++;
          if (rx_valid[s][p] && rx_accept[s][p]) begin
            automatic int lat = int'(16'(timer - rx_data[s][p][15:0]));
            check(rx_data[s][p][36:32] == 5'(p) && rx_data[s][p][31:16] == 16'(seq_rx[s][p]),
                  $sformatf("side %0d conn %0d: got port %0d seq %0d, expected seq %0d",
                            s, p, rx_data[s][p][36:32], rx_data[s][p][31:16], 16'(seq_rx[s][p])));
            seq_rx[s][p]++;
            if (measure_lat) begin
              if (lat > max_lat) max_lat = lat;
              if (lat < min_lat) min_lat = lat;
              lat_sum += lat; lat_n++;
            end
          end
        end
      end
    end
  end

  // ---------------- mechanism monitors ----------------
  int n_stall = 0, n_trig_credit = 0, n_idle_credit = 0, n_garbage = 0;
  int n_unused_slot = 0, n_table_writes = 0, n_rr = 0, n_prio = 0;
  for (genvar p = 0; p < P; p++) begin : g_mon
    always @(posedge eclk)
      if (rst_n && u_a.g_port[p].u_port.txf_valid && credits[0][p] == 0) n_stall++;
  end
  always @(posedge eclk) if (rst_n && u_a.pl_take) begin
    if (u_a.u_ser.pos > 1 && u_a.u_ser.phit_left == 0) begin
      if (u_a.pl_data[7:6] == TAG_CREDIT) begin
        if (u_a.s_cred_req) n_trig_credit++; else n_idle_credit++;
      end
      if (u_a.pl_data[7:6] == TAG_GARBAGE) n_garbage++;
    end
    if (u_a.u_ser.pos == 0 && !u_a.sel_active) n_unused_slot++;
  end

  // phits leaving A for each connection, and A's frames
  int a_sent [P];
  int a_frames = 0;
  always @(posedge eclk) if (rst_n) begin
    for (int p = 0; p < P; p++) if (u_a.p_phit_accept[p]) a_sent[p]++;
    if (u_a.frame_start) a_frames++;
  end

  // ---------------- configuration helpers ----------------
  task automatic cfg_wr(input int side, input int a, input int d);
    @(negedge eclk);
    cfg_valid[side] = 1; cfg_write[side] = 1; cfg_addr[side] = 8'(a); cfg_wdata[side] = 32'(d);
    @(negedge eclk);
    cfg_valid[side] = 0; cfg_write[side] = 0;
    n_table_writes++;
  endtask

  task automatic set_rates(input int r, input int acc);
    for (int s = 0; s < 2; s++) for (int p = 0; p < P; p++) begin
      rate[s][p] = r; acc_pr[s][p] = acc;
    end
  endtask

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

  int f0, s0;
  initial begin
    cfg_valid = '0; cfg_write = '0; cfg_addr = '0; cfg_wdata = '0;
    tx_data = '0;
    for (int s = 0; s < 2; s++) for (int p = 0; p < P; p++) begin
      seq_tx[s][p] = 0; seq_rx[s][p] = 0;
    end
    for (int p = 0; p < P; p++) a_sent[p] = 0;
    set_rates(0, 256);
    repeat (5) @(posedge eclk);
    rst_n = 1;

    // 1. uniform low-rate traffic, latency bound
    set_rates(2, 256);
    measure_lat = 1;
    wait_frames(40);
    measure_lat = 0;
    check(lat_n > 50, $sformatf("too few phits in the latency phase: %0d", lat_n));
    check(max_lat <= LAT_BOUND, $sformatf("max latency %0d above bound %0d", max_lat, LAT_BOUND));
    check(min_lat >= LAT, $sformatf("min latency %0d below the link latency", min_lat));
    $display("phase 1: %0d phits, latency min %0d avg %0d max %0d (bound %0d) cycles",
             lat_n, min_lat, lat_sum / (lat_n > 0 ? lat_n : 1), max_lat, LAT_BOUND);

    // 2. back-pressure on connection 1 at B
    set_rates(0, 256);
    wait_frames(4);
    acc_pr[1][1] = 0;
    rate[0][1] = 256;
    wait_frames(20);           // one slot of 5 phits per frame: 64 phits take 13 frames
    check(credits[0][1] == 0 && u_a.g_port[1].u_port.txf_valid, "A did not stall on connection 1");
    check(seq_tx[0][1] - seq_rx[1][1] >= D, "fewer phits buffered than the Rx FIFO depth");
    s0 = a_sent[1];
    wait_frames(3);
    check(a_sent[1] == s0, "A sent on connection 1 without credits");
    acc_pr[1][1] = 256;
    wait_frames(6);
    check(a_sent[1] > s0, "connection 1 did not resume");
    rate[0][1] = 0;
    wait_frames(6);

    // 3. rate: all of A's slots to connection 0, saturated
    set_rates(0, 256);
    for (int i = 0; i < NS; i++) cfg_wr(0, i, 0);
    rate[0][0] = 256;
    rate[1][0] = 256;          // B fills A's Rx FIFO of connection 0 ...
    acc_pr[0][0] = 0;          // ... which A's receiver does not empty yet
    wait_frames(6);
    f0 = a_frames; s0 = a_sent[0];
    wait_frames(10);
    check(a_sent[0] - s0 == 10 * NS * PHITS_PER_SLOT,
          $sformatf("saturated rate: %0d phits in 10 frames, expected %0d", a_sent[0] - s0, 10 * NS * PHITS_PER_SLOT));
    $display("phase 3: %0d phits in 10 frames (%0d per frame)", a_sent[0] - s0, (a_sent[0] - s0) / 10);
    // A's receiver now drains 64 phits at once while A's slots are full of
    // phits: the phit counter passes the trigger in the middle of a slot
    wait_frames(6);
    acc_pr[0][0] = 256;
    wait_frames(6);
    rate[0][0] = 0;
    rate[1][0] = 0;
    wait_frames(4);

    // 4. restore the table with slot 3 unused
    cfg_wr(0, 0, 0); cfg_wr(0, 1, 1); cfg_wr(0, 2, 2); cfg_wr(0, 3, 63);
    set_rates(8, 230);
    rate[0][3] = 0;            // connection 3 has no slot on A now
    wait_frames(10);
    cfg_wr(0, 3, 3);
    set_rates(8, 230);
    wait_frames(10);

    // 5. dynamic policies on A
    cfg_wr(0, 8'hFF, 1);
    set_rates(30, 230);
    f0 = a_frames;
    wait_frames(15);
    n_rr = a_frames - f0;
    cfg_wr(0, 8'hFF, 2);
    f0 = a_frames;
    wait_frames(15);
    n_prio = a_frames - f0;
    cfg_wr(0, 8'hFF, 0);

    // 6. drain
    set_rates(0, 256);
    wait_frames(30);
    for (int s = 0; s < 2; s++) for (int p = 0; p < P; p++) begin
      check(seq_rx[1-s][p] == seq_tx[s][p],
            $sformatf("side %0d conn %0d: sent %0d, received %0d", s, p, seq_tx[s][p], seq_rx[1-s][p]));
      check(credits[s][p] == 7'(D), $sformatf("side %0d conn %0d: %0d credits at the end", s, p, credits[s][p]));
    end

    $display("mechanisms: stall=%0d trigger_credit=%0d idle_credit=%0d garbage=%0d unused_slot=%0d table_writes=%0d rr_frames=%0d prio_frames=%0d rx_backpressure=%0d",
             n_stall, n_trig_credit, n_idle_credit, n_garbage, n_unused_slot, n_table_writes, n_rr, n_prio, n_rx_backpressure);
    check(n_stall > 0, "credit stall never happened");
    check(n_trig_credit > 0, "trigger credit return never happened");
    check(n_idle_credit > 0, "idle credit return never happened");
    check(n_garbage > 0, "no garbage byte sent");
    check(n_unused_slot > 0, "no unused slot sent");
    check(n_table_writes > 0, "no run-time table write");
    check(n_rr > 0 && n_prio > 0, "dynamic policies not run");
    check(n_rx_backpressure > 0, "receiver back-pressure never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
