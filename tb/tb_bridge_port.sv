// tb_bridge_port: one connection's flow-control stage in loopback.
//
// The link side is looped back onto the same port: every phit the port
// offers (phit_valid) is taken and written into its own Rx FIFO, and credit
// values it offers are returned to its own credit counter. The network side
// writes 600 numbered phits and reads them back with a random accept.
// Checked: data order and values; while the reader is stopped exactly 64
// phits (the Rx FIFO depth) cross before phit_valid falls for lack of credit
// (credit stall); credits return once the reader resumes, both at the
// trigger and below it when the link is idle; at the end all 64 credits are
// back.
module tb_bridge_port;
  import bridge_pkg::*;
  localparam int D = 64, T = 16, N = 600;
  logic nclk = 0, eclk = 0, nrst_n = 0, erst_n = 0;
  logic tx_valid = 0, tx_accept, rx_valid, rx_accept = 0;
  logic [PHIT_W-1:0] tx_data = '0, rx_data;
  logic phit_valid, phit_accept, creq, cpend, csent;
  logic [PHIT_W-1:0] phit_data;
  logic [CREDIT_W-1:0] cval;
  logic in_phit_valid = 0, in_credit_valid = 0;
  logic [PHIT_W-1:0] in_phit_data = '0;
  logic [CREDIT_W-1:0] in_credit_value = '0;
  logic [6:0] credits;
  int checks = 0, failures = 0;
  int n_stall = 0, n_trig = 0, n_idle_credit = 0, sent_in_block = 0;
  bit block_rx = 1;

  always #5 nclk = ~nclk;
  always #4 eclk = ~eclk;

  bridge_port #(.FIFO_DEPTH(D), .TRIGGER(T)) dut (
    .noc_clk(nclk), .noc_rst_n(nrst_n), .tx_valid, .tx_accept, .tx_data,
    .rx_valid, .rx_accept, .rx_data,
    .eth_clk(eclk), .eth_rst_n(erst_n), .phit_valid, .phit_data, .phit_accept,
    .credit_tx_request(creq), .credit_pending(cpend), .credit_value(cval), .credit_sent(csent),
    .in_phit_valid, .in_phit_data, .in_credit_valid, .in_credit_value, .credits);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Link loopback in the Ethernet domain: one byte-slot decision per cycle,
  // credits first if the trigger is reached, otherwise a phit, otherwise
  // idle-time credits.
  bit idle_ok = 0;   // the link is free for idle credits only now and then
  always @(negedge eclk) idle_ok = ($urandom % 32) == 0;
  assign phit_accept = phit_valid && !creq;
  assign csent       = creq || (!phit_valid && cpend && idle_ok);
  always @(posedge eclk) begin
    in_phit_valid   <= phit_accept;
    in_phit_data    <= phit_data;
    in_credit_valid <= csent;
    in_credit_value <= cval;
    if (erst_n) begin
      if (creq) n_trig++;
      else if (csent) n_idle_credit++;
      if (phit_accept && block_rx) sent_in_block++;
    end
  end

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge nclk);
    nrst_n = 1; erst_n = 1;
    #1;
    check(credits == 7'(D), "credits after reset");
    fork
      begin : writer
        for (int i = 0; i < N; i++) begin
          @(negedge nclk);
          tx_valid = 1; tx_data = PHIT_W'(i) ^ {5'h15, 32'hA5A50000};
          while (!tx_accept) @(negedge nclk);
          @(posedge nclk); #1 tx_valid = 0;
        end
      end
      begin : reader
        int got = 0;
        // reader stopped: exactly D phits may cross
        repeat (400) @(posedge eclk);
        check(sent_in_block == D, $sformatf("%0d phits crossed with the reader stopped, expected %0d", sent_in_block, D));
        check(!phit_valid && credits == 0, "phit_valid must fall with no credits left");
        if (!phit_valid) n_stall++;
        block_rx = 0;
        while (got < N) begin
          @(negedge nclk);
          rx_accept = ($urandom % 4) != 0;
          if (rx_valid && rx_accept) begin
            check(rx_data == (PHIT_W'(got) ^ {5'h15, 32'hA5A50000}), $sformatf("phit %0d wrong: %h", got, rx_data));
            got++;
          end
          @(posedge nclk); #1 rx_accept = 0;
        end
      end
    join
    repeat (500) @(posedge eclk);
    check(credits == 7'(D), $sformatf("credits at the end %0d, expected %0d", credits, D));
    check(n_stall > 0, "credit stall never happened");
    check(n_trig > 0, "trigger credit return never happened");
    check(n_idle_credit > 0, "idle-link credit return never happened");
    $display("stalls=%0d trigger_returns=%0d idle_returns=%0d", n_stall, n_trig, n_idle_credit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
