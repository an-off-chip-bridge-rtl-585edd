// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// Writer on a 10 ns clock, reader on a 8 ns clock. Phase 1 fills the FIFO
// with the reader stopped and checks that exactly DEPTH words are accepted.
// Phase 2 drains it and checks order and that wr_freed, summed in the write
// domain, reports every removed word. Phase 3 streams 2000 random words with
// random valid/accept on both sides against a reference queue.
module tb_async_fifo;
  localparam int W = 37, D = 64;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wv = 0, wa, rv, ra = 0;
  logic [W-1:0] wd = '0, rd;
  logic [$clog2(D):0] freed;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int freed_sum = 0;

  always #5 wclk = ~wclk;
  always #4 rclk = ~rclk;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_valid(wv), .wr_accept(wa), .wr_data(wd), .wr_freed(freed),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_valid(rv), .rd_accept(ra), .rd_data(rd));

  always @(posedge wclk) if (wrst_n) freed_sum += int'(freed);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // writer: push on posedge when accepted
  int n_written = 0;
  // Driven and sampled at the falling edge, away from the DUT's clock edge.
  task automatic write_word(input logic [W-1:0] d);
    @(negedge wclk);
    wv = 1; wd = d;
    while (!wa) @(negedge wclk);
    @(posedge wclk);
    model.push_back(d);
    n_written++;
    #1 wv = 0;
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int accepted;
  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge wclk);
    // Phase 1: fill
    accepted = 0;
    for (int i = 0; i < D + 8; i++) begin
      wv <= 1; wd <= W'(i * 3 + 1);
      @(posedge wclk);
      if (wa) begin accepted++; model.push_back(W'(i * 3 + 1)); end
    end
    wv <= 0;
    check(accepted == D, $sformatf("fill accepted %0d words, expected %0d", accepted, D));
    // Phase 2: drain
    repeat (5) @(posedge rclk);
    while (model.size() > 0) begin
      @(negedge rclk);
      if (rv) begin
        check(rd == model[0], $sformatf("drain data %h expected %h", rd, model[0]));
        ra = 1;
        @(posedge rclk); #1 ra = 0;
        void'(model.pop_front());
      end
    end
    repeat (10) @(posedge wclk);
    check(freed_sum == D, $sformatf("wr_freed total %0d expected %0d", freed_sum, D));
    check(!rv, "FIFO not empty after drain");
    // Phase 3: random streaming
    fork
      begin
        for (int i = 0; i < 2000; i++) begin
          while (($urandom % 4) == 0) @(posedge wclk);
          write_word({$urandom, 5'($urandom)});
        end
      end
      begin
        int got = 0;
        while (got < 2000) begin
          @(negedge rclk);
          ra = (($urandom % 3) != 0);
          if (rv && ra) begin
            check(model.size() > 0 && rd == model[0],
                  $sformatf("stream word %0d: %h, expected %h", got, rd, model.size() > 0 ? model[0] : '0));
            void'(model.pop_front());
            got++;
          end
          @(posedge rclk); #1 ra = 0;
        end
      end
    join
    repeat (10) @(posedge wclk);
    check(freed_sum == D + 2000, $sformatf("wr_freed total %0d expected %0d", freed_sum, D + 2000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
