// tb_frame_sender: frame layout and MAC handshake of the frame sender.
//
// 3 slots of 10 bytes (payload 31 bytes, frame 45 bytes). A MAC model
// acknowledges the first byte after a random delay (standing for preamble
// and inter-frame gap) and then takes one byte per cycle. Checked: the first
// byte is held until the ack, destination and source MAC, the length field,
// the incrementing frame number, that slot bytes come from the serializer in
// order (a counting pattern here), the frame length, one frame_start per
// frame, and that frames stop when enable falls.
module tb_frame_sender;
  localparam int NS = 3, SB = 10, PL = 1 + NS * SB, FL = 14 + PL;
  localparam logic [47:0] DMAC = 48'hAABBCCDDEEFF, SMAC = 48'h112233445566;
  logic clk = 0, rst_n = 0, enable = 0, tx_ack = 0;
  logic [7:0] tx_data, pl_data, frame_num;
  logic tx_valid, frame_start, pl_take;
  int checks = 0, failures = 0;
  int pattern = 0, starts = 0;

  always #4 clk = ~clk;

  frame_sender #(.NUM_SLOTS(NS), .SLOT_BYTES(SB), .DST_MAC(DMAC), .SRC_MAC(SMAC)) dut (
    .clk, .rst_n, .enable, .tx_data, .tx_valid, .tx_ack,
    .frame_start, .pl_take, .pl_data, .frame_num);

  assign pl_data = 8'(pattern);
  always @(posedge clk) if (rst_n) begin
    if (pl_take) pattern++;
    if (frame_start) starts++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] fr[FL];
  int exp_pat = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    enable = 1;
    for (int f = 0; f < 6; f++) begin
      automatic int d = 1 + $urandom % 12;
      automatic logic [7:0] first;
      // wait for the frame to begin, hold off the ack
      @(negedge clk);
      while (!tx_valid) @(negedge clk);
      first = tx_data;
      for (int i = 0; i < d; i++) begin
        @(negedge clk);
        check(tx_valid && tx_data == first, "first byte not held until ack");
      end
      tx_ack = 1; fr[0] = tx_data;
      @(negedge clk); tx_ack = 0;
      if (f == 5) enable = 0;   // stop after this frame
      for (int i = 1; i < FL; i++) begin
        check(tx_valid, $sformatf("tx_valid fell inside the frame at byte %0d", i));
        fr[i] = tx_data;
        @(negedge clk);
      end
      check(!tx_valid, "tx_valid still high after the last byte");
      for (int i = 0; i < 6; i++) check(fr[i] == DMAC[8*(5-i) +: 8], "destination MAC byte");
      for (int i = 0; i < 6; i++) check(fr[6+i] == SMAC[8*(5-i) +: 8], "source MAC byte");
      check({fr[12], fr[13]} == 16'(PL), $sformatf("length field %0d", {fr[12], fr[13]}));
      check(fr[14] == 8'(f), $sformatf("frame number %0d expected %0d", fr[14], f));
      for (int i = 15; i < FL; i++) begin
        check(fr[i] == 8'(exp_pat), $sformatf("slot byte %0d = %0d expected %0d", i, fr[i], exp_pat));
        exp_pat++;
      end
      check(starts == f + 1, "one frame_start per frame");
    end
    repeat (100) @(negedge clk);
    check(!tx_valid && starts == 6, "frames continue after enable fell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
