// tb_frame_receiver: header stripping of the frame receiver.
//
// Frames of 3 slots of 10 bytes arrive with random gaps and a 4-byte FCS
// after the payload. Checked: exactly the 30 slot bytes of every frame are
// passed on, in order; the frame number is captured; frame_start pulses once
// at the first byte of every frame; frame_done marks the last slot byte; a
// frame with another length field passes nothing on.
module tb_frame_receiver;
  localparam int NS = 3, SB = 10, PL = 1 + NS * SB;
  logic clk = 0, rst_n = 0, rx_valid = 0;
  logic [7:0] rx_data = '0, pl_data, frame_num;
  logic frame_start, pl_valid, frame_done;
  int checks = 0, failures = 0, starts = 0, dones = 0;
  logic [7:0] exp_q[$];

  always #4 clk = ~clk;

  frame_receiver #(.NUM_SLOTS(NS), .SLOT_BYTES(SB)) dut (
    .clk, .rst_n, .rx_data, .rx_valid, .frame_start, .pl_valid, .pl_data, .frame_num, .frame_done);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (frame_start) starts++;
    if (frame_done) dones++;
    if (pl_valid) begin
      check(exp_q.size() > 0 && pl_data == exp_q[0], $sformatf("payload byte %h wrong", pl_data));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      check(frame_done == (exp_q.size() == 0), "frame_done position");
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(input int fnum, input int len, input bit expect_pass);
    logic [7:0] b[$];
    for (int i = 0; i < 12; i++) b.push_back(8'($urandom));
    b.push_back(8'(len >> 8)); b.push_back(8'(len));
    b.push_back(8'(fnum));
    for (int i = 0; i < NS * SB; i++) begin
      automatic logic [7:0] x = 8'($urandom);
      b.push_back(x);
      if (expect_pass) exp_q.push_back(x);
    end
    for (int i = 0; i < 4; i++) b.push_back(8'($urandom));   // FCS
    foreach (b[i]) begin
      @(negedge clk); rx_valid = 1; rx_data = b[i];
    end
    @(negedge clk); rx_valid = 0;
    repeat (1 + $urandom % 5) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      if (f == 5) send_frame(99, 46, 0);   // foreign frame, other length
      send_frame(f, PL, 1);
      repeat (3) @(negedge clk);
      check(exp_q.size() == 0, $sformatf("frame %0d: %0d payload bytes missing", f, exp_q.size()));
      check(frame_num == 8'(f), "frame number");
    end
    check(starts == 9, $sformatf("frame_start count %0d expected 9", starts));
    check(dones == 8, $sformatf("frame_done count %0d expected 8", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
