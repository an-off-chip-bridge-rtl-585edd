// tb_serializer: byte format of the slots, checked by an independent decoder.
//
// SLOT_BYTES = 150, the slot size of the document's efficiency example.
// Phase A: phits always ready, no credits: every slot must be a connection
//          byte, a zero credit byte, 29 phits and 3 garbage bytes (the
//          document's 29 phits per slot).
// Phase B: phits arrive at random and the credit count grows at random: the
//          decoded phits must come out in order, the decoded credits must
//          add up to what was taken from the counter, a credit byte must
//          appear whenever the trigger is reached at a phit boundary, and no
//          phit may cross a slot boundary.
// Phase C: an unused slot carries only its connection byte, a zero credit
//          byte and garbage.
module tb_serializer;
  import bridge_pkg::*;
  localparam int SB = 150, T = 16;
  logic clk = 0, rst_n = 0, frame_start = 0, take = 0;
  logic [7:0] data;
  logic slot_done;
  logic [CONN_W-1:0] conn = 6'd5;
  logic conn_active = 1;
  logic phit_valid, phit_accept, creq, cpend, csent;
  logic [PHIT_W-1:0] phit_data;
  logic [CREDIT_W-1:0] cval;
  int checks = 0, failures = 0;

  // connection model
  logic [PHIT_W-1:0] q[$];
  int cc = 0;                // phit counter model
  int credits_taken = 0;
  assign phit_valid = q.size() > 0;
  assign phit_data  = q.size() > 0 ? q[0] : '0;
  assign cval = CREDIT_W'(cc > 63 ? 63 : cc);
  assign creq = cc >= T;
  assign cpend = cc != 0;

  always #4 clk = ~clk;

  serializer #(.SLOT_BYTES(SB)) dut (
    .clk, .rst_n, .frame_start, .take, .data, .slot_done, .conn, .conn_active,
    .phit_valid, .phit_data, .phit_accept, .credit_tx_request(creq),
    .credit_pending(cpend), .credit_value(cval), .credit_sent(csent));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference decoder of one slot's bytes.
  logic [PHIT_W-1:0] sent_q[$];    // phits handed to the DUT, in order
  int credits_decoded = 0;
  int phits_in_slot, garbage_in_slot, credit_bytes_in_slot;
  int nbyte = 0;
  int in_phit = 0;
  logic [PHIT_W-1:0] acc;
  int trig_seen = 0, trig_missed = 0;

  always @(posedge clk) if (rst_n && take) begin
    // checks on the DUT's choice at a phit boundary
    if (nbyte >= 2 && in_phit == 0 && conn_active && creq) begin
      if (data[7:6] == TAG_CREDIT) trig_seen++; else trig_missed++;
    end
    if (nbyte == 0) begin
      check(data == {2'b01, conn}, $sformatf("slot byte 0 = %h", data));
      phits_in_slot = 0; garbage_in_slot = 0; credit_bytes_in_slot = 0;
    end else if (nbyte == 1) begin
      check(data[7:6] == 2'b10, $sformatf("slot byte 1 = %h is not a credit byte", data));
      credits_decoded += int'(data[5:0]);
      credit_bytes_in_slot++;
    end else if (in_phit > 0) begin
      acc = {acc[PHIT_W-9:0], data};
      in_phit--;
      if (in_phit == 0) begin
        phits_in_slot++;
        check(sent_q.size() > 0 && acc == sent_q[0], $sformatf("decoded phit %h wrong", acc));
        if (sent_q.size() > 0) void'(sent_q.pop_front());
      end
    end else begin
      unique case (data[7:6])
        2'b11: begin
          check(data[5] == 1'b1, "phit header must be 111");
          acc = PHIT_W'(data[4:0]); in_phit = 4;
        end
        2'b10: begin credits_decoded += int'(data[5:0]); credit_bytes_in_slot++; end
        2'b00: garbage_in_slot++;
        default: check(0, "connection byte inside a slot");
      endcase
    end
    nbyte++;
    if (nbyte == SB) begin
      check(in_phit == 0, "phit crosses the slot boundary");
      check(slot_done, "slot_done missing at the last byte");
      nbyte = 0;
    end else begin
      check(!slot_done, "slot_done early");
    end
  end

  // DUT-side bookkeeping of the connection model
  always @(posedge clk) if (rst_n) begin
    if (phit_accept) begin sent_q.push_back(q[0]); void'(q.pop_front()); end
    if (csent) begin cc -= int'(cval); credits_taken += int'(cval); end
  end

  int phits_expected;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    // Phase A: saturated
    take = 1;
    for (int s = 0; s < 4; s++) begin
      for (int b = 0; b < SB; b++) begin
        if (q.size() < 4) q.push_back({$urandom, 5'($urandom)});
        @(negedge clk);
      end
      check(phits_in_slot == (SB - 2) / 5, $sformatf("saturated slot held %0d phits, expected %0d", phits_in_slot, (SB - 2) / 5));
      check(garbage_in_slot == SB - 2 - 5 * ((SB - 2) / 5), "garbage bytes in a saturated slot");
    end
    // Phase B: random
    for (int c = 0; c < 20 * SB; c++) begin
      if (($urandom % 6) == 0) q.push_back({$urandom, 5'($urandom)});
      if (($urandom % 5) == 0 && cc < 64) cc++;
      take = ($urandom % 8) != 0;
      @(negedge clk);
    end
    take = 1;
    q.delete();
    while (nbyte != 0 || in_phit != 0) @(negedge clk);
    check(sent_q.size() == 0, "phits taken but not decoded");
    check(credits_decoded == credits_taken, $sformatf("decoded credits %0d, taken %0d", credits_decoded, credits_taken));
    check(trig_seen > 0 && trig_missed == 0, $sformatf("trigger credit bytes seen %0d missed %0d", trig_seen, trig_missed));
    // Phase C: unused slot
    conn_active = 0; conn = 6'd63; cc = 20;
    q.push_back('1);
    for (int b = 0; b < SB; b++) @(negedge clk);
    check(phits_in_slot == 0 && credit_bytes_in_slot == 1 && garbage_in_slot == SB - 2,
          "unused slot must carry only garbage");
    check(credits_decoded == credits_taken, "unused slot returned credits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
