// tb_phit_counter: freed positions, credit sends and the trigger against a
// model. Also drives the count to the full FIFO depth (64) to check that a
// credit byte carries at most 63 and the rest stays counted.
module tb_phit_counter;
  localparam int D = 64, T = 16;
  logic clk = 0, rst_n = 0, sent = 0;
  logic [6:0] freed = '0, count;
  logic req, pend;
  logic [5:0] val;
  int checks = 0, failures = 0, model = 0, n_req = 0;

  always #4 clk = ~clk;

  phit_counter #(.DEPTH(D), .TRIGGER(T), .VAL_W(6)) dut (
    .clk, .rst_n, .freed, .sent, .count, .credit_tx_request(req),
    .credit_pending(pend), .credit_value(val));

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

  task automatic step(input int f, input bit s);
    @(negedge clk);
    freed = 7'(f); sent = s;
    #1;
    check(int'(val) == (model > 63 ? 63 : model), $sformatf("credit_value %0d, count %0d", val, model));
    check(req == (model >= T), $sformatf("credit_tx_request %0b at count %0d", req, model));
    check(pend == (model != 0), "credit_pending wrong");
    if (req) n_req++;
    @(posedge clk);
    model = model + f - (s ? (model > 63 ? 63 : model) : 0);
    #1 check(int'(count) == model, $sformatf("count %0d expected %0d", count, model));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill to the full depth without sending
    for (int i = 0; i < D; i++) step(1, 0);
    check(model == D, "count did not reach the depth");
    step(0, 1);   // sends 63
    check(model == 1, "after sending 63 one credit must remain");
    step(0, 1);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      automatic int room = D - model;
      automatic int f = ($urandom % 3);
      if (f > room) f = room;
      step(f, (model != 0) && (($urandom % 8) == 0 || model >= T));
    end
    check(n_req > 0, "trigger never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
