// tb_credit_counter: random decrements and credit returns against a model.
// Checks the reset value (far Rx FIFO depth), that a decrement at zero is
// ignored, simultaneous decrement and add, and has_credit.
module tb_credit_counter;
  localparam int MAXC = 64;
  logic clk = 0, rst_n = 0, dec = 0, add_valid = 0;
  logic [5:0] add_value = '0;
  logic [6:0] count;
  logic has_credit;
  int checks = 0, failures = 0, model = MAXC;

  always #4 clk = ~clk;

  credit_counter #(.MAX_CREDITS(MAXC), .INIT(MAXC), .ADD_W(6)) dut (
    .clk, .rst_n, .dec, .add_valid, .add_value, .count, .has_credit);

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

  initial begin
    repeat (2) @(posedge clk);
    #1 check(count == 7'(MAXC), "reset value is not the far FIFO depth");
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      dec = ($urandom % 3) != 0;
      add_valid = 0;
      // return credits only as far as the far FIFO has room
      if (($urandom % 4) == 0 && model < MAXC) begin
        add_valid = 1;
        add_value = 6'($urandom % ((MAXC - model) > 63 ? 64 : (MAXC - model + 1)));
      end
      if (i > 1500 && i < 1700) add_valid = 0;   // run dry: decrements at zero
      @(posedge clk);
      begin
        automatic int old = model;
        if (add_valid) model += int'(add_value);
        if (dec && old > 0) model--;   // no credit, nothing is sent
      end
      #1;
      check(int'(count) == model, $sformatf("cycle %0d: count %0d expected %0d", i, count, model));
      check(has_credit == (model != 0), "has_credit wrong");
    end
    dec = 0; add_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
