// tb_deserializer: decoding of slot bytes into connections, credits and phits.
//
// A reference encoder in the testbench writes random slots: a connection
// byte, then any mix of credit bytes, 5-byte phits (whose body bytes may look
// like any tag) and garbage bytes, with random gaps in in_valid. Each decoded
// phit and credit must match, with its connection, in order. Also checked:
// bytes before the first connection byte of a frame are ignored, and a
// frame_start in the middle of a phit discards it.
module tb_deserializer;
  import bridge_pkg::*;
  logic clk = 0, rst_n = 0, frame_start = 0, in_valid = 0;
  logic [7:0] in_data = '0;
  logic [CONN_W-1:0] conn;
  logic phit_valid, credit_valid;
  logic [PHIT_W-1:0] phit_data;
  logic [CREDIT_W-1:0] credit_value;
  int checks = 0, failures = 0, n_phit = 0, n_cred = 0;

  typedef struct { bit is_phit; logic [CONN_W-1:0] c; logic [PHIT_W-1:0] v; } item_t;
  item_t exp_q[$];

  always #4 clk = ~clk;

  deserializer dut (.clk, .rst_n, .frame_start, .in_valid, .in_data, .conn,
                    .phit_valid, .phit_data, .credit_valid, .credit_value);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(!(phit_valid && credit_valid), "phit and credit in the same cycle");
    if (phit_valid || credit_valid) begin
      if (exp_q.size() == 0) check(0, "unexpected output");
      else begin
        check(exp_q[0].is_phit == phit_valid && exp_q[0].c == conn &&
              (phit_valid ? (phit_data == exp_q[0].v) : (credit_value == CREDIT_W'(exp_q[0].v))),
              $sformatf("output mismatch: phit=%0b conn=%0d data=%h cred=%0d", phit_valid, conn, phit_data, credit_value));
        void'(exp_q.pop_front());
      end
      if (phit_valid) n_phit++; else n_cred++;
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [7:0] b);
    while (($urandom % 4) == 0) begin @(negedge clk); in_valid = 0; end
    @(negedge clk); in_valid = 1; in_data = b;
  endtask

  task automatic new_frame();
    @(negedge clk); in_valid = 0; frame_start = 1;
    @(negedge clk); frame_start = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    new_frame();
    // before any connection byte: ignored
    put(8'b10_000111);
    put({3'b111, 5'h1F}); repeat (4) put(8'hFF);
    for (int s = 0; s < 200; s++) begin
      automatic logic [CONN_W-1:0] c = CONN_W'($urandom);
      put({2'b01, c});
      for (int k = 0; k < 8; k++) begin
        automatic int sel = int'($urandom % 3);
        unique case (sel)
          0: begin
            automatic logic [CREDIT_W-1:0] v = CREDIT_W'($urandom);
            exp_q.push_back('{0, c, PHIT_W'(v)});
            put({2'b10, v});
          end
          1: begin
            automatic logic [PHIT_W-1:0] p = {5'($urandom), $urandom};
            exp_q.push_back('{1, c, p});
            put({3'b111, p[36:32]}); put(p[31:24]); put(p[23:16]); put(p[15:8]); put(p[7:0]);
          end
          default: put(8'($urandom % 64));
        endcase
      end
      if (s % 50 == 49) begin
        // a phit cut by the start of a new frame is dropped
        put({3'b111, 5'h3}); put(8'h12);
        new_frame();
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d items not decoded", exp_q.size()));
    check(n_phit > 100 && n_cred > 100, "too few phits or credits decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
