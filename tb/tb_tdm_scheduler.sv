// tb_tdm_scheduler: slot table, selector counter and the dynamic policies.
//
// Uses the document's slot-table example: 5 slots owned by connections
// 1,1,2,2,3, then slot 2 reassigned to connection 2 at run time. Checks the
// reset table (slot i -> connection i mod NUM_PORTS), that the owner of each
// slot appears in order and wraps at the end of the frame, that a table
// write is read back and takes effect, and the round-robin and priority
// policies against a reference computed here. A second instance is built
// with its own reset table, which must be read back and used as is.
module tb_tdm_scheduler;
  import bridge_pkg::*;
  localparam int P = 4, S = 5;
  logic clk = 0, rst_n = 0, frame_start = 0, slot_next = 0;
  logic [P-1:0] has_data = '0, has_cr = '0;
  logic [CONN_W-1:0] conn;
  logic [2:0] slot;
  logic cfg_valid = 0, cfg_write = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  tdm_scheduler #(.NUM_PORTS(P), .NUM_SLOTS(S)) dut (
    .clk, .rst_n, .frame_start, .slot_next, .has_data, .has_credit_ret(has_cr),
    .conn, .slot, .cfg_valid, .cfg_write, .cfg_addr, .cfg_wdata, .cfg_rdata);

  // second instance with a table fixed at build time: slot i -> (3*i+2) mod P
  function automatic slot_table_t own_table();
    slot_table_t t = '0;
    for (int i = 0; i < S; i++) t[i] = CONN_W'((3 * i + 2) % P);
    return t;
  endfunction
  logic [CONN_W-1:0] conn2;
  logic [2:0] slot2;
  logic [31:0] cfg_rdata2;
  tdm_scheduler #(.NUM_PORTS(P), .NUM_SLOTS(S), .INIT_TABLE(own_table())) dut2 (
    .clk, .rst_n, .frame_start, .slot_next, .has_data, .has_credit_ret(has_cr),
    .conn(conn2), .slot(slot2), .cfg_valid, .cfg_write(1'b0), .cfg_addr, .cfg_wdata,
    .cfg_rdata(cfg_rdata2));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic cfg_wr(input int a, input int d);
    @(negedge clk); cfg_valid = 1; cfg_write = 1; cfg_addr = 8'(a); cfg_wdata = 32'(d);
    @(posedge clk); #1 cfg_valid = 0; cfg_write = 0;
  endtask

  task automatic cfg_rd(input int a, output int d);
    @(negedge clk); cfg_valid = 1; cfg_write = 0; cfg_addr = 8'(a);
    @(posedge clk); #1 cfg_valid = 0; d = int'(cfg_rdata);
  endtask

  task automatic pulse_start();
    @(negedge clk); frame_start = 1; @(posedge clk); #1 frame_start = 0;
  endtask

  task automatic pulse_next();
    @(negedge clk); slot_next = 1; @(posedge clk); #1 slot_next = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_tab[S];
  int rd;
  int last;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset table
    for (int i = 0; i < S; i++) begin
      cfg_rd(i, rd);
      check(rd == i % P, $sformatf("reset entry %0d = %0d", i, rd));
      check(int'(cfg_rdata2) == (3 * i + 2) % P, $sformatf("preloaded entry %0d = %0d", i, cfg_rdata2));
    end
    pulse_start();
    for (int i = 0; i < 2 * S; i++) begin
      check(int'(conn2) == (3 * (i % S) + 2) % P, $sformatf("preloaded slot %0d owner %0d", i % S, conn2));
      pulse_next();
    end
    // document example: slots 1..5 -> 1,1,2,2,3 (index 0..4 here)
    exp_tab = '{1, 1, 2, 2, 3};
    for (int i = 0; i < S; i++) cfg_wr(i, exp_tab[i]);
    for (int f = 0; f < 3; f++) begin
      if (f == 2) begin
        cfg_wr(1, 2); exp_tab[1] = 2;    // slot 2 given to connection 2
        cfg_rd(1, rd);
        check(rd == 2, "table write not read back");
      end
      pulse_start();
      for (int i = 0; i < S; i++) begin
        check(int'(slot) == i && int'(conn) == exp_tab[i],
              $sformatf("frame %0d slot %0d: slot=%0d conn=%0d expected %0d", f, i, slot, conn, exp_tab[i]));
        pulse_next();
      end
      check(slot == 0, "selector did not wrap to slot 0");
    end
    // round robin
    cfg_wr(8'hFF, 1);
    cfg_rd(8'hFF, rd);
    check(rd == 1, "policy register read back");
    last = int'(conn);
    for (int i = 0; i < 400; i++) begin
      automatic int exp = -1;
      @(negedge clk);
      has_data = P'($urandom);
      has_cr   = P'($urandom);
      for (int k = 1; k <= P && exp < 0; k++) if (has_data[(last + k) % P]) exp = (last + k) % P;
      for (int k = 1; k <= P && exp < 0; k++) if (has_cr[(last + k) % P]) exp = (last + k) % P;
      if (exp < 0) exp = (last + 1) % P;
      slot_next = 1; @(posedge clk); #1 slot_next = 0;
      check(int'(conn) == exp, $sformatf("round robin: conn %0d expected %0d", conn, exp));
      last = int'(conn);
    end
    // priority
    cfg_wr(8'hFF, 2);
    for (int i = 0; i < 400; i++) begin
      automatic int exp = -1;
      @(negedge clk);
      has_data = P'($urandom) & P'($urandom);
      has_cr   = P'($urandom);
      for (int k = 0; k < P && exp < 0; k++) if (has_data[k]) exp = k;
      for (int k = 0; k < P && exp < 0; k++) if (has_cr[k]) exp = k;
      if (exp < 0) exp = 0;
      slot_next = 1; @(posedge clk); #1 slot_next = 0;
      check(int'(conn) == exp, $sformatf("priority: conn %0d expected %0d", conn, exp));
    end
    // back to TDM: the table still holds
    cfg_wr(8'hFF, 0);
    pulse_start();
    check(int'(conn) == exp_tab[0], "TDM after policy switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
