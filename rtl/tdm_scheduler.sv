// tdm_scheduler: decides which connection owns each slot of a frame.
//
// As in the document, the scheduler has a TDM selector counter and a TDM
// slot table with one entry per slot of the frame; the entry holds the
// connection number that may use that slot. A connection may own zero, one
// or more slots. The table is a RAM written through a memory-mapped port, so
// the bandwidth of each connection can be changed at run time (word address
// i = slot i, data = connection number). An entry with a connection number
// of NUM_PORTS or above leaves the slot unused.
// Besides TDM the document lists two dynamic policies, also built here:
//   round robin: the next slot goes to the next connection, after the one
//                that used the previous slot, that has a phit to send;
//   priority:    the next slot goes to the connection with the highest
//                priority that has a phit to send (connection 0 highest,
//                this design's choice).
// With a dynamic policy and no phit waiting anywhere, the slot goes to a
// connection that has credits to return, so credits keep flowing; otherwise
// to the next connection in turn (this design's choice).
// The policy register sits at word address 0xFF (this design's choice):
// 0 = TDM, 1 = round robin, 2 = priority. Write-data bits above the
// connection number are ignored and read back as zero.
//
// Timing: frame_start resets the selector to slot 0 and slot_next advances
// it; conn is registered at that moment and stays stable for the whole slot.
// A table write takes effect from the next slot that reads the entry.
// cfg_rdata is valid the cycle after cfg_valid && !cfg_write.
// Reset value of the table: INIT_TABLE, so a table can be fixed when the
// design is built and no configuration is needed after reset (the document
// mentions such a preloaded table); by default slot i belongs to connection
// i mod NUM_PORTS. Entries of INIT_TABLE past NUM_SLOTS are not used.
module tdm_scheduler
  import bridge_pkg::*;
#(
  parameter int unsigned NUM_PORTS  = 12,
  parameter int unsigned NUM_SLOTS  = 14,
  parameter slot_table_t INIT_TABLE = spread_table(NUM_PORTS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  frame_start,
  input  logic                  slot_next,
  input  logic [NUM_PORTS-1:0]  has_data,
  input  logic [NUM_PORTS-1:0]  has_credit_ret,
  output logic [CONN_W-1:0]     conn,
  output logic [$clog2(NUM_SLOTS)-1:0] slot,
  // memory-mapped configuration port
  input  logic                  cfg_valid,
  input  logic                  cfg_write,
  input  logic [7:0]            cfg_addr,
  input  logic [31:0]           cfg_wdata,
  output logic [31:0]           cfg_rdata
);
  localparam int unsigned SW = $clog2(NUM_SLOTS);
  localparam logic [7:0] ADDR_POLICY = 8'hFF;

  logic [CONN_W-1:0] table_q [NUM_SLOTS];
  sched_policy_e     policy;
  logic [SW-1:0]     next_slot;
  logic [CONN_W-1:0] next_conn, rr_pick, pr_pick;

  // Round robin: first requester after the current connection.
  function automatic logic [CONN_W-1:0] rr_search(
      input logic [NUM_PORTS-1:0] req, input logic [CONN_W-1:0] last, output logic found);
    logic [CONN_W-1:0] c;
    found = 1'b0;
    c = last;
    for (int unsigned k = 1; k <= NUM_PORTS; k++) begin
      automatic int unsigned idx = (int'(last) + k) % NUM_PORTS;
      if (!found && req[idx]) begin
        found = 1'b1;
        c = CONN_W'(idx);
      end
    end
    return c;
  endfunction

  function automatic logic [CONN_W-1:0] pr_search(
      input logic [NUM_PORTS-1:0] req, output logic found);
    logic [CONN_W-1:0] c;
    found = 1'b0;
    c = '0;
    for (int i = NUM_PORTS - 1; i >= 0; i--) begin
      if (req[i]) begin
        found = 1'b1;
        c = CONN_W'(i);
      end
    end
    return c;
  endfunction

  logic rr_d, rr_c, pr_d, pr_c;
  logic [CONN_W-1:0] rr_data, rr_cred, pr_data, pr_cred, rr_turn;
  logic [CONN_W-1:0] last_conn;

  assign last_conn = (conn < CONN_W'(NUM_PORTS)) ? conn : CONN_W'(NUM_PORTS - 1);

  always_comb begin
    rr_data = rr_search(has_data, last_conn, rr_d);
    rr_cred = rr_search(has_credit_ret, last_conn, rr_c);
    rr_turn = (last_conn == CONN_W'(NUM_PORTS - 1)) ? '0 : last_conn + 1'b1;
    pr_data = pr_search(has_data, pr_d);
    pr_cred = pr_search(has_credit_ret, pr_c);
    rr_pick = rr_d ? rr_data : (rr_c ? rr_cred : rr_turn);
    pr_pick = pr_d ? pr_data : (pr_c ? pr_cred : '0);

    next_slot = frame_start ? '0 :
                (slot == SW'(NUM_SLOTS - 1)) ? '0 : slot + 1'b1;
    unique case (policy)
      POL_RR:       next_conn = rr_pick;
      POL_PRIORITY: next_conn = pr_pick;
      default:      next_conn = table_q[next_slot];
    endcase
  end

  // selector counter and slot owner
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0;
      conn <= '0;
    end else if (frame_start || slot_next) begin
      slot <= next_slot;
      conn <= next_conn;
    end
  end

  // slot table RAM, policy register and configuration reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SLOTS; i++) table_q[i] <= INIT_TABLE[i];
      policy    <= POL_TDM;
      cfg_rdata <= '0;
    end else if (cfg_valid) begin
      if (cfg_write) begin
        if (cfg_addr == ADDR_POLICY)
          policy <= sched_policy_e'(cfg_wdata[1:0]);
        else if (cfg_addr < 8'(NUM_SLOTS))
          table_q[cfg_addr[SW-1:0]] <= cfg_wdata[CONN_W-1:0];
      end else begin
        if (cfg_addr == ADDR_POLICY)
          cfg_rdata <= 32'(policy);
        else if (cfg_addr < 8'(NUM_SLOTS))
          cfg_rdata <= 32'(table_q[cfg_addr[SW-1:0]]);
        else
          cfg_rdata <= '0;
      end
    end
  end

  initial begin
    assert (NUM_SLOTS >= 2 && NUM_SLOTS < 255) else $error("tdm_scheduler: NUM_SLOTS out of range");
    assert (NUM_PORTS >= 1 && NUM_PORTS <= MAX_CONN) else $error("tdm_scheduler: NUM_PORTS out of range");
  end

endmodule
