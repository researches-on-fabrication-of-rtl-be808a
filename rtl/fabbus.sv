// fabbus: FabHetero shared bus connecting the cache systems (and cache-less
// cores) of a heterogeneous multi-core to shared memory slaves.
//
// One transaction is in flight at a time. In IDLE the arbiter
// (fabbus_arbiter, fixed priority or round robin) grants a requesting
// master; the bus latches its request and in the same clock broadcasts it
// once on the snoop channel to all other masters. In BUSY the request is
// routed to the slave selected by the address bits above SLV_LSB; the
// slave's ack (with read data) is returned to the owner together with the
// ORed snoop hits of the other masters ('shared'), and the bus is free
// again in the next clock. With a single master no snoop broadcast is made.
// The master and slave counts (1 to 16), the 256-bit data and 64-bit
// address widths, the arbitration choices and the snoop bus with wired-OR
// responses follow the published bus; the request/ack handshake, the single
// outstanding transaction and the address decode are this design's own
// (the underlying AMBA signalling is not specified in detail).
//
// Timing: grant to slave request 1 clock; slave ack is passed through
// combinationally; a master may raise a new request the clock after ack.
module fabbus
  import fabbus_pkg::*;
#(
  parameter int unsigned N_MASTER    = 3,
  parameter int unsigned N_SLAVE     = 1,
  parameter bit          ROUND_ROBIN = 1'b1,
  parameter int unsigned SLV_LSB     = 32,
  parameter int unsigned MW          = (N_MASTER > 1) ? $clog2(N_MASTER) : 1,
  parameter int unsigned SWID        = (N_SLAVE > 1) ? $clog2(N_SLAVE) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req   [N_MASTER],
  output bus_rsp_t m_rsp   [N_MASTER],
  output snoop_t   snoop   [N_MASTER],
  input  logic     snoop_hit [N_MASTER],
  output bus_req_t s_req   [N_SLAVE],
  input  bus_rsp_t s_rsp   [N_SLAVE],
  output logic     busy
);

  typedef enum logic {IDLE, BUSY} state_e;
  state_e          state_q;
  logic [MW-1:0]   owner_q;
  bus_req_t        cur_q;
  logic            shared_q;
  logic [SWID-1:0] slv;

  logic [N_MASTER-1:0] req_vec, gnt;
  logic [MW-1:0]       gnt_idx;
  logic                gnt_valid;
  logic                shared_now;

  always_comb for (int m = 0; m < N_MASTER; m++) req_vec[m] = m_req[m].req;

  fabbus_arbiter #(.N(N_MASTER), .ROUND_ROBIN(ROUND_ROBIN)) u_arb (
    .clk(clk), .rst_n(rst_n), .advance(state_q == IDLE), .req(req_vec),
    .gnt(gnt), .gnt_idx(gnt_idx), .gnt_valid(gnt_valid));

  // Snoop broadcast in the grant clock; hits are ORed (wired-OR).
  always_comb
    for (int m = 0; m < N_MASTER; m++) begin
      snoop[m].valid = gnt_valid && (N_MASTER > 1) && !gnt[m];
      snoop[m].we    = m_req[gnt_idx].we;
      snoop[m].addr  = m_req[gnt_idx].addr;
    end
  always_comb begin
    shared_now = 1'b0;
    for (int m = 0; m < N_MASTER; m++)
      if (gnt_valid && !gnt[m] && snoop_hit[m]) shared_now = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= IDLE;
      owner_q  <= '0;
      cur_q    <= '0;
      shared_q <= 1'b0;
    end else if (state_q == IDLE) begin
      if (gnt_valid) begin
        state_q  <= BUSY;
        owner_q  <= gnt_idx;
        cur_q    <= m_req[gnt_idx];
        shared_q <= shared_now;
      end
    end else if (s_rsp[slv].ack) begin
      state_q <= IDLE;
    end
  end

  assign slv  = (N_SLAVE > 1) ? SWID'(cur_q.addr >> SLV_LSB) : '0;
  assign busy = (state_q == BUSY);

  always_comb begin
    for (int s = 0; s < N_SLAVE; s++) begin
      s_req[s]     = cur_q;
      s_req[s].req = busy && (SWID'(s) == slv);
    end
    for (int m = 0; m < N_MASTER; m++) begin
      m_rsp[m].ack    = busy && (MW'(m) == owner_q) && s_rsp[slv].ack;
      m_rsp[m].rdata  = s_rsp[slv].rdata;
      m_rsp[m].shared = shared_q;
    end
  end

  // A master keeps its request stable until it is acknowledged.
  for (genvar m = 0; m < N_MASTER; m++) begin : g_chk
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      (busy && owner_q == MW'(m) && !m_rsp[m].ack) |=> m_req[m].req);
  end

endmodule
