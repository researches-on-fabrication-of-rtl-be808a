// tb_fabbus: self-checking testbench of the FabHetero shared bus.
//
// Three master threads issue random reads and strobed writes to a small
// address range and hold each request until it is acknowledged; the bus
// drives the tb_bus_mem slave model, which answers after a random wait.
// Each clock the testbench drives random snoop-hit answers and checks:
//   * a grant is visible as a snoop broadcast to every master but the
//     granted one, carrying the granted master's address and direction;
//   * the granted master was requesting and is the one the model's
//     round-robin pointer picks among the requesters;
//   * the ack goes to the owner only, once, and with it the read data
//     equals a shadow copy of memory and 'shared' equals the OR of the
//     other masters' snoop hits of the grant clock;
//   * the slave sees exactly one request per transaction;
//   * every master is served (no starvation).
// Inputs change on the falling edge; checks sample before the rising edge.
module tb_fabbus;
  import fabbus_pkg::*;
  localparam int NM = 3;

  logic     clk = 1'b0, rst_n = 1'b0;
  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  snoop_t   snoop [NM];
  logic     snoop_hit [NM];
  bus_req_t s_req [1];
  bus_rsp_t s_rsp [1];
  logic     busy;
  int       n_rd, n_wr;
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  fabbus u_dut (.clk, .rst_n, .m_req, .m_rsp, .snoop, .snoop_hit,
                .s_req, .s_rsp, .busy);
  tb_bus_mem u_mem (.clk, .rst_n, .req(s_req[0]), .rsp(s_rsp[0]),
                    .n_reads(n_rd), .n_writes(n_wr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // shadow memory
  logic [DATA_W-1:0] shadow [longint];
  function automatic logic [DATA_W-1:0] sh_beat(input longint unsigned a);
    logic [DATA_W-1:0] v;
    if (shadow.exists(a >> 5)) return shadow[a >> 5];
    for (int w = 0; w < DATA_W / 32; w++)
      v[32*w +: 32] = 32'h9e37_79b9 * 32'((a >> 5) * 8 + longint'(w)) ^ 32'h5bd1_e995;
    return v;
  endfunction

  int  done_tx [NM];
  int  owner = -1;
  int  ptr = NM - 1;
  bit  exp_shared;
  int  n_tx = 0, n_shared = 0, n_contended = 0;
  bit  stop = 1'b0;

  initial begin
    for (int m = 0; m < NM; m++) begin
      m_req[m] = '0;
      snoop_hit[m] = 1'b0;
      done_tx[m] = 0;
    end
  end

  // Monitor: samples just before each rising edge.
  always @(negedge clk) if (rst_n) begin
    int n_valid, g, e, n_req;
    #4;
    n_valid = 0;
    g = -1;
    n_req = 0;
    for (int m = 0; m < NM; m++) begin
      if (snoop[m].valid) n_valid++;
      else g = m;
      if (m_req[m].req) n_req++;
    end
    // acks
    for (int m = 0; m < NM; m++)
      if (m_rsp[m].ack) begin
        check(m == owner, "ack to owner");
        check(m_req[m].req, "ack to a requester");
        if (!m_req[m].we) check(m_rsp[m].rdata == sh_beat(m_req[m].addr), "read data");
        else begin
          logic [DATA_W-1:0] v;
          v = sh_beat(m_req[m].addr);
          for (int b = 0; b < STRB_W; b++) if (m_req[m].wstrb[b]) v[8*b +: 8] = m_req[m].wdata[8*b +: 8];
          shadow[m_req[m].addr >> 5] = v;
        end
        check(m_rsp[m].shared == exp_shared, "shared flag");
        if (exp_shared) n_shared++;
        owner = -1;
        n_tx++;
      end
    check(s_req[0].req == busy, "slave request while busy");
    if (n_valid != 0) begin
      // grant clock
      check(n_valid == NM - 1, "snoop to all but one");
      check(owner == -1, "grant only when free");
      e = -1;
      for (int k = 0; k < NM; k++) if (e < 0 && m_req[(ptr + 1 + k) % NM].req) e = (ptr + 1 + k) % NM;
      check(g == e, "round-robin choice");
      if (g >= 0) begin
        check(m_req[g].req, "granted master requests");
        exp_shared = 1'b0;
        for (int m = 0; m < NM; m++) if (m != g) begin
          check(snoop[m].addr == m_req[g].addr && snoop[m].we == m_req[g].we, "snoop payload");
          if (snoop_hit[m]) exp_shared = 1'b1;
        end
        owner = g;
        ptr = g;
        if (n_req > 1) n_contended++;
      end
    end else if (owner == -1 && !busy) check(n_req == 0, "no grant while requests wait");
  end

  // random snoop answers
  always @(negedge clk) for (int m = 0; m < NM; m++) snoop_hit[m] <= 1'($urandom);

  task automatic master(input int m, input int n);
    for (int i = 0; i < n; i++) begin
      bus_req_t r;
      repeat ($urandom_range(3, 0)) @(negedge clk);
      r = '0;
      r.req   = 1'b1;
      r.we    = 1'($urandom);
      r.addr  = ADDR_W'($urandom_range(63, 0) * 4);
      r.wdata = {8{$urandom}};
      r.wstrb = STRB_W'({$urandom});
      m_req[m] = r;
      do @(negedge clk); while (!m_rsp_seen[m]);
      m_req[m] = '0;
      done_tx[m]++;
    end
  endtask

  // ack seen at the last rising edge (sampled by the master thread)
  bit m_rsp_seen [NM];
  always @(posedge clk) for (int m = 0; m < NM; m++) m_rsp_seen[m] <= m_rsp[m].ack;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fork
      master(0, 300);
      master(1, 300);
      master(2, 300);
    join
    repeat (5) @(negedge clk);
    for (int m = 0; m < NM; m++) check(done_tx[m] == 300, "all transactions done");
    check(n_tx == 900, "transaction count");
    check(n_rd + n_wr == 900, "slave saw each transaction once");
    check(n_shared > 0, "shared responses happened");
    check(n_contended > 0, "contention happened");
    $display("transactions=%0d reads=%0d writes=%0d shared=%0d contended=%0d",
             n_tx, n_rd, n_wr, n_shared, n_contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end
endmodule
