// tb_fabcache_l1d: self-checking testbench of the FabCache L1 data cache.
//
// The cache (default size: 16 KB, 4 ways, 16-byte lines) and a second,
// testbench-driven master share a two-master FabBus in front of the
// tb_bus_mem memory model. One thread runs a random mix of core reads,
// core writes and writes by the other master to a few sets with more tags
// than ways, so lines are evicted and invalidated all the time. A
// reference model keeps, per set, the cached tags in recency order and a
// word-level shadow of memory. Checked for every access:
//   * read data equals the shadow memory;
//   * hit or miss is what the LRU model predicts, a hit is acknowledged in
//     the clock of the request and a miss raises c_miss and goes to the bus;
//   * writes go through to memory (a later read from memory sees them)
//     and never allocate a line;
//   * a write by the other master to a cached line reports a snoop hit
//     and removes the line.
// Requests are driven on the falling edge, responses sampled at the
// rising edge.
module tb_fabcache_l1d;
  import fabbus_pkg::*;
  localparam int WAYS = 4;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        c_req = 1'b0, c_we = 1'b0;
  logic [31:0] c_addr = '0, c_wdata = '0;
  logic        c_ack, c_miss, d_snoop_hit;
  logic [31:0] c_rdata;
  bus_req_t    m_req [2];
  bus_rsp_t    m_rsp [2];
  snoop_t      snoop [2];
  logic        snoop_hit [2];
  bus_req_t    s_req [1];
  bus_rsp_t    s_rsp [1];
  logic        busy;
  int          n_rd, n_wr;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  fabcache_l1d u_dut (.clk, .rst_n, .c_req, .c_we, .c_addr, .c_wdata,
                      .c_ack, .c_rdata, .c_miss,
                      .b_req(m_req[0]), .b_rsp(m_rsp[0]),
                      .snoop(snoop[0]), .snoop_hit(d_snoop_hit));
  assign snoop_hit[0] = d_snoop_hit;
  assign snoop_hit[1] = 1'b0;
  fabbus #(.N_MASTER(2)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .snoop, .snoop_hit,
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

  // shadow memory, word addressed
  logic [31:0] shadow [int unsigned];
  function automatic logic [31:0] sh_word(input logic [31:0] a);
    if (shadow.exists(a >> 2)) return shadow[a >> 2];
    return 32'h9e37_79b9 * (a >> 2) ^ 32'h5bd1_e995;
  endfunction

  // LRU model: per set, tags in recency order (front = most recent)
  int unsigned lines [int unsigned][$];
  function automatic int find(input int unsigned set, input int unsigned tag);
    if (!lines.exists(set)) return -1;
    foreach (lines[set][i]) if (lines[set][i] == tag) return i;
    return -1;
  endfunction

  logic        ack_s, miss_s, shit_s;
  logic [31:0] rdata_s;
  always @(posedge clk) begin
    ack_s   <= c_ack;
    miss_s  <= c_miss;
    rdata_s <= c_rdata;
    shit_s  <= d_snoop_hit;
  end

  int n_hit = 0, n_miss = 0, n_evict = 0, n_inval = 0, n_wr_hit = 0;

  task automatic core_access(input bit we, input logic [31:0] a, input logic [31:0] d);
    int unsigned set, tag;
    int pos, clocks;
    bit saw_miss;
    set = (a >> 4) & 255;
    tag = a >> 12;
    pos = find(set, tag);
    c_req = 1'b1; c_we = we; c_addr = a; c_wdata = d;
    clocks = 0;
    saw_miss = 1'b0;
    do begin
      @(negedge clk);
      clocks++;
      if (miss_s) saw_miss = 1'b1;
    end while (!ack_s);
    c_req = 1'b0;
    if (!we) begin
      check(rdata_s == sh_word(a), "read data");
      if (pos >= 0) begin
        check(clocks == 1 && !saw_miss, "read hit in one clock");
        n_hit++;
        lines[set].delete(pos);
      end else begin
        check(clocks > 1 && saw_miss, "read miss goes to the bus");
        n_miss++;
        if (lines.exists(set) && lines[set].size() == WAYS) begin
          void'(lines[set].pop_back());
          n_evict++;
        end
      end
      lines[set].push_front(tag);
    end else begin
      shadow[a >> 2] = d;
      check(!saw_miss, "write does not refill");
      if (pos >= 0) begin
        lines[set].delete(pos);
        lines[set].push_front(tag);
        n_wr_hit++;
      end
    end
  endtask

  task automatic other_write(input logic [31:0] a, input logic [31:0] d);
    int unsigned set, tag;
    int pos;
    bus_req_t r;
    bit saw_hit;
    set = (a >> 4) & 255;
    tag = a >> 12;
    pos = find(set, tag);
    r = '0;
    r.req = 1'b1;
    r.we = 1'b1;
    r.addr = ADDR_W'(a);
    r.wdata = DATA_W'(d) << (32 * a[4:2]);
    r.wstrb = STRB_W'(4'hf) << (4 * a[4:2]);
    m_req[1] = r;
    saw_hit = 1'b0;
    do begin
      @(negedge clk);
      if (shit_s) saw_hit = 1'b1;
    end while (!m_rsp_seen);
    m_req[1] = '0;
    shadow[a >> 2] = d;
    check(saw_hit == (pos >= 0), "snoop hit reported");
    if (pos >= 0) begin
      lines[set].delete(pos);
      n_inval++;
    end
  endtask
  logic m_rsp_seen;
  always @(posedge clk) m_rsp_seen <= m_rsp[1].ack;

  initial begin
    m_req[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 6000; i++) begin
      logic [31:0] a;
      int op;
      a = ($urandom_range(7, 0) << 12) | ($urandom_range(3, 0) << 4) | ($urandom_range(3, 0) << 2);
      op = $urandom_range(99, 0);
      if (op < 60)      core_access(1'b0, a, '0);
      else if (op < 85) core_access(1'b1, a, $urandom);
      else              other_write(a, $urandom);
      repeat ($urandom_range(1, 0)) @(negedge clk);
    end
    check(n_hit > 0 && n_miss > 0 && n_evict > 0 && n_inval > 0 && n_wr_hit > 0,
          "every mechanism happened");
    $display("read hits=%0d misses=%0d evictions=%0d invalidations=%0d write hits=%0d",
             n_hit, n_miss, n_evict, n_inval, n_wr_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end
endmodule
