// tb_fabcache_l1i: self-checking testbench of the interleaved L1
// instruction cache.
//
// The cache (default: fetch width 4, two banks of 128 lines) refills from
// the tb_bus_mem memory model through a one-master FabBus. A thread fetches
// bundles at random word addresses of a region four times the cache size,
// mixing runs of sequential fetch with jumps. A model of the two
// direct-mapped banks (even lines in bank 0, odd lines in bank 1) predicts
// how many lines each fetch must refill. Checked for every fetch:
//   * all FETCH_W instructions equal memory, including bundles that
//     straddle two lines (one from each bank);
//   * a fetch whose lines are present is acknowledged in the clock of the
//     request, without a refill;
//   * a fetch missing k lines causes exactly k bus reads.
// Requests are driven on the falling edge, responses sampled at the
// rising edge.
module tb_fabcache_l1i;
  import fabbus_pkg::*;
  localparam int FW = 4;
  localparam int BS = 128;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        f_req = 1'b0;
  logic [31:0] f_pc = '0;
  logic        f_ack, f_miss;
  logic [31:0] f_instr [FW];
  bus_req_t    m_req [1];
  bus_rsp_t    m_rsp [1];
  snoop_t      snoop [1];
  logic        snoop_hit [1];
  bus_req_t    s_req [1];
  bus_rsp_t    s_rsp [1];
  logic        busy;
  int          n_rd, n_wr;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  fabcache_l1i u_dut (.clk, .rst_n, .f_req, .f_pc, .f_ack, .f_instr, .f_miss,
                      .b_req(m_req[0]), .b_rsp(m_rsp[0]));
  assign snoop_hit[0] = 1'b0;
  fabbus #(.N_MASTER(1)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .snoop, .snoop_hit,
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

  function automatic logic [31:0] mem_word(input logic [31:0] a);
    return 32'h9e37_79b9 * (a >> 2) ^ 32'h5bd1_e995;
  endfunction

  // bank model: key = bank * BS + set, value = line number held
  int unsigned held [int unsigned];
  function automatic bit present(input int unsigned ln);
    int unsigned key;
    key = (ln & 1) * BS + ((ln >> 1) % BS);
    return held.exists(key) && held[key] == ln;
  endfunction
  function automatic void put(input int unsigned ln);
    held[(ln & 1) * BS + ((ln >> 1) % BS)] = ln;
  endfunction

  logic        ack_s;
  logic [31:0] instr_s [FW];
  always @(posedge clk) begin
    ack_s   <= f_ack;
    instr_s <= f_instr;
  end

  int n_hit = 0, n_miss1 = 0, n_miss2 = 0, n_straddle = 0;

  task automatic fetch(input logic [31:0] pc);
    int unsigned ln0, ln1;
    int need, clocks, rd0;
    bit two;
    ln0 = pc >> 4;
    ln1 = ln0 + 1;
    two = (pc[3:2] != 2'b00);
    need = (present(ln0) ? 0 : 1) + ((two && !present(ln1)) ? 1 : 0);
    rd0 = n_rd;
    f_req = 1'b1;
    f_pc = pc;
    clocks = 0;
    do begin
      @(negedge clk);
      clocks++;
    end while (!ack_s);
    f_req = 1'b0;
    for (int k = 0; k < FW; k++) check(instr_s[k] == mem_word(pc + 32'(4 * k)), "bundle word");
    check(n_rd - rd0 == need, "refill count");
    if (need == 0) begin
      check(clocks == 1, "hit in one clock");
      n_hit++;
    end else if (need == 1) n_miss1++;
    else n_miss2++;
    if (two) n_straddle++;
    put(ln0);
    if (two) put(ln1);
  endtask

  initial begin
    logic [31:0] pc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    pc = 32'h0000_1000;
    for (int i = 0; i < 6000; i++) begin
      if ($urandom_range(9, 0) == 0) pc = 32'($urandom_range(4 * 2 * BS * FW - 1, 0)) << 2;
      else pc = pc + 32'(4 * $urandom_range(FW, 1));
      pc = pc & 32'h0000_7ffc;
      fetch(pc);
      repeat ($urandom_range(1, 0)) @(negedge clk);
    end
    check(n_hit > 0 && n_miss1 > 0 && n_miss2 > 0 && n_straddle > 0, "every case happened");
    check(n_wr == 0, "no writes");
    $display("hits=%0d one-line misses=%0d two-line misses=%0d straddling=%0d",
             n_hit, n_miss1, n_miss2, n_straddle);
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
