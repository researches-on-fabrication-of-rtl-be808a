// tb_vsp_hetero_top: end-to-end testbench of vsp_hetero_top at its default
// (published) parameters.
//
// Two things run at once:
//   * the VSP core executes the phase program of vsp_prog_pkg with the
//     depth controller enabled, from combinational instruction and data
//     memories in the testbench; every retired PC is compared with the
//     instruction-level model and the final data memory and registers are
//     compared at the end;
//   * on the FabCache side, one thread plays the generated core: it fetches
//     bundles through the interleaved L1 instruction cache and issues loads
//     and stores through the L1 data cache; a second thread is the
//     uncached master and writes and reads the same data region, so its
//     writes are snooped and invalidate lines of the data cache. Shared
//     memory is the tb_bus_mem model; a word shadow of it, updated at each
//     acknowledged bus write, checks every fetched instruction, every load
//     and every uncached read.
// Each mechanism is counted and the test fails if any never happened:
// branch misprediction, interlock stall, HS->LE migration, LE entry, LE->HS
// return, instruction-cache hit and miss, data-cache hit and miss, snoop
// invalidation, 'shared' responses and bus contention.
`timescale 1ns/1ps
module tb_vsp_hetero_top;
  import vsp_pkg::*;
  import fabbus_pkg::*;
  import vsp_prog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // VSP side
  logic        ctrl_en = 1'b1, fixed_le = 1'b0;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_re, dmem_we;
  logic [3:0]  dmem_be;
  mode_e       mode;
  logic        retire;
  logic [31:0] retire_pc;
  logic        ev_mp, ev_mig, ev_le, ev_hs, ev_st;
  // generated-core side
  logic        f_req = 1'b0, f_ack, f_miss;
  logic [31:0] f_pc = '0;
  logic [31:0] f_instr [4];
  logic        d_req = 1'b0, d_we = 1'b0, d_ack, d_miss, d_snoop_hit;
  logic [31:0] d_addr = '0, d_wdata = '0, d_rdata;
  bus_req_t    x_req;
  bus_rsp_t    x_rsp;
  bus_req_t    mem_req;
  bus_rsp_t    mem_rsp;
  logic        bus_busy;
  int          n_mrd, n_mwr;

  vsp_hetero_top dut (
    .clk, .rst_n, .ctrl_en, .fixed_le,
    .imem_addr, .imem_rdata, .dmem_addr, .dmem_re, .dmem_we, .dmem_wdata, .dmem_be, .dmem_rdata,
    .mode_o(mode), .retire_o(retire), .retire_pc_o(retire_pc),
    .ev_mispredict(ev_mp), .ev_migrate(ev_mig), .ev_to_le(ev_le), .ev_to_hs(ev_hs),
    .ev_stall(ev_st),
    .f_req, .f_pc, .f_ack, .f_instr, .f_miss,
    .d_req, .d_we, .d_addr, .d_wdata, .d_ack, .d_rdata, .d_miss, .d_snoop_hit,
    .x_req, .x_rsp, .mem_req, .mem_rsp, .bus_busy);

  tb_bus_mem u_mem (.clk, .rst_n, .req(mem_req), .rsp(mem_rsp),
                    .n_reads(n_mrd), .n_writes(n_mwr));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- VSP core ----------------
  program_c prog;
  iss_c     iss;
  word_t    dmem [DWORDS];
  int       nret = 0, done_seen = 0;
  int       n_mp = 0, n_st = 0, n_mig = 0, n_le = 0, n_hs = 0;

  assign imem_rdata = (imem_addr - IBASE) >> 2 < IWORDS ? prog.img[(imem_addr - IBASE) >> 2] : 32'h0;
  assign dmem_rdata = dmem[dmem_addr[11:2]];

  always @(posedge clk) if (rst_n) begin
    if (dmem_we) begin
      for (int k = 0; k < 4; k++)
        if (dmem_be[k]) dmem[dmem_addr[11:2]][8*k +: 8] <= dmem_wdata[8*k +: 8];
      if (dmem_addr == DONE_ADDR) done_seen = 1;
    end
    if (retire) begin
      check(nret < iss.pcs.size() ? retire_pc == iss.pcs[nret] : 1'b1, "VSP retired PC");
      nret++;
    end
    n_mp  += int'(ev_mp);
    n_st  += int'(ev_st);
    n_mig += int'(ev_mig);
    n_le  += int'(ev_le);
    n_hs  += int'(ev_hs);
  end

  // ---------------- shared memory shadow ----------------
  logic [31:0] shadow [int unsigned];
  function automatic logic [31:0] sh_word(input logic [31:0] a);
    if (shadow.exists(a >> 2)) return shadow[a >> 2];
    return 32'h9e37_79b9 * (a >> 2) ^ 32'h5bd1_e995;
  endfunction
  // bus writes become visible at their ack (reads and writes of one word
  // never acknowledge in the same clock, so the order is free)
  always @(posedge clk) if (rst_n && mem_rsp.ack && mem_req.we)
    for (int w = 0; w < 8; w++)
      if (mem_req.wstrb[4*w +: 4] == 4'hf)
        shadow[32'((mem_req.addr >> 2 & ~64'h7) + 64'(w))] = mem_req.wdata[32*w +: 32];

  // sampled responses
  logic        f_ack_s, d_ack_s, x_ack_s, x_sh_s, d_miss_s, f_miss_s;
  logic [31:0] f_instr_s [4];
  logic [31:0] d_rdata_s;
  logic [255:0] x_rdata_s;
  always @(posedge clk) begin
    f_ack_s <= f_ack;   f_instr_s <= f_instr; f_miss_s <= f_miss;
    d_ack_s <= d_ack;   d_rdata_s <= d_rdata; d_miss_s <= d_miss;
    x_ack_s <= x_rsp.ack; x_rdata_s <= x_rsp.rdata; x_sh_s <= x_rsp.shared;
  end

  int n_ihit = 0, n_imiss = 0, n_dhit = 0, n_dmiss = 0, n_inval = 0, n_shared = 0, n_cont = 0;
  always @(posedge clk) if (rst_n) begin
    int r;
    if (d_snoop_hit && dut.snoop[2].we) n_inval++;
    r = int'(x_req.req) + int'(dut.m_req[1].req) + int'(dut.m_req[2].req);
    if (!bus_busy && r > 1) n_cont++;
  end

  bit vsp_done = 1'b0;

  task automatic fetch_thread();
    logic [31:0] pc;
    pc = 32'h0000_2000;
    while (!vsp_done) begin
      int clocks;
      bit missed;
      if ($urandom_range(7, 0) == 0) pc = 32'($urandom_range(4095, 0)) << 2;
      else pc = pc + 32'(4 * $urandom_range(4, 1));
      pc = pc & 32'h0000_7ffc;
      f_pc = pc;
      f_req = 1'b1;
      clocks = 0;
      missed = 1'b0;
      do begin
        @(negedge clk);
        clocks++;
        if (f_miss_s) missed = 1'b1;
      end while (!f_ack_s);
      f_req = 1'b0;
      for (int k = 0; k < 4; k++) check(f_instr_s[k] == sh_word(pc + 32'(4 * k)), "fetched instruction");
      if (missed) n_imiss++;
      else begin
        check(clocks == 1, "fetch hit in one clock");
        n_ihit++;
      end
    end
  endtask

  function automatic logic [31:0] data_addr();
    return 32'h0001_0000 | ($urandom_range(5, 0) << 12) | ($urandom_range(3, 0) << 4) |
           ($urandom_range(3, 0) << 2);
  endfunction

  task automatic data_thread();
    while (!vsp_done) begin
      logic [31:0] a;
      bit missed;
      a = data_addr();
      d_addr = a;
      d_we = ($urandom_range(3, 0) == 0);
      d_wdata = $urandom;
      d_req = 1'b1;
      missed = 1'b0;
      do begin
        @(negedge clk);
        if (d_miss_s) missed = 1'b1;
      end while (!d_ack_s);
      d_req = 1'b0;
      if (!d_we) begin
        check(d_rdata_s == sh_word(a), "load data");
        if (missed) n_dmiss++;
        else n_dhit++;
      end
      repeat ($urandom_range(2, 0)) @(negedge clk);
    end
  endtask

  task automatic uncached_thread();
    while (!vsp_done) begin
      logic [31:0] a;
      bus_req_t r;
      a = data_addr();
      r = '0;
      r.req = 1'b1;
      r.we = 1'($urandom);
      r.addr = ADDR_W'(a);
      r.wdata = DATA_W'($urandom) << (32 * a[4:2]);
      r.wstrb = STRB_W'(4'hf) << (4 * a[4:2]);
      x_req = r;
      do @(negedge clk); while (!x_ack_s);
      x_req = '0;
      if (!r.we) check(x_rdata_s[32*a[4:2] +: 32] == sh_word(a), "uncached read data");
      if (x_sh_s) n_shared++;
      repeat ($urandom_range(12, 2)) @(negedge clk);
    end
  endtask

  initial begin
    x_req = '0;
    foreach (dmem[i]) dmem[i] = 0;
    prog = build_program(3, 16);
    iss = new();
    iss.run(prog);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      fetch_thread();
      data_thread();
      uncached_thread();
      begin
        while (!(done_seen && nret >= iss.nret)) @(negedge clk);
        vsp_done = 1'b1;
      end
    join
    repeat (4) @(negedge clk);
    // VSP end state
    for (int i = 0; i < DWORDS; i++) check(dmem[i] == iss.dmem[i], "VSP data memory");
    for (int r = 2; r < 32; r++) check(dut.u_vsp.rf[r] == iss.rf[r], "VSP register");
    check(nret >= iss.nret, "VSP retired count");
    $display("VSP: retired=%0d mispredicts=%0d stalls=%0d migrations=%0d to_le=%0d to_hs=%0d",
             nret, n_mp, n_st, n_mig, n_le, n_hs);
    $display("L1I: hits=%0d misses=%0d  L1D: hits=%0d misses=%0d invalidations=%0d",
             n_ihit, n_imiss, n_dhit, n_dmiss, n_inval);
    $display("bus: reads=%0d writes=%0d shared=%0d contended clocks=%0d",
             n_mrd, n_mwr, n_shared, n_cont);
    check(n_mp > 0,    "mechanism: branch misprediction");
    check(n_st > 0,    "mechanism: interlock stall");
    check(n_mig > 0,   "mechanism: migration HS->LE");
    check(n_le > 0,    "mechanism: LE reached");
    check(n_hs > 0,    "mechanism: LE->HS");
    check(n_ihit > 0,  "mechanism: L1I hit");
    check(n_imiss > 0, "mechanism: L1I miss");
    check(n_dhit > 0,  "mechanism: L1D hit");
    check(n_dmiss > 0, "mechanism: L1D miss");
    check(n_inval > 0, "mechanism: snoop invalidation");
    check(n_shared > 0, "mechanism: shared response");
    check(n_cont > 0,  "mechanism: bus contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end
endmodule
