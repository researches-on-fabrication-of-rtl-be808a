// tb_vsp_mibench: runs the four integer kernels of vsp_mibench_pkg (bit
// count, integer square root, quick sort, string search) on the VSP core
// in six configurations each: controller disabled with fixed high-speed
// and fixed low-energy mode, and controller enabled with the threshold
// sets TH0..TH3 (IPC_HtoL / IPC_LtoH / #BR = 15/18/6, 15/21/6, 18/21/6,
// 18/24/6) written by the program with MTC0.
//
// For every run the testbench checks each retired PC against the
// instruction-level model, the kernel's result words against values
// computed directly in SystemVerilog, the whole data memory against the
// model, and the timing relations: the fixed-HS run is the fastest, the
// fixed-LE run the slowest, and every controller run lies between them.
// It prints, per run, the clock count, the share of clocks spent in LE
// mode, the number of HS->LE migrations and the mean interval between
// them, which is the shape of the published threshold study; the LE share
// must not fall (beyond 2 points of rounding) from TH0 to TH3, the order in
// which the threshold sets favour the low-energy mode. The core is
// used at its default parameters; memories are combinational models.
`timescale 1ns/1ps
module tb_vsp_mibench;
  import vsp_pkg::*;
  import vsp_prog_pkg::*;
  import vsp_mibench_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ctrl_en = 1'b0, fixed_le = 1'b0;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_re, dmem_we;
  logic [3:0] dmem_be;
  mode_e mode;
  logic retire;
  logic [31:0] retire_pc;
  logic ev_mp, ev_mig, ev_le, ev_hs, ev_st;

  always #5 clk = ~clk;

  vsp_core dut (
    .clk, .rst_n, .ctrl_en, .fixed_le,
    .imem_addr, .imem_rdata, .dmem_addr, .dmem_re, .dmem_we, .dmem_wdata, .dmem_be, .dmem_rdata,
    .mode_o(mode), .retire_o(retire), .retire_pc_o(retire_pc),
    .ev_mispredict(ev_mp), .ev_migrate(ev_mig), .ev_to_le(ev_le), .ev_to_hs(ev_hs),
    .ev_stall(ev_st));

  program_c prog = new();
  iss_c     iss = new();
  word_t    dmem [DWORDS];
  int checks = 0, failures = 0;
  int cycles, nret, done_seen, n_mig, n_le_clk;
  bit tracking = 1'b0;

  assign imem_rdata = (imem_addr - IBASE) >> 2 < IWORDS ? prog.img[(imem_addr - IBASE) >> 2] : 32'h0;
  assign dmem_rdata = dmem[dmem_addr[11:2]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n && tracking) begin
    cycles++;
    if (mode != MODE_HS) n_le_clk++;
    if (dmem_we) begin
      for (int k = 0; k < 4; k++)
        if (dmem_be[k]) dmem[dmem_addr[11:2]][8*k +: 8] <= dmem_wdata[8*k +: 8];
      if (dmem_addr == DONE_ADDR) done_seen = 1;
    end
    if (retire) begin
      if (nret < iss.pcs.size()) check(retire_pc == iss.pcs[nret], "retired PC");
      nret++;
    end
    if (ev_mig) n_mig++;
  end

  task automatic run(input int k, input bit en, input bit le, input int th [3], input string name,
                     output int cyc);
    word_t exp_res [$];
    int base;
    prog = build_kernel(k, th[0], th[1], th[2]);
    iss.run(prog);
    check(iss.nret < MAXRET, "kernel finishes in the model");
    ctrl_en = en;
    fixed_le = le;
    foreach (dmem[i]) dmem[i] = 0;
    cycles = 0; nret = 0; done_seen = 0; n_mig = 0; n_le_clk = 0;
    rst_n = 1'b0;
    tracking = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    tracking = 1'b1;
    while (!(done_seen && nret >= iss.nret) && cycles < 400000) @(posedge clk);
    repeat (2) @(posedge clk);
    tracking = 1'b0;
    cyc = cycles;
    check(done_seen != 0, "kernel finished");
    expected(k, exp_res, base);
    foreach (exp_res[i]) check(dmem[(base >> 2) + i] == exp_res[i], "kernel result");
    for (int i = 0; i < DWORDS; i++) check(dmem[i] == iss.dmem[i], "data memory");
    $display("  %-13s %-9s clocks=%7d instr=%6d LE-share=%3d%% migrations=%4d interval=%0d",
             (k == 0) ? "bit count" : (k == 1) ? "int sqrt" : (k == 2) ? "quick sort" : "string search",
             name, cycles, iss.nret, 100 * n_le_clk / cycles, n_mig,
             (n_mig > 0) ? cycles / n_mig : 0);
  endtask

  initial begin
    int th [4][3];
    int c_hs, c_le, c_th;
    int total_mig, share, prev_share;
    th = '{'{15, 18, 6}, '{15, 21, 6}, '{18, 21, 6}, '{18, 24, 6}};
    total_mig = 0;
    for (int k = 0; k < 4; k++) begin
      run(k, 1'b0, 1'b0, th[1], "fixed HS", c_hs);
      run(k, 1'b0, 1'b1, th[1], "fixed LE", c_le);
      check(c_hs < c_le, "HS faster than LE");
      prev_share = 0;
      for (int t = 0; t < 4; t++) begin
        run(k, 1'b1, 1'b0, th[t], $sformatf("TH%0d", t), c_th);
        check(c_th >= c_hs - c_hs / 20 && c_th <= c_le, "controller run between HS and LE");
        share = 100 * n_le_clk / c_th;
        check(share + 2 >= prev_share, "LE share does not fall from TH0 to TH3");
        prev_share = share;
        total_mig += n_mig;
      end
    end
    check(total_mig > 0, "the controller unified the pipeline at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end
endmodule
