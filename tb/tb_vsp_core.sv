// tb_vsp_core: self-checking testbench of the VSP core.
//
// The core runs the phase program of vsp_prog_pkg from combinational
// instruction and data memories, three times: with the depth controller
// disabled and the mode fixed to high-speed, fixed to low-energy, and with
// the controller enabled. Each run is checked against the instruction-level
// model: the sequence of retired PCs, the data memory contents, the
// register file and the threshold register written by MTC0. Timing checks:
// low-energy mode spends four clocks per pipeline cycle (the run takes at
// least 4 clocks per instruction), the high-speed run needs fewer clocks
// than the low-energy one, and every migration lasts exactly four clocks
// before the core is in low-energy mode.
`timescale 1ns/1ps
module tb_vsp_core;
  import vsp_pkg::*;
  import vsp_prog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ctrl_en, fixed_le;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_re, dmem_we;
  logic [3:0] dmem_be;
  mode_e mode;
  logic retire; logic [31:0] retire_pc;
  logic ev_mp, ev_mig, ev_le, ev_hs, ev_st;

  always #5 clk = ~clk;

  vsp_core dut (
    .clk(clk), .rst_n(rst_n), .ctrl_en(ctrl_en), .fixed_le(fixed_le),
    .imem_addr(imem_addr), .imem_rdata(imem_rdata),
    .dmem_addr(dmem_addr), .dmem_re(dmem_re), .dmem_we(dmem_we),
    .dmem_wdata(dmem_wdata), .dmem_be(dmem_be), .dmem_rdata(dmem_rdata),
    .mode_o(mode), .retire_o(retire), .retire_pc_o(retire_pc),
    .ev_mispredict(ev_mp), .ev_migrate(ev_mig), .ev_to_le(ev_le),
    .ev_to_hs(ev_hs), .ev_stall(ev_st));

  program_c prog;
  iss_c     iss;
  word_t    dmem [DWORDS];
  int checks = 0, failures = 0;
  int cycles, nret, done_seen, n_mig, n_le, n_hs, n_mp, n_st, mig_start, mig_bad;
  bit tracking;

  assign imem_rdata = (imem_addr - IBASE) >> 2 < IWORDS ? prog.img[(imem_addr - IBASE) >> 2] : 32'h0;
  assign dmem_rdata = dmem[dmem_addr[11:2]];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && tracking) begin
    cycles++;
    if (dmem_we) begin
      for (int k = 0; k < 4; k++)
        if (dmem_be[k]) dmem[dmem_addr[11:2]][8*k +: 8] <= dmem_wdata[8*k +: 8];
      if (dmem_addr == DONE_ADDR) done_seen = 1;
    end
    if (retire) begin
      checks++;
      if (nret < iss.pcs.size() && retire_pc != iss.pcs[nret]) begin
        if (failures < 10) $display("FAIL: retire %0d pc %h expected %h", nret, retire_pc, iss.pcs[nret]);
        failures++;
      end
      nret++;
    end
    if (ev_mig) begin n_mig++; mig_start = cycles; end
    if (ev_le) begin n_le++; if (cycles - mig_start != 4) mig_bad++; end
    if (ev_hs) n_hs++;
    if (ev_mp) n_mp++;
    if (ev_st) n_st++;
  end

  task automatic run(bit en, bit le, string name, output int cyc);
    ctrl_en = en; fixed_le = le;
    foreach (dmem[i]) dmem[i] = 0;
    cycles = 0; nret = 0; done_seen = 0; n_mig = 0; n_le = 0; n_hs = 0; n_mp = 0; n_st = 0; mig_bad = 0;
    rst_n = 0; tracking = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; tracking = 1;
    while (!(done_seen && nret >= iss.nret) && cycles < 200000) @(posedge clk);
    repeat (2) @(posedge clk);
    tracking = 0;
    cyc = cycles;
    $display("%s: cycles=%0d retired=%0d mispredicts=%0d stalls=%0d migrations=%0d to_le=%0d to_hs=%0d",
             name, cycles, nret, n_mp, n_st, n_mig, n_le, n_hs);
    check(done_seen, {name, ": program finished"});
    check(nret >= iss.nret, {name, ": retired count"});
    for (int i = 0; i < DWORDS; i++)
      if (dmem[i] !== iss.dmem[i]) begin
        check(0, $sformatf("%s: dmem[%0d]=%h expected %h", name, i, dmem[i], iss.dmem[i]));
        break;
      end
    check(1, {name, ": dmem compared"});
    for (int r = 1; r < 32; r++)
      if (r != 1 && dut.rf[r] !== iss.rf[r])
        check(0, $sformatf("%s: r%0d=%h expected %h", name, r, dut.rf[r], iss.rf[r]));
    check(dut.u_ctrl.th_htol == 6'(iss.th[0]), {name, ": MTC0 threshold"});
    check(mig_bad == 0, {name, ": migration lasts 4 cycles"});
  endtask

  int c_hs, c_le, c_dyn;
  initial begin
    prog = build_program(3, 16);
    iss = new();
    iss.run(prog);
    $display("reference: %0d instructions", iss.nret);
    run(0, 0, "fixed HS", c_hs);
    check(n_mig == 0 && n_hs == 0, "fixed HS: no mode change");
    check(n_mp > 0, "fixed HS: mispredictions happen");
    check(n_st > 0, "fixed HS: interlocks happen");
    check(c_hs >= iss.nret, "fixed HS: at most one instruction per clock");
    run(0, 1, "fixed LE", c_le);
    check(n_mp == 0, "fixed LE: no mispredictions");
    check(c_le >= 4 * iss.nret, "fixed LE: four clocks per pipeline cycle");
    check(c_le <= 4 * (iss.nret + n_st + 8), "fixed LE: one LE cycle per instruction plus load-use bubbles");
    check(n_st < iss.nret / 4, "fixed LE: ALU results never interlock");
    check(c_hs < c_le, "HS faster than LE");
    run(1, 0, "controller", c_dyn);
    check(n_mig > 0, "controller: unification via migration");
    check(n_le > 0, "controller: reached LE");
    check(n_hs > 0, "controller: returned to HS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
