// tb_depth_ctrl: self-checking testbench of the depth controller.
//
// Random retire/branch flags are fed on sampled cycles; a reference keeps
// the last DEPTH samples in a queue and recomputes both sums and the
// expected unify request (registered, one clock later) for high-speed and
// low-energy mode. Also checked: threshold writes, that unsampled cycles
// leave the window unchanged, and that a disabled controller follows the
// fixed mode input.
`timescale 1ns/1ps
module tb_depth_ctrl;
  localparam int DEPTH = 32;
  localparam int SW = 6;
  logic clk = 0, rst_n = 0;
  logic ctrl_en, fixed_le, le_mode, sample_en, retire, is_branch, th_we;
  logic [1:0] th_sel;
  logic [SW-1:0] th_wdata, ipc_sum, br_sum, th_htol, th_ltoh, th_br;
  logic unify_req;
  int checks = 0, failures = 0;
  bit ipc_q[$], br_q[$];
  int e_ipc = DEPTH, e_br = 0, e_htol = 15, e_ltoh = 21, e_br_th = 6;
  bit exp_req;

  always #5 clk = ~clk;

  depth_ctrl dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int sumq(ref bit q[$]);
    int s = 0; foreach (q[i]) s += q[i]; return s;
  endfunction

  initial begin
    ctrl_en = 1; fixed_le = 0; le_mode = 0; sample_en = 0; retire = 0; is_branch = 0;
    th_we = 0; th_sel = 0; th_wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin ipc_q.push_back(1); br_q.push_back(0); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(ipc_sum == DEPTH && br_sum == 0 && !unify_req, "reset state");
    check(th_htol == 15 && th_ltoh == 21 && th_br == 6, "reset thresholds (TH1)");
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int phase = (cyc / 300) % 4;
      // phases: busy, idle, branchy-busy, mixed
      sample_en = ($urandom_range(0, 3) != 0);
      case (phase)
        0: retire = ($urandom_range(0, 9) < 9);
        1: retire = ($urandom_range(0, 9) < 3);
        2: retire = ($urandom_range(0, 9) < 8);
        default: retire = $urandom_range(0, 1);
      endcase
      is_branch = (phase == 2) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 15) == 0);
      le_mode = (cyc / 150) % 2;
      th_we = (cyc == 1500 || cyc == 1501 || cyc == 1502);
      th_sel = 2'(cyc - 1500);
      th_wdata = (cyc == 1500) ? 6'd18 : (cyc == 1501) ? 6'd24 : 6'd5;
      // the registered request is taken from the sums and thresholds
      // present before this edge and the mode input of this cycle
      exp_req = le_mode ? !((e_ipc > e_ltoh) && (e_br < e_br_th)) : (e_ipc <= e_htol);
      @(posedge clk);
      if (th_we) begin
        if (th_sel == 0) e_htol = th_wdata; else if (th_sel == 1) e_ltoh = th_wdata; else e_br_th = th_wdata;
      end
      if (sample_en) begin
        void'(ipc_q.pop_front()); void'(br_q.pop_front());
        ipc_q.push_back(retire); br_q.push_back(retire && is_branch);
      end
      e_ipc = sumq(ipc_q); e_br = sumq(br_q);
      #1;
      check(ipc_sum == e_ipc && br_sum == e_br, $sformatf("sums %0d/%0d expected %0d/%0d", ipc_sum, br_sum, e_ipc, e_br));
      check(th_htol == e_htol && th_ltoh == e_ltoh && th_br == e_br_th, "thresholds");
      check(unify_req == exp_req, $sformatf("cycle %0d unify_req=%0b expected %0b", cyc, unify_req, exp_req));
    end
    // disabled controller: fixed mode
    ctrl_en = 0; fixed_le = 1;
    repeat (2) @(posedge clk); #1;
    check(unify_req == 1, "disabled: fixed LE");
    fixed_le = 0;
    @(posedge clk); #1;
    check(unify_req == 0, "disabled: fixed HS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
