// tb_gshare_bp: self-checking testbench of the gshare predictor.
//
// A reference model (counter table and global history kept in the
// testbench) receives the same random updates. Every clock the lookup index
// (PC word bits XOR history) and the predicted direction are compared.
// A trained always-taken and never-taken branch must predict correctly, and
// with enable low the state must not move.
`timescale 1ns/1ps
module tb_gshare_bp;
  localparam int N = 1024, IW = 10;
  logic clk = 0, rst_n = 0, enable;
  logic [31:0] lk_pc;
  logic lk_taken, up_valid, up_taken;
  logic [IW-1:0] lk_idx, up_idx;
  int checks = 0, failures = 0;
  int ref_ctr [N];
  logic [IW-1:0] ref_ghr;

  always #5 clk = ~clk;
  gshare_bp dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic compare();
    logic [IW-1:0] e_idx;
    e_idx = lk_pc[IW+1:2] ^ ref_ghr;
    check(lk_idx == e_idx, $sformatf("index %h expected %h", lk_idx, e_idx));
    check(lk_taken == (ref_ctr[e_idx] >= 2), "direction");
  endtask

  initial begin
    enable = 1; up_valid = 0; up_taken = 0; up_idx = 0; lk_pc = 0;
    foreach (ref_ctr[i]) ref_ctr[i] = 1;
    ref_ghr = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      enable   = (c % 500) < 450;
      lk_pc    = {$urandom_range(0, 255), 2'b00} + 32'hbfc0_0000;
      up_valid = $urandom_range(0, 1);
      up_idx   = IW'($urandom_range(0, 63));
      up_taken = $urandom_range(0, 2) != 0;
      #1 compare();
      @(posedge clk);
      if (enable && up_valid) begin
        if (up_taken && ref_ctr[up_idx] < 3) ref_ctr[up_idx]++;
        else if (!up_taken && ref_ctr[up_idx] > 0) ref_ctr[up_idx]--;
        ref_ghr = {ref_ghr[IW-2:0], up_taken};
      end
      #1;
    end
    // training: a branch that is always taken is predicted taken
    enable = 1;
    for (int k = 0; k < 40; k++) begin
      lk_pc = 32'hbfc0_0100; #1;
      up_valid = 1; up_idx = lk_idx; up_taken = 1;
      @(posedge clk); #1;
    end
    up_valid = 0; lk_pc = 32'hbfc0_0100; #1;
    check(lk_taken == 1, "trained taken");
    for (int k = 0; k < 40; k++) begin
      lk_pc = 32'hbfc0_0200; #1;
      up_valid = 1; up_idx = lk_idx; up_taken = 0;
      @(posedge clk); #1;
    end
    up_valid = 0; lk_pc = 32'hbfc0_0200; #1;
    check(lk_taken == 0, "trained not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
