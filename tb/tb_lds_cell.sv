// tb_lds_cell: self-checking testbench of the LDS-cell.
//
// The input toggles several times inside each clock phase (glitches).
// Separate stages (unify = 0): the output changes only at a rising clock
// edge and then equals the input just before it. Unified stages
// (unify = 1): while the clock is high the output holds the value the input
// had at the end of the previous low phase (glitches are blocked); while
// the clock is low it follows the input. With the clock gate closed
// (cg_en = 0, clock held high) the output holds in both modes.
`timescale 1ns/1ps
module tb_lds_cell;
  localparam int W = 8;
  logic clk = 0, cg_en, unify;
  logic [W-1:0] d, q, last_low, last_edge, held;
  int checks = 0, failures = 0;

  lds_cell #(.WIDTH(W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    cg_en = 1; unify = 0; d = 0;
    // settle: one full cycle
    #5 clk = 1; #5 clk = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      unify = (cyc / 50) % 2;
      cg_en = ((cyc % 25) < 20);
      // low phase: glitch the input, check transparency / hold
      held = q;
      for (int g = 0; g < 4; g++) begin
        d = W'($urandom);
        #1;
        if (unify && cg_en) check(q == d, "unified, clock low: transparent");
        else                check(q == held, "output holds during low phase");
      end
      last_low = d;
      #1 clk = 1;
      #0.5;
      if (cg_en) begin
        if (!unify) check(q == last_low, "separate: loads at rising edge");
        else        check(q == last_low, "unified: latch closes with input of low phase");
      end else check(q == held, "gated: holds over edge");
      held = q;
      // high phase: glitch the input, output must not move
      for (int g = 0; g < 4; g++) begin
        d = W'($urandom);
        #1 check(q == held, "clock high: glitches blocked");
      end
      #0.5 clk = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
