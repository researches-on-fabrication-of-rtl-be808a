// lds_cell: latch / D-flip-flop selector cell, the pipeline register placed
// between two stages that the VSP processor unifies in low-energy mode.
//
// The cell is a master-slave D flip-flop whose master-latch output is also
// brought to an output multiplexer (Fig. "LDS-cell"):
//   unify = 0 (stages separate): q is the flip-flop (slave) output, so the
//            cell is an ordinary rising-edge pipeline register;
//   unify = 1 (stages unified) : q is the master latch. The latch holds
//            while the cell clock is high (first half of the unified stage,
//            so glitches of the first half do not reach the second half)
//            and is transparent while the clock is low (second half).
// Clock gating keeps the cell clock HIGH in gated cycles, so a gated
// unified cell also holds and blocks glitches. Here the gate is modelled
// with the enable cg_en instead of a derived clock net: with cg_en low the
// flip-flop does not load and the master latch stays closed, which is what
// a cell clock held high does. The master-latch + slave + multiplexer
// structure and the clock-held-high gating follow the published cell; the
// enable-style model of the gate and the WIDTH parameter are this design's.
//
// Timing: q (unify = 0) changes after a rising clk edge with cg_en high;
// q (unify = 1) follows d while clk is low and cg_en is high.
module lds_cell #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             cg_en,   // 0: cell clock held high (gated)
  input  logic             unify,   // pipeline stage control signal
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] master, slave;

  // Master latch: transparent while the (ungated) cell clock is low.
  always_latch begin
    if (!clk && cg_en) master = d;
  end

  // Slave: loads the master value at the rising edge of the cell clock.
  always_ff @(posedge clk) begin
    if (cg_en) slave <= master;
  end

  assign q = unify ? master : slave;

endmodule
