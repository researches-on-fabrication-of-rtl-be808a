// gshare_bp: gshare branch direction predictor of the VSP processor.
//
// A table of ENTRIES two-bit saturating counters is indexed by the word
// address of the branch XOR the global history of recent branch outcomes.
// The published core has a 1K-entry gshare predictor and stops it in
// low-energy mode; the counter width, the history length (log2 ENTRIES
// bits), the weakly-not-taken reset value and the update at resolution
// (non-speculative history) are this design's choices.
//
// Interface: lookup is combinational (lk_pc -> lk_taken, lk_idx). The index
// used is carried with the branch and returned with the outcome on
// up_valid/up_idx/up_taken; the counter and the history update on the next
// clock edge. With enable low (low-energy mode) neither the table nor the
// history change.
module gshare_bp #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned IW      = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [31:0]   lk_pc,
  output logic          lk_taken,
  output logic [IW-1:0] lk_idx,
  input  logic          up_valid,
  input  logic [IW-1:0] up_idx,
  input  logic          up_taken
);

  logic [1:0]    ctr [ENTRIES];
  logic [IW-1:0] ghr;

  assign lk_idx   = lk_pc[IW+1:2] ^ ghr;
  assign lk_taken = ctr[lk_idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr <= '0;
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= 2'b01;
    end else if (enable && up_valid) begin
      ghr <= {ghr[IW-2:0], up_taken};
      if (up_taken && ctr[up_idx] != 2'b11)       ctr[up_idx] <= ctr[up_idx] + 2'b01;
      else if (!up_taken && ctr[up_idx] != 2'b00) ctr[up_idx] <= ctr[up_idx] - 2'b01;
    end
  end

endmodule
