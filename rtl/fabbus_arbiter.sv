// fabbus_arbiter: request arbiter of the FabHetero shared bus.
//
// Picks one of N requesting masters when 'advance' is high (the bus is
// free). ROUND_ROBIN = 0 gives fixed priority, master 0 highest;
// ROUND_ROBIN = 1 starts the search after the master granted last, so every
// requester is served within N grants. Both algorithms are the two the
// published bus offers; the pointer update on a grant is this design's
// choice.
//
// Timing: gnt (one-hot) and gnt_idx are combinational from req and the
// pointer; the pointer moves at the clock edge when a grant is taken.
module fabbus_arbiter #(
  parameter int unsigned N           = 4,
  parameter bit          ROUND_ROBIN = 1'b1,
  parameter int unsigned IW          = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  input  logic [N-1:0]  req,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          gnt_valid
);

  logic [IW-1:0] last_q;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int k = 0; k < N; k++) begin
      int unsigned m;
      m = ROUND_ROBIN ? (int'(last_q) + 1 + k) % N : k;
      if (!gnt_valid && advance && req[m]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(m);
      end
    end
    if (gnt_valid) gnt[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         last_q <= IW'(N - 1);
    else if (gnt_valid) last_q <= gnt_idx;
  end

  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
