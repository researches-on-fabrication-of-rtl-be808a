// tb_fabbus_arbiter: self-checking testbench of the FabBus arbiter.
//
// Two arbiters, one round-robin (the default) and one fixed-priority, see
// the same random request vectors and 'advance' strobes. A reference model
// in the testbench keeps its own round-robin pointer and predicts the
// one-hot grant and its index of each arbiter every clock; the checks also
// cover fairness (with all masters requesting, round robin serves every
// master within N grants) and that nothing is granted while advance is low.
// Inputs change on the falling edge, outputs are sampled before the rising
// edge. The check rules are this design's reading of the two published
// arbitration schemes.
module tb_fabbus_arbiter;
  localparam int N = 4;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         advance = 1'b0;
  logic [N-1:0] req = '0;
  logic [N-1:0] gnt_rr, gnt_fp;
  logic [1:0]   idx_rr, idx_fp;
  logic         v_rr, v_fp;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  fabbus_arbiter u_rr (.clk, .rst_n, .advance, .req,
                       .gnt(gnt_rr), .gnt_idx(idx_rr), .gnt_valid(v_rr));
  fabbus_arbiter #(.ROUND_ROBIN(1'b0)) u_fp (.clk, .rst_n, .advance, .req,
                       .gnt(gnt_fp), .gnt_idx(idx_fp), .gnt_valid(v_fp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int ptr = N - 1;         // model round-robin pointer
  int since[N];            // grants since master m was last served (all-request phase)
  bit all_phase = 1'b0;

  task automatic step();
    int e_rr, e_fp;
    e_rr = -1;
    e_fp = -1;
    if (advance) begin
      for (int k = 0; k < N; k++) if (e_rr < 0 && req[(ptr + 1 + k) % N]) e_rr = (ptr + 1 + k) % N;
      for (int k = 0; k < N; k++) if (e_fp < 0 && req[k]) e_fp = k;
    end
    #4;  // just before the rising edge
    check(v_rr == (e_rr >= 0), "rr valid");
    check(v_fp == (e_fp >= 0), "fp valid");
    if (e_rr >= 0) begin
      check(int'(idx_rr) == e_rr, "rr index");
      check(gnt_rr == N'(1 << e_rr), "rr one-hot");
    end else check(gnt_rr == '0, "rr none");
    if (e_fp >= 0) begin
      check(int'(idx_fp) == e_fp, "fp index");
      check(gnt_fp == N'(1 << e_fp), "fp one-hot");
    end else check(gnt_fp == '0, "fp none");
    if (all_phase) begin
      for (int m = 0; m < N; m++) since[m] = (m == e_rr) ? 0 : since[m] + 1;
      for (int m = 0; m < N; m++) check(since[m] < N, "rr fairness");
    end
    @(posedge clk);
    if (e_rr >= 0) ptr = e_rr;
    @(negedge clk);
  endtask

  initial begin
    for (int m = 0; m < N; m++) since[m] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // phase 1: random requests
    for (int i = 0; i < 2000; i++) begin
      req     = N'($urandom);
      advance = ($urandom % 4) != 0;
      step();
    end
    // phase 2: all masters request every clock
    all_phase = 1'b1;
    for (int i = 0; i < 200; i++) begin
      req     = '1;
      advance = 1'b1;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end
endmodule
