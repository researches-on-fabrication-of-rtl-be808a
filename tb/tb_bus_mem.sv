// tb_bus_mem: shared-memory slave model for the FabBus testbenches.
//
// Holds 256-bit beats in a sparse associative array; a beat never written
// reads as a fixed function of its address (init_word), so every address
// has known contents. A request is answered after a random wait of 0 to
// MAX_WAIT clocks with a one-clock registered ack; reads return the beat
// containing the address, writes merge wdata under the byte strobes at the
// moment the ack is raised. The model is testbench-only.
module tb_bus_mem
  import fabbus_pkg::*;
#(
  parameter int MAX_WAIT = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output int       n_reads,
  output int       n_writes
);
  logic [DATA_W-1:0] mem [longint];
  int wait_left = -1;

  function automatic logic [31:0] init_word(input longint unsigned waddr);
    return 32'h9e37_79b9 * 32'(waddr) ^ 32'h5bd1_e995;
  endfunction

  function automatic logic [DATA_W-1:0] beat(input longint unsigned a);
    longint unsigned k;
    logic [DATA_W-1:0] v;
    k = a >> 5;
    if (mem.exists(k)) return mem[k];
    for (int w = 0; w < DATA_W / 32; w++) v[32*w +: 32] = init_word(k * 8 + longint'(w));
    return v;
  endfunction

  initial begin
    rsp = '0;
    n_reads = 0;
    n_writes = 0;
  end

  always @(posedge clk) begin
    rsp.ack <= 1'b0;
    if (!rst_n) wait_left = -1;
    else if (req.req && !rsp.ack) begin
      if (wait_left < 0) wait_left = int'($urandom_range(MAX_WAIT, 0));
      if (wait_left == 0) begin
        logic [DATA_W-1:0] v;
        v = beat(req.addr);
        rsp.ack   <= 1'b1;
        rsp.rdata <= v;
        if (req.we) begin
          for (int b = 0; b < STRB_W; b++) if (req.wstrb[b]) v[8*b +: 8] = req.wdata[8*b +: 8];
          mem[req.addr >> 5] = v;
          n_writes <= n_writes + 1;
        end else n_reads <= n_reads + 1;
        wait_left = -1;
      end else wait_left--;
    end
  end
endmodule
