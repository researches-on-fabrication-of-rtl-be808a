// fabcache_l1d: FabCache L1 data cache.
//
// A WAYS-way set-associative cache of SETS sets and LINE_WORDS-word lines,
// with blocking miss handling, write-through without write allocation, and
// LRU replacement. Each way of a set holds an LRU value: the way touched
// last gets WAYS-1, the ways above its old value move down by one, and the
// way with value 0 (after any invalid way) is the victim. Direct mapping is
// the 1-way case of the same code. A line is refilled over the shared bus
// in a single beat (line-size transmission). A snooped write of another
// master to a cached line invalidates it; a snooped access reports a hit on
// snoop_hit.
// Blocking miss handling, write-through, LRU, line-size transmission,
// dimensions as parameters and 1-way direct mapping follow the published
// cache generator; the core handshake, no-write-allocate and the
// invalidate-on-snooped-write rule are this design's choices. The default
// size (16 KB, 16-byte lines, 4 ways) is the data cache used in the
// cache-warming study.
//
// Core side: the core holds c_req (with c_we, c_addr, c_wdata) until the
// one-clock c_ack. A read hit is acknowledged in the clock of the request
// (tags and data are read combinationally); a read miss costs the bus
// transaction plus one clock; a write is acknowledged with the bus ack.
module fabcache_l1d
  import fabbus_pkg::*;
#(
  parameter int unsigned WAYS       = 4,
  parameter int unsigned SETS       = 256,
  parameter int unsigned LINE_WORDS = 4,
  parameter int unsigned OW  = $clog2(LINE_WORDS),
  parameter int unsigned SIW = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int unsigned TW  = 32 - 2 - OW - ((SETS > 1) ? $clog2(SETS) : 0)
) (
  input  logic        clk,
  input  logic        rst_n,
  // core
  input  logic        c_req,
  input  logic        c_we,
  input  logic [31:0] c_addr,
  input  logic [31:0] c_wdata,
  output logic        c_ack,
  output logic [31:0] c_rdata,
  output logic        c_miss,      // a read miss is being served
  // shared bus (master side)
  output bus_req_t    b_req,
  input  bus_rsp_t    b_rsp,
  input  snoop_t      snoop,
  output logic        snoop_hit
);

  localparam int unsigned LBITS = LINE_WORDS * 32;
  localparam int unsigned SBITS = (SETS > 1) ? $clog2(SETS) : 0;

  logic [TW-1:0]    tag_a  [SETS][WAYS];
  logic             vld_a  [SETS][WAYS];
  logic [WW-1:0]    lru_a  [SETS][WAYS];
  logic [LBITS-1:0] data_a [SETS][WAYS];

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_WRITE} state_e;
  state_e state_q;

  function automatic logic [SIW-1:0] idx_of(logic [31:0] a);
    return (SETS > 1) ? SIW'(a >> (2 + OW)) : '0;
  endfunction
  function automatic logic [TW-1:0] tag_of(logic [31:0] a);
    return TW'(a >> (2 + OW + SBITS));
  endfunction

  logic [SIW-1:0] c_idx;
  logic [TW-1:0]  c_tag;
  logic [OW-1:0]  c_off;
  logic           hit;
  logic [WW-1:0]  hit_way, victim;

  assign c_idx = idx_of(c_addr);
  assign c_tag = tag_of(c_addr);
  assign c_off = OW'(c_addr >> 2);

  always_comb begin
    hit = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld_a[c_idx][w] && tag_a[c_idx][w] == c_tag) begin
        hit = 1'b1;
        hit_way = WW'(w);
      end
    // victim: an invalid way if any, else the way whose LRU value is 0
    victim = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (lru_a[c_idx][w] == '0) victim = WW'(w);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!vld_a[c_idx][w]) victim = WW'(w);
  end

  // Snoop lookup.
  logic [31:0]    s_addr;
  logic [SIW-1:0] s_idx;
  logic           s_hit;
  logic [WW-1:0]  s_way;
  assign s_addr = snoop.addr[31:0];
  assign s_idx  = idx_of(s_addr);
  always_comb begin
    s_hit = 1'b0;
    s_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld_a[s_idx][w] && tag_a[s_idx][w] == tag_of(s_addr)) begin
        s_hit = 1'b1;
        s_way = WW'(w);
      end
  end
  assign snoop_hit = snoop.valid && s_hit;

  // Core response.
  logic [LBITS-1:0] hit_line;
  assign hit_line = data_a[c_idx][hit_way];
  assign c_rdata  = hit_line[32*c_off +: 32];
  assign c_ack    = (state_q == S_IDLE && c_req && !c_we && hit) ||
                    (state_q == S_WRITE && b_rsp.ack);
  assign c_miss   = (state_q == S_FILL);

  // Bus request: line read on a miss, one-word write for a store.
  localparam int unsigned BEAT_WORDS = DATA_W / 32;
  logic [$clog2(BEAT_WORDS)-1:0] beat_w;
  assign beat_w = c_addr[2 +: $clog2(BEAT_WORDS)];
  always_comb begin
    b_req       = '0;
    b_req.addr  = ADDR_W'(c_addr);
    b_req.we    = (state_q == S_WRITE);
    b_req.req   = (state_q != S_IDLE);
    b_req.wdata = DATA_W'(c_wdata) << (32 * beat_w);
    b_req.wstrb = STRB_W'(4'hf) << (4 * beat_w);
  end

  // LRU update of one set after an access to way 'w'.
  task automatic touch(input logic [SIW-1:0] s, input logic [WW-1:0] w);
    for (int k = 0; k < WAYS; k++)
      if (WW'(k) == w) lru_a[s][k] <= WW'(WAYS - 1);
      else if (lru_a[s][k] > lru_a[s][w]) lru_a[s][k] <= lru_a[s][k] - WW'(1);
  endtask

  // The line sits in the bus beat at its own word offset (a line is at
  // most one beat wide).
  logic [LBITS-1:0] fill_line;
  assign fill_line = LBITS'(b_rsp.rdata >> (32 * (int'(beat_w) & ~(LINE_WORDS - 1))));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          vld_a[s][w] <= 1'b0;
          lru_a[s][w] <= WW'(w);
        end
    end else begin
      unique case (state_q)
        S_IDLE: if (c_req) begin
          if (c_we) begin
            state_q <= S_WRITE;
            if (hit) begin
              data_a[c_idx][hit_way][32*c_off +: 32] <= c_wdata;
              touch(c_idx, hit_way);
            end
          end else if (hit) begin
            touch(c_idx, hit_way);
          end else begin
            state_q <= S_FILL;
          end
        end
        S_FILL: if (b_rsp.ack) begin
          tag_a[c_idx][victim]  <= c_tag;
          vld_a[c_idx][victim]  <= 1'b1;
          data_a[c_idx][victim] <= fill_line;
          state_q <= S_IDLE;
        end
        S_WRITE: if (b_rsp.ack) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
      // another master writes a line held here: drop it
      if (snoop.valid && snoop.we && s_hit) vld_a[s_idx][s_way] <= 1'b0;
    end
  end

  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != S_IDLE) |-> c_req);

endmodule
