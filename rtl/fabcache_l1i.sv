// fabcache_l1i: FabCache L1 instruction cache with two interleaved banks.
//
// A superscalar front end fetches FETCH_W consecutive instructions per
// clock starting at any word, so a fetch bundle usually straddles two
// cache lines. The line size is FETCH_W words and the lines are spread
// over two banks, even lines in bank 0 and odd lines in bank 1, so the two
// lines of any bundle sit in different banks and are read in the same
// clock. Each bank is direct mapped with BANK_SETS lines. On a miss the
// missing line (the first one, then the second) is read over the shared
// bus in a single beat, and the access is retried. Instruction caches do
// not snoop (the code is not written at run time).
// The two-bank interleaving, the line size equal to the fetch width, the
// blocking refill and the line-size transmission follow the published
// cache generator; the bank size, direct mapping and the fetch handshake
// are this design's choices.
//
// Fetch side: f_req and f_pc are held until the one-clock f_ack, which on a
// hit comes in the clock of the request; f_instr[k] is the word at
// f_pc + 4k. A miss in one line costs one bus transaction plus one clock.
module fabcache_l1i
  import fabbus_pkg::*;
#(
  parameter int unsigned FETCH_W   = 4,
  parameter int unsigned BANK_SETS = 128,
  parameter int unsigned OW  = $clog2(FETCH_W),
  parameter int unsigned BIW = $clog2(BANK_SETS),
  parameter int unsigned TW  = 32 - 2 - OW - 1 - BIW
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        f_req,
  input  logic [31:0] f_pc,
  output logic        f_ack,
  output logic [31:0] f_instr [FETCH_W],
  output logic        f_miss,       // a refill is in progress
  output bus_req_t    b_req,
  input  bus_rsp_t    b_rsp
);

  localparam int unsigned LBITS = FETCH_W * 32;

  logic [TW-1:0]    tag_a  [2][BANK_SETS];
  logic             vld_a  [2][BANK_SETS];
  logic [LBITS-1:0] data_a [2][BANK_SETS];

  // Line numbers of the two lines a bundle can touch.
  logic [29-OW:0] ln0, ln1;
  logic [OW-1:0]  off;
  logic           need1;
  assign ln0   = f_pc[31:2+OW];
  assign ln1   = ln0 + 1'b1;
  assign off   = f_pc[2 +: OW];
  assign need1 = (off != '0);

  function automatic logic lhit(logic [29-OW:0] ln);
    return vld_a[ln[0]][ln[BIW:1]] && tag_a[ln[0]][ln[BIW:1]] == ln[29-OW:BIW+1];
  endfunction

  logic hit0, hit1, hit;
  assign hit0 = lhit(ln0);
  assign hit1 = !need1 || lhit(ln1);
  assign hit  = hit0 && hit1;

  logic [LBITS-1:0] l0, l1;
  logic [2*LBITS-1:0] pair;
  assign l0   = data_a[ln0[0]][ln0[BIW:1]];
  assign l1   = data_a[ln1[0]][ln1[BIW:1]];
  assign pair = {l1, l0} >> (32 * off);
  always_comb
    for (int k = 0; k < FETCH_W; k++) f_instr[k] = pair[32*k +: 32];

  typedef enum logic {S_IDLE, S_FILL} state_e;
  state_e         state_q;
  logic [29-OW:0] fill_ln;

  assign f_ack  = (state_q == S_IDLE) && f_req && hit;
  assign f_miss = (state_q == S_FILL);

  localparam int unsigned BEAT_WORDS = DATA_W / 32;
  logic [31:0] fill_addr;
  logic [$clog2(BEAT_WORDS)-1:0] fill_w;
  assign fill_addr = {fill_ln, {(OW+2){1'b0}}};
  assign fill_w    = fill_addr[2 +: $clog2(BEAT_WORDS)];
  always_comb begin
    b_req      = '0;
    b_req.req  = (state_q == S_FILL);
    b_req.addr = ADDR_W'(fill_addr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      fill_ln <= '0;
      for (int b = 0; b < 2; b++)
        for (int s = 0; s < BANK_SETS; s++) vld_a[b][s] <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (f_req && !hit) begin
          state_q <= S_FILL;
          fill_ln <= hit0 ? ln1 : ln0;
        end
        S_FILL: if (b_rsp.ack) begin
          tag_a[fill_ln[0]][fill_ln[BIW:1]]  <= fill_ln[29-OW:BIW+1];
          vld_a[fill_ln[0]][fill_ln[BIW:1]]  <= 1'b1;
          data_a[fill_ln[0]][fill_ln[BIW:1]] <= LBITS'(b_rsp.rdata >> (32 * fill_w));
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != S_IDLE) |-> f_req);

endmodule
