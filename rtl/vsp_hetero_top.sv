// vsp_hetero_top: one VSP core next to the FabCache memory side of a
// heterogeneous multi-core.
//
// The chip-level pieces that can be built from the description are put
// together here:
//   * u_vsp  - the variable-stages-pipeline core (high-speed, migration and
//              low-energy modes, gshare predictor, depth controller). Its
//              instruction and data memory ports are brought out, as on the
//              fabricated test chip, where the memories are off the core.
//   * FabCache/FabBus side of a generated heterogeneous multi-core: an L1
//     instruction cache (two interleaved banks) and an L1 data cache
//     (set-associative, LRU, write-through) for one generated core whose
//     fetch and load/store ports are brought out, plus one further
//     uncached bus master port. All three masters share FabBus, which
//     arbitrates round-robin, broadcasts each transaction as a snoop so the
//     data cache can drop lines written by others, and drives one slave
//     port towards the shared memory outside this block.
// Bus master order: 0 = external master, 1 = L1 instruction cache,
// 2 = L1 data cache. The composition (which master sits where and the
// external slave) is this design's choice; the core, the cache and bus
// parameters default to the published values.
//
// Timing: everything is on clk, reset asynchronous active low. The core
// needs memories that answer combinationally within the clock; the cache
// ports use hold-until-ack handshakes (see the cache modules).
module vsp_hetero_top
  import vsp_pkg::*;
  import fabbus_pkg::*;
#(
  parameter logic [31:0] RESET_PC   = 32'hbfc0_0000,
  parameter int unsigned LE_DIV     = 4,
  parameter int unsigned BP_ENTRIES = 1024,
  parameter int unsigned CTRL_DEPTH = 32,
  parameter int unsigned FETCH_W    = 4,
  parameter int unsigned I_BANK_SETS = 128,
  parameter int unsigned D_WAYS     = 4,
  parameter int unsigned D_SETS     = 256,
  parameter int unsigned D_LINE_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- VSP core -------------------------------------------------------
  input  logic        ctrl_en,
  input  logic        fixed_le,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  output logic        dmem_re,
  output logic        dmem_we,
  output logic [31:0] dmem_wdata,
  output logic [3:0]  dmem_be,
  input  logic [31:0] dmem_rdata,
  output mode_e       mode_o,
  output logic        retire_o,
  output logic [31:0] retire_pc_o,
  output logic        ev_mispredict,
  output logic        ev_migrate,
  output logic        ev_to_le,
  output logic        ev_to_hs,
  output logic        ev_stall,
  // ---- generated core: fetch port ---------------------------------------
  input  logic        f_req,
  input  logic [31:0] f_pc,
  output logic        f_ack,
  output logic [31:0] f_instr [FETCH_W],
  output logic        f_miss,
  // ---- generated core: load/store port ----------------------------------
  input  logic        d_req,
  input  logic        d_we,
  input  logic [31:0] d_addr,
  input  logic [31:0] d_wdata,
  output logic        d_ack,
  output logic [31:0] d_rdata,
  output logic        d_miss,
  output logic        d_snoop_hit,
  // ---- further bus master (uncached) ------------------------------------
  input  bus_req_t    x_req,
  output bus_rsp_t    x_rsp,
  // ---- shared-memory side -------------------------------------------------
  output bus_req_t    mem_req,
  input  bus_rsp_t    mem_rsp,
  output logic        bus_busy
);

  vsp_core #(
    .RESET_PC(RESET_PC), .LE_DIV(LE_DIV),
    .BP_ENTRIES(BP_ENTRIES), .CTRL_DEPTH(CTRL_DEPTH)
  ) u_vsp (
    .clk, .rst_n, .ctrl_en, .fixed_le,
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_re, .dmem_we, .dmem_wdata, .dmem_be, .dmem_rdata,
    .mode_o, .retire_o, .retire_pc_o,
    .ev_mispredict, .ev_migrate, .ev_to_le, .ev_to_hs, .ev_stall
  );

  bus_req_t m_req   [3];
  bus_rsp_t m_rsp   [3];
  snoop_t   snoop   [3];
  logic     snoop_hit [3];
  bus_req_t s_req   [1];
  bus_rsp_t s_rsp   [1];

  assign m_req[0]     = x_req;
  assign x_rsp        = m_rsp[0];
  assign snoop_hit[0] = 1'b0;      // uncached master holds no lines
  assign snoop_hit[1] = 1'b0;      // instruction cache does not snoop

  fabcache_l1i #(.FETCH_W(FETCH_W), .BANK_SETS(I_BANK_SETS)) u_l1i (
    .clk, .rst_n,
    .f_req, .f_pc, .f_ack, .f_instr, .f_miss,
    .b_req(m_req[1]), .b_rsp(m_rsp[1])
  );

  fabcache_l1d #(.WAYS(D_WAYS), .SETS(D_SETS), .LINE_WORDS(D_LINE_WORDS)) u_l1d (
    .clk, .rst_n,
    .c_req(d_req), .c_we(d_we), .c_addr(d_addr), .c_wdata(d_wdata),
    .c_ack(d_ack), .c_rdata(d_rdata), .c_miss(d_miss),
    .b_req(m_req[2]), .b_rsp(m_rsp[2]),
    .snoop(snoop[2]), .snoop_hit(snoop_hit[2])
  );
  assign d_snoop_hit = snoop_hit[2];

  fabbus #(.N_MASTER(3), .N_SLAVE(1)) u_bus (
    .clk, .rst_n,
    .m_req, .m_rsp, .snoop, .snoop_hit,
    .s_req, .s_rsp, .busy(bus_busy)
  );
  assign mem_req  = s_req[0];
  assign s_rsp[0] = mem_rsp;

endmodule
