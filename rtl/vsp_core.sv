// vsp_core: variable stages pipeline (VSP) processor core, an in-order
// MIPS R3000-compatible integer pipeline whose depth changes at run time.
//
// High-speed (HS) mode is a 7-stage pipeline
//     F  D  R  EX1  EX2  M  W
// (branches resolve in EX1, the ALU takes two stages, a 1K-entry gshare
// predictor redirects fetch from D). Low-energy (LE) mode unifies it into
// three stages, FDR | EX | MW, clocked at a quarter of the HS rate: the
// pipeline registers inside a unified group are made transparent, the
// branch predictor is stopped (the branch resolves before the next fetch,
// so nothing is mispredicted) and the ALU never causes an interlock.
// The EX1/EX2 register is a bank of LDS-cells (lds_cell), so in LE mode the
// EX1 logic is separated from EX2 by a latch that blocks glitches during
// the first half of the cycle. The other unified registers are modelled as
// a register plus bypass multiplexer.
//
// Depth changes, from the depth_ctrl request unify_req:
//  * LE -> HS at any LE cycle: F, EX1 and M carry on with their
//    instructions, the other stage registers are emptied.
//  * HS -> LE only when a branch misprediction in EX1 already flushes the
//    front end. The delay slot moves into EX1, the machine enters
//    migration (MIG) mode: F/D/R are unified and run at the LE rate while
//    EX1..W keep the HS rate and drain. The first new instruction reaches
//    EX1 four HS cycles later, when the back end is empty, and the core is
//    in LE mode. The flush is thus hidden behind the misprediction.
//
// Quarter-rate operation is modelled with clock enables (fe_en for the
// front end, be_en for the back end) on one clock, which also models the
// clock gating of idle pipeline registers.
//
// What follows the published design: the stage names and counts, the
// 7/3-stage modes, 2-stage ALU, branch in EX1, branch delay slot, the
// 1K-entry gshare predictor stopped in LE mode, LE at 1/4 of the HS clock,
// migration mode and its 4-cycle front end, the LE->HS rule, LDS-cells,
// thresholds in otherwise unused co-processor registers, and the external
// controller-disable input with a fixed mode. This design's own choices:
// the instruction subset (no exceptions, ADD/ADDI do not trap), the
// multiply/divide unit modelled as a MDU_LAT-clock delay to HI/LO with its
// divide-by-zero results, the forwarding network and interlocks, where the ALU is split, the
// CP0 register numbers 22/23/24 (written with MTC0), and skipping the
// migration when the delay slot is stalled.
//
// Memory interface: instruction and data memories are external and read
// combinationally (the fabricated chip had no cache); data writes take
// place at the clock edge that ends the M stage. Byte and halfword
// stores repeat their data in every lane and set dmem_be; loads pick the
// lane from the word read and extend it (little-endian). LWL/LWR merge
// memory bytes into the old rt value, SWL/SWR write part of a word.
module vsp_core
  import vsp_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'hbfc0_0000,
  parameter int unsigned LE_DIV   = 4,
  parameter int unsigned BP_ENTRIES = 1024,
  parameter int unsigned CTRL_DEPTH = 32,
  parameter int unsigned MDU_LAT    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // depth controller control (external pins of the chip)
  input  logic        ctrl_en,      // 0: controller disabled (clock gated)
  input  logic        fixed_le,     // mode while disabled: 1 = low-energy
  // instruction memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data memory
  output logic [31:0] dmem_addr,
  output logic        dmem_re,
  output logic        dmem_we,
  output logic [31:0] dmem_wdata,
  output logic [3:0]  dmem_be,      // byte lanes written by a store
  input  logic [31:0] dmem_rdata,
  // status and events
  output mode_e       mode_o,
  output logic        retire_o,     // an instruction retired this clock
  output logic [31:0] retire_pc_o,
  output logic        ev_mispredict,
  output logic        ev_migrate,   // HS -> MIG (unification started)
  output logic        ev_to_le,     // MIG -> LE
  output logic        ev_to_hs,     // LE -> HS
  output logic        ev_stall      // interlock bubble inserted
);

  localparam int unsigned BPW = $clog2(BP_ENTRIES);
  localparam int unsigned CW  = $clog2(LE_DIV);
  localparam int unsigned SW  = $clog2(CTRL_DEPTH + 1);

  // ------------------------------------------------------------------
  // Mode and clock enables
  // ------------------------------------------------------------------
  mode_e       mode_q;
  logic [CW-1:0] cnt_q;
  logic        tick, fe_uni, be_uni, fe_en, be_en;
  logic        unify_req;

  assign tick   = (cnt_q == CW'(LE_DIV - 1));
  assign fe_uni = (mode_q != MODE_HS);
  assign be_uni = (mode_q == MODE_LE);
  assign fe_en  = fe_uni ? tick : 1'b1;
  assign be_en  = be_uni ? tick : 1'b1;
  assign mode_o = mode_q;

  // ------------------------------------------------------------------
  // Pipeline state
  // ------------------------------------------------------------------
  logic [31:0] pc_q;
  fetch_t      sD;
  dec_t        sR;
  ex_t         sE1;
  e2_t         e2_d, e2_q;
  logic        e2_valid_q;
  mem_t        sM, sW;
  logic [31:0] rf [32];

  // ------------------------------------------------------------------
  // F and D
  // ------------------------------------------------------------------
  fetch_t f_cur, d_in;
  dec_t   dD;
  logic   bp_taken;
  logic [BPW-1:0] bp_idx;

  assign imem_addr = pc_q;
  assign f_cur     = '{valid: 1'b1, pc: pc_q, instr: imem_rdata};
  assign d_in      = fe_uni ? f_cur : sD;

  function automatic dec_t decode(fetch_t f);
    dec_t d;
    logic [5:0]  op, fn;
    logic [31:0] pc4;
    pc4 = f.pc + 32'd4;
    op = f.instr[31:26];
    fn = f.instr[5:0];
    d = '0;
    d.valid  = f.valid;
    d.pc     = f.pc;
    d.rs     = f.instr[25:21];
    d.rt     = f.instr[20:16];
    d.shamt  = f.instr[10:6];
    d.imm    = {{16{f.instr[15]}}, f.instr[15:0]};
    d.alu_op = ALU_ADD;
    d.br_target = pc4 + {{14{f.instr[15]}}, f.instr[15:0], 2'b00};
    unique case (op)
      OP_RTYPE: begin
        d.use_rs = 1'b1;
        d.use_rt = 1'b1;
        d.dst    = f.instr[15:11];
        unique case (fn)
          FN_SLL:  begin d.alu_op = ALU_SLL; d.use_rs = 1'b0; end
          FN_SRL:  begin d.alu_op = ALU_SRL; d.use_rs = 1'b0; end
          FN_SRA:  begin d.alu_op = ALU_SRA; d.use_rs = 1'b0; end
          FN_SLLV: begin d.alu_op = ALU_SLL; d.shv = 1'b1; end
          FN_SRLV: begin d.alu_op = ALU_SRL; d.shv = 1'b1; end
          FN_SRAV: begin d.alu_op = ALU_SRA; d.shv = 1'b1; end
          FN_JR:   begin d.is_jr = 1'b1; d.use_rt = 1'b0; d.dst = '0; end
          FN_JALR: begin d.is_jr = 1'b1; d.use_rt = 1'b0; d.is_link = 1'b1; end
          FN_MULT, FN_MULTU, FN_DIV, FN_DIVU: begin
            d.is_mdu = 1'b1;
            d.mdu_fn = fn[1:0];
            d.dst    = '0;
          end
          FN_MFHI, FN_MFLO: begin
            d.alu_op = ALU_MF;
            d.mf_hi  = (fn == FN_MFHI);
            d.use_rs = 1'b0;
            d.use_rt = 1'b0;
          end
          FN_ADD, FN_ADDU: d.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: d.alu_op = ALU_SUB;
          FN_AND:  d.alu_op = ALU_AND;
          FN_OR:   d.alu_op = ALU_OR;
          FN_XOR:  d.alu_op = ALU_XOR;
          FN_NOR:  d.alu_op = ALU_NOR;
          FN_SLT:  d.alu_op = ALU_SLT;
          FN_SLTU: d.alu_op = ALU_SLTU;
          default: begin d.dst = '0; d.use_rs = 1'b0; d.use_rt = 1'b0; end
        endcase
      end
      OP_J, OP_JAL: begin
        d.is_j      = 1'b1;
        d.br_target = {pc4[31:28], f.instr[25:0], 2'b00};
        if (op == OP_JAL) begin
          d.is_link = 1'b1;
          d.dst     = 5'd31;
        end
      end
      OP_BEQ, OP_BNE: begin
        d.is_br   = 1'b1;
        d.br_cond = (op == OP_BNE) ? BR_NE : BR_EQ;
        d.use_rs  = 1'b1;
        d.use_rt  = 1'b1;
      end
      OP_BLEZ, OP_BGTZ: begin
        d.is_br   = 1'b1;
        d.br_cond = (op == OP_BGTZ) ? BR_GTZ : BR_LEZ;
        d.use_rs  = 1'b1;
      end
      OP_REGIMM: begin
        // rt: 0 BLTZ, 1 BGEZ, 16 BLTZAL, 17 BGEZAL (others: no operation)
        if (f.instr[19:17] == 3'b000) begin
          d.is_br   = 1'b1;
          d.br_cond = f.instr[16] ? BR_GEZ : BR_LTZ;
          d.use_rs  = 1'b1;
          if (f.instr[20]) begin
            d.is_link = 1'b1;
            d.dst     = 5'd31;
          end
        end
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        d.use_rs  = (op != OP_LUI);
        d.use_imm = 1'b1;
        d.dst     = f.instr[20:16];
        unique case (op)
          OP_SLTI:  d.alu_op = ALU_SLT;
          OP_SLTIU: d.alu_op = ALU_SLTU;
          OP_ANDI:  begin d.alu_op = ALU_AND; d.imm = {16'h0, f.instr[15:0]}; end
          OP_ORI:   begin d.alu_op = ALU_OR;  d.imm = {16'h0, f.instr[15:0]}; end
          OP_XORI:  begin d.alu_op = ALU_XOR; d.imm = {16'h0, f.instr[15:0]}; end
          OP_LUI:   d.alu_op = ALU_LUI;
          default:  d.alu_op = ALU_ADD;
        endcase
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        d.use_rs   = 1'b1;
        d.use_imm  = 1'b1;
        d.is_load  = 1'b1;
        d.dst      = f.instr[20:16];
        d.mem_size = op[1:0];
        d.mem_uns  = op[2];
      end
      OP_LWL, OP_LWR: begin
        // unaligned load: merges memory bytes into the old rt value
        d.use_rs    = 1'b1;
        d.use_rt    = 1'b1;
        d.use_imm   = 1'b1;
        d.is_load   = 1'b1;
        d.dst       = f.instr[20:16];
        d.mem_size  = 2'd2;
        d.mem_left  = (op == OP_LWL);
        d.mem_right = (op == OP_LWR);
      end
      OP_SWL, OP_SWR: begin
        d.use_rs    = 1'b1;
        d.use_rt    = 1'b1;
        d.use_imm   = 1'b1;
        d.is_store  = 1'b1;
        d.mem_size  = 2'd2;
        d.mem_left  = (op == OP_SWL);
        d.mem_right = (op == OP_SWR);
      end
      OP_SB, OP_SH, OP_SW: begin
        d.use_rs   = 1'b1;
        d.use_rt   = 1'b1;
        d.use_imm  = 1'b1;
        d.is_store = 1'b1;
        d.mem_size = op[1:0];
      end
      OP_COP0: begin
        if (f.instr[25:21] == COP_MT) begin
          d.is_mtc0 = 1'b1;
          d.use_rt  = 1'b1;
          d.c0reg   = f.instr[15:11];
        end
      end
      default: ;  // unsupported: executes as a no-op
    endcase
    return d;
  endfunction

  always_comb begin
    dD = decode(d_in);
    dD.bp_idx = 10'(bp_idx);
    // Prediction only with a separate D stage (HS mode); the unified
    // front end waits for EX to resolve the branch.
    dD.pred_taken = !fe_uni && d_in.valid && (dD.is_j || (dD.is_br && bp_taken));
  end

  // Multiply/divide unit state (see the MDU section below).
  logic [31:0] hi_q, lo_q;
  logic        mdu_wait;

  // ------------------------------------------------------------------
  // R: register read, forwarding and interlock
  // ------------------------------------------------------------------
  dec_t        r_in;
  dec_t        e2_ctl;
  logic        e2v_valid;
  logic [31:0] e2_res, m_res, ld_val;
  mem_t        w_view;
  logic [31:0] op_a, op_b;
  logic        haz_a, haz_b, stall;

  assign r_in = fe_uni ? dD : sR;

  // EX2 view: in LE mode EX1 and EX2 are the same (unified) stage.
  always_comb begin
    e2_ctl    = be_uni ? sE1.d : e2_q.d;
    e2v_valid = be_uni ? sE1.d.valid : e2_valid_q;
    e2_ctl.valid = e2v_valid;
  end

  // EX2: finish the split ALU.
  always_comb begin
    logic [16:0] hi;
    logic        slt;
    hi  = {1'b0, e2_q.a_hi} + {1'b0, e2_q.bx_hi} + 17'(e2_q.carry);
    // signed compare: sign of a-b unless the operand signs differ
    slt = (e2_q.a_hi[15] != ~e2_q.bx_hi[15]) ? e2_q.a_hi[15] : hi[15];
    unique case (e2_q.d.alu_op)
      ALU_ADD, ALU_SUB: e2_res = e2_q.d.is_link ? e2_q.simple : {hi[15:0], e2_q.lo};
      ALU_SLT:          e2_res = {31'h0, slt};
      ALU_SLTU:         e2_res = {31'h0, ~hi[16]};
      default:          e2_res = e2_q.simple;
    endcase
  end

  // Load data: the addressed byte or halfword lane (little-endian),
  // sign- or zero-extended.
  always_comb begin
    logic [31:0] lane;
    logic [31:0] keep;
    lane = dmem_rdata >> {sM.res[1:0], 3'b000};
    unique case (sM.d.mem_size)
      2'd0:    ld_val = sM.d.mem_uns ? {24'h0, lane[7:0]}  : {{24{lane[7]}}, lane[7:0]};
      2'd1:    ld_val = sM.d.mem_uns ? {16'h0, lane[15:0]} : {{16{lane[15]}}, lane[15:0]};
      default: ld_val = dmem_rdata;
    endcase
    // LWL: bytes 0..k of the word go to the top of rt (k = address[1:0]);
    // LWR: bytes k..3 go to the bottom of rt; the other bytes of rt stay.
    if (sM.d.mem_left) begin
      keep   = 32'hffff_ffff >> {3'(sM.res[1:0]) + 3'd1, 3'b000};
      ld_val = (dmem_rdata << {2'(~sM.res[1:0]), 3'b000}) | (sM.b & keep);
    end else if (sM.d.mem_right) begin
      keep   = ~(32'hffff_ffff >> {sM.res[1:0], 3'b000});
      ld_val = lane | (sM.b & keep);
    end
  end

  assign m_res  = sM.d.is_load ? ld_val : sM.res;

  always_comb begin
    w_view = sW;
    if (be_uni) begin
      w_view     = sM;
      w_view.res = m_res;
    end
  end

  function automatic logic [32:0] fwd(input logic [4:0] r, input logic used);
    // returns {hazard, value}
    if (!used || r == 5'd0)
      return {1'b0, 32'h0};
    if (!be_uni && sE1.d.valid && sE1.d.dst == r)
      return {1'b1, 32'h0};                         // ALU result not ready
    if (e2v_valid && e2_ctl.dst == r)
      return e2_ctl.is_load ? {1'b1, 32'h0} : {1'b0, e2_res};
    if (sM.d.valid && sM.d.dst == r)
      return {1'b0, m_res};
    if (!be_uni && sW.d.valid && sW.d.dst == r)
      return {1'b0, sW.res};
    return {1'b0, rf[r]};
  endfunction

  always_comb begin
    {haz_a, op_a} = fwd(r_in.rs, r_in.use_rs);
    {haz_b, op_b} = fwd(r_in.rt, r_in.use_rt);
    // MFHI/MFLO read HI/LO in EX1 and wait for the multiply/divide unit.
    stall = r_in.valid && (haz_a || haz_b ||
                           (r_in.alu_op == ALU_MF && (mdu_wait || (!be_uni && sE1.d.valid && sE1.d.is_mdu))));
  end

  // ------------------------------------------------------------------
  // EX1: branch resolution and first ALU half
  // ------------------------------------------------------------------
  logic        e1_taken, e1_redirect;
  logic [31:0] e1_target, dslot_pc;

  always_comb begin
    logic [31:0] bop, bx;
    logic [4:0]  sa;
    logic        sub, cond;
    unique case (sE1.d.br_cond)
      BR_EQ:   cond = (sE1.a == sE1.b);
      BR_NE:   cond = (sE1.a != sE1.b);
      BR_LEZ:  cond = sE1.a[31] || (sE1.a == 32'h0);
      BR_GTZ:  cond = !sE1.a[31] && (sE1.a != 32'h0);
      BR_LTZ:  cond = sE1.a[31];
      default: cond = !sE1.a[31];
    endcase
    e1_taken = sE1.d.is_j || sE1.d.is_jr || (sE1.d.is_br && cond);
    e1_target   = sE1.d.is_jr ? sE1.a : (e1_taken ? sE1.d.br_target : sE1.d.pc + 32'd8);
    e1_redirect = sE1.d.valid && be_en && (e1_taken != sE1.d.pred_taken);
    dslot_pc    = sE1.d.pc + 32'd4;

    sa  = sE1.d.shv ? sE1.a[4:0] : sE1.d.shamt;
    bop = sE1.d.use_imm ? sE1.d.imm : sE1.b;
    sub = (sE1.d.alu_op == ALU_SUB) || (sE1.d.alu_op == ALU_SLT) || (sE1.d.alu_op == ALU_SLTU);
    bx  = sub ? ~bop : bop;
    e2_d       = '0;
    e2_d.d     = sE1.d;
    e2_d.b     = sE1.b;
    {e2_d.carry, e2_d.lo} = {1'b0, sE1.a[15:0]} + {1'b0, bx[15:0]} + 17'(sub);
    e2_d.a_hi  = sE1.a[31:16];
    e2_d.bx_hi = bx[31:16];
    unique case (sE1.d.alu_op)
      ALU_AND: e2_d.simple = sE1.a & bop;
      ALU_OR:  e2_d.simple = sE1.a | bop;
      ALU_XOR: e2_d.simple = sE1.a ^ bop;
      ALU_NOR: e2_d.simple = ~(sE1.a | bop);
      ALU_SLL: e2_d.simple = sE1.b << sa;
      ALU_SRL: e2_d.simple = sE1.b >> sa;
      ALU_SRA: e2_d.simple = $signed(sE1.b) >>> sa;
      ALU_LUI: e2_d.simple = {sE1.d.imm[15:0], 16'h0};
      ALU_MF:  e2_d.simple = sE1.d.mf_hi ? hi_q : lo_q;
      default: e2_d.simple = sE1.d.pc + 32'd8;   // link value
    endcase
  end

  // EX1/EX2 boundary: LDS-cells (latch in LE mode, flip-flop otherwise).
  lds_cell #(.WIDTH($bits(e2_t))) u_lds_ex (
    .clk   (clk),
    .cg_en (be_en),
    .unify (be_uni),
    .d     (e2_d),
    .q     (e2_q)
  );

  // ------------------------------------------------------------------
  // Sequencing
  // ------------------------------------------------------------------
  logic adv_fe, d_predict, go_mig, go_le, go_hs;
  logic keep_f, keep_d, keep_r;

  assign adv_fe    = fe_en && !stall;
  assign d_predict = !fe_uni && sD.valid && dD.pred_taken;
  // Instructions younger than the branch delay slot are squashed.
  assign keep_f    = !e1_redirect || (pc_q == dslot_pc);
  assign keep_d    = !e1_redirect || (sD.pc == dslot_pc);
  assign keep_r    = !e1_redirect || (r_in.pc == dslot_pc);

  assign go_mig = (mode_q == MODE_HS) && e1_redirect && unify_req && !stall &&
                  sR.valid && (sR.pc == dslot_pc);
  assign go_le  = (mode_q == MODE_MIG) && tick && !sE1.d.valid && !e2_valid_q && !sM.d.valid;
  assign go_hs  = (mode_q == MODE_LE) && tick && !unify_req;

  assign ev_mispredict = e1_redirect && !be_uni;
  assign ev_migrate    = go_mig;
  assign ev_to_le      = go_le;
  assign ev_to_hs      = go_hs;
  assign ev_stall      = stall && fe_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= fixed_le && !ctrl_en ? MODE_LE : MODE_HS;
      cnt_q  <= '0;
    end else begin
      if (go_mig) begin
        mode_q <= MODE_MIG;
        cnt_q  <= '0;
      end else begin
        if (go_le) mode_q <= MODE_LE;
        if (go_hs) mode_q <= MODE_HS;
        cnt_q <= (mode_q == MODE_HS || go_hs) ? '0 : cnt_q + CW'(1);
      end
    end
  end

  // PC
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    pc_q <= RESET_PC;
    else if (e1_redirect)          pc_q <= e1_target;
    else if (adv_fe && d_predict)  pc_q <= dD.br_target;
    else if (adv_fe)               pc_q <= pc_q + 32'd4;
  end

  // F -> D, D -> R (transparent while the front end is unified)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sD <= '0;
      sR <= '0;
    end else if (fe_uni || go_mig) begin
      sD.valid <= 1'b0;
      sR.valid <= 1'b0;
    end else if (adv_fe) begin
      sD       <= f_cur;
      sD.valid <= keep_f;
      sR       <= dD;
      sR.valid <= sD.valid && keep_d;
    end else if (e1_redirect) begin
      if (!keep_d) sD.valid <= 1'b0;
      if (!keep_r) sR.valid <= 1'b0;
    end
  end

  // R -> EX1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sE1 <= '0;
    end else if (be_en) begin
      sE1.d     <= r_in;
      sE1.d.valid <= adv_fe && r_in.valid && keep_r;
      sE1.a     <= op_a;
      sE1.b     <= op_b;
    end
  end

  // EX2 valid, EX2 -> M, M -> W
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e2_valid_q <= 1'b0;
      sM <= '0;
      sW <= '0;
    end else begin
      if (be_uni || go_hs) e2_valid_q <= 1'b0;
      else if (be_en)      e2_valid_q <= sE1.d.valid;
      if (be_en) begin
        sM.d   <= e2_ctl;
        sM.res <= e2_res;
        sM.b   <= e2_q.b;
      end
      if (be_uni || go_hs) begin
        sW.d.valid <= 1'b0;
      end else if (be_en) begin
        sW     <= sM;
        sW.res <= m_res;
      end
    end
  end

  // Register file, written by W.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) rf[i] <= '0;
    end else if (be_en && w_view.d.valid && w_view.d.dst != 5'd0) begin
      rf[w_view.d.dst] <= w_view.res;
    end
  end

  // M: data memory.
  assign dmem_addr  = sM.res;
  assign dmem_re    = sM.d.valid && sM.d.is_load;
  assign dmem_we    = sM.d.valid && sM.d.is_store && be_en;
  always_comb begin
    unique case (sM.d.mem_size)
      2'd0: begin
        dmem_wdata = {4{sM.b[7:0]}};
        dmem_be    = 4'b0001 << sM.res[1:0];
      end
      2'd1: begin
        dmem_wdata = {2{sM.b[15:0]}};
        dmem_be    = sM.res[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        dmem_wdata = sM.b;
        dmem_be    = 4'b1111;
      end
    endcase
    // SWL: the top k+1 bytes of rt to lanes 0..k; SWR: the bottom bytes of
    // rt to lanes k..3 (k = address[1:0]).
    if (sM.d.mem_left) begin
      dmem_wdata = sM.b >> {2'(~sM.res[1:0]), 3'b000};
      dmem_be    = 4'b1111 >> 2'(~sM.res[1:0]);
    end else if (sM.d.mem_right) begin
      dmem_wdata = sM.b << {sM.res[1:0], 3'b000};
      dmem_be    = 4'b1111 << sM.res[1:0];
    end
  end

  assign retire_o    = be_en && w_view.d.valid;
  assign retire_pc_o = w_view.d.pc;

  // ------------------------------------------------------------------
  // MDU: multiply/divide, MDU_LAT clocks from EX1 to HI/LO
  // ------------------------------------------------------------------
  // The operation starts when it leaves EX1. Its result is computed at
  // once and held for MDU_LAT-1 further clocks before HI/LO take it, the
  // timing of a MDU_LAT-stage unit; MFHI/MFLO stall in R until then. In LE
  // mode MDU_LAT clocks fit in one LE cycle, so nothing waits.
  logic [63:0]   mdu_res;
  logic [63:0]   pend_q;
  logic [$clog2(MDU_LAT):0] mdu_cnt_q;

  always_comb begin
    logic signed [63:0] sp;
    sp = $signed(sE1.a) * $signed(sE1.b);
    unique case (sE1.d.mdu_fn)
      2'd0: mdu_res = sp;
      2'd1: mdu_res = {32'h0, sE1.a} * {32'h0, sE1.b};
      2'd2: begin
        // HI = remainder, LO = quotient; x/0 gives LO = -1, HI = x, and
        // -2^31/-1 gives LO = -2^31, HI = 0 (the architecture leaves both open)
        if (sE1.b == 32'h0)
          mdu_res = {sE1.a, 32'hffff_ffff};
        else if (sE1.a == 32'h8000_0000 && sE1.b == 32'hffff_ffff)
          mdu_res = {32'h0, 32'h8000_0000};
        else
          mdu_res = {32'($signed(sE1.a) % $signed(sE1.b)), 32'($signed(sE1.a) / $signed(sE1.b))};
      end
      default: begin
        if (sE1.b == 32'h0) mdu_res = {sE1.a, 32'hffff_ffff};
        else                mdu_res = {sE1.a % sE1.b, sE1.a / sE1.b};
      end
    endcase
  end

  assign mdu_wait = (mdu_cnt_q > 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_q      <= '0;
      lo_q      <= '0;
      pend_q    <= '0;
      mdu_cnt_q <= '0;
    end else begin
      if (mdu_cnt_q == 1) {hi_q, lo_q} <= pend_q;
      if (be_en && sE1.d.valid && sE1.d.is_mdu) begin
        pend_q    <= mdu_res;
        mdu_cnt_q <= ($clog2(MDU_LAT) + 1)'(MDU_LAT - 1);
      end else if (mdu_cnt_q != 0) begin
        mdu_cnt_q <= mdu_cnt_q - 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------
  // Branch predictor and depth controller
  // ------------------------------------------------------------------
  gshare_bp #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (mode_q == MODE_HS),
    .lk_pc    (d_in.pc),
    .lk_taken (bp_taken),
    .lk_idx   (bp_idx),
    .up_valid (sE1.d.valid && sE1.d.is_br),
    .up_idx   (BPW'(sE1.d.bp_idx)),
    .up_taken (e1_taken)
  );

  logic          th_we;
  logic [1:0]    th_sel;
  logic [SW-1:0] ipc_sum, br_sum, th_htol, th_ltoh, th_br;

  assign th_we  = be_en && sM.d.valid && sM.d.is_mtc0 &&
                  (sM.d.c0reg == C0_TH_HTOL || sM.d.c0reg == C0_TH_LTOH || sM.d.c0reg == C0_TH_BR);
  assign th_sel = (sM.d.c0reg == C0_TH_HTOL) ? 2'd0 : (sM.d.c0reg == C0_TH_LTOH) ? 2'd1 : 2'd2;

  depth_ctrl #(.DEPTH(CTRL_DEPTH)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .ctrl_en   (ctrl_en),
    .fixed_le  (fixed_le),
    .le_mode   (mode_q != MODE_HS),
    .sample_en (be_en),
    .retire    (retire_o),
    .is_branch (w_view.d.is_br || w_view.d.is_j || w_view.d.is_jr),
    .th_we     (th_we),
    .th_sel    (th_sel),
    .th_wdata  (SW'(sM.b)),
    .unify_req (unify_req),
    .ipc_sum   (ipc_sum),
    .br_sum    (br_sum),
    .th_htol   (th_htol),
    .th_ltoh   (th_ltoh),
    .th_br     (th_br)
  );

  // In LE mode no branch can be mispredicted (nothing is predicted).
  a_no_pred_le : assert property (@(posedge clk) disable iff (!rst_n)
                                  (mode_q == MODE_LE) |-> !(sE1.d.valid && sE1.d.pred_taken));

endmodule
