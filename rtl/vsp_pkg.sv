// vsp_pkg: types and constants shared by the variable stages pipeline (VSP)
// processor. The core executes an integer subset of the MIPS R3000
// instruction set; this package holds the opcode and function-field values,
// the ALU operation encoding, the pipeline mode and the records that travel
// between pipeline stages.
//
// Pipeline modes: HS is the 7-stage high-speed pipeline (F D R EX1 EX2 M W),
// LE the 3-stage low-energy pipeline (FDR, EX, MW) clocked at a quarter of
// the HS rate, and MIG the migration mode used while the pipeline is being
// unified (front end already unified and slow, back end still deep and fast).
package vsp_pkg;

  // Primary opcodes (instr[31:26]) of the supported subset.
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_REGIMM = 6'h01;  // BLTZ/BGEZ(AL), selected by rt
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_BLEZ  = 6'h06;
  localparam logic [5:0] OP_BGTZ  = 6'h07;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0a;
  localparam logic [5:0] OP_SLTIU = 6'h0b;
  localparam logic [5:0] OP_ANDI  = 6'h0c;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_XORI  = 6'h0e;
  localparam logic [5:0] OP_LUI   = 6'h0f;
  localparam logic [5:0] OP_COP0  = 6'h10;
  localparam logic [5:0] OP_LB    = 6'h20;
  localparam logic [5:0] OP_LH    = 6'h21;
  localparam logic [5:0] OP_LWL   = 6'h22;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_LBU   = 6'h24;
  localparam logic [5:0] OP_LHU   = 6'h25;
  localparam logic [5:0] OP_LWR   = 6'h26;
  localparam logic [5:0] OP_SB    = 6'h28;
  localparam logic [5:0] OP_SH    = 6'h29;
  localparam logic [5:0] OP_SWL   = 6'h2a;
  localparam logic [5:0] OP_SWR   = 6'h2e;
  localparam logic [5:0] OP_SW    = 6'h2b;

  // Function field (instr[5:0]) of R-type instructions.
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_JALR = 6'h09;
  localparam logic [5:0] FN_MFHI = 6'h10;
  localparam logic [5:0] FN_MFLO = 6'h12;
  localparam logic [5:0] FN_MULT = 6'h18;
  localparam logic [5:0] FN_MULTU = 6'h19;
  localparam logic [5:0] FN_DIV  = 6'h1a;
  localparam logic [5:0] FN_DIVU = 6'h1b;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2a;
  localparam logic [5:0] FN_SLTU = 6'h2b;

  // rs field of COP0 instructions: MTC0.
  localparam logic [4:0] COP_MT = 5'h04;

  // Coprocessor-0 registers, unused by the base R3000, that hold the three
  // depth-controller thresholds.
  localparam logic [4:0] C0_TH_HTOL = 5'd22;
  localparam logic [4:0] C0_TH_LTOH = 5'd23;
  localparam logic [4:0] C0_TH_BR   = 5'd24;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI, ALU_MF
  } alu_op_e;

  // Condition of a conditional branch.
  typedef enum logic [2:0] {
    BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ
  } br_cond_e;

  typedef enum logic [1:0] {
    MODE_HS  = 2'd0,   // 7-stage high-speed mode
    MODE_MIG = 2'd1,   // migration: unified slow front end, deep fast back end
    MODE_LE  = 2'd2    // 3-stage low-energy mode
  } mode_e;

  // Fetched instruction (F -> D).
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } fetch_t;

  // Decoded instruction (D -> R and beyond).
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    alu_op_e     alu_op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  dst;        // destination register, 0 when none
    logic        use_rs;
    logic        use_rt;
    logic        use_imm;    // ALU operand B is the immediate
    logic [31:0] imm;
    logic [4:0]  shamt;
    logic        shv;        // shift amount from rs (SLLV/SRLV/SRAV)
    logic        is_load;
    logic        is_store;
    logic [1:0]  mem_size;   // 0 byte, 1 halfword, 2 word
    logic        mem_uns;    // LBU/LHU: zero-extend
    logic        mem_left;   // LWL/SWL
    logic        mem_right;  // LWR/SWR
    logic        is_br;      // conditional branch
    br_cond_e    br_cond;
    logic        is_j;       // j / jal
    logic        is_jr;      // jr / jalr
    logic        is_link;    // jal, jalr, bltzal, bgezal: writes pc+8
    logic        is_mtc0;
    logic        is_mdu;     // MULT, MULTU, DIV, DIVU
    logic [1:0]  mdu_fn;     // funct[1:0]: 0 MULT, 1 MULTU, 2 DIV, 3 DIVU
    logic        mf_hi;      // MFHI (else MFLO) when alu_op is ALU_MF
    logic [4:0]  c0reg;
    logic [31:0] br_target;  // pc+4+offset for branches, jump target for j/jal
    logic        pred_taken; // fetch was redirected to br_target in D
    logic [9:0]  bp_idx;     // gshare entry used for the prediction
  } dec_t;

  // Instruction with its operands (R -> EX1).
  typedef struct packed {
    dec_t        d;
    logic [31:0] a;
    logic [31:0] b;          // rt value (also store data / mtc0 data)
  } ex_t;

  // EX1 -> EX2 payload: the ALU is split in two stages. EX1 forms the low
  // half of an add/subtract with its carry and the complete result of the
  // single-stage operations; EX2 finishes the high half and the compares.
  typedef struct packed {
    dec_t        d;
    logic [31:0] b;          // store / mtc0 data
    logic [15:0] lo;         // low 16 bits of a +/- b
    logic        carry;      // carry out of the low half
    logic [15:0] a_hi;
    logic [15:0] bx_hi;      // high half of b, inverted for subtract
    logic [31:0] simple;     // result of logic, shift and lui operations
  } e2_t;

  // Completed instruction (EX2 -> M, M -> W).
  typedef struct packed {
    dec_t        d;
    logic [31:0] res;        // ALU result or load data (after M)
    logic [31:0] b;
  } mem_t;

endpackage
