// vsp_prog_pkg: test program and reference model for the VSP core
// testbenches.
//
// build_program() assembles, into an instruction image, a MIPS program with
// phases of different character: a load-use heavy loop (low IPC in the
// deep pipeline), a loop with data-dependent branches (mispredictions), a
// multiply/divide sequence whose results are read at once (MDU stalls),
// compare-with-zero branches, variable shifts and a JALR, byte, halfword
// and unaligned (LWL/LWR/SWL/SWR) loads and stores, a called routine
// of independent ALU instructions (high IPC), MTC0 writes
// of the depth-controller thresholds, and a final store to DONE_ADDR
// followed by an endless loop. iss_run() executes the same image with an
// instruction-level model (delayed branches, no pipeline) and records the
// retired PCs and the final data memory, which the testbenches compare with
// the RTL.
package vsp_prog_pkg;

  localparam logic [31:0] IBASE     = 32'hbfc0_0000;
  localparam int          IWORDS    = 512;
  localparam int          DWORDS    = 1024;       // data memory at 0x0000_0000
  localparam logic [31:0] DONE_ADDR = 32'h0000_0ffc;
  localparam int          MAXRET    = 20000;

  typedef logic [31:0] word_t;

  // ---------------- assembler ----------------
  function automatic word_t r_t(int fn, int rd, int rs, int rt, int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic word_t i_t(int op, int rt, int rs, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t addu(int rd, int rs, int rt); return r_t(6'h21, rd, rs, rt); endfunction
  function automatic word_t subu(int rd, int rs, int rt); return r_t(6'h23, rd, rs, rt); endfunction
  function automatic word_t and_(int rd, int rs, int rt); return r_t(6'h24, rd, rs, rt); endfunction
  function automatic word_t or_ (int rd, int rs, int rt); return r_t(6'h25, rd, rs, rt); endfunction
  function automatic word_t xor_(int rd, int rs, int rt); return r_t(6'h26, rd, rs, rt); endfunction
  function automatic word_t nor_(int rd, int rs, int rt); return r_t(6'h27, rd, rs, rt); endfunction
  function automatic word_t slt (int rd, int rs, int rt); return r_t(6'h2a, rd, rs, rt); endfunction
  function automatic word_t sltu(int rd, int rs, int rt); return r_t(6'h2b, rd, rs, rt); endfunction
  function automatic word_t sll (int rd, int rt, int sh); return r_t(6'h00, rd, 0, rt, sh); endfunction
  function automatic word_t srl (int rd, int rt, int sh); return r_t(6'h02, rd, 0, rt, sh); endfunction
  function automatic word_t sra (int rd, int rt, int sh); return r_t(6'h03, rd, 0, rt, sh); endfunction
  function automatic word_t jr  (int rs);                 return r_t(6'h08, 0, rs, 0); endfunction
  function automatic word_t sllv (int rd, int rt, int rs); return r_t(6'h04, rd, rs, rt); endfunction
  function automatic word_t srlv (int rd, int rt, int rs); return r_t(6'h06, rd, rs, rt); endfunction
  function automatic word_t srav (int rd, int rt, int rs); return r_t(6'h07, rd, rs, rt); endfunction
  function automatic word_t jalr (int rd, int rs);        return r_t(6'h09, rd, rs, 0); endfunction
  function automatic word_t mfhi (int rd);                return r_t(6'h10, rd, 0, 0); endfunction
  function automatic word_t mflo (int rd);                return r_t(6'h12, rd, 0, 0); endfunction
  function automatic word_t mult (int rs, int rt);        return r_t(6'h18, 0, rs, rt); endfunction
  function automatic word_t multu(int rs, int rt);        return r_t(6'h19, 0, rs, rt); endfunction
  function automatic word_t div_ (int rs, int rt);        return r_t(6'h1a, 0, rs, rt); endfunction
  function automatic word_t divu (int rs, int rt);        return r_t(6'h1b, 0, rs, rt); endfunction
  function automatic word_t addiu(int rt, int rs, int imm); return i_t(6'h09, rt, rs, imm); endfunction
  function automatic word_t slti (int rt, int rs, int imm); return i_t(6'h0a, rt, rs, imm); endfunction
  function automatic word_t sltiu(int rt, int rs, int imm); return i_t(6'h0b, rt, rs, imm); endfunction
  function automatic word_t andi (int rt, int rs, int imm); return i_t(6'h0c, rt, rs, imm); endfunction
  function automatic word_t ori  (int rt, int rs, int imm); return i_t(6'h0d, rt, rs, imm); endfunction
  function automatic word_t xori (int rt, int rs, int imm); return i_t(6'h0e, rt, rs, imm); endfunction
  function automatic word_t lui  (int rt, int imm);         return i_t(6'h0f, rt, 0, imm); endfunction
  function automatic word_t lw   (int rt, int rs, int off); return i_t(6'h23, rt, rs, off); endfunction
  function automatic word_t sw   (int rt, int rs, int off); return i_t(6'h2b, rt, rs, off); endfunction
  function automatic word_t lb   (int rt, int rs, int off); return i_t(6'h20, rt, rs, off); endfunction
  function automatic word_t lh   (int rt, int rs, int off); return i_t(6'h21, rt, rs, off); endfunction
  function automatic word_t lbu  (int rt, int rs, int off); return i_t(6'h24, rt, rs, off); endfunction
  function automatic word_t lhu  (int rt, int rs, int off); return i_t(6'h25, rt, rs, off); endfunction
  function automatic word_t sb   (int rt, int rs, int off); return i_t(6'h28, rt, rs, off); endfunction
  function automatic word_t sh   (int rt, int rs, int off); return i_t(6'h29, rt, rs, off); endfunction
  function automatic word_t lwl  (int rt, int rs, int off); return i_t(6'h22, rt, rs, off); endfunction
  function automatic word_t lwr  (int rt, int rs, int off); return i_t(6'h26, rt, rs, off); endfunction
  function automatic word_t swl  (int rt, int rs, int off); return i_t(6'h2a, rt, rs, off); endfunction
  function automatic word_t swr  (int rt, int rs, int off); return i_t(6'h2e, rt, rs, off); endfunction
  function automatic word_t mtc0 (int rt, int rd);          return {6'h10, 5'h04, 5'(rt), 5'(rd), 11'h0}; endfunction
  function automatic word_t nop  ();                        return 32'h0; endfunction

  class program_c;
    word_t img [IWORDS];
    int    n;
    function new(); n = 0; foreach (img[i]) img[i] = 32'h0; endfunction
    function void emit(word_t w); img[n] = w; n++; endfunction
    function int here(); return n; endfunction
    // branch from the current position to word index tgt
    function void beq(int rs, int rt, int tgt); emit(i_t(6'h04, rt, rs, tgt - (n + 1))); endfunction
    function void bne(int rs, int rt, int tgt); emit(i_t(6'h05, rt, rs, tgt - (n + 1))); endfunction
    function void blez(int rs, int tgt); emit(i_t(6'h06, 0, rs, tgt - (n + 1))); endfunction
    function void bgtz(int rs, int tgt); emit(i_t(6'h07, 0, rs, tgt - (n + 1))); endfunction
    // BLTZ, BGEZ, BLTZAL, BGEZAL: rt field 0, 1, 16, 17
    function void regimm(int code, int rs, int tgt); emit(i_t(6'h01, code, rs, tgt - (n + 1))); endfunction
    function void j  (int tgt); emit({6'h02, 26'((IBASE + 32'(tgt * 4)) >> 2)}); endfunction
    function void jal(int tgt); emit({6'h03, 26'((IBASE + 32'(tgt * 4)) >> 2)}); endfunction
    function void patch_jal(int at, int tgt); img[at] = {6'h03, 26'((IBASE + 32'(tgt * 4)) >> 2)}; endfunction
  endclass

  // Build the workload; 'outer' sets how often the phase sequence repeats,
  // 'th_htol' is written to the IPC_HtoL threshold register at the start.
  function automatic program_c build_program(int outer = 3, int th_htol = 15);
    program_c p = new();
    int l_init, l_outer, l_sum, l_br, l_skip, call_at, l_end, fn_at, l_cz;
    p.emit(addiu(1, 0, th_htol));
    p.emit(mtc0(1, 22));
    p.emit(addiu(2, 0, 32'h100));            // array base
    p.emit(addiu(3, 0, 24));                 // length
    p.emit(addiu(4, 0, 7));                  // seed
    l_init = p.here();                       // fill the array
    p.emit(sw(4, 2, 0));
    p.emit(sll(5, 4, 3));
    p.emit(xor_(4, 4, 5));
    p.emit(addiu(4, 4, 13));
    p.emit(addiu(3, 3, -1));
    p.bne(3, 0, l_init);
    p.emit(addiu(2, 2, 4));                  // delay slot
    p.emit(addiu(20, 0, outer));
    l_outer = p.here();
    // phase 1: load-use chain (low IPC in the deep pipeline)
    p.emit(addiu(2, 0, 32'h100));
    p.emit(addiu(3, 0, 24));
    p.emit(addiu(6, 0, 0));
    l_sum = p.here();
    p.emit(lw(7, 2, 0));
    p.emit(addu(6, 6, 7));
    p.emit(lw(8, 2, 0));
    p.emit(subu(6, 6, 8));
    p.emit(xor_(6, 6, 7));
    p.emit(sra(9, 6, 2));
    p.emit(addu(6, 6, 9));
    p.emit(addiu(3, 3, -1));
    p.bne(3, 0, l_sum);
    p.emit(addiu(2, 2, 4));                  // delay slot
    p.emit(sw(6, 0, 32'h200));
    // phase 2: data-dependent branches (mispredictions)
    p.emit(addiu(2, 0, 32'h100));
    p.emit(addiu(3, 0, 24));
    p.emit(addiu(10, 0, 0));
    l_br = p.here();
    p.emit(lw(7, 2, 0));
    p.emit(andi(11, 7, 4));
    l_skip = p.here() + 5;
    p.beq(11, 0, l_skip);
    p.emit(addiu(3, 3, -1));                 // delay slot
    p.emit(addiu(10, 10, 1));
    p.emit(slt(12, 10, 3));
    p.emit(sltu(13, 3, 10));
    // l_skip:
    p.bne(3, 0, l_br);
    p.emit(addiu(2, 2, 4));                  // delay slot
    p.emit(sw(10, 0, 32'h204));
    // phase 2b: multiply/divide unit, results read back at once (stalls)
    p.emit(mult(7, 10));
    p.emit(mflo(28));
    p.emit(mfhi(29));
    p.emit(addu(28, 28, 29));
    p.emit(ori(9, 0, 16'h0007));
    p.emit(div_(7, 9));
    p.emit(mflo(30));
    p.emit(addu(28, 28, 30));
    p.emit(mfhi(30));
    p.emit(addu(28, 28, 30));
    p.emit(multu(28, 7));
    p.emit(mfhi(30));
    p.emit(addu(28, 28, 30));
    p.emit(divu(7, 0));                      // divide by zero
    p.emit(nop());
    p.emit(mflo(30));
    p.emit(addu(28, 28, 30));
    p.emit(mfhi(30));
    p.emit(xor_(28, 28, 30));
    p.emit(sw(28, 0, 32'h20c));
    // phase 2c: variable shifts, compare-with-zero branches (with and
    // without link) on a count running from 2 down to -2, and a JALR
    p.emit(addiu(11, 0, 5));
    l_cz = p.here();
    p.emit(sllv(30, 7, 11));
    p.emit(srav(29, 30, 11));
    p.emit(srlv(19, 7, 11));
    p.emit(addu(28, 28, 30));
    p.emit(xor_(28, 28, 29));
    p.emit(addu(28, 28, 19));
    p.emit(addiu(9, 11, -3));
    p.blez(9, p.here() + 3);
    p.emit(nop());
    p.emit(addiu(28, 28, 1));
    p.bgtz(9, p.here() + 3);
    p.emit(sll(28, 28, 1));                  // delay slot
    p.emit(addiu(28, 28, 2));
    p.regimm(0, 9, p.here() + 3);            // bltz
    p.emit(nop());
    p.emit(addiu(28, 28, 4));
    p.regimm(1, 9, p.here() + 3);            // bgez
    p.emit(nop());
    p.emit(addiu(28, 28, 8));
    p.regimm(16, 9, p.here() + 3);           // bltzal
    p.emit(nop());
    p.emit(addiu(28, 28, 16));
    p.regimm(17, 9, p.here() + 2);           // bgezal
    p.emit(addu(28, 28, 31));                // delay slot
    p.emit(addiu(11, 11, -1));
    p.bne(11, 0, l_cz);
    p.emit(nop());
    p.emit(lui(1, IBASE[31:16]));
    p.emit(ori(1, 1, (p.here() + 5) * 4));
    p.emit(jalr(25, 1));
    p.emit(addiu(28, 28, 3));                // delay slot
    p.emit(addiu(28, 28, 100));              // skipped
    p.emit(addiu(28, 28, 200));              // skipped
    p.emit(addu(28, 28, 25));
    p.emit(sw(28, 0, 32'h210));
    // phase 2d: byte and halfword stores and loads, used at once
    p.emit(sw(28, 0, 32'h214));
    p.emit(sb(7, 0, 32'h215));
    p.emit(sh(19, 0, 32'h216));
    p.emit(lb(30, 0, 32'h214));
    p.emit(addu(28, 28, 30));
    p.emit(lbu(30, 0, 32'h215));
    p.emit(addu(28, 28, 30));
    p.emit(lh(30, 0, 32'h216));
    p.emit(xor_(28, 28, 30));
    p.emit(lhu(30, 0, 32'h214));
    p.emit(addu(28, 28, 30));
    p.emit(lb(30, 0, 32'h217));
    p.emit(subu(28, 28, 30));
    p.emit(sb(28, 0, 32'h21b));
    p.emit(sh(7, 0, 32'h218));
    p.emit(lw(30, 0, 32'h214));
    p.emit(addu(28, 28, 30));
    p.emit(ori(30, 0, 16'h85f1));            // negative byte and halfword
    p.emit(sh(30, 0, 32'h222));
    p.emit(lb(29, 0, 32'h223));
    p.emit(addu(28, 28, 29));
    p.emit(lh(29, 0, 32'h222));
    p.emit(xor_(28, 28, 29));
    p.emit(lb(29, 0, 32'h222));
    p.emit(addu(28, 28, 29));
    p.emit(lhu(29, 0, 32'h222));
    p.emit(addu(28, 28, 29));
    // unaligned word at every byte offset: SWR/SWL store it, LWR/LWL load
    // it back into a register that already holds other bytes
    for (int k = 0; k < 4; k++) begin
      p.emit(addu(29, 28, 7));
      p.emit(swr(29, 0, 32'h230 + 8 * k + k));
      p.emit(swl(29, 0, 32'h230 + 8 * k + k + 3));
      p.emit(lwr(28, 0, 32'h230 + 8 * k + 1));
      p.emit(lwl(28, 0, 32'h230 + 8 * k + 4 + k));
      p.emit(xor_(28, 28, 29));
    end
    p.emit(sw(28, 0, 32'h21c));
    // phase 3: call a routine of independent ALU work (high IPC)
    call_at = p.here();
    p.emit(nop());                           // patched to jal
    p.emit(ori(21, 0, 16'h1234));            // delay slot
    p.emit(sw(22, 0, 32'h208));
    p.emit(addiu(20, 20, -1));
    p.bne(20, 0, l_outer);
    p.emit(nop());
    // end: signal completion, then spin
    p.emit(lui(1, 16'h0));
    p.emit(sw(6, 0, DONE_ADDR[15:0]));
    l_end = p.here();
    p.beq(0, 0, l_end);
    p.emit(nop());
    // routine
    fn_at = p.here();
    p.patch_jal(call_at, fn_at);
    p.emit(addiu(22, 0, 1));
    for (int k = 0; k < 6; k++) begin
      p.emit(addiu(23, 0, k));
      p.emit(ori(24, 0, 16'h00f0));
      p.emit(sll(25, 21, k + 1));
      p.emit(addu(22, 22, 22));              // dependent every 4 instructions
      p.emit(nor_(26, 21, 0));
      p.emit(lui(27, k));
      p.emit(xori(14, 21, 16'h0ff0));
      p.emit(srl(15, 21, 3));
      p.emit(or_(16, 21, 23));
      p.emit(and_(17, 21, 24));
      p.emit(slti(18, 21, 100));
      p.emit(sltiu(19, 21, -1));
    end
    p.emit(addu(22, 22, 25));
    p.emit(addu(22, 22, 26));
    p.emit(jr(31));
    p.emit(addu(22, 22, 27));                // delay slot
    return p;
  endfunction

  // ---------------- instruction-level reference model ----------------
  class iss_c;
    word_t rf [32];
    word_t dmem [DWORDS];
    word_t pcs [$];
    int    nret;
    word_t th [3];
    word_t hi, lo;

    function automatic void run(program_c p);
      word_t pc, npc, ins, a, b, r, res;
      int    op, fn;
      bit    done;
      foreach (rf[i])   rf[i] = 0;
      foreach (dmem[i]) dmem[i] = 0;
      th = '{15, 21, 6};
      hi = 0; lo = 0;
      pcs.delete();
      pc = IBASE; npc = IBASE + 4; done = 0; nret = 0;
      while (!done && nret < MAXRET) begin
        word_t nnpc;
        ins = p.img[(pc - IBASE) >> 2];
        op = ins[31:26]; fn = ins[5:0];
        a = rf[ins[25:21]]; b = rf[ins[20:16]];
        nnpc = npc + 4;
        pcs.push_back(pc); nret++;
        case (op)
          0: begin
            case (fn)
              'h00: res = b << ins[10:6];
              'h02: res = b >> ins[10:6];
              'h03: res = $signed(b) >>> ins[10:6];
              'h04: res = b << a[4:0];
              'h06: res = b >> a[4:0];
              'h07: res = $signed(b) >>> a[4:0];
              'h08: nnpc = a;
              'h09: begin nnpc = a; res = pc + 8; end
              'h10: res = hi;
              'h12: res = lo;
              'h18: {hi, lo} = 64'($signed(a) * $signed(b));
              'h19: {hi, lo} = 64'(a) * 64'(b);
              'h1a: if (b == 0) begin lo = '1; hi = a; end
                    else if (a == 32'h8000_0000 && b == '1) begin lo = a; hi = 0; end
                    else begin lo = $signed(a) / $signed(b); hi = $signed(a) % $signed(b); end
              'h1b: if (b == 0) begin lo = '1; hi = a; end
                    else begin lo = a / b; hi = a % b; end
              'h20, 'h21: res = a + b;
              'h22, 'h23: res = a - b;
              'h24: res = a & b;
              'h25: res = a | b;
              'h26: res = a ^ b;
              'h27: res = ~(a | b);
              'h2a: res = ($signed(a) < $signed(b)) ? 1 : 0;
              'h2b: res = (a < b) ? 1 : 0;
              default: ;
            endcase
            if (!(fn inside {'h08, 'h18, 'h19, 'h1a, 'h1b}) && ins[15:11] != 0) rf[ins[15:11]] = res;
          end
          2, 3: begin
            nnpc = {npc[31:28], ins[25:0], 2'b00};
            if (op == 3) rf[31] = pc + 8;
          end
          1: if (ins[19:17] == 0) begin
            if (ins[20]) rf[31] = pc + 8;
            if (ins[16] ? !a[31] : a[31]) nnpc = npc + {{14{ins[15]}}, ins[15:0], 2'b00};
          end
          6: if (a[31] || a == 0) nnpc = npc + {{14{ins[15]}}, ins[15:0], 2'b00};
          7: if (!a[31] && a != 0) nnpc = npc + {{14{ins[15]}}, ins[15:0], 2'b00};
          4: if (a == b) nnpc = npc + {{14{ins[15]}}, ins[15:0], 2'b00};
          5: if (a != b) nnpc = npc + {{14{ins[15]}}, ins[15:0], 2'b00};
          'h08, 'h09, 'h0a, 'h0b, 'h0c, 'h0d, 'h0e, 'h0f: begin
            word_t se, ze;
            se = {{16{ins[15]}}, ins[15:0]};
            ze = {16'h0, ins[15:0]};
            case (op)
              'h0a: res = ($signed(a) < $signed(se)) ? 1 : 0;
              'h0b: res = (a < se) ? 1 : 0;
              'h0c: res = a & ze;
              'h0d: res = a | ze;
              'h0e: res = a ^ ze;
              'h0f: res = {ins[15:0], 16'h0};
              default: res = a + se;
            endcase
            if (ins[20:16] != 0) rf[ins[20:16]] = res;
          end
          'h10: if (ins[25:21] == 4 && ins[15:11] >= 22 && ins[15:11] <= 24) th[ins[15:11] - 22] = b;
          'h23: begin
            r = a + {{16{ins[15]}}, ins[15:0]};
            if (ins[20:16] != 0) rf[ins[20:16]] = dmem[r[11:2]];
          end
          'h20, 'h21, 'h24, 'h25: begin
            word_t w;
            r = a + {{16{ins[15]}}, ins[15:0]};
            w = dmem[r[11:2]];
            case (op)
              'h20: res = {{24{w[8*r[1:0] + 7]}}, w[8*r[1:0] +: 8]};
              'h24: res = {24'h0, w[8*r[1:0] +: 8]};
              'h21: res = {{16{w[16*r[1] + 15]}}, w[16*r[1] +: 16]};
              default: res = {16'h0, w[16*r[1] +: 16]};
            endcase
            if (ins[20:16] != 0) rf[ins[20:16]] = res;
          end
          'h22, 'h26: begin                // LWL, LWR (little-endian)
            word_t w, o;
            int    k;
            r = a + {{16{ins[15]}}, ins[15:0]};
            w = dmem[r[11:2]];
            k = r[1:0];
            o = b;
            if (op == 'h22) for (int i = 0; i <= k; i++) o[8*(3-k+i) +: 8] = w[8*i +: 8];
            else            for (int i = k; i <= 3; i++) o[8*(i-k) +: 8] = w[8*i +: 8];
            if (ins[20:16] != 0) rf[ins[20:16]] = o;
          end
          'h2a, 'h2e: begin                // SWL, SWR
            int k;
            r = a + {{16{ins[15]}}, ins[15:0]};
            k = r[1:0];
            if (op == 'h2a) for (int i = 0; i <= k; i++) dmem[r[11:2]][8*i +: 8] = b[8*(3-k+i) +: 8];
            else            for (int i = k; i <= 3; i++) dmem[r[11:2]][8*i +: 8] = b[8*(i-k) +: 8];
          end
          'h28: begin
            r = a + {{16{ins[15]}}, ins[15:0]};
            dmem[r[11:2]][8*r[1:0] +: 8] = b[7:0];
          end
          'h29: begin
            r = a + {{16{ins[15]}}, ins[15:0]};
            dmem[r[11:2]][16*r[1] +: 16] = b[15:0];
          end
          'h2b: begin
            r = a + {{16{ins[15]}}, ins[15:0]};
            dmem[r[11:2]] = b;
            if (r == DONE_ADDR) done = 1;
          end
          default: ;
        endcase
        pc = npc; npc = nnpc;
      end
    endfunction
  endclass

endpackage
