// vsp_mibench_pkg: small hand-assembled versions of four integer kernels
// (bit count, integer square root, quick sort, string search) for the VSP
// core, plus the expected results computed independently in SystemVerilog.
//
// Each program first writes the three depth-controller thresholds with MTC0,
// generates its input with a xorshift generator (x ^= x<<13; x ^= x>>17;
// x ^= x<<5, seed 0x2545f491), runs the kernel, writes its result words to
// data memory and ends with the completion store to DONE_ADDR. Sizes are
// kept small enough for the instruction-level model's retire limit:
//   bit count   : set bits of 32 words, shift-and-mask loop     -> 0x300
//   int sqrt    : bit-by-bit square root of 32 words            -> 0x300..
//   quick sort  : iterative Lomuto quicksort of 48 signed words -> 0x100..
//   string search: count of pattern {1,2,3} in 192 symbols 0..3 -> 0x300
// Every branch delay slot holds an independent or harmless instruction.
package vsp_mibench_pkg;
  import vsp_prog_pkg::*;

  localparam int K_BITCOUNT = 0, K_ISQRT = 1, K_QSORT = 2, K_SEARCH = 3;
  localparam int N_BC = 32, N_SQ = 32, N_QS = 48, N_TX = 192, N_PAT = 3;
  localparam word_t SEED = 32'h2545_f491;

  function automatic word_t xs(word_t x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  // branch patch: op 4 = beq, 5 = bne
  function automatic void patch_b(program_c p, int at, int op, int rs, int rt, int tgt);
    p.img[at] = i_t(op, rt, rs, tgt - (at + 1));
  endfunction

  // r20 = r20 advanced by one xorshift step (uses r21)
  function automatic void gen(program_c p);
    p.emit(sll(21, 20, 13)); p.emit(xor_(20, 20, 21));
    p.emit(srl(21, 20, 17)); p.emit(xor_(20, 20, 21));
    p.emit(sll(21, 20, 5));  p.emit(xor_(20, 20, 21));
  endfunction

  // fill n words from byte address base with xorshift values shifted right by sh
  function automatic void fill(program_c p, int base, int n, int sh);
    int l;
    p.emit(lui(20, SEED[31:16])); p.emit(ori(20, 20, SEED[15:0]));
    p.emit(addiu(8, 0, base)); p.emit(addiu(9, 0, n));
    l = p.here();
    gen(p);
    p.emit(srl(22, 20, sh));
    p.emit(sw(22, 8, 0));
    p.emit(addiu(9, 9, -1));
    p.bne(9, 0, l);
    p.emit(addiu(8, 8, 4));
  endfunction

  function automatic program_c build_kernel(int k, int th_htol, int th_ltoh, int th_br);
    program_c p = new();
    int l1, l2, l3, l4, l5, f1, f2, f3;
    p.emit(addiu(1, 0, th_htol)); p.emit(mtc0(1, 22));
    p.emit(addiu(1, 0, th_ltoh)); p.emit(mtc0(1, 23));
    p.emit(addiu(1, 0, th_br));   p.emit(mtc0(1, 24));
    case (k)
      K_BITCOUNT: begin
        fill(p, 32'h100, N_BC, 0);
        p.emit(addiu(8, 0, 32'h100)); p.emit(addiu(9, 0, N_BC)); p.emit(addiu(10, 0, 0));
        l1 = p.here();
        p.emit(lw(11, 8, 0));
        l2 = p.here();
        f1 = p.here(); p.emit(nop());                 // beq r11, r0, done_word
        p.emit(andi(12, 11, 1));                      // delay slot (harmless)
        p.emit(addu(10, 10, 12));
        p.beq(0, 0, l2);
        p.emit(srl(11, 11, 1));                       // delay slot
        patch_b(p, f1, 4, 11, 0, p.here());
        p.emit(addiu(9, 9, -1));
        p.bne(9, 0, l1);
        p.emit(addiu(8, 8, 4));
        p.emit(sw(10, 0, 32'h300));
      end
      K_ISQRT: begin
        fill(p, 32'h100, N_SQ, 0);
        p.emit(addiu(17, 0, 32'h100)); p.emit(addiu(18, 0, 32'h300)); p.emit(addiu(19, 0, N_SQ));
        l1 = p.here();
        p.emit(lw(12, 17, 0));                        // op
        p.emit(addiu(13, 0, 0));                      // res
        p.emit(lui(14, 16'h4000));                    // one = 1 << 30
        l2 = p.here();                                // while (one > op) one >>= 2
        p.emit(sltu(15, 12, 14));
        f1 = p.here(); p.emit(nop());                 // beq r15, r0, main
        p.emit(nop());
        p.beq(0, 0, l2);
        p.emit(srl(14, 14, 2));
        patch_b(p, f1, 4, 15, 0, p.here());
        l3 = p.here();                                // main: while (one != 0)
        f2 = p.here(); p.emit(nop());                 // beq r14, r0, done
        p.emit(addu(16, 13, 14));                     // delay slot: res + one
        p.emit(sltu(15, 12, 16));
        f3 = p.here(); p.emit(nop());                 // bne r15, r0, else
        p.emit(srl(13, 13, 1));                       // delay slot: res >>= 1 (both paths)
        p.emit(subu(12, 12, 16));
        p.emit(addu(13, 13, 14));
        patch_b(p, f3, 5, 15, 0, p.here());
        p.beq(0, 0, l3);
        p.emit(srl(14, 14, 2));                       // delay slot
        patch_b(p, f2, 4, 14, 0, p.here());
        p.emit(sw(13, 18, 0));
        p.emit(addiu(17, 17, 4));
        p.emit(addiu(19, 19, -1));
        p.bne(19, 0, l1);
        p.emit(addiu(18, 18, 4));
      end
      K_QSORT: begin
        fill(p, 32'h100, N_QS, 0);
        p.emit(addiu(29, 0, 32'h400)); p.emit(addiu(30, 0, 32'h400));
        p.emit(addiu(4, 0, 32'h100)); p.emit(addiu(5, 0, 32'h100 + 4 * (N_QS - 1)));
        p.emit(sw(4, 29, 0)); p.emit(sw(5, 29, 4)); p.emit(addiu(29, 29, 8));
        l1 = p.here();                                // loop: while stack not empty
        f1 = p.here(); p.emit(nop());                 // beq r29, r30, end
        p.emit(nop());
        p.emit(addiu(29, 29, -8));
        p.emit(lw(4, 29, 0)); p.emit(lw(5, 29, 4));
        p.emit(sltu(8, 4, 5));
        p.beq(8, 0, l1);
        p.emit(nop());
        p.emit(lw(9, 5, 0));                          // pivot = a[hi]
        p.emit(addu(10, 4, 0));                       // i
        p.emit(addu(11, 4, 0));                       // j
        l2 = p.here();
        f2 = p.here(); p.emit(nop());                 // beq r11, r5, partition done
        p.emit(nop());
        p.emit(lw(12, 11, 0));
        p.emit(slt(8, 12, 9));
        f3 = p.here(); p.emit(nop());                 // beq r8, r0, noswap
        p.emit(nop());
        p.emit(lw(13, 10, 0)); p.emit(sw(12, 10, 0)); p.emit(sw(13, 11, 0));
        p.emit(addiu(10, 10, 4));
        patch_b(p, f3, 4, 8, 0, p.here());
        p.beq(0, 0, l2);
        p.emit(addiu(11, 11, 4));                     // delay slot
        patch_b(p, f2, 4, 11, 5, p.here());
        p.emit(lw(13, 10, 0)); p.emit(sw(9, 10, 0)); p.emit(sw(13, 5, 0));
        p.emit(addiu(14, 10, -4));
        p.emit(sw(4, 29, 0)); p.emit(sw(14, 29, 4)); p.emit(addiu(29, 29, 8));
        p.emit(addiu(14, 10, 4));
        p.emit(sw(14, 29, 0)); p.emit(sw(5, 29, 4));
        p.beq(0, 0, l1);
        p.emit(addiu(29, 29, 8));                     // delay slot
        patch_b(p, f1, 4, 29, 30, p.here());
      end
      default: begin                                  // string search
        fill(p, 32'h400, N_TX, 30);
        p.emit(addiu(1, 0, 1)); p.emit(sw(1, 0, 32'h380));
        p.emit(addiu(1, 0, 2)); p.emit(sw(1, 0, 32'h384));
        p.emit(addiu(1, 0, 3)); p.emit(sw(1, 0, 32'h388));
        p.emit(addiu(8, 0, 32'h400)); p.emit(addiu(9, 0, 32'h400 + 4 * (N_TX - N_PAT + 1)));
        p.emit(addiu(10, 0, 0));
        l1 = p.here();
        f1 = p.here(); p.emit(nop());                 // beq r8, r9, end
        p.emit(addu(12, 8, 0));                       // delay slot
        p.emit(addiu(13, 0, 32'h380));
        p.emit(addiu(14, 0, N_PAT));
        l2 = p.here();
        p.emit(lw(15, 12, 0)); p.emit(lw(16, 13, 0));
        f2 = p.here(); p.emit(nop());                 // bne r15, r16, next
        p.emit(addiu(12, 12, 4));                     // delay slot
        p.emit(addiu(14, 14, -1));
        p.bne(14, 0, l2);
        p.emit(addiu(13, 13, 4));                     // delay slot
        p.emit(addiu(10, 10, 1));
        patch_b(p, f2, 5, 15, 16, p.here());
        p.beq(0, 0, l1);
        p.emit(addiu(8, 8, 4));                       // delay slot
        patch_b(p, f1, 4, 8, 9, p.here());
        p.emit(sw(10, 0, 32'h300));
      end
    endcase
    l5 = 0;
    p.emit(sw(0, 0, DONE_ADDR[15:0]));
    l4 = p.here();
    p.beq(0, 0, l4);
    p.emit(nop());
    return p;
  endfunction

  // Expected results, computed directly.
  function automatic void expected(int k, ref word_t res [$], output int res_base);
    word_t x, v [$];
    res.delete();
    x = SEED;
    case (k)
      K_BITCOUNT: begin
        int tot = 0;
        for (int i = 0; i < N_BC; i++) begin x = xs(x); tot += $countones(x); end
        res.push_back(word_t'(tot));
        res_base = 32'h300;
      end
      K_ISQRT: begin
        for (int i = 0; i < N_SQ; i++) begin
          longint unsigned lo, hi, mid;
          x = xs(x);
          lo = 0; hi = 65536;                          // binary search: r*r <= x < (r+1)^2
          while (hi - lo > 1) begin
            mid = (lo + hi) / 2;
            if (mid * mid <= longint'(x)) lo = mid; else hi = mid;
          end
          res.push_back(word_t'(lo));
        end
        res_base = 32'h300;
      end
      K_QSORT: begin
        for (int i = 0; i < N_QS; i++) begin x = xs(x); v.push_back(x); end
        for (int i = 0; i < N_QS; i++)                 // selection of the minimum, signed
          for (int j = i + 1; j < N_QS; j++)
            if ($signed(v[j]) < $signed(v[i])) begin word_t t = v[i]; v[i] = v[j]; v[j] = t; end
        res = v;
        res_base = 32'h100;
      end
      default: begin
        int cnt = 0;
        for (int i = 0; i < N_TX; i++) begin x = xs(x); v.push_back(x >> 30); end
        for (int i = 0; i + N_PAT <= N_TX; i++)
          if (v[i] == 1 && v[i+1] == 2 && v[i+2] == 3) cnt++;
        res.push_back(word_t'(cnt));
        res_base = 32'h300;
      end
    endcase
  endfunction
endpackage
