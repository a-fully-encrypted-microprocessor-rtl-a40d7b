// tb_kpu_asm: a small assembler for the testbenches. It encodes the
// OpenRISC-subset instructions of the core into a program image, and emits
// user-mode immediates as three prefix instructions plus the instruction,
// carrying an immediate encrypted with the reference cipher.
package tb_kpu_asm;
  import tb_cipher_model::*;

  logic [31:0] prog [0:4095];   // 16 KiB of instruction memory, word-indexed
  int unsigned at;              // byte address of the next instruction

  function automatic void org(int unsigned a); at = a; endfunction

  function automatic void emit(logic [31:0] w);
    prog[at >> 2] = w;
    at += 4;
  endfunction

  function automatic void clear();
    for (int i = 0; i < 4096; i++) prog[i] = {8'h15, 24'h0};   // l.nop
    at = 0;
  endfunction

  function automatic logic [31:0] rrr(logic [5:0] opc, int d, int a, int b, logic [10:0] lo);
    return {opc, 5'(d), 5'(a), 5'(b), lo};
  endfunction
  function automatic logic [31:0] rri(logic [5:0] opc, int d, int a, logic [15:0] imm);
    return {opc, 5'(d), 5'(a), imm};
  endfunction

  // supervisor (plain immediates)
  function automatic void ori(int d, int a, logic [15:0] k);  emit(rri(6'h2a, d, a, k)); endfunction
  function automatic void addi(int d, int a, logic [15:0] k); emit(rri(6'h27, d, a, k)); endfunction
  function automatic void add(int d, int a, int b);  emit(rrr(6'h38, d, a, b, 11'h000)); endfunction
  function automatic void sub(int d, int a, int b);  emit(rrr(6'h38, d, a, b, 11'h002)); endfunction
  function automatic void xorr(int d, int a, int b); emit(rrr(6'h38, d, a, b, 11'h005)); endfunction
  function automatic void mul(int d, int a, int b);  emit(rrr(6'h38, d, a, b, 11'h306)); endfunction
  function automatic void sll(int d, int a, int b);  emit(rrr(6'h38, d, a, b, 11'h008)); endfunction
  function automatic void sfne(int a, int b);  emit(rrr(6'h39, 1, a, b, 11'h0)); endfunction
  function automatic void sfltu(int a, int b); emit(rrr(6'h39, 4, a, b, 11'h0)); endfunction
  function automatic void lwz(int d, int a, logic [15:0] off) ; emit(rri(6'h21, d, a, off)); endfunction
  function automatic void ld(int d, int a, logic [15:0] off)  ; emit(rri(6'h20, d, a, off)); endfunction
  function automatic void sw(int a, logic [15:0] off, int b);  emit({6'h35, off[15:11], 5'(a), 5'(b), off[10:0]}); endfunction
  function automatic void sd(int a, logic [15:0] off, int b);  emit({6'h34, off[15:11], 5'(a), 5'(b), off[10:0]}); endfunction
  function automatic void mtspr(int a, int b, logic [15:0] k); emit({6'h30, k[15:11], 5'(a), 5'(b), k[10:0]}); endfunction
  function automatic void mfspr(int d, int a, logic [15:0] k); emit(rri(6'h2d, d, a, k)); endfunction
  function automatic void rfe();  emit({6'h09, 26'h0}); endfunction
  function automatic void sys();  emit({16'h2000, 16'h0}); endfunction
  function automatic void nop(logic [15:0] k); emit({8'h15, 8'h0, k}); endfunction
  function automatic void jr(int b);   emit({6'h11, 10'h0, 5'(b), 11'h0}); endfunction
  function automatic void jump(logic [5:0] opc, int unsigned target);
    logic [31:0] off = (target - at) >> 2;
    emit({opc, off[25:0]});
  endfunction
  function automatic void j(int unsigned t)   ; jump(6'h00, t); endfunction
  function automatic void jal(int unsigned t) ; jump(6'h01, t); endfunction
  function automatic void bf(int unsigned t)  ; jump(6'h04, t); endfunction
  function automatic void bnf(int unsigned t) ; jump(6'h03, t); endfunction

  // user mode: encrypted immediate, three prefixes then the instruction
  function automatic void enc_imm(logic [5:0] opc, int d, int a, logic [31:0] v);
    logic [63:0] c = enc(v, 31'($urandom()));
    emit({6'h1c, 10'h0, c[63:48]});
    emit({6'h1c, 10'h0, c[47:32]});
    emit({6'h1c, 10'h0, c[31:16]});
    emit(rri(opc, d, a, c[15:0]));
  endfunction
  function automatic void uaddi(int d, int a, logic [31:0] v) ; enc_imm(6'h27, d, a, v); endfunction
  function automatic void uxori(int d, int a, logic [31:0] v) ; enc_imm(6'h2b, d, a, v); endfunction
  function automatic void umuli(int d, int a, logic [31:0] v) ; enc_imm(6'h2c, d, a, v); endfunction
  function automatic void usfeqi(int a, logic [31:0] v)       ; enc_imm(6'h2f, 0, a, v); endfunction
  function automatic void umovhi(int d, logic [31:0] v)       ; enc_imm(6'h06, d, 0, v); endfunction

endpackage
