// tb_kpu_prog: the end-to-end test program for the core and its expected
// results.
//
// Supervisor code at the reset vector sets EPCR/ESR, leaves values in r3..r7
// (with a supervisor load feeding an add), and enters user mode with l.rfe.
// The user program uses encrypted immediates (configuration B), register
// operations (configuration A) that depend on them, a store and a load that
// hits the user data cache, a load that misses and is decrypted, a B
// instruction with an unencrypted (prefix-less) immediate right behind
// that load, a second store and load at the same address, a counted loop with a compare and a
// backward branch, a call and return through the link register, a B-type
// compare feeding a branch, a user-mode l.mfspr (reads zero), a store of a
// program address, l.muli, two stores to addresses sharing a cache line and
// a load of the first (which must wait for its store), then l.sys. The system-call handler stores the
// encrypted registers r10..r26 and two supervisor values with l.sd and
// returns; the user program then executes l.ld, which is illegal in user mode,
// and the illegal-instruction handler records EPCR and halts with l.nop 1.
package tb_kpu_prog;
  import kpu_pkg::*;
  import tb_kpu_asm::*;
  import tb_cipher_model::*;

  localparam int unsigned USER_PC = 32'h1000;
  localparam int unsigned UBASE   = 32'h1000;   // first logical word of the TLB
  localparam int unsigned SAVE    = 32'h80;     // word index where the handler saves r10..r26

  int unsigned ret_pc, illegal_pc;
  logic [31:0] expect_r [10:26];

  function automatic void build();
    int unsigned loop_pc, sub_pc, skip_pc, fix, off1, off2;
    clear();
    // ---------------- supervisor entry
    org(32'h100);
    ori(1, 0, 16'(USER_PC));
    mtspr(0, 1, 16'd32);           // EPCR = user entry
    mtspr(0, 0, 16'd64);           // ESR = 0: return to user mode
    ori(3, 0, 16'd5);
    ori(4, 0, 16'h800);
    sd(4, 16'd0, 3);               // word 0x100 = 5
    ld(5, 4, 16'd0);               // r5 = 5
    add(6, 5, 3);                  // load-use: r6 = 10
    add(7, 6, 6);                  // r7 = 20
    rfe();
    // ---------------- user program
    org(USER_PC);
    uaddi(10, 0, 100);             // B
    add(11, 10, 3);                // A behind B: 105
    uaddi(21, 0, 32'h2000);        // data address
    sw(21, 16'd0, 11);             // TLB slot 0
    lwz(12, 21, 16'd0);            // user data cache hit: 105
    add(13, 12, 12);               // 210
    lwz(14, 21, 16'd8);            // miss, TLB slot 1, decrypted: 777
    addi(23, 14, 16'd1);           // B with no prefix (zero-filled immediate) right behind the load: 778
    add(15, 14, 13);               // 987
    add(16, 0, 0);
    uaddi(18, 0, 15);
    loop_pc = at;
    uaddi(16, 16, 3);
    sfne(16, 18);
    bf(loop_pc);
    sw(21, 16'd0, 15);             // second store to the same address: cache write hit
    lwz(17, 21, 16'd0);            // 987
    fix = at; emit(0);             // jal SUB, patched below
    ret_pc = at;
    usfeqi(19, 16);
    skip_pc = at + 4 + 16;         // bnf over one encrypted addi (4 instructions)
    bnf(skip_pc);
    uaddi(20, 0, 32'h55);
    mfspr(22, 0, 16'd17);          // user mode: reads zero
    sw(21, 16'd16, 9);             // program address to memory, TLB slot 2
    umuli(24, 11, 3);              // 315
    xorr(25, 24, 10);
    // two new addresses that share a user data cache line: the second store
    // evicts the first, so the load behind them misses while the first store
    // is still on its way to memory and must wait for it
    off1 = 24;
    off2 = 28;
    while (addr_scramble(32'h2000 + off2) >> 28 != addr_scramble(32'h2000 + off1) >> 28) off2 += 4;
    sw(21, 16'(off1), 13);
    sw(21, 16'(off2), 13);
    lwz(26, 21, 16'(off1));        // 210 after waiting for the store
    sys();
    illegal_pc = at;
    ld(26, 0, 16'd0);              // illegal in user mode
    nop(0);
    sub_pc = at;
    uaddi(19, 16, 1);              // 16
    jr(9);
    begin
      int unsigned save = at;
      org(fix); jal(sub_pc); org(save);
    end
    // ---------------- system call handler
    org(32'h0c00);
    for (int r = 10; r <= 26; r++) sd(0, 16'(32'h400 + 8 * (r - 10)), r);
    sd(0, 16'h500, 6);
    sd(0, 16'h508, 7);
    rfe();
    // ---------------- illegal instruction handler
    org(32'h0700);
    mfspr(1, 0, 16'd32);
    sd(0, 16'h510, 1);
    nop(1);

    for (int r = 10; r <= 26; r++) expect_r[r] = 0;
    expect_r[10] = 100; expect_r[11] = 105; expect_r[12] = 105; expect_r[13] = 210;
    expect_r[14] = 777; expect_r[15] = 987; expect_r[16] = 15;  expect_r[17] = 987; expect_r[18] = 15;
    expect_r[19] = 16;  expect_r[20] = 32'h55; expect_r[21] = 32'h2000; expect_r[22] = 0;
    expect_r[23] = 778; expect_r[24] = 315; expect_r[25] = 315 ^ 100;
    expect_r[26] = 210;
  endfunction

  // data memory image before the run: the word that the missing load reads
  function automatic logic [63:0] preload_slot1();
    return enc(777, 31'h2bad_cafe);
  endfunction

endpackage
