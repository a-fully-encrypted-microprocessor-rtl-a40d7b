// kpu_core: an OpenRISC-subset processor core that keeps user-mode data
// encrypted everywhere outside its shadow registers and user data cache.
//
// Pipeline. One instruction enters per cycle and every instruction traverses
// NST = ROUNDS + 5 stages (15 for the default 10-round codec). Stage numbers
// below are those of the default:
//
//   supervisor      1 Fetch  2 Decode  3 Read  4 Execute  5 Write, then idle
//   user, config A  1 Fetch  2 Decode  3 Read  4 Execute  5..14 codec  15 Write
//   user, config B  1 Fetch  2 Decode  3..12 codec  13 Read  14 Execute  15 Write
//
// Supervisor instructions run unencrypted on the real registers and are done
// after stage 5. User instructions run on the decrypted shadow registers.
// Configuration B is taken by user-mode instructions with an immediate
// operand (l.addi, l.andi, l.ori, l.xori, l.muli, l.movhi, l.sfXXi): their
// 64-bit encrypted immediate, assembled from prefix instructions, is
// decrypted by the B codec before the registers are read. Every other user
// instruction takes configuration A: it executes early, so its result can be
// forwarded at once; user loads that miss the user data cache have the loaded
// word decrypted by the A decryptor, and user stores have their data
// encrypted by the A encryptor on the way to memory.
//
// Forwarding and stalls. Results are forwarded from every stage to the two
// read points (stage 3 for A, stage 13 for B), as soon as they exist: from
// execute combinationally, from a load in stage 5 (cache hit or supervisor
// load), from a B result in stage 14 and from the A decryptor at stage 15.
// A reader whose producer has no value yet holds the stages up to its read
// point and a bubble goes on; stages beyond keep moving, and the codecs have
// per-stage enables so that they freeze with the stages they parallel.
// Results are written to the shadow registers in order at the last stage;
// supervisor results go to the real registers at stage 5. The SR[F] flag is
// renamed as register 32 and forwarded like a GPR.
//
// Memory. User data addresses are plaintext inside the core. Leaving it they
// are scrambled by a keyed bijection and then remapped by the unit-granularity,
// first-come TLB to a logical word UBASE + n. User stores also write their
// plaintext to the user data cache; user loads look there first. Supervisor
// accesses use the byte address divided by 8 as a word index. Memory words
// are 64 bits; the data port is a synchronous read port (data one cycle after
// the address) and a write port.
//
// Mode switches. l.sys, l.rfe and illegal instructions are serialising: in
// execute they wait for the stages ahead to drain, then, if the mode changes,
// stream the stale registers through the codec (leaving user mode: encrypt
// shadow into real; entering it: decrypt real into shadow and flush the user
// data cache), and only then redirect fetch. Branches are predicted at fetch by
// the branch prediction buffer and resolved in execute.
//
// Differences from OpenRISC 1.1: no branch delay slots (the link register
// gets pc+4), no shift-immediate instructions, only SR, EPCR0 and ESR0 as SPRs
// (user-mode l.mtspr is ignored and l.mfspr reads zero, as the document says),
// and l.nop 1 stops the core. The pipeline arrangement, shadow registers,
// prefix instructions, program-address protocol, user data cache, TLB policy
// and branch prediction buffer follow the document; the lazy register
// refresh, the address scrambling, the encodings not listed in OpenRISC and
// the drain-based mode switch are this design's choices.
//
// Circuit note: stage records hold whole instruction words; lint reports
// fields that later stages do not read.
module kpu_core
  import kpu_pkg::*;
#(
  parameter int unsigned  ROUNDS      = CODEC_ROUNDS,
  parameter logic [127:0] KEY         = DEFAULT_KEY,
  parameter int unsigned  TLB_ENTRIES = 64,
  parameter int unsigned  UDC_ENTRIES = 16,
  parameter int unsigned  BPB_ENTRIES = 64,
  parameter logic [31:0]  UBASE       = 32'h0000_1000,
  parameter logic [31:0]  RESET_PC    = VEC_RESET
) (
  input  logic   clk,
  input  logic   rst_n,
  // instruction memory, combinational read
  output data_t  imem_addr,
  input  data_t  imem_rdata,
  // data memory: synchronous read port and write port, 64-bit words
  output logic   dmem_re,
  output data_t  dmem_raddr,
  input  word_t  dmem_rdata,
  output logic   dmem_we,
  output data_t  dmem_waddr,
  output word_t  dmem_wdata,
  // status
  output logic   user_mode,
  output logic   halted,
  output logic   tlb_overflow,
  output perf_t  perf,
  output logic [31:0] bpb_hits,
  output logic [31:0] bpb_misses,
  output logic [31:0] bpb_hits_right,
  output logic [31:0] bpb_hits_wrong,
  output logic [31:0] bpb_misses_right,
  output logic [31:0] bpb_misses_wrong
);

  localparam int NST = ROUNDS + 5;   // stages; also the write stage of user instructions
  localparam int RB  = ROUNDS + 3;   // read stage of configuration B
  localparam int XB  = ROUNDS + 4;   // execute stage of configuration B
  localparam int SW  = 5;            // write stage of supervisor instructions

  typedef struct packed {
    logic        valid;
    logic        user;
    logic        cfg_b;
    iclass_e     cls;
    alu_op_e     aluop;
    logic        use_imm;
    logic        mem64;
    logic        bnf;
    logic [5:0]  src1;
    logic        src1_en;
    logic [5:0]  src2;
    logic        src2_en;
    logic [5:0]  rd;
    logic        wr_en;
    data_t       pc;
    data_t       insn;
    data_t       jtarget;
    word_t       imm;
    word_t       opa;
    word_t       opb;
    word_t       res;
    logic        rdy;
    data_t       maddr;
    data_t       haddr;
    logic        pred_hit;
    logic        pred_taken;
    data_t       pred_target;
  } pipe_t;

  pipe_t st [2:NST];

  // ------------------------------------------------------------- state
  data_t pc_q;
  logic  user_q;
  logic  flag_q;
  data_t epcr_q;
  logic  esr_sm_q, esr_f_q;
  logic  fetch_stop_q;
  logic  halted_q;
  logic  tlb_ovf_q;
  perf_t perf_q;

  typedef enum logic [2:0] {SER_IDLE, SER_ISSUE, SER_WAIT} ser_e;
  ser_e       ser_q;
  logic [4:0] sync_idx_q;

  // ------------------------------------------------------------- freeze
  // Stages 1..frz hold; stage frz+1 receives a bubble; stages beyond move.
  int unsigned frz;
  logic        stall_r, stall_x, stall_b;
  logic        flush_front;      // kill stages 2 and 3 and the fetch
  logic        redirect;
  data_t       redirect_pc;

  function automatic logic moves(int k, int unsigned f);
    return k > int'(f) + 1;
  endfunction

  // ------------------------------------------------------------- submodules
  logic [4:0]  rf_addr   [3];
  logic        rf_shadow [3];
  word_t       rf_data   [3];
  logic        rf_real_we, rf_real_sync, rf_sh_we, rf_sh_sync;
  logic [4:0]  rf_real_addr, rf_sh_addr;
  word_t       rf_real_data, rf_sh_data;
  logic [31:0] real_stale, shadow_stale;

  kpu_regfile #(.NREGS(32), .NREAD(3)) u_rf (
    .clk, .rst_n,
    .rd_addr(rf_addr), .rd_shadow(rf_shadow), .rd_data(rf_data),
    .real_we(rf_real_we), .real_addr(rf_real_addr), .real_data(rf_real_data), .real_sync(rf_real_sync),
    .shadow_we(rf_sh_we), .shadow_addr(rf_sh_addr), .shadow_data(rf_sh_data), .shadow_sync(rf_sh_sync),
    .real_stale, .shadow_stale);

  // prefix accumulator in decode
  logic  pfx_adv, pfx_is;
  word_t pfx_imm64;
  logic [1:0] pfx_count;
  kpu_prefix u_pfx (
    .clk, .rst_n, .flush(flush_front), .advance(pfx_adv), .is_prefix(pfx_is),
    .seg(st[2].insn[15:0]), .imm_lo(st[2].insn[15:0]), .imm64(pfx_imm64), .count(pfx_count));

  // B codec: decrypts the immediate, stage j parallels pipeline stage 4+j
  logic [ROUNDS-1:0] bdec_en, a_en;
  word_t bdec_out, aenc_out, adec_out;
  logic  bdec_v, aenc_v, adec_v;
  logic  aenc_in_v, adec_in_v;
  word_t aenc_in, adec_in;

  kpu_decrypt #(.ROUNDS(ROUNDS), .KEY(KEY)) u_bdec (
    .clk, .rst_n, .stage_en(bdec_en), .in_valid(st[3].valid && st[3].cfg_b),
    .in_cipher(st[3].imm), .out_valid(bdec_v), .out_plain(bdec_out));

  // A codec: encrypts store data or decrypts load data, stage j parallels 6+j
  kpu_encrypt #(.ROUNDS(ROUNDS), .KEY(KEY)) u_aenc (
    .clk, .rst_n, .stage_en(a_en), .in_valid(aenc_in_v), .in_plain(aenc_in),
    .out_valid(aenc_v), .out_cipher(aenc_out));
  kpu_decrypt #(.ROUNDS(ROUNDS), .KEY(KEY)) u_adec (
    .clk, .rst_n, .stage_en(a_en), .in_valid(adec_in_v), .in_cipher(adec_in),
    .out_valid(adec_v), .out_plain(adec_out));

  always_comb begin
    for (int j = 0; j < int'(ROUNDS); j++) begin
      bdec_en[j] = (4 + j) > int'(frz);
      a_en[j]    = (6 + j) > int'(frz);
    end
  end

  assign aenc_in_v = st[5].valid && ((st[5].cls == C_STORE && st[5].user) || st[5].cls == C_SYNC_ENC);
  assign aenc_in   = st[5].opb;
  assign adec_in_v = st[5].valid && ((st[5].cls == C_LOAD && st[5].user) || st[5].cls == C_SYNC_DEC);
  assign adec_in   = (st[5].cls == C_SYNC_DEC) ? st[5].opb : dmem_rdata;

  // execute-stage ALUs: A/supervisor at stage 4, B at stage XB
  data_t x_a, x_b, x_y, b_y;
  logic  x_f, b_f, x_cy, x_ov, b_cy, b_ov;
  assign x_a = st[4].opa[31:0];
  assign x_b = st[4].use_imm ? st[4].imm[31:0] : st[4].opb[31:0];
  kpu_alu u_alu_a (.op(st[4].aluop), .a(x_a), .b(x_b), .y(x_y), .flag(x_f), .cy(x_cy), .ov(x_ov));
  kpu_alu u_alu_b (.op(st[XB].aluop), .a(st[XB].opa[31:0]), .b(st[XB].imm[31:0]),
                   .y(b_y), .flag(b_f), .cy(b_cy), .ov(b_ov));


  // memory address path (execute)
  data_t x_addr, x_haddr;
  logic  x_mem_user;
  logic  tlb_hit, tlb_full;
  logic [$clog2(TLB_ENTRIES)-1:0] tlb_lidx;
  data_t tlb_laddr;
  logic [$clog2(TLB_ENTRIES):0] tlb_used;
  logic  tlb_req;

  assign x_addr     = st[4].opa[31:0] + st[4].imm[31:0];
  assign x_haddr    = addr_scramble(x_addr);
  assign x_mem_user = st[4].valid && st[4].user && (st[4].cls == C_LOAD || st[4].cls == C_STORE) && !st[4].mem64;
  assign tlb_req    = x_mem_user && moves(5, frz);

  kpu_tlb #(.ENTRIES(TLB_ENTRIES), .LBASE(UBASE)) u_tlb (
    .clk, .rst_n, .req_valid(tlb_req), .req_addr(x_haddr), .hit(tlb_hit), .lidx(tlb_lidx),
    .laddr(tlb_laddr), .full(tlb_full), .used(tlb_used));

  logic  udc_flush, udc_lookup, udc_hit, udc_write, udc_probe;
  word_t udc_rdata;
  logic [31:0] udc_rh, udc_rm, udc_wh, udc_wm;
  assign udc_lookup = tlb_req && st[4].cls == C_LOAD;
  assign udc_write  = tlb_req && st[4].cls == C_STORE;

  kpu_udcache #(.ENTRIES(UDC_ENTRIES)) u_udc (
    .clk, .rst_n, .flush(udc_flush), .lookup_valid(udc_lookup), .lookup_addr(x_haddr),
    .hit(udc_hit), .rdata(udc_rdata), .probe_hit(udc_probe), .write_valid(udc_write), .write_addr(x_haddr),
    .write_data(st[4].opb), .read_hits(udc_rh), .read_misses(udc_rm),
    .write_hits(udc_wh), .write_misses(udc_wm));

  logic unused_ok;
  assign unused_ok = ^{x_cy, x_ov, b_cy, b_ov, bdec_v, aenc_v, adec_v, pfx_count, tlb_hit, tlb_lidx, tlb_used};

  // branch prediction buffer
  logic  bp_hit, bp_taken, bp_upd, bp_right;
  data_t bp_target;
  logic  x_taken;
  data_t x_next;
  kpu_bpb #(.ENTRIES(BPB_ENTRIES)) u_bpb (
    .clk, .rst_n, .lookup_pc(pc_q), .pred_hit(bp_hit), .pred_taken(bp_taken), .pred_target(bp_target),
    .upd_valid(bp_upd), .upd_pc(st[4].pc), .upd_taken(x_taken), .upd_target(x_next),
    .upd_was_hit(st[4].pred_hit), .upd_right(bp_right),
    .hits(bpb_hits), .misses(bpb_misses), .hits_right(bpb_hits_right), .hits_wrong(bpb_hits_wrong),
    .misses_right(bpb_misses_right), .misses_wrong(bpb_misses_wrong));

  // ------------------------------------------------------------- decode
  pipe_t dec;
  always_comb begin
    logic [5:0]  opc;
    logic [4:0]  r_d, r_a, r_b;
    data_t       sx16, zx16, sxst;
    logic        usr;
    opc  = st[2].insn[31:26];
    r_d  = st[2].insn[25:21];
    r_a  = st[2].insn[20:16];
    r_b  = st[2].insn[15:11];
    sx16 = {{16{st[2].insn[15]}}, st[2].insn[15:0]};
    zx16 = {16'h0, st[2].insn[15:0]};
    sxst = {{16{st[2].insn[25]}}, st[2].insn[25:21], st[2].insn[10:0]};
    usr  = st[2].user;
    dec  = st[2];
    dec.cls     = C_NOP;
    dec.aluop   = ALU_ADD;
    dec.use_imm = 1'b0;
    dec.mem64   = 1'b0;
    dec.bnf     = 1'b0;
    dec.cfg_b   = 1'b0;
    dec.src1    = {1'b0, r_a};
    dec.src1_en = 1'b0;
    dec.src2    = {1'b0, r_b};
    dec.src2_en = 1'b0;
    dec.rd      = {1'b0, r_d};
    dec.wr_en   = 1'b0;
    dec.imm     = {32'h0, sx16};
    dec.jtarget = st[2].pc + {{4{st[2].insn[25]}}, st[2].insn[25:0], 2'b00};
    dec.opa     = '0;
    dec.opb     = '0;
    dec.res     = '0;
    dec.rdy     = 1'b0;
    dec.maddr   = '0;
    dec.haddr   = '0;
    unique case (opc)
      OPC_J:      dec.cls = C_JUMP;
      OPC_JAL:    begin dec.cls = C_JUMP; dec.rd = REG_LR; dec.wr_en = 1'b1; end
      OPC_BNF,
      OPC_BF:     begin dec.cls = C_BRANCH; dec.src1 = REG_FLAG; dec.src1_en = 1'b1; dec.bnf = (opc == OPC_BNF); end
      OPC_NOP:    dec.cls = (st[2].insn[15:0] == 16'h0001) ? C_HALT : C_NOP;
      OPC_MOVHI:  begin
                    dec.cls = st[2].insn[16] ? C_ILLEGAL : C_ALU;
                    dec.aluop = usr ? ALU_PASSB : ALU_MOVHI;
                    dec.use_imm = 1'b1; dec.imm = {32'h0, zx16}; dec.wr_en = !st[2].insn[16];
                  end
      OPC_SYS:    dec.cls = (st[2].insn[25:16] == 10'h0) ? C_SYS : C_ILLEGAL;
      OPC_RFE:    dec.cls = usr ? C_ILLEGAL : C_RFE;
      OPC_JR:     begin dec.cls = C_JREG; dec.src2_en = 1'b1; end
      OPC_JALR:   begin dec.cls = C_JREG; dec.src2_en = 1'b1; dec.rd = REG_LR; dec.wr_en = 1'b1; end
      OPC_PREFIX: dec.cls = C_PREFIX;
      OPC_LD,
      OPC_LWZ:    begin
                    dec.cls = (usr && opc == OPC_LD) ? C_ILLEGAL : C_LOAD;
                    dec.mem64 = (opc == OPC_LD); dec.src1_en = 1'b1; dec.wr_en = !(usr && opc == OPC_LD);
                  end
      OPC_ADDI:   begin dec.cls = C_ALU; dec.aluop = ALU_ADD; dec.use_imm = 1'b1; dec.src1_en = 1'b1; dec.wr_en = 1'b1; end
      OPC_ANDI:   begin dec.cls = C_ALU; dec.aluop = ALU_AND; dec.use_imm = 1'b1; dec.imm = {32'h0, zx16}; dec.src1_en = 1'b1; dec.wr_en = 1'b1; end
      OPC_ORI:    begin dec.cls = C_ALU; dec.aluop = ALU_OR;  dec.use_imm = 1'b1; dec.imm = {32'h0, zx16}; dec.src1_en = 1'b1; dec.wr_en = 1'b1; end
      OPC_XORI:   begin dec.cls = C_ALU; dec.aluop = ALU_XOR; dec.use_imm = 1'b1; dec.src1_en = 1'b1; dec.wr_en = 1'b1; end
      OPC_MULI:   begin dec.cls = C_ALU; dec.aluop = ALU_MUL; dec.use_imm = 1'b1; dec.src1_en = 1'b1; dec.wr_en = 1'b1; end
      OPC_MFSPR:  begin dec.cls = C_MFSPR; dec.imm = {32'h0, zx16}; dec.src1_en = 1'b1; dec.wr_en = 1'b1; end
      OPC_MTSPR:  begin dec.cls = C_MTSPR; dec.imm = {48'h0, st[2].insn[25:21], st[2].insn[10:0]};
                        dec.src1_en = 1'b1; dec.src2_en = 1'b1; end
      OPC_SD,
      OPC_SW:     begin
                    dec.cls = (usr && opc == OPC_SD) ? C_ILLEGAL : C_STORE;
                    dec.mem64 = (opc == OPC_SD); dec.imm = {32'h0, sxst}; dec.src1_en = 1'b1; dec.src2_en = 1'b1;
                  end
      OPC_ALU:    begin
                    dec.cls = C_ALU; dec.src1_en = 1'b1; dec.src2_en = 1'b1; dec.wr_en = 1'b1;
                    unique case (st[2].insn[3:0])
                      4'h0: dec.aluop = ALU_ADD;
                      4'h2: dec.aluop = ALU_SUB;
                      4'h3: dec.aluop = ALU_AND;
                      4'h4: dec.aluop = ALU_OR;
                      4'h5: dec.aluop = ALU_XOR;
                      4'h6: dec.aluop = ALU_MUL;
                      4'h8: dec.aluop = (st[2].insn[7:6] == 2'd0) ? ALU_SLL :
                                        (st[2].insn[7:6] == 2'd1) ? ALU_SRL :
                                        (st[2].insn[7:6] == 2'd2) ? ALU_SRA : ALU_ROR;
                      default: begin dec.cls = C_ILLEGAL; dec.wr_en = 1'b0; end
                    endcase
                  end
      OPC_SF,
      OPC_SFI:    begin
                    dec.cls = C_ALU; dec.src1_en = 1'b1; dec.src2_en = (opc == OPC_SF);
                    dec.use_imm = (opc == OPC_SFI); dec.rd = REG_FLAG; dec.wr_en = 1'b1;
                    unique case (st[2].insn[25:21])
                      5'h00: dec.aluop = ALU_SFEQ;
                      5'h01: dec.aluop = ALU_SFNE;
                      5'h02: dec.aluop = ALU_SFGTU;
                      5'h03: dec.aluop = ALU_SFGEU;
                      5'h04: dec.aluop = ALU_SFLTU;
                      5'h05: dec.aluop = ALU_SFLEU;
                      5'h0a: dec.aluop = ALU_SFGTS;
                      5'h0b: dec.aluop = ALU_SFGES;
                      5'h0c: dec.aluop = ALU_SFLTS;
                      5'h0d: dec.aluop = ALU_SFLES;
                      default: begin dec.cls = C_ILLEGAL; dec.wr_en = 1'b0; end
                    endcase
                  end
      default:    dec.cls = C_ILLEGAL;
    endcase
    if (dec.cls == C_ILLEGAL) begin
      dec.wr_en = 1'b0; dec.src1_en = 1'b0; dec.src2_en = 1'b0;
    end
    // user-mode immediates are encrypted and take configuration B
    if (usr && dec.cls == C_ALU && dec.use_imm) begin
      dec.cfg_b = 1'b1;
      dec.imm   = pfx_imm64;
    end
    if (dec.wr_en && dec.rd == 6'd0) dec.wr_en = 1'b0;
  end

  assign pfx_adv = st[2].valid && moves(3, frz) && !flush_front;
  assign pfx_is  = st[2].cls == C_PREFIX || st[2].insn[31:26] == OPC_PREFIX;

  // ------------------------------------------------------------- producers
  // For every stage: does it hold a pending register write, which register,
  // and is its value available yet.
  logic [NST:4] p_v, p_rdy;
  logic [5:0]   p_rd  [NST:4];
  word_t        p_val [NST:4];
  word_t        x_res, ld5_val;
  logic         x_rdy, ld5_rdy;

  logic [15:0] spr;
  assign spr = st[4].opa[15:0] | st[4].imm[15:0];

  always_comb begin
    // execute result (A configuration and supervisor)
    x_rdy = 1'b1;
    x_res = '0;
    unique case (st[4].cls)
      C_ALU:   x_res = (st[4].rd == REG_FLAG) ? {63'h0, x_f} :
                       st[4].user ? {32'h8000_0000, x_y} : {32'h0, x_y};
      C_JUMP,
      C_JREG:  x_res = st[4].user ? {PA_TAG, 16'h0, st[4].pc + 32'd4} : {32'h0, st[4].pc + 32'd4};
      C_MFSPR: begin
                 if (st[4].user)            x_res = '0;
                 else if (spr == SPR_SR)    x_res = {54'h0, flag_q, 8'h0, 1'b1};
                 else if (spr == SPR_EPCR)  x_res = {32'h0, epcr_q};
                 else if (spr == SPR_ESR)   x_res = {54'h0, esr_f_q, 8'h0, esr_sm_q};
                 else                       x_res = '0;
               end
      C_LOAD:  x_rdy = 1'b0;
      default: x_res = '0;
    endcase
    if (st[4].cfg_b) x_rdy = 1'b0;
    // load value at stage 5
    ld5_rdy = 1'b1;
    if (st[5].user) begin
      ld5_val = udc_rdata;
      ld5_rdy = udc_hit;
    end else begin
      ld5_val = st[5].mem64 ? dmem_rdata : {32'h0, dmem_rdata[31:0]};
    end
    for (int k = 4; k <= NST; k++) begin
      p_v[k]   = st[k].valid && st[k].wr_en && (st[k].user || k <= SW);
      p_rd[k]  = st[k].rd;
      p_rdy[k] = st[k].rdy;
      p_val[k] = st[k].res;
      if (!st[k].rdy) begin
        if (k == 4) begin
          p_rdy[k] = x_rdy;
          p_val[k] = x_res;
        end else if (k == 5 && st[k].cls == C_LOAD) begin
          p_rdy[k] = ld5_rdy;
          p_val[k] = ld5_val;
        end else if (k == XB && st[k].cfg_b) begin
          p_rdy[k] = 1'b1;
          p_val[k] = (st[k].rd == REG_FLAG) ? {63'h0, b_f} :
                     (st[k].aluop == ALU_PASSB) ? {32'h8000_0000, st[k].imm[31:0]} : {32'h8000_0000, b_y};
        end else if (k == NST && st[k].cls == C_LOAD) begin
          p_rdy[k] = 1'b1;
          p_val[k] = adec_out;
        end
      end
    end
  end

  // ------------------------------------------------------------- operand read
  // Stage 3 (A read): two sources; stage RB (B read): one source.
  word_t r3a, r3b, rba;
  logic  r3a_ok, r3b_ok, rba_ok;
  logic  r3a_fw, r3b_fw, rba_fw;

  always_comb begin
    rf_addr[0]   = st[3].src1[4:0];
    rf_shadow[0] = st[3].user;
    rf_addr[1]   = st[3].src2[4:0];
    rf_shadow[1] = st[3].user;
    rf_addr[2]   = st[RB].src1[4:0];
    rf_shadow[2] = 1'b1;
    if (ser_q == SER_ISSUE) begin
      rf_addr[0]   = sync_idx_q;
      rf_shadow[0] = user_q;   // leaving user mode: read shadow; entering: read real
    end
  end

  always_comb begin
    logic found;
    // stage 3, source 1
    r3a = (st[3].src1 == REG_FLAG) ? {63'h0, flag_q} : rf_data[0];
    r3a_ok = 1'b1; r3a_fw = 1'b0; found = 1'b0;
    if (st[3].src1_en && st[3].src1 != 6'd0)
      for (int k = 4; k <= NST; k++)
        if (!found && p_v[k] && p_rd[k] == st[3].src1) begin
          found = 1'b1; r3a_fw = 1'b1; r3a_ok = p_rdy[k]; r3a = p_val[k];
        end
    // stage 3, source 2
    r3b = rf_data[1];
    r3b_ok = 1'b1; r3b_fw = 1'b0; found = 1'b0;
    if (st[3].src2_en && st[3].src2 != 6'd0)
      for (int k = 4; k <= NST; k++)
        if (!found && p_v[k] && p_rd[k] == st[3].src2) begin
          found = 1'b1; r3b_fw = 1'b1; r3b_ok = p_rdy[k]; r3b = p_val[k];
        end
    // stage RB, source 1
    rba = rf_data[2];
    rba_ok = 1'b1; rba_fw = 1'b0; found = 1'b0;
    if (st[RB].src1_en && st[RB].src1 != 6'd0)
      for (int k = RB + 1; k <= NST; k++)
        if (!found && p_v[k] && p_rd[k] == st[RB].src1) begin
          found = 1'b1; rba_fw = 1'b1; rba_ok = p_rdy[k]; rba = p_val[k];
        end
  end

  // ------------------------------------------------------------- execute control
  logic  x_ser, x_drained, x_mode_change, x_new_user, x_commit;
  data_t x_ser_pc;
  logic  x_mem_order;

  always_comb begin
    x_drained = 1'b1;
    for (int k = 5; k <= NST; k++) if (st[k].valid) x_drained = 1'b0;
    x_ser = st[4].valid && (st[4].cls == C_SYS || st[4].cls == C_RFE || st[4].cls == C_ILLEGAL);
    unique case (st[4].cls)
      C_SYS:   begin x_new_user = 1'b0; x_ser_pc = VEC_SYSCALL; end
      C_RFE:   begin x_new_user = !esr_sm_q; x_ser_pc = epcr_q; end
      default: begin x_new_user = 1'b0; x_ser_pc = VEC_ILLEGAL; end
    endcase
    x_mode_change = x_new_user != st[4].user;
    x_commit = x_ser && x_drained && (ser_q == SER_WAIT || (ser_q == SER_IDLE && !x_mode_change));
    // a user load whose address has a store in flight that the cache no
    // longer holds waits for that store to reach memory
    x_mem_order = 1'b0;
    if (x_mem_user && st[4].cls == C_LOAD)
      for (int k = 5; k <= NST; k++)
        if (st[k].valid && st[k].cls == C_STORE && st[k].user && st[k].haddr == x_haddr && !udc_probe)
          x_mem_order = 1'b1;
  end

  // control transfer resolved in execute
  always_comb begin
    x_taken = 1'b0;
    x_next  = st[4].pc + 32'd4;
    unique case (st[4].cls)
      C_BRANCH: begin x_taken = st[4].opa[0] ^ st[4].bnf; if (x_taken) x_next = st[4].jtarget; end
      C_JUMP:   begin x_taken = 1'b1; x_next = st[4].jtarget; end
      C_JREG:   begin x_taken = 1'b1; x_next = st[4].opb[31:0]; end
      default:  ;
    endcase
  end

  data_t x_pred_next;
  logic  x_ctrl, x_mispredict;
  assign x_pred_next  = st[4].pred_taken ? st[4].pred_target : st[4].pc + 32'd4;
  assign x_ctrl       = st[4].cls == C_BRANCH || st[4].cls == C_JUMP || st[4].cls == C_JREG;
  assign x_mispredict = st[4].valid && !x_ser && st[4].cls != C_HALT && moves(5, frz) && x_next != x_pred_next;
  assign bp_upd       = st[4].valid && x_ctrl && moves(5, frz);
  assign bp_right     = x_next == x_pred_next;

  // ------------------------------------------------------------- stall logic
  always_comb begin
    stall_b = st[RB].valid && st[RB].cfg_b && !rba_ok;
    stall_x = st[4].valid && ((x_ser && !x_commit) || x_mem_order);
    stall_r = st[3].valid && !st[3].cfg_b && !(r3a_ok && r3b_ok);
    if (stall_b)      frz = RB;
    else if (stall_x) frz = 4;
    else if (stall_r) frz = 3;
    else              frz = 0;
  end

  always_comb begin
    flush_front = 1'b0;
    redirect    = 1'b0;
    redirect_pc = x_next;
    if (x_commit) begin
      flush_front = 1'b1; redirect = 1'b1; redirect_pc = x_ser_pc;
    end else if (st[4].valid && st[4].cls == C_HALT && moves(5, frz)) begin
      flush_front = 1'b1;
    end else if (x_mispredict) begin
      flush_front = 1'b1; redirect = 1'b1; redirect_pc = x_next;
    end
  end

  assign udc_flush = x_commit && x_mode_change && x_new_user;

  // ------------------------------------------------------------- register writes
  always_comb begin
    rf_real_we = 1'b0; rf_real_addr = st[SW].rd[4:0]; rf_real_data = p_val[SW]; rf_real_sync = 1'b0;
    rf_sh_we   = 1'b0; rf_sh_addr   = st[NST].rd[4:0]; rf_sh_data  = p_val[NST]; rf_sh_sync  = 1'b0;
    if (st[SW].valid && st[SW].wr_en && !st[SW].user && st[SW].rd != REG_FLAG)
      rf_real_we = 1'b1;
    if (st[NST].valid && st[NST].cls == C_SYNC_ENC) begin
      rf_real_we = 1'b1; rf_real_addr = st[NST].rd[4:0]; rf_real_data = aenc_out; rf_real_sync = 1'b1;
    end
    if (st[NST].valid && st[NST].wr_en && st[NST].user && st[NST].rd != REG_FLAG)
      rf_sh_we = 1'b1;
    if (st[NST].valid && st[NST].cls == C_SYNC_DEC) begin
      rf_sh_we = 1'b1; rf_sh_data = adec_out; rf_sh_sync = 1'b1;
    end
  end

  // ------------------------------------------------------------- memory port
  always_comb begin
    dmem_re    = st[4].valid && st[4].cls == C_LOAD && moves(5, frz) && !x_mem_order;
    dmem_raddr = x_mem_user ? tlb_laddr : {3'b000, x_addr[31:3]};
    dmem_we    = 1'b0;
    dmem_waddr = st[NST].maddr;
    dmem_wdata = aenc_out;
    if (st[NST].valid && st[NST].cls == C_STORE && st[NST].user) begin
      dmem_we = 1'b1;
    end else if (st[4].valid && st[4].cls == C_STORE && !st[4].user && moves(5, frz)) begin
      dmem_we    = 1'b1;
      dmem_waddr = {3'b000, x_addr[31:3]};
      dmem_wdata = st[4].mem64 ? st[4].opb : {32'h0, st[4].opb[31:0]};
    end
  end

  // ------------------------------------------------------------- sequential
  pipe_t bubble;
  always_comb begin
    bubble = '0;
    bubble.cls = C_NOP;
    bubble.aluop = ALU_ADD;
  end

  assign imem_addr = pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q         <= RESET_PC;
      user_q       <= 1'b0;
      flag_q       <= 1'b0;
      epcr_q       <= '0;
      esr_sm_q     <= 1'b1;
      esr_f_q      <= 1'b0;
      fetch_stop_q <= 1'b0;
      halted_q     <= 1'b0;
      tlb_ovf_q    <= 1'b0;
      perf_q       <= '0;
      ser_q        <= SER_IDLE;
      sync_idx_q   <= '0;
      for (int k = 2; k <= NST; k++) st[k] <= bubble;
    end else begin
      // ---- last stages first: stage k loads stage k-1 when it moves
      for (int k = NST; k >= 5; k--) begin
        if (moves(k, frz)) begin
          st[k] <= st[k-1];
          // results captured on the way out of their producing stage
          if (k - 1 == 4 && !st[4].rdy && x_rdy) begin st[k].res <= x_res; st[k].rdy <= 1'b1; end
          if (k - 1 == 4) begin
            st[k].haddr <= x_haddr;
            st[k].maddr <= x_mem_user ? tlb_laddr : {3'b000, x_addr[31:3]};
          end
          if (k - 1 == 5 && st[5].cls == C_LOAD && !st[5].rdy && ld5_rdy) begin
            st[k].res <= ld5_val; st[k].rdy <= 1'b1;
          end
          if (k - 1 == RB && st[RB].cfg_b) begin
            st[k].opa <= rba;
            st[k].imm <= bdec_out;
          end
          if (k - 1 == XB && st[XB].cfg_b) begin
            st[k].res <= p_val[XB]; st[k].rdy <= 1'b1;
          end
        end else if (k == int'(frz) + 1) begin
          st[k] <= bubble;
        end
      end
      // sync pseudo-instructions enter stage 5 while execute is held
      if (ser_q == SER_ISSUE) begin
        if (user_q ? real_stale[sync_idx_q] : shadow_stale[sync_idx_q]) begin
          st[5]       <= bubble;
          st[5].valid <= 1'b1;
          st[5].cls   <= user_q ? C_SYNC_ENC : C_SYNC_DEC;
          st[5].rd    <= {1'b0, sync_idx_q};
          st[5].opb   <= rf_data[0];
          perf_q.sync_regs <= perf_q.sync_regs + 1;
        end
      end
      // ---- stage 4 (execute) loads the read stage
      if (moves(4, frz)) begin
        st[4] <= flush_front ? bubble : st[3];
        if (!flush_front && !st[3].cfg_b) begin
          st[4].opa <= r3a;
          st[4].opb <= r3b;
        end
      end else if (frz == 3) begin
        st[4] <= bubble;
      end
      // ---- stage 3 loads decode
      if (moves(3, frz)) st[3] <= flush_front ? bubble : dec;
      // ---- stage 2 loads fetch
      if (moves(2, frz)) begin
        if (flush_front || fetch_stop_q) begin
          st[2] <= bubble;
        end else begin
          st[2]             <= bubble;
          st[2].valid       <= 1'b1;
          st[2].user        <= user_q;
          st[2].pc          <= pc_q;
          st[2].insn        <= imem_rdata;
          st[2].pred_hit    <= bp_hit;
          st[2].pred_taken  <= bp_taken;
          st[2].pred_target <= bp_target;
          st[2].cls         <= (imem_rdata[31:26] == OPC_PREFIX) ? C_PREFIX : C_NOP;
        end
      end
      // ---- program counter
      if (redirect)                              pc_q <= redirect_pc;
      else if (moves(2, frz) && !fetch_stop_q)   pc_q <= bp_taken ? bp_target : pc_q + 32'd4;
      // ---- execute-stage side effects
      if (st[4].valid && moves(5, frz)) begin
        if (st[4].cls == C_MTSPR && !st[4].user) begin
          if (spr == SPR_EPCR) epcr_q <= st[4].opb[31:0];
          if (spr == SPR_ESR) begin
            esr_sm_q <= st[4].opb[0]; esr_f_q <= st[4].opb[9];
          end
        end
        if (st[4].cls == C_HALT) fetch_stop_q <= 1'b1;
        if (tlb_req && tlb_full) tlb_ovf_q <= 1'b1;
      end
      // ---- flag writes
      if (st[SW].valid && st[SW].wr_en && !st[SW].user && st[SW].rd == REG_FLAG) flag_q <= p_val[SW][0];
      if (st[NST].valid && st[NST].wr_en && st[NST].user && st[NST].rd == REG_FLAG) flag_q <= p_val[NST][0];
      // ---- serialising instructions
      unique case (ser_q)
        SER_IDLE: if (x_ser && x_drained && x_mode_change) begin
                    ser_q <= SER_ISSUE; sync_idx_q <= '0;
                  end
        SER_ISSUE: begin
                    sync_idx_q <= sync_idx_q + 5'd1;
                    if (sync_idx_q == 5'd31) ser_q <= SER_WAIT;
                  end
        SER_WAIT:  if (x_commit) ser_q <= SER_IDLE;
        default:   ser_q <= SER_IDLE;
      endcase
      if (x_commit) begin
        user_q <= x_new_user;
        perf_q.exceptions <= perf_q.exceptions + ((st[4].cls != C_RFE) ? 32'd1 : 32'd0);
        if (x_mode_change) perf_q.mode_switches <= perf_q.mode_switches + 1;
        if (st[4].cls == C_RFE) begin
          flag_q <= esr_f_q;
        end else begin
          epcr_q   <= (st[4].cls == C_SYS) ? st[4].pc + 32'd4 : st[4].pc;
          esr_sm_q <= !st[4].user;
          esr_f_q  <= flag_q;
        end
      end
      // ---- retirement and statistics
      if (st[NST].valid && st[NST].cls == C_HALT) halted_q <= 1'b1;
      perf_q.cycles <= perf_q.cycles + 1;
      if (st[NST].valid && st[NST].cls != C_SYNC_ENC && st[NST].cls != C_SYNC_DEC) begin
        if (st[NST].user) perf_q.retired_user <= perf_q.retired_user + 1;
        else              perf_q.retired_sup  <= perf_q.retired_sup + 1;
        if (st[NST].cls == C_PREFIX) perf_q.prefixes <= perf_q.prefixes + 1;
        if (st[NST].cfg_b)           perf_q.cfg_b    <= perf_q.cfg_b + 1;
      end
      if (frz == 3)                 perf_q.stall_read   <= perf_q.stall_read + 1;
      if (frz == 4)                 perf_q.stall_exec   <= perf_q.stall_exec + 1;
      if (frz == RB)                perf_q.stall_b_read <= perf_q.stall_b_read + 1;
      perf_q.fwd_used <= perf_q.fwd_used
        + ((moves(4, frz) && !flush_front && st[3].valid && !st[3].cfg_b && (r3a_fw || r3b_fw)) ? 32'd1 : 32'd0)
        + ((moves(RB + 1, frz) && st[RB].valid && st[RB].cfg_b && rba_fw) ? 32'd1 : 32'd0);
      if (x_mispredict) perf_q.mispredicts <= perf_q.mispredicts + 1;
      if (st[4].valid && x_mem_order) perf_q.mem_order <= perf_q.mem_order + 1;
    end
  end

  always_comb begin
    perf = perf_q;
    perf.udc_read_hits    = udc_rh;
    perf.udc_read_misses  = udc_rm;
    perf.udc_write_hits   = udc_wh;
    perf.udc_write_misses = udc_wm;
  end

  assign user_mode    = user_q;
  assign halted       = halted_q;
  assign tlb_overflow = tlb_ovf_q;

  // ------------------------------------------------------------- assertions
  // The two memory write sources never coincide, and only user instructions
  // can hold the B read stage.
  a_store_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(st[NST].valid && st[NST].cls == C_STORE && st[NST].user &&
      st[4].valid && st[4].cls == C_STORE && !st[4].user))
    else $error("supervisor and user stores collide");
  a_b_stall_user: assert property (@(posedge clk) disable iff (!rst_n)
    !(stall_b && !st[RB].user))
    else $error("B stall on a supervisor instruction");

endmodule
