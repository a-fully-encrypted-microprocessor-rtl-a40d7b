// tb_kpu_top: end-to-end test of the whole design at its default parameters.
//
// The processor runs the program of tb_kpu_prog (supervisor set-up, a user
// program on encrypted data, a system call whose handler saves the encrypted
// registers, a return to user mode and an illegal instruction that ends the
// run). The memory image is then checked against results worked out here,
// and every mechanism of the design must have happened at least once:
// prefix instructions, configuration B, read-stage stalls (A and B),
// execute-stage holds for mode switches, forwarding, branch mispredictions
// and prediction buffer hits, mode switches with register refresh through
// the codec, exceptions, user data cache read hits, misses (decrypted loads)
// and write hits, loads waiting for an in-flight store, and the
// program-address protocol. Meanwhile the idealised
// encrypted ALU beside the core is fed a stream of encrypted operands whose
// results must decrypt to the plain results.
module tb_kpu_top;
  import kpu_pkg::*;
  import tb_cipher_model::*;
  import tb_kpu_asm::*;
  import tb_kpu_prog::*;

  logic clk = 0, rst_n = 0;
  data_t imem_addr, imem_rdata, dmem_raddr, dmem_waddr;
  logic dmem_re, dmem_we, user_mode, halted, tlb_overflow;
  word_t dmem_rdata, dmem_wdata;
  perf_t perf;
  logic [31:0] bh, bm, bhr, bhw, bmr, bmw;
  logic ae_in_valid = 0, ae_cmp_valid, ae_cmp, ae_out_valid;
  alu_op_e ae_op = ALU_ADD;
  word_t ae_a = 0, ae_b = 0, ae_y;
  int checks = 0, failures = 0, cycle = 0;
  int user_cycles = 0;

  logic [63:0] dmem [0:8191];

  kpu_top dut (
    .clk, .rst_n, .imem_addr, .imem_rdata, .dmem_re, .dmem_raddr, .dmem_rdata,
    .dmem_we, .dmem_waddr, .dmem_wdata, .user_mode, .halted, .tlb_overflow, .perf,
    .bpb_hits(bh), .bpb_misses(bm), .bpb_hits_right(bhr), .bpb_hits_wrong(bhw),
    .bpb_misses_right(bmr), .bpb_misses_wrong(bmw),
    .ae_in_valid, .ae_op, .ae_a, .ae_b, .ae_cmp_valid, .ae_cmp, .ae_out_valid, .ae_y);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (user_mode) user_cycles++;
  end

  assign imem_rdata = prog[imem_addr[13:2]];
  always @(posedge clk) begin
    if (dmem_re) dmem_rdata <= dmem[dmem_raddr[12:0]];
    if (dmem_we) dmem[dmem_waddr[12:0]] <= dmem_wdata;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic happened(int n, string what);
    $display("  %-40s %0d", what, n);
    check(n > 0, {what, " never happened"});
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: design did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encrypted ALU stream
  typedef struct { logic [31:0] y; logic f; bit is_cmp; } ae_exp_t;
  ae_exp_t ae_q [$], ae_cq [$];
  int ae_done = 0;

  initial begin
    logic [31:0] a, b;
    ae_exp_t e;
    init();
    wait (rst_n);
    for (int i = 0; i < 24; i++) begin
      @(negedge clk);
      a = $urandom(); b = (i % 3 == 0) ? a : $urandom();
      ae_op = (i % 3 == 0) ? ALU_SFEQ : (i % 3 == 1) ? ALU_ADD : ALU_MUL;
      ae_in_valid = 1;
      ae_a = enc(a, 31'($urandom()));
      ae_b = enc(b, 31'($urandom()));
      e.is_cmp = (ae_op == ALU_SFEQ);
      e.f = (a == b);
      e.y = (ae_op == ALU_ADD) ? a + b : (ae_op == ALU_MUL) ? a * b : 32'h0;
      ae_q.push_back(e); ae_cq.push_back(e);
    end
    @(negedge clk) ae_in_valid = 0;
  end

  always @(posedge clk) begin
    if (ae_cmp_valid && ae_cq.size() > 0) begin
      automatic ae_exp_t e = ae_cq.pop_front();
      if (e.is_cmp) check(ae_cmp == e.f, "ALU' compare output");
    end
    if (ae_out_valid && ae_q.size() > 0) begin
      automatic ae_exp_t e = ae_q.pop_front();
      automatic logic [63:0] d = dec(ae_y);
      check(d[31:0] == e.y && ae_y[63:32] != 0, "ALU' encrypted result");
      ae_done++;
    end
  end

  initial begin
    logic [63:0] d;
    init();
    build();
    for (int i = 0; i < 8192; i++) dmem[i] = 0;
    dmem[UBASE + 1] = preload_slot1();
    dmem_rdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (halted);
    repeat (2) @(posedge clk);
    // results
    for (int r = 10; r <= 26; r++) begin
      d = dec(dmem[SAVE + r - 10]);
      check(d[31:0] == expect_r[r], $sformatf("r%0d = %0d, want %0d", r, d[31:0], expect_r[r]));
    end
    check(dmem[SAVE][63:32] != 0, "saved registers are encrypted");
    check(dmem[32'hA0] == 64'd10 && dmem[32'hA1] == 64'd20, "supervisor values stored plain");
    check(dmem[UBASE + 2] == {32'h0, ret_pc}, "program address stored zero-filled");
    check(dmem[32'hA2] == {32'h0, illegal_pc}, "EPCR of the illegal instruction");
    check(ae_done == 24, "all encrypted ALU results seen");
    check(perf.retired_user + perf.retired_sup <= perf.cycles, "at most one instruction per cycle");
    $display("cycles %0d, retired user %0d, supervisor %0d, user-mode cycles %0d",
             perf.cycles, perf.retired_user, perf.retired_sup, user_cycles);
    $display("mechanisms:");
    happened(perf.prefixes,          "prefix instructions");
    happened(perf.cfg_b,             "configuration B instructions");
    happened(perf.stall_read,        "A read-stage stall cycles");
    happened(perf.stall_b_read,      "B read-stage stall cycles");
    happened(perf.stall_exec,        "execute holds (drain, refresh)");
    happened(perf.fwd_used,          "forwarded operands");
    happened(perf.mispredicts,       "branch mispredictions");
    happened(bh,                     "prediction buffer hits");
    happened(bhr,                    "prediction buffer hits, right");
    happened(bm,                     "prediction buffer misses");
    happened(perf.mode_switches,     "mode switches");
    happened(perf.sync_regs,         "registers refreshed through the codec");
    happened(perf.exceptions,        "exceptions (system call, illegal)");
    happened(perf.udc_read_hits,     "user data cache read hits");
    happened(perf.udc_read_misses,   "user data cache read misses (decrypted loads)");
    happened(perf.udc_write_hits,    "user data cache write hits");
    happened(perf.udc_write_misses,  "user data cache write misses");
    happened(perf.mem_order,         "loads waiting for an in-flight store");
    happened(int'(dmem[UBASE + 2] == {32'h0, ret_pc}), "program-address protocol (stored return address)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
