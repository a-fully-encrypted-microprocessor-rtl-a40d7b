// tb_kpu_core: runs the end-to-end program (tb_kpu_prog) on the core at its
// default parameters with behavioural instruction and data memories, then
// checks the memory image: the encrypted registers saved by the system-call
// handler decrypt to the expected values, supervisor values are stored
// plain, the program address was stored in its zero-filled form, the user
// store reached memory encrypted, and EPCR pointed at the illegal
// instruction.
module tb_kpu_core;
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
  int checks = 0, failures = 0, cycle = 0;

  logic [63:0] dmem [0:8191];

  kpu_core dut (
    .clk, .rst_n, .imem_addr, .imem_rdata, .dmem_re, .dmem_raddr, .dmem_rdata,
    .dmem_we, .dmem_waddr, .dmem_wdata, .user_mode, .halted, .tlb_overflow, .perf,
    .bpb_hits(bh), .bpb_misses(bm), .bpb_hits_right(bhr), .bpb_hits_wrong(bhw),
    .bpb_misses_right(bmr), .bpb_misses_wrong(bmw));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  assign imem_rdata = prog[imem_addr[13:2]];
  always @(posedge clk) begin
    if (dmem_re) dmem_rdata <= dmem[dmem_raddr[12:0]];
    if (dmem_we) dmem[dmem_waddr[12:0]] <= dmem_wdata;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: core did not halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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
    @(posedge clk);
    $display("cycles %0d retired user %0d sup %0d", perf.cycles, perf.retired_user, perf.retired_sup);
    $display("prefix %0d cfgB %0d stall_r %0d stall_b %0d stall_x %0d fwd %0d mispred %0d modesw %0d sync %0d exc %0d",
      perf.prefixes, perf.cfg_b, perf.stall_read, perf.stall_b_read, perf.stall_exec, perf.fwd_used,
      perf.mispredicts, perf.mode_switches, perf.sync_regs, perf.exceptions);
    $display("udc rh %0d rm %0d wh %0d wm %0d  bpb hits %0d (%0d/%0d) misses %0d (%0d/%0d)",
      perf.udc_read_hits, perf.udc_read_misses, perf.udc_write_hits, perf.udc_write_misses, bh, bhr, bhw, bm, bmr, bmw);
    for (int r = 10; r <= 26; r++) begin
      d = dec(dmem[SAVE + r - 10]);
      check(d[31:0] == expect_r[r], $sformatf("r%0d = %0d, want %0d", r, d[31:0], expect_r[r]));
    end
    check(dmem[SAVE] != {32'h0, 32'd100} && dmem[SAVE][63:32] != 0, "saved r10 is encrypted");
    check(dmem[32'hA0] == 64'd10 && dmem[32'hA1] == 64'd20, "supervisor values stored plain");
    check(dmem[UBASE + 2] == {32'h0, ret_pc}, "program address stored zero-filled");
    d = dec(dmem[UBASE + 0]);
    check(d[31:0] == 987 && d[63], "last user store reached memory encrypted");
    check(dmem[32'hA2] == {32'h0, illegal_pc}, "EPCR of the illegal instruction");
    check(dmem[32'h100] == 64'd5, "supervisor l.sd");
    check(!tlb_overflow, "no TLB overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
