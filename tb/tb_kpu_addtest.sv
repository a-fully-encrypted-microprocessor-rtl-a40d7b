// tb_kpu_addtest: an add-test workload run at three codec depths.
//
// The program has the shape of an instruction-set add test: for each of N
// operand pairs it loads two encrypted constants (prefixed l.addi), adds
// them with l.add, stores the sum and reloads it (a user data cache hit),
// compares it with the encrypted expected sum (prefixed l.sfeqi) and
// branches to a failure routine if it differs; every fourth pair also
// checks an add-immediate. Passes are counted in a register. l.sys ends the
// user program and the supervisor handler saves the pass count and halts.
//
// The same program (its immediates encrypted for the depth in question) is
// run on kpu_top with ROUNDS = 10, 11 and 12, one after the other. Each run
// must produce the right sums in memory and the right pass count, retire
// the expected number of user instructions, hit the user data cache on
// every reload and never miss it. The cycle count must grow with the codec
// depth; the throughput lost per extra stage is printed, with the instruction
// mix and stall share, for comparison with measurements on a larger add test.
module tb_kpu_addtest;
  import kpu_pkg::*;
  import tb_cipher_model::*;
  import tb_kpu_asm::*;

  localparam int N = 40;                 // operand pairs (each uses one TLB slot)
  localparam int NDEPTH = 3;
  localparam int DEPTHS [NDEPTH] = '{10, 11, 12};
  localparam int unsigned USER_PC = 32'h1000, FAIL_PC = 32'h3000, UBASE = 32'h1000;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc [NDEPTH], ret [NDEPTH];
  logic [31:0] a_v [N], b_v [N];
  int expect_user, expect_prefix, expect_pass;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: a run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void build();
    int users = 0;
    clear();
    org(32'h100);                         // supervisor: enter user mode
    ori(1, 0, 16'(USER_PC));
    mtspr(0, 1, 16'd32);
    mtspr(0, 0, 16'd64);
    rfe();
    org(32'hc00);                         // system call: save pass count, halt
    ori(4, 0, 16'h480);
    sd(4, 16'd0, 7);
    nop(1);
    org(FAIL_PC);                         // failure: count in r8, then system call
    uaddi(8, 8, 1);
    sys();
    org(USER_PC);
    uaddi(21, 0, 32'h4000); users += 4;   // data area
    add(7, 0, 0);           users += 1;
    for (int i = 0; i < N; i++) begin
      uaddi(3, 0, a_v[i]);                users += 4;
      uaddi(4, 0, b_v[i]);                users += 4;
      add(5, 3, 4);                       users += 1;
      sw(21, 16'(4 * i), 5);              users += 1;
      lwz(6, 21, 16'(4 * i));             users += 1;
      usfeqi(6, a_v[i] + b_v[i]);         users += 4;
      bnf(FAIL_PC);                       users += 1;
      uaddi(7, 7, 1);                     users += 4;
      if (i % 4 == 0) begin
        uaddi(5, 3, b_v[i]);              users += 4;
        usfeqi(5, a_v[i] + b_v[i]);       users += 4;
        bnf(FAIL_PC);                     users += 1;
        uaddi(7, 7, 1);                   users += 4;
      end
    end
    sys();                                users += 1;
    expect_user = users;
  endfunction

  genvar g;
  for (g = 0; g < NDEPTH; g++) begin : run
    logic rst_n = 0;
    data_t imem_addr, dmem_raddr, dmem_waddr;
    logic dmem_re, dmem_we, user_mode, halted, tlb_overflow;
    word_t dmem_rdata, dmem_wdata;
    perf_t perf;
    logic [31:0] bh, bm, bhr, bhw, bmr, bmw;
    logic ae_cmp_valid, ae_cmp, ae_out_valid;
    word_t ae_y;
    logic [63:0] dmem [0:8191];

    kpu_top #(.ROUNDS(DEPTHS[g])) dut (
      .clk, .rst_n, .imem_addr, .imem_rdata(prog[imem_addr[13:2]]), .dmem_re, .dmem_raddr,
      .dmem_rdata, .dmem_we, .dmem_waddr, .dmem_wdata, .user_mode, .halted, .tlb_overflow, .perf,
      .bpb_hits(bh), .bpb_misses(bm), .bpb_hits_right(bhr), .bpb_hits_wrong(bhw),
      .bpb_misses_right(bmr), .bpb_misses_wrong(bmw),
      .ae_in_valid(1'b0), .ae_op(ALU_ADD), .ae_a(64'h0), .ae_b(64'h0),
      .ae_cmp_valid, .ae_cmp, .ae_out_valid, .ae_y);

    always @(posedge clk) begin
      if (dmem_re) dmem_rdata <= dmem[dmem_raddr[12:0]];
      if (dmem_we) dmem[dmem_waddr[12:0]] <= dmem_wdata;
    end
    initial begin
      dmem_rdata = 0;
      for (int i = 0; i < 8192; i++) dmem[i] = 0;
    end
  end

  task automatic report(int k, perf_t p, logic [31:0] r_hits, logic [31:0] r_miss);
    real usr = p.retired_user, tot = p.cycles;
    $display("ROUNDS=%0d: %0d cycles, %0d user + %0d supervisor instructions, %.2f cycles per instruction",
             DEPTHS[k], p.cycles, p.retired_user, p.retired_sup, tot / (p.retired_user + p.retired_sup));
    $display("  prefixes %.1f%% of user instructions, read-stage stall cycles %.1f%% of cycles, B instructions %0d",
             100.0 * p.prefixes / usr, 100.0 * (p.stall_read + p.stall_b_read) / tot, p.cfg_b);
    $display("  user data cache: read hits %0d, misses %0d, write hits %0d, misses %0d; mispredictions %0d",
             r_hits, r_miss, p.udc_write_hits, p.udc_write_misses, p.mispredicts);
  endtask

  `define RUN(K) \
    begin \
      logic [63:0] d; \
      NR = DEPTHS[K]; \
      build(); \
      repeat (2) @(posedge clk); \
      run[K].rst_n = 1; \
      wait (run[K].halted); \
      repeat (2) @(posedge clk); \
      for (int i = 0; i < N; i++) begin \
        d = dec(run[K].dmem[UBASE + i]); \
        check(d[31:0] == a_v[i] + b_v[i], $sformatf("ROUNDS=%0d sum %0d", DEPTHS[K], i)); \
      end \
      d = dec(run[K].dmem[32'h90]); \
      check(d[31:0] == expect_pass, $sformatf("ROUNDS=%0d pass count %0d, want %0d", DEPTHS[K], d[31:0], expect_pass)); \
      check(run[K].perf.retired_user == expect_user, $sformatf("ROUNDS=%0d user instructions %0d, want %0d", DEPTHS[K], run[K].perf.retired_user, expect_user)); \
      check(run[K].perf.prefixes == expect_prefix, "prefix count"); \
      check(run[K].perf.udc_read_hits == N && run[K].perf.udc_read_misses == 0, "every reload hits the user data cache"); \
      check(!run[K].tlb_overflow, "TLB did not overflow"); \
      cyc[K] = run[K].perf.cycles; ret[K] = run[K].perf.retired_user + run[K].perf.retired_sup; \
      report(K, run[K].perf, run[K].perf.udc_read_hits, run[K].perf.udc_read_misses); \
    end

  initial begin
    init();
    for (int i = 0; i < N; i++) begin
      a_v[i] = (i % 5 == 0) ? 32'hffff_ff00 + i : $urandom();
      b_v[i] = (i % 7 == 0) ? 32'h8000_0000 : $urandom();
    end
    expect_pass = N + (N + 3) / 4;
    expect_prefix = 3 * (1 + 4 * N + 3 * ((N + 3) / 4));
    `RUN(0)
    `RUN(1)
    `RUN(2)
    for (int k = 1; k < NDEPTH; k++) begin
      check(cyc[k] > cyc[k-1], "a deeper codec costs cycles");
      $display("ROUNDS %0d -> %0d: throughput %.2f%% lower", DEPTHS[k-1], DEPTHS[k],
               100.0 * (1.0 - (real'(ret[k]) / cyc[k]) / (real'(ret[k-1]) / cyc[k-1])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
