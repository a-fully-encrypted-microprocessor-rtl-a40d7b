// tb_kpu_prefix: sequences of prefixes followed by an immediate instruction,
// with stalls (advance low), a flush and an intervening ordinary instruction;
// checks the assembled 64-bit immediate each time.
module tb_kpu_prefix;
  import kpu_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, advance = 0, is_prefix = 0;
  logic [15:0] seg = 0, imm_lo = 0;
  logic [63:0] imm64;
  logic [1:0] count;
  int checks = 0, failures = 0;

  kpu_prefix dut (.clk, .rst_n, .flush, .advance, .is_prefix, .seg, .imm_lo, .imm64, .count);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(bit adv, bit pre, logic [15:0] s);
    @(negedge clk); advance = adv; is_prefix = pre; seg = s;
    @(posedge clk); #1; advance = 0;
  endtask

  initial begin
    logic [63:0] want;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      automatic int n = $urandom_range(0, 3);
      want = 0;
      for (int i = 0; i < n; i++) begin
        automatic logic [15:0] s = 16'($urandom());
        if ($urandom_range(0, 2) == 0) step(0, 1, 16'hdead);   // decode stalled
        step(1, 1, s);
        want = {want[47:0], s};
      end
      imm_lo = 16'($urandom());
      #1 check(imm64 == {want[47:0], imm_lo}, $sformatf("imm %h want %h", imm64, {want[47:0], imm_lo}));
      check(count == 2'(n), "segment count");
      step(1, 0, 0);   // the immediate instruction itself is accepted
      #1 check(imm64[63:16] == 0, "cleared after use");
    end
    step(1, 1, 16'h1111); step(1, 1, 16'h2222);
    @(negedge clk); flush = 1; @(posedge clk); #1 flush = 0;
    check(imm64[63:16] == 0 && count == 0, "flush clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
