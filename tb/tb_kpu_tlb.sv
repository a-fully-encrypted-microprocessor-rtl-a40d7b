// tb_kpu_tlb: random address requests against a first-come, first-served
// model: a new address gets the next logical word, a repeated one its old
// word, and a miss on a full table raises "full" without allocating.
module tb_kpu_tlb;
  import kpu_pkg::*;
  localparam int E = 64;
  localparam logic [31:0] LB = 32'h0000_1000;
  logic clk = 0, rst_n = 0, req_valid = 0, hit, full;
  logic [31:0] req_addr = 0, laddr;
  logic [5:0] lidx;
  logic [6:0] used;
  int checks = 0, failures = 0;

  kpu_tlb #(.ENTRIES(E), .LBASE(LB)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] seen [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pos;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      req_valid = $urandom_range(0, 3) != 0;
      req_addr = (t < 400) ? 32'($urandom_range(0, 50)) * 32'h9e37_79b1 : $urandom();
      #1;
      if (req_valid) begin
        pos = -1;
        foreach (seen[i]) if (seen[i] == req_addr) pos = i;
        if (pos >= 0) begin
          check(hit && laddr == LB + pos && !full, $sformatf("hit at %0d", pos));
        end else if (seen.size() < E) begin
          check(!hit && laddr == LB + seen.size() && !full, "new address gets next slot");
        end else begin
          check(!hit && full, "full table refuses");
        end
      end
      @(posedge clk);
      if (req_valid && pos < 0 && seen.size() < E) seen.push_back(req_addr);
      #1 check(used == seen.size(), "slots used");
    end
    check(seen.size() == E, "table filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
