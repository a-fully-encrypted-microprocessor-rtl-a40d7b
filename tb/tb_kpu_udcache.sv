// tb_kpu_udcache: random stores and loads over a small set of scrambled word
// addresses against a model of a direct-mapped cache indexed by the top
// address bits; checks hit/miss, the returned plaintext,
// the same-cycle write bypass, the flush and the four statistics counters.
module tb_kpu_udcache;
  import kpu_pkg::*;
  localparam int E = 16;
  logic clk = 0, rst_n = 0, flush = 0, lookup_valid = 0, write_valid = 0, hit, probe_hit;
  logic [31:0] lookup_addr = 0, write_addr = 0;
  logic [63:0] rdata, write_data = 0;
  logic [31:0] read_hits, read_misses, write_hits, write_misses;
  int checks = 0, failures = 0;

  kpu_udcache #(.ENTRIES(E)) dut (.*);
  always #5 clk = ~clk;

  bit m_v [E]; logic [31:0] m_t [E]; logic [63:0] m_d [E];
  int rh = 0, rm = 0, wh = 0, wm = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit eh; logic [63:0] ed;
    for (int i = 0; i < E; i++) m_v[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      lookup_valid = $urandom_range(0, 1);
      write_valid  = $urandom_range(0, 2) == 0;
      lookup_addr  = addr_scramble(32'($urandom_range(0, 40)) * 32'd4);
      write_addr   = ($urandom_range(0, 3) == 0) ? lookup_addr : addr_scramble(32'($urandom_range(0, 40)) * 32'd4);
      write_data   = {$urandom(), $urandom()};
      flush        = (t % 500 == 499);
      // model, evaluated before the edge
      eh = 0; ed = 0;
      if (lookup_valid) begin
        automatic int i = int'(lookup_addr >> (32 - $clog2(E)));
        if (!flush && write_valid && write_addr == lookup_addr) begin eh = 1; ed = write_data; end
        else if (!flush && m_v[i] && m_t[i] == lookup_addr) begin eh = 1; ed = m_d[i]; end
        if (eh) rh++; else rm++;
        #1 check(probe_hit == (m_v[i] && m_t[i] == lookup_addr), "probe");
      end
      if (flush) for (int i = 0; i < E; i++) m_v[i] = 0;
      else if (write_valid) begin
        automatic int i = int'(write_addr >> (32 - $clog2(E)));
        if (m_v[i] && m_t[i] == write_addr) wh++; else wm++;
        m_v[i] = 1; m_t[i] = write_addr; m_d[i] = write_data;
      end
      @(posedge clk); #1;
      if (lookup_valid) begin
        check(hit == eh, $sformatf("hit %b want %b at %h", hit, eh, lookup_addr));
        if (eh) check(rdata == ed, "hit data");
      end
      check(read_hits == rh && read_misses == rm && write_hits == wh && write_misses == wm, "counters");
    end
    check(rh > 100 && rm > 100 && wh > 50 && wm > 50, "all four outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
