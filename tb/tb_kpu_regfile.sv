// tb_kpu_regfile: random writes to both banks against a model of the two
// banks and their stale bits, reading through all three ports with either
// bank selected; r0 stays zero.
module tb_kpu_regfile;
  import kpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] rd_addr [3];
  logic rd_shadow [3];
  logic [63:0] rd_data [3];
  logic real_we = 0, real_sync = 0, shadow_we = 0, shadow_sync = 0;
  logic [4:0] real_addr = 0, shadow_addr = 0;
  logic [63:0] real_data = 0, shadow_data = 0;
  logic [31:0] real_stale, shadow_stale;
  int checks = 0, failures = 0;

  kpu_regfile dut (.*);
  always #5 clk = ~clk;

  logic [63:0] m_real [32], m_sh [32];
  logic [31:0] m_rs, m_ss;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin m_real[i] = 0; m_sh[i] = 0; end
    m_rs = 0; m_ss = 0;
    for (int p = 0; p < 3; p++) begin rd_addr[p] = 0; rd_shadow[p] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      real_we = $urandom_range(0, 1); real_addr = 5'($urandom()); real_data = {$urandom(), $urandom()}; real_sync = $urandom_range(0, 1);
      shadow_we = $urandom_range(0, 1); shadow_addr = 5'($urandom()); shadow_data = {$urandom(), $urandom()}; shadow_sync = $urandom_range(0, 1);
      for (int p = 0; p < 3; p++) begin rd_addr[p] = 5'($urandom()); rd_shadow[p] = $urandom_range(0, 1); end
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd_data[p] !== (rd_addr[p] == 0 ? 64'h0 : rd_shadow[p] ? m_sh[rd_addr[p]] : m_real[rd_addr[p]])) begin
          failures++; $display("FAIL read port %0d", p);
        end
      end
      checks++;
      if (real_stale !== m_rs || shadow_stale !== m_ss) begin failures++; $display("FAIL stale %h/%h %h/%h", real_stale, m_rs, shadow_stale, m_ss); end
      @(posedge clk);
      if (real_we && real_addr != 0) begin
        m_real[real_addr] = real_data;
        if (real_sync) m_rs[real_addr] = 0; else m_ss[real_addr] = 1;
      end
      if (shadow_we && shadow_addr != 0) begin
        m_sh[shadow_addr] = shadow_data;
        if (shadow_sync) m_ss[shadow_addr] = 0; else m_rs[shadow_addr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
