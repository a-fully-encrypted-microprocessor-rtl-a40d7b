// tb_kpu_encrypt: checks the encryption codec against the reference model:
// known S-box values, one block per cycle, a latency of ROUNDS cycles,
// round-trip through the reference decryption, the program-address
// pass-through, fresh pads, and that disabled stages hold their data.
module tb_kpu_encrypt;
  import tb_cipher_model::*;

  localparam int R = 10;
  logic clk = 0, rst_n = 0;
  logic [R-1:0] en;
  logic in_valid, out_valid;
  logic [63:0] in_plain, out_cipher;
  int checks = 0, failures = 0;
  int cycle = 0;

  kpu_encrypt dut (.clk, .rst_n, .stage_en(en), .in_valid, .in_plain, .out_valid, .out_cipher);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] sent [$];
  int          sent_cycle [$];

  initial begin
    logic [63:0] p, c, d;
    int c0;
    init();
    check(sb[8'h00] == 8'h63 && sb[8'h53] == 8'hed && kpu_pkg::SBOX[8'h53] == 8'hed, "S-box known values");
    en = '1; in_valid = 0; in_plain = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // stream 40 data words, one per cycle
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          @(negedge clk);
          in_valid = 1;
          in_plain = {32'h0, $urandom()};
          if (i == 7)  in_plain = {16'h7fff, 16'h0, 32'h0000_1234};   // program address
          sent.push_back(in_plain);
          sent_cycle.push_back(cycle);
        end
        @(negedge clk) in_valid = 0;
      end
      begin
        automatic int n = 0;
        while (n < 40) begin
          @(posedge clk); #1;
          if (out_valid) begin
            p = sent.pop_front();
            c0 = sent_cycle.pop_front();
            check(cycle - c0 == R, $sformatf("latency %0d", cycle - c0));
            if (p[63:48] == 16'h7fff) begin
              check(out_cipher == {32'h0, p[31:0]}, "program address leaves zero-filled");
            end else begin
              d = decrypt_block(out_cipher, KEY, 10);
              check(d[31:0] == p[31:0], $sformatf("round trip %h -> %h", p, d));
              check(d[63] == 1'b1, "pad bit 63 set");
              check(encrypt_block(d, KEY, 10) == out_cipher, "matches reference encryption");
              check(out_cipher[63:32] != 0, "cipher avoids the zero-filled form");
            end
            n++;
          end
        end
      end
    join
    // two encryptions of the same datum differ (fresh pad)
    @(negedge clk); in_valid = 1; in_plain = 64'h5;
    @(negedge clk); in_plain = 64'h5;
    @(negedge clk); in_valid = 0;
    repeat (R - 2) @(posedge clk);
    #1 c = out_cipher;
    @(posedge clk); #1;
    check(out_valid && c != out_cipher, "one datum, two encryptions");
    check(decrypt_block(c, KEY, 10) != decrypt_block(out_cipher, KEY, 10), "pads differ");
    check(decrypt_block(c, KEY, 10) ==? {1'b1, 31'bx, 32'h5}, "both carry the datum");
    // freeze: with every stage disabled the block stays inside
    @(negedge clk); in_valid = 1; in_plain = 64'h77;
    @(negedge clk); in_valid = 0; en = '0;
    begin
      automatic bit seen = 0;
      repeat (R + 3) begin @(posedge clk); #1 if (out_valid) seen = 1; end
      check(!seen, "frozen pipeline emits nothing");
    end
    @(negedge clk); en = '1;
    repeat (R - 2) @(posedge clk);
    #1 check(!out_valid, "frozen block not early");
    @(posedge clk);
    #1 check(out_valid && decrypt_block(out_cipher, KEY, 10) ==? {1'b1, 31'bx, 32'h77}, "frozen block finishes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
