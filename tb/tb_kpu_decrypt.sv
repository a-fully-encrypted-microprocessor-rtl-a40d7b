// tb_kpu_decrypt: checks the decryption codec against the reference model:
// blocks encrypted by the model come back with their pad and datum after
// ROUNDS cycles, one per cycle; zero-filled program addresses come back in
// the 16'h7fff form; disabled stages hold their data.
module tb_kpu_decrypt;
  import tb_cipher_model::*;

  localparam int R = 10;
  logic clk = 0, rst_n = 0;
  logic [R-1:0] en;
  logic in_valid, out_valid;
  logic [63:0] in_cipher, out_plain;
  int checks = 0, failures = 0;
  int cycle = 0;

  kpu_decrypt dut (.clk, .rst_n, .stage_en(en), .in_valid, .in_cipher, .out_valid, .out_plain);

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

  logic [63:0] want [$];
  int          sent_cycle [$];

  initial begin
    logic [63:0] p;
    init();
    en = '1; in_valid = 0; in_cipher = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          @(negedge clk);
          in_valid = 1;
          if (i % 9 == 4) begin
            in_cipher = {32'h0, $urandom()};
            want.push_back({16'h7fff, 16'h0, in_cipher[31:0]});
          end else begin
            p = {1'b1, 31'($urandom()), 32'($urandom())};
            in_cipher = encrypt_block(p, KEY, 10);
            want.push_back(p);
          end
          sent_cycle.push_back(cycle);
        end
        @(negedge clk) in_valid = 0;
      end
      begin
        automatic int n = 0;
        while (n < 40) begin
          @(posedge clk); #1;
          if (out_valid) begin
            p = want.pop_front();
            check(cycle - sent_cycle.pop_front() == R, "latency");
            check(out_plain == p, $sformatf("plain %h want %h", out_plain, p));
            n++;
          end
        end
      end
    join
    @(negedge clk); in_valid = 1; p = {1'b1, 31'h5555, 32'h99}; in_cipher = encrypt_block(p, KEY, 10);
    @(negedge clk); in_valid = 0; en = '0;
    begin
      automatic bit seen = 0;
      repeat (R + 3) begin @(posedge clk); #1 if (out_valid) seen = 1; end
      check(!seen, "frozen pipeline emits nothing");
    end
    @(negedge clk); en = '1;
    repeat (R - 1) @(posedge clk);
    #1 check(out_valid && out_plain == p, "frozen block finishes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
