// tb_kpu_alu_enc: feeds operands encrypted by the reference model through the
// encrypted ALU, one per cycle, and checks that each result decrypts to the
// plain result, that the compare bit is right, and the two latencies.
module tb_kpu_alu_enc;
  import kpu_pkg::*;
  import tb_cipher_model::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, cmp_valid, cmp, out_valid;
  alu_op_e op = ALU_ADD;
  logic [63:0] a_enc = 0, b_enc = 0, y_enc;
  int checks = 0, failures = 0, cycle = 0;

  kpu_alu_enc dut (.clk, .rst_n, .in_valid, .op, .a_enc, .b_enc, .cmp_valid, .cmp, .out_valid, .y_enc);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] y; logic f; int t; bit is_cmp; } exp_t;
  exp_t qy [$];
  exp_t qc [$];

  initial begin
    logic [31:0] a, b;
    alu_op_e ops [5] = '{ALU_ADD, ALU_SUB, ALU_XOR, ALU_SFLTU, ALU_SFEQ};
    exp_t e;
    init();
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      for (int i = 0; i < 30; i++) begin
        @(negedge clk);
        a = $urandom(); b = (i % 4 == 0) ? a : $urandom();
        op = ops[i % 5];
        in_valid = 1;
        a_enc = enc(a, 31'($urandom()));
        b_enc = enc(b, 31'($urandom()));
        e.t = cycle;
        e.is_cmp = (op == ALU_SFLTU || op == ALU_SFEQ);
        e.y = (op == ALU_ADD) ? a + b : (op == ALU_SUB) ? a - b : (op == ALU_XOR) ? a ^ b : 32'h0;
        e.f = (op == ALU_SFLTU) ? (a < b) : (op == ALU_SFEQ) ? (a == b) : 1'b0;
        qy.push_back(e); qc.push_back(e);
        if (i == 29) begin @(negedge clk); in_valid = 0; end
      end
      begin
        automatic int n = 0, m = 0;
        while (n < 30 || m < 30) begin
          @(posedge clk); #1;
          if (cmp_valid) begin
            e = qc.pop_front();
            check(cycle - e.t == 10, "compare latency 10");
            if (e.is_cmp) check(cmp == e.f, "compare bit");
            m++;
          end
          if (out_valid) begin
            e = qy.pop_front();
            check(cycle - e.t == 20, "result latency 20");
            begin
              automatic logic [63:0] d = dec(y_enc);
              check(d[63] && d[31:0] == e.y, $sformatf("result %h want %h", d, e.y));
            end
            n++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
