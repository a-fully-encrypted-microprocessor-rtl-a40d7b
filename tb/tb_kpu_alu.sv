// tb_kpu_alu: drives every ALU operation with random and corner operands and
// compares result, flag, carry and overflow with values computed here from
// wider arithmetic.
module tb_kpu_alu;
  import kpu_pkg::*;

  alu_op_e op;
  logic [31:0] a, b, y;
  logic flag, cy, ov;
  int checks = 0, failures = 0;

  kpu_alu dut (.op, .a, .b, .y, .flag, .cy, .ov);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_of(alu_op_e o, logic [31:0] x, logic [31:0] z,
                                    output logic [31:0] ey, output logic ef, output logic ec, output logic eo);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    longint ux = longint'({32'h0, x}), uz = longint'({32'h0, z});
    longint r;
    ey = 0; ef = 0; ec = 0; eo = 0;
    case (o)
      ALU_ADD:   begin r = ux + uz; ey = r[31:0]; ec = r[32]; r = sx + sz; eo = (r > 64'sd2147483647 || r < -64'sd2147483648); end
      ALU_SUB:   begin ey = x - z; ec = (ux < uz); r = sx - sz; eo = (r > 64'sd2147483647 || r < -64'sd2147483648); end
      ALU_AND:   ey = x & z;
      ALU_OR:    ey = x | z;
      ALU_XOR:   ey = x ^ z;
      ALU_MUL:   begin r = sx * sz; ey = r[31:0]; end
      ALU_SLL:   for (int i = 0; i < 32; i++) ey[i] = (i >= z[4:0]) ? x[i - z[4:0]] : 1'b0;
      ALU_SRL:   for (int i = 0; i < 32; i++) ey[i] = (i + z[4:0] < 32) ? x[i + z[4:0]] : 1'b0;
      ALU_SRA:   for (int i = 0; i < 32; i++) ey[i] = (i + z[4:0] < 32) ? x[i + z[4:0]] : x[31];
      ALU_ROR:   for (int i = 0; i < 32; i++) ey[i] = x[(i + z[4:0]) % 32];
      ALU_MOVHI: ey = z * 32'h10000;
      ALU_PASSB: ey = z;
      ALU_SFEQ:  ef = (ux == uz);
      ALU_SFNE:  ef = (ux != uz);
      ALU_SFGTU: ef = (ux > uz);
      ALU_SFGEU: ef = (ux >= uz);
      ALU_SFLTU: ef = (ux < uz);
      ALU_SFLEU: ef = (ux <= uz);
      ALU_SFGTS: ef = (sx > sz);
      ALU_SFGES: ef = (sx >= sz);
      ALU_SFLTS: ef = (sx < sz);
      ALU_SFLES: ef = (sx <= sz);
      default: ;
    endcase
  endfunction

  initial begin
    logic [31:0] ey; logic ef, ec, eo;
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000, 32'hffffffff, 32'h12345678};
    for (int k = 0; k <= int'(ALU_SFLES); k++) begin
      for (int t = 0; t < 236; t++) begin
        op = alu_op_e'(k);
        if (t < 36) begin a = corner[t / 6]; b = corner[t % 6]; end
        else begin a = $urandom(); b = (t % 3 == 0) ? a : $urandom(); end
        #1;
        expect_of(op, a, b, ey, ef, ec, eo);
        checks++;
        if (y !== ey || flag !== ef || ((op == ALU_ADD || op == ALU_SUB) && (cy !== ec || ov !== eo))) begin
          failures++;
          if (failures < 10) $display("FAIL %s a=%h b=%h y=%h/%h f=%b/%b cy=%b/%b ov=%b/%b", op.name(), a, b, y, ey, flag, ef, cy, ec, ov, eo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
