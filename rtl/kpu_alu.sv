// kpu_alu: the plain 32-bit OpenRISC integer ALU inside the encrypted ALU.
//
// Combinational. Computes add, subtract, logic operations, the low word of a
// multiply, shifts and rotate (amount b[4:0]), l.movhi (b << 16), a pass of b,
// and the ten OpenRISC set-flag comparisons, whose 1-bit result is "flag"
// (the compare output the document draws on its ALU). cy and ov are the
// carry and signed overflow of add and subtract, as OpenRISC defines them
// (for subtract cy is the borrow). The operation set is that of the OpenRISC
// 1000 integer instructions this core implements.
module kpu_alu
  import kpu_pkg::*;
(
  input  alu_op_e     op,
  input  data_t       a,
  input  data_t       b,
  output data_t       y,
  output logic        flag,
  output logic        cy,
  output logic        ov
);

  logic [32:0] sum, dif;
  logic        lts, ltu, eq;

  assign sum = {1'b0, a} + {1'b0, b};
  assign dif = {1'b0, a} - {1'b0, b};
  assign eq  = (a == b);
  assign ltu = dif[32];
  assign lts = $signed(a) < $signed(b);

  always_comb begin
    y    = '0;
    flag = 1'b0;
    cy   = 1'b0;
    ov   = 1'b0;
    unique case (op)
      ALU_ADD:   begin y = sum[31:0]; cy = sum[32]; ov = (a[31] == b[31]) && (sum[31] != a[31]); end
      ALU_SUB:   begin y = dif[31:0]; cy = dif[32]; ov = (a[31] != b[31]) && (dif[31] != a[31]); end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_MUL:   y = a * b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = data_t'($signed(a) >>> b[4:0]);
      ALU_ROR:   y = (a >> b[4:0]) | (a << (6'd32 - {1'b0, b[4:0]}));
      ALU_MOVHI: y = {b[15:0], 16'h0};
      ALU_PASSB: y = b;
      ALU_SFEQ:  flag = eq;
      ALU_SFNE:  flag = !eq;
      ALU_SFGTU: flag = !ltu && !eq;
      ALU_SFGEU: flag = !ltu;
      ALU_SFLTU: flag = ltu;
      ALU_SFLEU: flag = ltu || eq;
      ALU_SFGTS: flag = !lts && !eq;
      ALU_SFGES: flag = !lts;
      ALU_SFLTS: flag = lts;
      ALU_SFLES: flag = lts || eq;
      default:   y = '0;
    endcase
  end

endmodule
