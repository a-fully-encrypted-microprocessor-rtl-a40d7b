// kpu_alu_enc: the idealised encrypted ALU ("ALU'") that the document draws,
// z' = E(D(x') op D(y')).
//
// Both 64-bit encrypted operands enter a pipelined decryptor; the 32-bit
// plaintext data meet in the ordinary ALU; the 32-bit result is padded and
// re-encrypted by a pipelined encryptor. The 1-bit compare output of the ALU
// leaves unencrypted, as the document draws it. The structure (two D, one
// ALU, one E, 32-bit inner paths, a 1-bit compare) follows the document; the
// pipelining is this design's choice.
//
// Timing: fully pipelined, one operation per cycle. cmp/cmp_valid appear
// ROUNDS cycles after in_valid, y_enc/out_valid 2*ROUNDS cycles after it.
// The processor core itself does not use this unit: it keeps decrypted
// operands in shadow registers so that a run of operations needs the codec
// only at its start and end.
module kpu_alu_enc
  import kpu_pkg::*;
#(
  parameter int unsigned  ROUNDS = CODEC_ROUNDS,
  parameter logic [127:0] KEY    = DEFAULT_KEY
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  alu_op_e op,
  input  word_t   a_enc,
  input  word_t   b_enc,
  output logic    cmp_valid,
  output logic    cmp,
  output logic    out_valid,
  output word_t   y_enc
);

  word_t   a_pl, b_pl;
  logic    a_v, b_v;
  alu_op_e op_dly [ROUNDS];
  data_t   y_pl;
  logic    flag, cy, ov;

  kpu_decrypt #(.ROUNDS(ROUNDS), .KEY(KEY)) u_dec_a (
    .clk, .rst_n, .stage_en('1), .in_valid, .in_cipher(a_enc), .out_valid(a_v), .out_plain(a_pl));
  kpu_decrypt #(.ROUNDS(ROUNDS), .KEY(KEY)) u_dec_b (
    .clk, .rst_n, .stage_en('1), .in_valid, .in_cipher(b_enc), .out_valid(b_v), .out_plain(b_pl));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ROUNDS; k++) op_dly[k] <= ALU_ADD;
    end else begin
      op_dly[0] <= op;
      for (int k = 1; k < ROUNDS; k++) op_dly[k] <= op_dly[k-1];
    end
  end

  kpu_alu u_alu (.op(op_dly[ROUNDS-1]), .a(a_pl[31:0]), .b(b_pl[31:0]), .y(y_pl), .flag, .cy, .ov);

  // carry and overflow stay inside: OpenRISC keeps them in SR, not in the result
  logic unused_ok;
  assign unused_ok = ^{cy, ov, b_v, a_pl[63:32], b_pl[63:32]};

  assign cmp_valid = a_v;
  assign cmp       = flag;

  kpu_encrypt #(.ROUNDS(ROUNDS), .KEY(KEY)) u_enc (
    .clk, .rst_n, .stage_en('1), .in_valid(a_v), .in_plain({32'h0, y_pl}),
    .out_valid, .out_cipher(y_enc));

endmodule
