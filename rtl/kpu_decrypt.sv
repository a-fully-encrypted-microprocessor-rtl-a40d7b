// kpu_decrypt: pipelined decryption codec, one inverse Rijndael round per stage.
//
// The inverse of kpu_encrypt: a 64-bit block is decrypted in ROUNDS stages
// and leaves as the 64-bit plaintext, whose low 32 bits are the datum and
// whose top 32 bits are the pad.
//
// Program-address protocol: a block whose top 32 bits are zero is a program
// address in its "encrypted" form; it is not deciphered but leaves with its
// top 16 bits rewritten to 16'h7fff (bits 47:32 zero), the "decrypted" form.
//
// Interface and timing as kpu_encrypt: per-stage enables stage_en, a valid bit
// that travels with the data, latency ROUNDS enabled cycles, one block per
// cycle. The document fixes the cipher family, the block size, the 10 stages
// and the program-address forms; the round structure is this design's choice.
module kpu_decrypt
  import kpu_pkg::*;
#(
  parameter int unsigned  ROUNDS = CODEC_ROUNDS,
  parameter logic [127:0] KEY    = DEFAULT_KEY
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ROUNDS-1:0] stage_en,
  input  logic              in_valid,
  input  word_t             in_cipher,
  output logic              out_valid,
  output word_t             out_plain
);

  localparam rkeys_t RK = key_expand(KEY, ROUNDS);

  word_t              st    [ROUNDS];
  logic [ROUNDS-1:0]  pa;
  logic [ROUNDS-1:0]  vld;

  logic  in_pa;
  assign in_pa = (in_cipher[63:32] == 32'h0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pa  <= '0;
      vld <= '0;
      for (int k = 0; k < ROUNDS; k++) st[k] <= '0;
    end else begin
      for (int k = 0; k < ROUNDS; k++) begin
        if (stage_en[k]) begin
          if (k == 0) begin
            pa[0]  <= in_pa;
            vld[0] <= in_valid;
            st[0]  <= in_pa ? {PA_TAG, 16'h0, in_cipher[31:0]}
                            : dec_round(in_cipher ^ RK[ROUNDS], RK[ROUNDS-1], ROUNDS == 1);
          end else begin
            pa[k]  <= pa[k-1];
            vld[k] <= vld[k-1];
            st[k]  <= pa[k-1] ? st[k-1]
                              : dec_round(st[k-1], RK[ROUNDS-1-k], k == ROUNDS - 1);
          end
        end
      end
    end
  end

  assign out_valid = vld[ROUNDS-1];
  assign out_plain = st[ROUNDS-1];

endmodule
