// kpu_encrypt: pipelined encryption codec, one Rijndael round per stage.
//
// A 32-bit datum is padded to a 64-bit plaintext block {1, pad[30:0], datum}
// and encrypted with a 64-bit-block Rijndael (see kpu_pkg) in ROUNDS stages.
// The pad comes from a 31-bit LFSR that steps on every accepted input, so one
// datum has many encryptions. Bit 63 of the padded block is 1, so data never
// looks like a decrypted program address.
//
// Program-address protocol: an input whose top 16 bits are 16'h7fff is a
// decrypted program address; it passes through the stages unciphered and
// leaves as the 32-bit address zero-filled to 64 bits.
//
// Interface: stage_en[k] lets stage k load from stage k-1 (stage 0 from the
// input), so a host pipeline can freeze stages individually; tie it to all
// ones for a free-running codec. in_valid/out_valid travel with the data.
// Latency: ROUNDS cycles of enabled stages (10 by default, as in the
// document). Throughput: one block per cycle.
//
// The document fixes the cipher family, the 64-bit block and the 10 codec
// stages; the round structure for a 64-bit block, the key, the LFSR pad and
// the stage enables are this design's choices.
module kpu_encrypt
  import kpu_pkg::*;
#(
  parameter int unsigned  ROUNDS = CODEC_ROUNDS,
  parameter logic [127:0] KEY    = DEFAULT_KEY
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ROUNDS-1:0] stage_en,
  input  logic              in_valid,
  input  word_t             in_plain,
  output logic              out_valid,
  output word_t             out_cipher
);

  localparam rkeys_t RK = key_expand(KEY, ROUNDS);

  word_t              st    [ROUNDS];
  logic [ROUNDS-1:0]  pa;      // stage holds a program address, not cipher state
  logic [ROUNDS-1:0]  vld;
  logic [30:0]        lfsr;

  logic  in_pa;
  word_t in_block;

  assign in_pa    = (in_plain[63:48] == PA_TAG);
  assign in_block = in_pa ? {32'h0, in_plain[31:0]}
                          : ({1'b1, lfsr, in_plain[31:0]} ^ RK[0]);

  // x^31 + x^28 + 1, stepped once per accepted input
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 31'h1234_5677;
    else if (stage_en[0] && in_valid) lfsr <= {lfsr[29:0], lfsr[30] ^ lfsr[27]};
  end

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
            st[0]  <= in_pa ? in_block : enc_round(in_block, RK[1], ROUNDS == 1);
          end else begin
            pa[k]  <= pa[k-1];
            vld[k] <= vld[k-1];
            st[k]  <= pa[k-1] ? st[k-1] : enc_round(st[k-1], RK[k+1], k == ROUNDS - 1);
          end
        end
      end
    end
  end

  assign out_valid  = vld[ROUNDS-1];
  assign out_cipher = st[ROUNDS-1];

endmodule
