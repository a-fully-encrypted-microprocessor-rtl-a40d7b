// kpu_prefix: assembles the 64-bit encrypted immediate of a user-mode
// immediate instruction in the decode stage.
//
// An encrypted datum does not fit the 16-bit immediate field, so the
// instruction stream carries it in pieces: prefix instructions bring the
// leading 16-bit segments, the immediate instruction itself the last one.
// Every accepted prefix shifts its segment into a 48-bit accumulator; the
// immediate instruction reads {accumulator, own 16 bits} and the accumulator
// is cleared by any accepted non-prefix instruction and by a pipeline flush.
// With fewer than three prefixes the missing leading segments are zero, so an
// immediate with no prefixes is a zero-filled word, which the decryptor
// treats as the unencrypted (program-address) form.
//
// Interface: "advance" marks the cycle in which decode hands the current
// instruction on; imm64 is combinational from the accumulator and imm_lo.
// The prefix mechanism is the document's; the segment order, the count of
// three and the clearing rule are this design's choices.
module kpu_prefix
  import kpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        advance,
  input  logic        is_prefix,
  input  logic [15:0] seg,
  input  logic [15:0] imm_lo,
  output word_t       imm64,
  output logic [1:0]  count
);

  logic [47:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      count <= '0;
    end else if (flush) begin
      acc   <= '0;
      count <= '0;
    end else if (advance) begin
      if (is_prefix) begin
        acc   <= {acc[31:0], seg};
        count <= (count == 2'd3) ? 2'd3 : count + 2'd1;
      end else begin
        acc   <= '0;
        count <= '0;
      end
    end
  end

  assign imm64 = {acc, imm_lo};

endmodule
