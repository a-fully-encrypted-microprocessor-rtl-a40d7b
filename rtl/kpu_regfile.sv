// kpu_regfile: the general purpose registers in two banks, "real" and
// "shadow".
//
// The real bank is the architectural OpenRISC GPR file: it is what supervisor
// mode reads and writes, and in user mode it holds encrypted words. The shadow
// bank is private to user mode and holds the decrypted versions of the same
// registers, so that consecutive user-mode operations run on plaintext and
// need the codec only at the ends of a series. A read port selects its bank
// per access (user instructions read shadow, supervisor ones real).
//
// Coherence is kept lazily with two stale vectors: an ordinary shadow write
// (a user-mode result) marks the real copy stale, an ordinary real write (a
// supervisor result) marks the shadow copy stale, and a write with *_sync set
// (a codec refresh at a mode switch) clears the stale bit of the bank it
// writes. r0 reads as zero in both banks and ignores writes.
//
// Timing: three combinational read ports, two write ports that write at the
// clock edge. The two banks and the aliasing by mode follow the document; the
// lazy refresh with stale bits is this design's choice.
module kpu_regfile
  import kpu_pkg::*;
#(
  parameter int unsigned NREGS  = 32,
  parameter int unsigned NREAD  = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [4:0]               rd_addr   [NREAD],
  input  logic                     rd_shadow [NREAD],
  output word_t                    rd_data   [NREAD],
  input  logic                     real_we,
  input  logic [4:0]               real_addr,
  input  word_t                    real_data,
  input  logic                     real_sync,
  input  logic                     shadow_we,
  input  logic [4:0]               shadow_addr,
  input  word_t                    shadow_data,
  input  logic                     shadow_sync,
  output logic [NREGS-1:0]         real_stale,
  output logic [NREGS-1:0]         shadow_stale
);

  word_t real_q   [NREGS];
  word_t shadow_q [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin
        real_q[i]   <= '0;
        shadow_q[i] <= '0;
      end
      real_stale   <= '0;
      shadow_stale <= '0;
    end else begin
      if (real_we && real_addr != 5'd0) begin
        real_q[real_addr] <= real_data;
        if (real_sync) real_stale[real_addr]   <= 1'b0;
        else           shadow_stale[real_addr] <= 1'b1;
      end
      if (shadow_we && shadow_addr != 5'd0) begin
        shadow_q[shadow_addr] <= shadow_data;
        if (shadow_sync) shadow_stale[shadow_addr] <= 1'b0;
        else             real_stale[shadow_addr]   <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NREAD; p++) begin
      if (rd_addr[p] == 5'd0) rd_data[p] = '0;
      else if (rd_shadow[p])  rd_data[p] = shadow_q[rd_addr[p]];
      else                    rd_data[p] = real_q[rd_addr[p]];
    end
  end

endmodule
