// kpu_udcache: the user data cache, a small user-mode-only store of the
// unencrypted versions of data written to memory in user mode.
//
// Every user-mode store writes {address, plaintext word} here while its
// encrypted copy goes on to memory; every user-mode load looks here first,
// and a hit supplies the plaintext at once, so the load skips decryption.
// It is a direct-mapped array of ENTRIES lines indexed by the top address
// bits. The addresses it sees are already scrambled by a multiplicative
// mix, whose top bits depend on every address bit (its low bits would not:
// they depend only on the low address bits, which word alignment fixes). Writes always allocate. "flush" invalidates every line (the core
// flushes it on entry to user mode, since supervisor code may have changed
// memory behind it).
//
// Timing: a lookup presented in one cycle returns hit/rdata registered in the
// next (probe_hit gives the same answer combinationally, before any write of
// this cycle); a write in the same cycle as a lookup of the same address is seen by
// that lookup. Read and write hit/miss counters match the statistics the
// document reports. The cache, its place and its purpose are the document's;
// size, organisation and the flush rule are this design's choices.
module kpu_udcache
  import kpu_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        lookup_valid,
  input  data_t       lookup_addr,
  output logic        hit,
  output word_t       rdata,
  output logic        probe_hit,
  input  logic        write_valid,
  input  data_t       write_addr,
  input  word_t       write_data,
  output logic [31:0] read_hits,
  output logic [31:0] read_misses,
  output logic [31:0] write_hits,
  output logic [31:0] write_misses
);

  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid;
  data_t              tag  [ENTRIES];
  word_t              data [ENTRIES];

  logic [IW-1:0] li, wi;
  logic          lhit, whit;

  assign li   = lookup_addr[31 -: IW];
  assign wi   = write_addr[31 -: IW];
  assign lhit = valid[li] && tag[li] == lookup_addr;
  assign whit = valid[wi] && tag[wi] == write_addr;
  assign probe_hit = lhit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid        <= '0;
      hit          <= 1'b0;
      rdata        <= '0;
      read_hits    <= '0;
      read_misses  <= '0;
      write_hits   <= '0;
      write_misses <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        tag[i]  <= '0;
        data[i] <= '0;
      end
    end else begin
      if (flush) begin
        valid <= '0;
      end else if (write_valid) begin
        valid[wi] <= 1'b1;
        tag[wi]   <= write_addr;
        data[wi]  <= write_data;
        if (whit) write_hits   <= write_hits + 1;
        else      write_misses <= write_misses + 1;
      end
      if (lookup_valid) begin
        if (!flush && write_valid && write_addr == lookup_addr) begin
          hit   <= 1'b1;
          rdata <= write_data;
        end else begin
          hit   <= lhit && !flush;
          rdata <= data[li];
        end
        if ((lhit && !flush) || (!flush && write_valid && write_addr == lookup_addr))
          read_hits <= read_hits + 1;
        else
          read_misses <= read_misses + 1;
      end else begin
        hit <= 1'b0;
      end
    end
  end

endmodule
