// kpu_tlb: translation look-aside buffer with unit granularity and
// first-come, first-served allocation.
//
// Encrypted addresses do not cluster into pages, so every distinct user data
// address gets an entry of its own. The first time an address is seen it is
// given the next free slot, and slot i stands for logical word LBASE + i: the
// logical addresses are handed out serially in order of first use, so data
// first touched together lands together and ordinary cache look-ahead keeps
// working. A fully associative search finds addresses already seen.
//
// Interface: req_valid/req_addr is looked up combinationally; hit, lidx and
// laddr are valid in the same cycle, and for a miss they already give the slot
// that the clock edge allocates. When all ENTRIES slots are taken a miss
// raises "full" and allocates nothing (laddr then points at the last slot);
// the document does not say what happens then. Unit granularity and serial
// first-come allocation are the document's; the size, LBASE and the full
// behaviour are this design's choices.
module kpu_tlb
  import kpu_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter logic [31:0] LBASE   = 32'h0000_1000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        req_valid,
  input  data_t                       req_addr,
  output logic                        hit,
  output logic [$clog2(ENTRIES)-1:0]  lidx,
  output data_t                       laddr,
  output logic                        full,
  output logic [$clog2(ENTRIES):0]    used
);

  localparam int unsigned IW = $clog2(ENTRIES);

  data_t key [ENTRIES];

  always_comb begin
    hit  = 1'b0;
    lidx = (used == (IW+1)'(ENTRIES)) ? IW'(ENTRIES - 1) : used[IW-1:0];
    for (int i = 0; i < ENTRIES; i++) begin
      if ((IW+1)'(i) < used && key[i] == req_addr && !hit) begin
        hit  = 1'b1;
        lidx = IW'(i);
      end
    end
  end

  assign full  = req_valid && !hit && used == (IW+1)'(ENTRIES);
  assign laddr = LBASE + data_t'(lidx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used <= '0;
      for (int i = 0; i < ENTRIES; i++) key[i] <= '0;
    end else if (req_valid && !hit && used != (IW+1)'(ENTRIES)) begin
      key[used[IW-1:0]] <= req_addr;
      used              <= used + 1'b1;
    end
  end

endmodule
