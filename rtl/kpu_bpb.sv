// kpu_bpb: the branch prediction buffer.
//
// A direct-mapped table of ENTRIES lines indexed by pc[IW+1:2], each holding
// a tag (the rest of the pc), the last target and a 2-bit saturating counter.
// The fetch stage looks up its pc combinationally: a hit with the counter's
// upper bit set predicts "taken" to the stored target; anything else predicts
// fall-through. When a branch or jump resolves, the core reports pc, outcome,
// target, whether fetch had hit and whether the prediction was right; the line
// is then updated (or allocated with a weakly biased counter on a miss).
//
// Counters of hits and misses, each split into right and wrong predictions,
// match the statistics the document reports. The document names the buffer
// and reports its statistics; its organisation is this design's choice.
module kpu_bpb
  import kpu_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  data_t       lookup_pc,
  output logic        pred_hit,
  output logic        pred_taken,
  output data_t       pred_target,
  input  logic        upd_valid,
  input  data_t       upd_pc,
  input  logic        upd_taken,
  input  data_t       upd_target,
  input  logic        upd_was_hit,
  input  logic        upd_right,
  output logic [31:0] hits,
  output logic [31:0] misses,
  output logic [31:0] hits_right,
  output logic [31:0] hits_wrong,
  output logic [31:0] misses_right,
  output logic [31:0] misses_wrong
);

  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = 30 - IW;

  logic [ENTRIES-1:0] valid;
  logic [TW-1:0]      tag    [ENTRIES];
  data_t              target [ENTRIES];
  logic [1:0]         cnt    [ENTRIES];

  logic [IW-1:0] li, ui;
  assign li = lookup_pc[IW+1:2];
  assign ui = upd_pc[IW+1:2];

  assign pred_hit    = valid[li] && tag[li] == lookup_pc[31:IW+2];
  assign pred_taken  = pred_hit && cnt[li][1];
  assign pred_target = target[li];

  logic uhit;
  assign uhit = valid[ui] && tag[ui] == upd_pc[31:IW+2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid        <= '0;
      hits         <= '0;
      misses       <= '0;
      hits_right   <= '0;
      hits_wrong   <= '0;
      misses_right <= '0;
      misses_wrong <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        tag[i]    <= '0;
        target[i] <= '0;
        cnt[i]    <= 2'b01;
      end
    end else if (upd_valid) begin
      if (uhit) begin
        if (upd_taken && cnt[ui] != 2'b11) cnt[ui] <= cnt[ui] + 2'b01;
        if (!upd_taken && cnt[ui] != 2'b00) cnt[ui] <= cnt[ui] - 2'b01;
        if (upd_taken) target[ui] <= upd_target;
      end else begin
        valid[ui]  <= 1'b1;
        tag[ui]    <= upd_pc[31:IW+2];
        target[ui] <= upd_target;
        cnt[ui]    <= upd_taken ? 2'b10 : 2'b01;
      end
      if (upd_was_hit) begin
        hits <= hits + 1;
        if (upd_right) hits_right <= hits_right + 1;
        else           hits_wrong <= hits_wrong + 1;
      end else begin
        misses <= misses + 1;
        if (upd_right) misses_right <= misses_right + 1;
        else           misses_wrong <= misses_wrong + 1;
      end
    end
  end

endmodule
