// kpu_top: the encrypted-running processor and, beside it, the idealised
// encrypted ALU.
//
// The core (kpu_core) is the processor: a 15-stage OpenRISC-subset pipeline
// that runs supervisor code unencrypted and user code on encrypted data, with
// its codecs, shadow registers, prefix unit, user data cache, TLB and branch
// prediction buffer inside. Instruction and data memories are ordinary RAM
// outside this module: the instruction port is a combinational read, the data
// port a synchronous read port plus a write port of 64-bit words.
//
// The idealised ALU' (kpu_alu_enc: decrypt both operands, operate, encrypt)
// is the reference arrangement the document starts from. The core does not
// use it, since its shadow registers make a run of operations need the codec
// only at its ends; it stands beside the core with its own ports, sharing the
// clock, reset and key.
module kpu_top
  import kpu_pkg::*;
#(
  parameter int unsigned  ROUNDS      = CODEC_ROUNDS,
  parameter logic [127:0] KEY         = DEFAULT_KEY,
  parameter int unsigned  TLB_ENTRIES = 64,
  parameter int unsigned  UDC_ENTRIES = 16,
  parameter int unsigned  BPB_ENTRIES = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  output data_t   imem_addr,
  input  data_t   imem_rdata,
  output logic    dmem_re,
  output data_t   dmem_raddr,
  input  word_t   dmem_rdata,
  output logic    dmem_we,
  output data_t   dmem_waddr,
  output word_t   dmem_wdata,
  output logic    user_mode,
  output logic    halted,
  output logic    tlb_overflow,
  output perf_t   perf,
  output logic [31:0] bpb_hits,
  output logic [31:0] bpb_misses,
  output logic [31:0] bpb_hits_right,
  output logic [31:0] bpb_hits_wrong,
  output logic [31:0] bpb_misses_right,
  output logic [31:0] bpb_misses_wrong,
  // idealised encrypted ALU
  input  logic    ae_in_valid,
  input  alu_op_e ae_op,
  input  word_t   ae_a,
  input  word_t   ae_b,
  output logic    ae_cmp_valid,
  output logic    ae_cmp,
  output logic    ae_out_valid,
  output word_t   ae_y
);

  kpu_core #(
    .ROUNDS(ROUNDS), .KEY(KEY), .TLB_ENTRIES(TLB_ENTRIES),
    .UDC_ENTRIES(UDC_ENTRIES), .BPB_ENTRIES(BPB_ENTRIES)
  ) u_core (
    .clk, .rst_n, .imem_addr, .imem_rdata,
    .dmem_re, .dmem_raddr, .dmem_rdata, .dmem_we, .dmem_waddr, .dmem_wdata,
    .user_mode, .halted, .tlb_overflow, .perf,
    .bpb_hits, .bpb_misses, .bpb_hits_right, .bpb_hits_wrong,
    .bpb_misses_right, .bpb_misses_wrong);

  kpu_alu_enc #(.ROUNDS(ROUNDS), .KEY(KEY)) u_alu_enc (
    .clk, .rst_n, .in_valid(ae_in_valid), .op(ae_op), .a_enc(ae_a), .b_enc(ae_b),
    .cmp_valid(ae_cmp_valid), .cmp(ae_cmp), .out_valid(ae_out_valid), .y_enc(ae_y));

endmodule
