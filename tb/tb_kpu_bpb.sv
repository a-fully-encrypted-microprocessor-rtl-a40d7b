// tb_kpu_bpb: trains the buffer with branches of fixed and alternating
// behaviour and checks each lookup against a model of direct-mapped lines
// with 2-bit counters, and the hit/miss, right/wrong counters.
module tb_kpu_bpb;
  import kpu_pkg::*;
  localparam int E = 64;
  logic clk = 0, rst_n = 0;
  logic [31:0] lookup_pc = 0, pred_target, upd_pc = 0, upd_target = 0;
  logic pred_hit, pred_taken, upd_valid = 0, upd_taken = 0, upd_was_hit = 0, upd_right = 0;
  logic [31:0] hits, misses, hits_right, hits_wrong, misses_right, misses_wrong;
  int checks = 0, failures = 0;

  kpu_bpb #(.ENTRIES(E)) dut (.*);
  always #5 clk = ~clk;

  bit mv [E]; logic [31:0] mpc [E], mtg [E]; int mc [E];
  int h = 0, m = 0, hr = 0, hw = 0, mr = 0, mw = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit eh, et, taken; logic [31:0] pc, tgt;
    for (int i = 0; i < E; i++) mv[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      pc = 32'h100 + 4 * 32'($urandom_range(0, 90));
      tgt = pc + 32'h40;
      taken = (pc[3:2] == 0) ? 1 : (pc[3:2] == 1) ? 0 : (pc[3:2] == 2) ? t[0] : ($urandom_range(0, 3) != 0);
      lookup_pc = pc;
      #1;
      begin
        automatic int i = (pc >> 2) % E;
        eh = mv[i] && mpc[i] == pc;
        et = eh && mc[i] >= 2;
        check(pred_hit == eh && pred_taken == et && (!et || pred_target == mtg[i]), "prediction");
        upd_valid = 1; upd_pc = pc; upd_taken = taken; upd_target = tgt;
        upd_was_hit = eh; upd_right = (et == taken);
        if (eh) begin h++; if (et == taken) hr++; else hw++; end
        else    begin m++; if (et == taken) mr++; else mw++; end
        if (eh) begin
          if (taken && mc[i] < 3) mc[i]++;
          if (!taken && mc[i] > 0) mc[i]--;
          if (taken) mtg[i] = tgt;
        end else begin
          mv[i] = 1; mpc[i] = pc; mtg[i] = tgt; mc[i] = taken ? 2 : 1;
        end
      end
      @(posedge clk); #1 upd_valid = 0;
      check(hits == h && misses == m && hits_right == hr && hits_wrong == hw && misses_right == mr && misses_wrong == mw, "counters");
    end
    check(hr > 500 && h > 1000, "buffer learns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
