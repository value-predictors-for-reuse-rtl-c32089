// tb_memo_table_t: self-checking test of the trace memoization table.
// Uses 4 sets of 4 ways.  Checks: lookup returns inserted traces one cycle
// later; a fifth trace in a full set evicts the least recently used one; a
// reuse update protects a way from eviction; re-inserting the same instance
// overwrites in place; a stride update moves the last values by the strides.
module tb_memo_table_t;
  import rst_pkg::*;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0;
  logic lk_en, up_en, up_adv, ins_en, ins_evict;
  pc_t lk_pc;
  trace_t lk_ways [W];
  logic [1:0] lk_age [W];
  logic [1:0] lk_set, up_set;
  logic [1:0] up_way;
  trace_t ins_tr;
  int checks = 0, failures = 0;

  memo_table_t #(.ENTRIES(16), .WAYS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic trace_t mk(pc_t pc, word_t v);
    trace_t t = '0;
    t.vld = 1; t.pc = pc; t.npc = pc + 5;
    t.icnt = 2; t.icr[0] = 5'd2; t.icr[1] = 5'd3; t.icv[0] = v; t.icv[1] = v + 1;
    t.ocnt = 1; t.ocr[0] = 5'd1; t.ocv[0] = v * 3;
    return t;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic insert(trace_t t, logic exp_evict);
    @(negedge clk);
    ins_en = 1; ins_tr = t;
    #1 check($sformatf("evict flag for pc %0d", t.pc), ins_evict == exp_evict);
    @(posedge clk); #1 ins_en = 0;
  endtask

  task automatic lookup(pc_t pc);
    @(negedge clk);
    lk_en = 1; lk_pc = pc;
    @(posedge clk); #1 lk_en = 0;
  endtask

  function automatic int find(pc_t pc, word_t v);
    for (int w = 0; w < int'(W); w++)
      if (lk_ways[w].vld && lk_ways[w].pc == pc && lk_ways[w].icv[0] == v) return w;
    return -1;
  endfunction

  initial begin
    int w;
    trace_t s;
    lk_en = 0; up_en = 0; up_adv = 0; ins_en = 0; lk_pc = '0; up_set = '0; up_way = '0; ins_tr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    lookup(30'd1);
    for (int k = 0; k < 4; k++) check("empty after reset", !lk_ways[k].vld);
    // A,B,C,D fill set 1 (two share PC 1 with different inputs: n-value)
    insert(mk(30'd1, 32'd10), 0);
    insert(mk(30'd1, 32'd20), 0);
    insert(mk(30'd5, 32'd30), 0);
    insert(mk(30'd9, 32'd40), 0);
    lookup(30'd1);
    check("set index", lk_set == 2'd1);
    check("A present", find(30'd1, 32'd10) >= 0);
    check("B present", find(30'd1, 32'd20) >= 0);
    check("C present", find(30'd5, 32'd30) >= 0);
    check("D present", find(30'd9, 32'd40) >= 0);
    w = find(30'd9, 32'd40);
    if (w >= 0) check("D output value", lk_ways[w].ocv[0] == 32'd120);
    // touch A so that B becomes the oldest
    w = find(30'd1, 32'd10);
    @(negedge clk); up_en = 1; up_set = 2'd1; up_way = 2'(w); up_adv = 0;
    @(posedge clk); #1 up_en = 0;
    insert(mk(30'd13, 32'd50), 1);
    lookup(30'd13);
    check("E present", find(30'd13, 32'd50) >= 0);
    check("B evicted (LRU)", find(30'd1, 32'd20) < 0);
    check("A kept (touched)", find(30'd1, 32'd10) >= 0);
    // same instance: overwrite in place, no eviction
    s = mk(30'd5, 32'd30); s.ocv[0] = 32'd999;
    insert(s, 0);
    lookup(30'd5);
    w = find(30'd5, 32'd30);
    check("C overwritten", w >= 0 && lk_ways[w].ocv[0] == 32'd999);
    check("A still there", find(30'd1, 32'd10) >= 0);
    // stride advance
    s = mk(30'd2, 32'd100);
    s.strided = 1; s.icd[0].vld = 1; s.icd[0].slot = 0; s.icd[0].d = 32'd4;
    s.ocd[0].vld = 1; s.ocd[0].slot = 0; s.ocd[0].d = 32'd12;
    insert(s, 0);
    lookup(30'd2);
    w = find(30'd2, 32'd100);
    check("strided present", w >= 0);
    @(negedge clk); up_en = 1; up_set = lk_set; up_way = 2'(w); up_adv = 1;
    @(posedge clk); #1 up_en = 0; up_adv = 0;
    lookup(30'd2);
    w = find(30'd2, 32'd104);
    check("input advanced by stride", w >= 0);
    if (w >= 0) begin
      check("second input unchanged", lk_ways[w].icv[1] == 32'd101);
      check("output advanced by stride", lk_ways[w].ocv[0] == 32'd312);
      check("iteration counter", lk_ways[w].it == 8'd1);
      check("touched way is MRU", lk_age[w] == 2'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
