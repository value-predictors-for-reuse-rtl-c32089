// tb_reuse_test: self-checking test of the RS2 reuse test.
// Builds sets of trace candidates and register states by hand and checks the
// decision (regular / speculative / none), the chosen way, the predicted
// registers and values, the refusal reasons and the stride extrapolation.
module tb_reuse_test;
  import rst_pkg::*;
  localparam int unsigned W = 4;
  rst_mode_e mode;
  logic valid, conf_ok, spec_room;
  pc_t pc;
  trace_t ways [W];
  logic [1:0] age [W];
  word_t rf_val [NREGS];
  logic  rf_rdy [NREGS];
  tag_t  rf_tag [NREGS];
  logic hit, spec, adv;
  logic [1:0] way;
  pc_t npc;
  logic [NB-1:0] bm, btk;
  logic [$clog2(N_OUT+1)-1:0] ocnt;
  reg_t ocr [N_OUT];
  word_t ocv [N_OUT];
  logic [$clog2(MAX_PRED+1)-1:0] npred;
  reg_t pred_r [MAX_PRED];
  word_t pred_v [MAX_PRED];
  tag_t pred_t [MAX_PRED];
  logic spec_no_conf, spec_no_room, spec_no_filter;
  int checks = 0, failures = 0;

  reuse_test #(.WAYS(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // trace at PC 40 reading r2,r3,r5 and writing r1 = sum
  function automatic trace_t mk(word_t a, word_t b, word_t c);
    trace_t t = '0;
    t.vld = 1; t.pc = 30'd40; t.npc = 30'd52;
    t.icnt = 3; t.icr[0] = 5'd2; t.icr[1] = 5'd3; t.icr[2] = 5'd5;
    t.icv[0] = a; t.icv[1] = b; t.icv[2] = c;
    t.ocnt = 1; t.ocr[0] = 5'd1; t.ocv[0] = a + b + c;
    t.bm = 4'b0011; t.btk = 4'b0010;
    return t;
  endfunction

  task automatic regs(word_t a, word_t b, word_t c, logic ra, logic rb, logic rc);
    rf_val[2] = a; rf_val[3] = b; rf_val[5] = c;
    rf_rdy[2] = ra; rf_rdy[3] = rb; rf_rdy[5] = rc;
    #1;
  endtask

  initial begin
    mode = RST_NVALUE; valid = 1; conf_ok = 1; spec_room = 1; pc = 30'd40;
    for (int r = 0; r < int'(NREGS); r++) begin rf_val[r] = 0; rf_rdy[r] = 1; rf_tag[r] = tag_t'(r + 64); end
    for (int w = 0; w < int'(W); w++) begin ways[w] = '0; age[w] = 2'(w); end
    ways[1] = mk(1, 2, 3);
    ways[2] = mk(10, 20, 30);
    age[1] = 2'd2; age[2] = 2'd0;
    // regular reuse
    regs(10, 20, 30, 1, 1, 1);
    check("regular hit", hit && !spec && way == 2'd2);
    check("outputs", ocnt == 1 && ocr[0] == 5'd1 && ocv[0] == 32'd60 && npc == 30'd52);
    check("branch masks", bm == 4'b0011 && btk == 4'b0010);
    check("no prediction", npred == 0 && !adv);
    // mismatch
    regs(10, 21, 30, 1, 1, 1);
    check("mismatch misses", !hit);
    // speculative: r3 missing, both ways agree on the rest? way1 needs r2=1
    regs(1, 0, 3, 1, 0, 1);
    check("spec hit", hit && spec && way == 2'd1);
    check("one prediction", npred == 1 && pred_r[0] == 5'd3 && pred_v[0] == 32'd2 && pred_t[0] == tag_t'(67));
    check("spec outputs", ocv[0] == 32'd6);
    // two missing: two candidates, the most recently used way (2) is chosen
    regs(0, 0, 30, 0, 0, 1);
    check("two-input spec: only way 2 matches r5", hit && spec && way == 2'd2 && npred == 2);
    check("predicted values", pred_r[0] == 5'd2 && pred_v[0] == 32'd10 && pred_r[1] == 5'd3 && pred_v[1] == 32'd20);
    ways[3] = mk(7, 8, 30); age[3] = 2'd1;
    regs(0, 0, 30, 0, 0, 1);
    check("MRU among candidates", hit && way == 2'd2);
    age[3] = 2'd3; age[2] = 2'd1; age[1] = 2'd0;
    ways[1] = mk(7, 8, 30); ways[1].ocv[0] = 32'd77;  // same inputs as way 3
    regs(0, 0, 30, 0, 0, 1);
    check("MRU among candidates after aging", hit && way == 2'd1 && ocv[0] == 32'd77);
    // three inputs missing: not predictable
    regs(0, 0, 0, 0, 0, 0);
    check("three missing refused", !hit && !spec_no_conf);
    // confidence and room
    conf_ok = 0; regs(0, 0, 30, 0, 0, 1);
    check("low confidence refused", !hit && spec_no_conf);
    conf_ok = 1; spec_room = 0; regs(0, 0, 30, 0, 0, 1);
    check("tracker full refused", !hit && spec_no_room);
    spec_room = 1;
    // regular beats speculative
    regs(7, 8, 30, 1, 1, 1);
    check("regular hit when all ready", hit && !spec);
    // invalid stage / other PC
    valid = 0; regs(10, 20, 30, 1, 1, 1);
    check("invalid stage", !hit);
    valid = 1; pc = 30'd44; regs(10, 20, 30, 1, 1, 1);
    check("tag mismatch", !hit);
    pc = 30'd40;
    // filtered-stride mode: strided trace is not predicted, but regular reuse stays
    ways[2].strided = 1;
    ways[2].icd[0] = '{vld: 1'b1, slot: 3'd0, d: 32'd4};
    ways[2].ocd[0] = '{vld: 1'b1, slot: 2'd0, d: 32'd4};
    ways[1] = '0; ways[3] = '0;
    mode = RST_FILTERED; regs(0, 20, 30, 0, 1, 1);
    check("filtered refuses strided prediction", !hit && spec_no_filter);
    regs(10, 20, 30, 1, 1, 1);
    check("filtered keeps regular reuse", hit && !spec && !adv);
    // stride-aware mode: inputs expected at last value + stride
    mode = RST_STRIDE; regs(14, 20, 30, 1, 1, 1);
    check("stride regular reuse", hit && !spec && adv && ocv[0] == 32'd64);
    regs(10, 20, 30, 1, 1, 1);
    check("stride trace no longer matches last value", !hit);
    regs(0, 20, 30, 0, 1, 1);
    check("stride prediction", hit && spec && adv && npred == 1 && pred_v[0] == 32'd14);
    mode = RST_NVALUE; regs(0, 20, 30, 0, 1, 1);
    check("n-value ignores strides", hit && spec && !adv && pred_v[0] == 32'd10 && ocv[0] == 32'd60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
