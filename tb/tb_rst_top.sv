// tb_rst_top: end-to-end test of the RST unit at its default configuration
// (last n-value prediction, 1024-entry trace table, 2048-entry instruction
// table, 4096 confidence counters, 8 tracked speculative reuses).
//
// The testbench plays the host processor.  It commits a small loop body
// (three integer instructions and one instruction outside the reuse domain)
// with two different input values, so that two instances of the same trace
// are stored, then fetches the loop start with various register states and
// checks, against values computed here:
//   regular reuse, confidence training by regular reuse, speculative reuse
//   with a correct prediction (verified at writeback), speculative reuse with
//   a wrong prediction (squash, confidence penalty, later refusal), a full
//   prediction tracker refusing speculation, instruction reuse, eviction from
//   a full set, and trace termination by domain, load/store and resources.
// Each mechanism is counted from the unit's event outputs; one that never
// happens is a failure.  The RS2 result is checked one cycle after the fetch.
module tb_rst_top;
  import rst_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic f_en; pc_t f_pc;
  word_t rf_val [NREGS]; logic rf_rdy [NREGS]; tag_t rf_tag [NREGS];
  logic tr_reuse, tr_spec; pc_t tr_pc, tr_npc;
  logic [NB-1:0] tr_bm, tr_btk;
  logic [$clog2(N_OUT+1)-1:0] tr_ocnt;
  reg_t tr_ocr [N_OUT]; word_t tr_ocv [N_OUT];
  logic [2:0] tr_id, sq_id;
  logic ir_reuse, ir_wr; reg_t ir_rd; word_t ir_res; pc_t ir_npc;
  logic wb_en [4]; tag_t wb_tag [4]; word_t wb_val [4];
  logic sq_en, ver_ok; pc_t sq_pc; reg_t sq_reg;
  logic c_en, brk; commit_t c;
  logic ev_spec_no_conf, ev_spec_no_room, ev_spec_no_filter, ev_trace_new, ev_trace_evict;
  logic ev_stride_found, ev_stride_conf, ev_stride_use, ev_fin_domain, ev_fin_mem, ev_fin_res;

  rst_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reg = 0, n_spec = 0, n_ok = 0, n_sq = 0, n_noconf = 0, n_noroom = 0, n_ir = 0;
  int n_new = 0, n_evict = 0, n_fd = 0, n_fm = 0, n_fr = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (tr_reuse && !tr_spec) n_reg++;
    if (tr_spec) n_spec++;
    if (ver_ok) n_ok++;
    if (sq_en) n_sq++;
    if (ev_spec_no_conf) n_noconf++;
    if (ev_spec_no_room) n_noroom++;
    if (ir_reuse) n_ir++;
    if (ev_trace_new) n_new++;
    if (ev_trace_evict) n_evict++;
    if (ev_fin_domain) n_fd++;
    if (ev_fin_mem) n_fm++;
    if (ev_fin_res) n_fr++;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t R [NREGS];

  task automatic commit(int pc, iclass_e cls, int rd, int rs1, int rs2, word_t res);
    @(negedge clk);
    c = '0;
    c.pc = 30'(pc); c.npc = 30'(pc + 1); c.cls = cls;
    c.use1 = rs1 >= 0; c.rs1 = reg_t'(rs1 < 0 ? 0 : rs1); c.v1 = R[rs1 < 0 ? 0 : rs1];
    c.use2 = rs2 >= 0; c.rs2 = reg_t'(rs2 < 0 ? 0 : rs2); c.v2 = R[rs2 < 0 ? 0 : rs2];
    c.wr = rd >= 0; c.rd = reg_t'(rd < 0 ? 0 : rd); c.res = res;
    c_en = 1;
    @(posedge clk); #1 c_en = 0;
    if (rd >= 0 && cls != IC_MEM) R[rd] = res;
  endtask

  // loop body at base: r1 = r2 + r3; r4 = r1 + r5; r6 = r4 - r2; then a
  // non-reusable instruction that ends the trace
  task automatic body(int base, word_t r2);
    R[2] = r2;
    commit(base,     IC_ALU, 1, 2, 3, R[2] + R[3]);
    commit(base + 1, IC_ALU, 4, 1, 5, R[1] + R[5]);
    commit(base + 2, IC_ALU, 6, 4, 2, R[4] - R[2]);
    commit(base + 3, IC_OTHER, -1, -1, -1, 0);
  endtask

  // set the register state seen by RS2 (after the previous RS2 cycle ends)
  task automatic regs(word_t r2, logic r2_ready, tag_t r2_tag);
    @(posedge clk); #1;
    for (int r = 0; r < int'(NREGS); r++) begin rf_val[r] = R[r]; rf_rdy[r] = 1; rf_tag[r] = '0; end
    rf_val[2] = r2_ready ? r2 : 32'hDEAD; rf_rdy[2] = r2_ready; rf_tag[2] = r2_tag;
  endtask

  // fetch pc; return at the RS2 cycle with outputs valid
  task automatic fetch(int pc);
    @(negedge clk); f_en = 1; f_pc = 30'(pc);
    @(posedge clk); #1 f_en = 0;
  endtask

  task automatic expect_outputs(word_t r2, string what);
    word_t e1, e4, e6;
    e1 = r2 + R[3]; e4 = e1 + R[5]; e6 = e4 - r2;
    check({what, ": output context"}, tr_ocnt == 3 && tr_ocr[0] == 1 && tr_ocr[1] == 4 && tr_ocr[2] == 6 &&
          tr_ocv[0] == e1 && tr_ocv[1] == e4 && tr_ocv[2] == e6 && tr_npc == 30'd103);
  endtask

  task automatic writeback(tag_t t, word_t v);
    @(negedge clk); wb_en[0] = 1; wb_tag[0] = t; wb_val[0] = v;
    @(posedge clk); #1 wb_en[0] = 0;
  endtask

  initial begin
    f_en = 0; f_pc = '0; c_en = 0; brk = 0; c = '0;
    for (int p = 0; p < 4; p++) begin wb_en[p] = 0; wb_tag[p] = '0; wb_val[p] = '0; end
    for (int r = 0; r < int'(NREGS); r++) begin R[r] = word_t'(r * 7 + 1); rf_val[r] = '0; rf_rdy[r] = 1; rf_tag[r] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // ---- build two instances of the loop trace at PC 100 ----
    body(100, 32'd10);
    body(100, 32'd20);
    repeat (2) @(posedge clk);
    check("two traces created", n_new == 2 && n_fd == 2);
    // ---- regular reuse, twice with r2 = 10, once with r2 = 20 ----
    regs(32'd10, 1, '0); fetch(100);
    check("regular reuse r2=10", tr_reuse && !tr_spec && tr_pc == 30'd100);
    expect_outputs(32'd10, "regular r2=10");
    regs(32'd20, 1, '0); fetch(100);
    check("regular reuse r2=20", tr_reuse && !tr_spec);
    expect_outputs(32'd20, "regular r2=20");
    regs(32'd30, 1, '0); fetch(100);
    check("unseen input value is not reused", !tr_reuse);
    // ---- speculation before the counter is trained is refused ----
    // (two regular reuses took it from 1 to 3)
    regs(32'd10, 1, '0); fetch(100);   // most recent instance: r2 = 10
    regs(32'd0, 0, 7'd17); fetch(100);
    check("speculative reuse", tr_reuse && tr_spec);
    expect_outputs(32'd10, "spec predicts most recent r2=10");
    writeback(7'd17, 32'd10);
    @(negedge clk); #1;
    check("prediction verified", n_ok == 1 && n_sq == 0);
    // ---- wrong prediction: squash and penalty ----
    regs(32'd0, 0, 7'd18); fetch(100);
    check("second speculative reuse", tr_spec);
    writeback(7'd18, 32'd99);
    #1 check("squash raised", sq_en && sq_pc == 30'd100 && sq_reg == 5'd2);
    @(negedge clk);
    regs(32'd0, 0, 7'd19); fetch(100);
    check("refused after penalty", !tr_reuse && ev_spec_no_conf);
    // ---- retrain and fill the prediction tracker ----
    for (int k = 0; k < 3; k++) begin regs(32'd20, 1, '0); fetch(100); end
    for (int k = 0; k < 8; k++) begin
      regs(32'd0, 0, tag_t'(40 + k)); fetch(100);
      check("spec while tracker has room", tr_spec);
    end
    regs(32'd0, 0, 7'd60); fetch(100);
    check("tracker full refuses speculation", !tr_reuse && ev_spec_no_room);
    for (int k = 0; k < 8; k++) writeback(tag_t'(40 + k), 32'd20);
    repeat (10) @(posedge clk);
    check("all eight verified", n_ok == 9);
    regs(32'd0, 0, 7'd61); fetch(100);
    check("room again", tr_spec);
    writeback(7'd61, 32'd20);
    // ---- instruction reuse from Memo_Table_G ----
    R[2] = 32'd20; R[1] = 32'd20 + R[3];
    regs(32'd20, 1, '0); fetch(101);
    check("instruction reuse", ir_reuse && ir_wr && ir_rd == 5'd4 && ir_res == R[1] + R[5] && ir_npc == 30'd102);
    regs(32'd20, 1, '0); rf_val[5] = 32'd12345; fetch(101);
    check("instruction not reused with other operand", !ir_reuse);
    // ---- eviction: five traces in one set (256 sets) ----
    for (int k = 1; k <= 4; k++) body(100 + 256 * k, 32'd5);
    repeat (2) @(posedge clk);
    check("an instance at PC 100 was evicted", n_evict >= 1);
    // ---- trace ended by a load (address calculation only) ----
    commit(2000, IC_ALU, 7, 8, 9, 3);
    commit(2001, IC_ALU, 10, 7, -1, 4);
    commit(2002, IC_MEM, 11, 10, -1, 100);
    // ---- trace ended by resources ----
    commit(3000, IC_ALU, 20, 1, 2, 1);
    commit(3001, IC_ALU, 21, 3, 4, 2);
    commit(3002, IC_ALU, 22, 5, 6, 3);
    commit(3003, IC_ALU, 23, 7, 8, 4);
    commit(3004, IC_OTHER, -1, -1, -1, 0);
    repeat (3) @(posedge clk);
    // ---- mechanism coverage ----
    $display("regular=%0d spec=%0d verified=%0d squash=%0d no_conf=%0d no_room=%0d ireuse=%0d new=%0d evict=%0d fin_domain=%0d fin_mem=%0d fin_res=%0d",
             n_reg, n_spec, n_ok, n_sq, n_noconf, n_noroom, n_ir, n_new, n_evict, n_fd, n_fm, n_fr);
    check("regular reuse happened", n_reg > 0);
    check("speculative reuse happened", n_spec > 0);
    check("verification happened", n_ok > 0);
    check("squash happened", n_sq > 0);
    check("confidence refusal happened", n_noconf > 0);
    check("tracker-full refusal happened", n_noroom > 0);
    check("instruction reuse happened", n_ir > 0);
    check("trace creation happened", n_new > 0);
    check("eviction happened", n_evict > 0);
    check("domain termination happened", n_fd > 0);
    check("load/store termination happened", n_fm > 0);
    check("resource termination happened", n_fr > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
