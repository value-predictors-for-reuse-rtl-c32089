// tb_rst_top_stride: end-to-end test of the stride-aware and filtered-stride
// variants of the RST unit, side by side on the same stimulus.
//
// A loop body advances an induction register (r8 += 4; r9 = r8 + r10; then an
// instruction outside the reuse domain).  Three iterations are committed with
// r8 = 0, 4, 8, so stride recognition sees the same input stride (4) and
// output strides (4, 4) twice and stores the third trace with its strides.
// Stride-aware unit: a never-seen input r8 = 12 is reused by extrapolation,
// the stored last value then moves on, and a missing r8 is predicted as
// last value + stride and verified at writeback.
// Filtered-stride unit: the same unseen value is not reused, regular reuse of
// a seen instance still works, and no prediction is made for that PC.
// Stride recognition, confirmation, extrapolated reuse and the filter are
// each counted; one that never happens is a failure.
module tb_rst_top_stride;
  import rst_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic f_en; pc_t f_pc;
  word_t rf_val [NREGS]; logic rf_rdy [NREGS]; tag_t rf_tag [NREGS];
  logic wb_en [4]; tag_t wb_tag [4]; word_t wb_val [4];
  logic c_en, brk; commit_t c;

  // outputs of the two units
  typedef struct {
    logic tr_reuse, tr_spec; pc_t tr_pc, tr_npc;
    logic [NB-1:0] tr_bm, tr_btk;
    logic [$clog2(N_OUT+1)-1:0] tr_ocnt;
    reg_t tr_ocr [N_OUT]; word_t tr_ocv [N_OUT];
    logic [2:0] tr_id, sq_id;
    logic ir_reuse, ir_wr; reg_t ir_rd; word_t ir_res; pc_t ir_npc;
    logic sq_en, ver_ok; pc_t sq_pc; reg_t sq_reg;
    logic ev_spec_no_conf, ev_spec_no_room, ev_spec_no_filter, ev_trace_new, ev_trace_evict;
    logic ev_stride_found, ev_stride_conf, ev_stride_use, ev_fin_domain, ev_fin_mem, ev_fin_res;
  } out_t;
  out_t a, f;   // a: stride-aware, f: filtered-stride

  rst_top #(.MODE(RST_STRIDE), .MT_ENTRIES(64), .MG_ENTRIES(64), .CONF_ENTRIES(64)) u_sa (
    .clk, .rst_n, .flush, .f_en, .f_pc, .rf_val, .rf_rdy, .rf_tag,
    .tr_reuse(a.tr_reuse), .tr_spec(a.tr_spec), .tr_pc(a.tr_pc), .tr_npc(a.tr_npc),
    .tr_bm(a.tr_bm), .tr_btk(a.tr_btk), .tr_ocnt(a.tr_ocnt), .tr_ocr(a.tr_ocr), .tr_ocv(a.tr_ocv),
    .tr_id(a.tr_id), .ir_reuse(a.ir_reuse), .ir_wr(a.ir_wr), .ir_rd(a.ir_rd), .ir_res(a.ir_res),
    .ir_npc(a.ir_npc), .wb_en, .wb_tag, .wb_val, .sq_en(a.sq_en), .sq_id(a.sq_id), .sq_pc(a.sq_pc),
    .sq_reg(a.sq_reg), .ver_ok(a.ver_ok), .c_en, .c, .brk,
    .ev_spec_no_conf(a.ev_spec_no_conf), .ev_spec_no_room(a.ev_spec_no_room),
    .ev_spec_no_filter(a.ev_spec_no_filter), .ev_trace_new(a.ev_trace_new),
    .ev_trace_evict(a.ev_trace_evict), .ev_stride_found(a.ev_stride_found),
    .ev_stride_conf(a.ev_stride_conf), .ev_stride_use(a.ev_stride_use),
    .ev_fin_domain(a.ev_fin_domain), .ev_fin_mem(a.ev_fin_mem), .ev_fin_res(a.ev_fin_res));

  rst_top #(.MODE(RST_FILTERED), .MT_ENTRIES(64), .MG_ENTRIES(64), .CONF_ENTRIES(64)) u_fs (
    .clk, .rst_n, .flush, .f_en, .f_pc, .rf_val, .rf_rdy, .rf_tag,
    .tr_reuse(f.tr_reuse), .tr_spec(f.tr_spec), .tr_pc(f.tr_pc), .tr_npc(f.tr_npc),
    .tr_bm(f.tr_bm), .tr_btk(f.tr_btk), .tr_ocnt(f.tr_ocnt), .tr_ocr(f.tr_ocr), .tr_ocv(f.tr_ocv),
    .tr_id(f.tr_id), .ir_reuse(f.ir_reuse), .ir_wr(f.ir_wr), .ir_rd(f.ir_rd), .ir_res(f.ir_res),
    .ir_npc(f.ir_npc), .wb_en, .wb_tag, .wb_val, .sq_en(f.sq_en), .sq_id(f.sq_id), .sq_pc(f.sq_pc),
    .sq_reg(f.sq_reg), .ver_ok(f.ver_ok), .c_en, .c, .brk,
    .ev_spec_no_conf(f.ev_spec_no_conf), .ev_spec_no_room(f.ev_spec_no_room),
    .ev_spec_no_filter(f.ev_spec_no_filter), .ev_trace_new(f.ev_trace_new),
    .ev_trace_evict(f.ev_trace_evict), .ev_stride_found(f.ev_stride_found),
    .ev_stride_conf(f.ev_stride_conf), .ev_stride_use(f.ev_stride_use),
    .ev_fin_domain(f.ev_fin_domain), .ev_fin_mem(f.ev_fin_mem), .ev_fin_res(f.ev_fin_res));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_found = 0, n_conf = 0, n_use = 0, n_filter = 0, n_ok = 0, f_conf = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (a.ev_stride_found) n_found++;
    if (a.ev_stride_conf) n_conf++;
    if (f.ev_stride_conf) f_conf++;
    if (a.ev_stride_use) n_use++;
    if (f.ev_spec_no_filter) n_filter++;
    if (a.ver_ok) n_ok++;
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
    if (rd >= 0) R[rd] = res;
  endtask

  task automatic iter();
    commit(200, IC_ALU, 8, 8, -1, R[8] + 4);
    commit(201, IC_ALU, 9, 8, 10, R[8] + R[10]);
    commit(202, IC_OTHER, -1, -1, -1, 0);
  endtask

  task automatic regs(word_t r8, logic rdy, tag_t t);
    @(posedge clk); #1;
    for (int r = 0; r < int'(NREGS); r++) begin rf_val[r] = R[r]; rf_rdy[r] = 1; rf_tag[r] = '0; end
    rf_val[8] = rdy ? r8 : 32'hBAD; rf_rdy[8] = rdy; rf_tag[8] = t;
  endtask

  task automatic fetch(int pc);
    @(negedge clk); f_en = 1; f_pc = 30'(pc);
    @(posedge clk); #1 f_en = 0;
  endtask

  // outputs of the loop trace started with r8 = x
  function automatic logic outs_ok(out_t o, word_t x);
    return o.tr_ocnt == 2 && o.tr_ocr[0] == 8 && o.tr_ocv[0] == x + 4 &&
           o.tr_ocr[1] == 9 && o.tr_ocv[1] == x + 4 + R[10] && o.tr_npc == 30'd202;
  endfunction

  initial begin
    f_en = 0; f_pc = '0; c_en = 0; brk = 0; c = '0;
    for (int p = 0; p < 4; p++) begin wb_en[p] = 0; wb_tag[p] = '0; wb_val[p] = '0; end
    for (int r = 0; r < int'(NREGS); r++) begin R[r] = word_t'(r + 1000); rf_val[r] = '0; rf_rdy[r] = 1; rf_tag[r] = '0; end
    R[8] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    iter(); iter(); iter();          // traces with r8 = 0, 4, 8
    repeat (2) @(posedge clk);
    check("stride candidate then confirmation", n_found == 2 && n_conf == 1 && f_conf == 1);
    // unseen value 12 = last (8) + stride (4)
    regs(32'd12, 1, '0); fetch(200);
    check("stride-aware reuses unseen instance", a.tr_reuse && !a.tr_spec && a.ev_stride_use && outs_ok(a, 12));
    check("filtered-stride does not", !f.tr_reuse);
    regs(32'd16, 1, '0); fetch(200);
    check("last value moved on: 16 reused", a.tr_reuse && outs_ok(a, 16));
    regs(32'd8, 1, '0); fetch(200);
    check("stride-aware no longer holds 8 as strided last value", !a.tr_reuse || !a.ev_stride_use);
    check("filtered-stride regular reuse of a seen instance", f.tr_reuse && !f.tr_spec && outs_ok(f, 8));
    regs(32'd8, 1, '0); fetch(200);   // trains the filtered unit's counter
    // missing r8: predicted as 16 + 4
    regs(32'd0, 0, 7'd33); fetch(200);
    check("stride prediction", a.tr_spec && a.ev_stride_use && outs_ok(a, 20));
    check("filtered refuses prediction for strided PC", !f.tr_reuse && f.ev_spec_no_filter);
    @(negedge clk); wb_en[2] = 1; wb_tag[2] = 7'd33; wb_val[2] = 32'd20;
    @(posedge clk); #1 wb_en[2] = 0;
    repeat (2) @(posedge clk);
    check("stride prediction verified", n_ok == 1);
    $display("found=%0d confirmed=%0d used=%0d filtered=%0d verified=%0d", n_found, n_conf, n_use, n_filter, n_ok);
    check("stride recognition happened", n_found > 0);
    check("stride confirmation happened", n_conf > 0);
    check("stride extrapolation happened", n_use > 0);
    check("filter happened", n_filter > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
