// rst_top: Reuse through Speculation on Traces (RST) unit.
//
// Sits beside a superscalar pipeline and turns redundant dynamic instruction
// sequences (traces) into single-step register updates.  Four stages run in
// parallel with the host pipeline:
//   RS1  the fetch PC looks up Memo_Table_T (traces), Memo_Table_G (single
//        instructions) and the confidence table (registered reads);
//   RS2  the reuse test compares the candidates' input contexts with the
//        register state.  A trace whose ready inputs all match is reused; if up
//        to two inputs are still being computed, they are predicted and the
//        trace is reused speculatively when its confidence counter allows;
//   RS3  each speculative reuse is tracked until the predicted registers are
//        written back; a wrong value raises a squash, and the confidence
//        counter of the trace is updated either way (a regular reuse also
//        counts as a correct prediction);
//   RS4  committed instructions are formed into new traces (and single
//        instructions) and stored in the memo tables.
// MODE selects the input predictor: RST_NVALUE (last n-value prediction, the
// values already held by the n ways of a set), RST_STRIDE (adds stride
// recognition in RS4 and extrapolation of strided traces in RS2) or
// RST_FILTERED (stride recognition used only to refuse predicting strided
// traces).  RST_NVALUE is the default: it matches the stride-aware variant in
// performance with simpler hardware.
//
// Interface (host pipeline side):
//   f_en/f_pc               fetch PC entering RS1 (word address)
//   rf_val/rf_rdy/rf_tag    register state seen by RS2 one cycle later: value,
//                           ready flag and tag of the in-flight producer
//   tr_*                    RS2 trace reuse result (output context, next PC,
//                           branch masks for branch-predictor update, tracker
//                           id of a speculative reuse)
//   ir_*                    RS2 instruction reuse result
//   wb_*                    writeback results (tag, value), WBP per cycle
//   sq_*                    RS3 squash request for a mispredicted reuse
//   c_en/c/brk              committed instruction stream into RS4
// The remaining outputs are one-cycle event flags for statistics.
// The host processor, its register renaming and the squash itself are outside
// this unit.
module rst_top
  import rst_pkg::*;
#(
  parameter rst_mode_e   MODE         = RST_NVALUE,
  parameter int unsigned MT_ENTRIES   = 1024,
  parameter int unsigned MT_WAYS      = 4,
  parameter int unsigned MG_ENTRIES   = 2048,
  parameter int unsigned MG_WAYS      = 4,
  parameter int unsigned CONF_ENTRIES = 4096,
  parameter int unsigned CONF_SAT     = 3,
  parameter int unsigned CONF_THRESH  = 3,
  parameter int unsigned CONF_PENALTY = 3,
  parameter int unsigned CONF_INC     = 1,
  parameter int unsigned CONF_INIT    = 1,
  parameter int unsigned PV_ENTRIES   = 8,
  parameter int unsigned WBP          = 4,
  localparam int unsigned MTW         = (MT_WAYS > 1) ? $clog2(MT_WAYS) : 1,
  localparam int unsigned IDW         = (PV_ENTRIES > 1) ? $clog2(PV_ENTRIES) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  // RS1
  input  logic            f_en,
  input  pc_t             f_pc,
  // register state for RS2
  input  word_t           rf_val [NREGS],
  input  logic            rf_rdy [NREGS],
  input  tag_t            rf_tag [NREGS],
  // RS2 trace reuse
  output logic            tr_reuse,
  output logic            tr_spec,
  output pc_t             tr_pc,
  output pc_t             tr_npc,
  output logic [NB-1:0]   tr_bm,
  output logic [NB-1:0]   tr_btk,
  output logic [$clog2(N_OUT+1)-1:0] tr_ocnt,
  output reg_t            tr_ocr [N_OUT],
  output word_t           tr_ocv [N_OUT],
  output logic [IDW-1:0]  tr_id,
  // RS2 instruction reuse
  output logic            ir_reuse,
  output logic            ir_wr,
  output reg_t            ir_rd,
  output word_t           ir_res,
  output pc_t             ir_npc,
  // writeback into RS3
  input  logic            wb_en  [WBP],
  input  tag_t            wb_tag [WBP],
  input  word_t           wb_val [WBP],
  // RS3 outcome
  output logic            sq_en,
  output logic [IDW-1:0]  sq_id,
  output pc_t             sq_pc,
  output reg_t            sq_reg,
  output logic            ver_ok,
  // RS4
  input  logic            c_en,
  input  commit_t         c,
  input  logic            brk,
  // event flags
  output logic            ev_spec_no_conf,
  output logic            ev_spec_no_room,
  output logic            ev_spec_no_filter,
  output logic            ev_trace_new,
  output logic            ev_trace_evict,
  output logic            ev_stride_found,
  output logic            ev_stride_conf,
  output logic            ev_stride_use,
  output logic            ev_fin_domain,
  output logic            ev_fin_mem,
  output logic            ev_fin_res
);

  // ---------------- RS1 -> RS2 ----------------
  logic rs2_v;
  pc_t  rs2_pc;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      rs2_v  <= 1'b0;
      rs2_pc <= '0;
    end else begin
      rs2_v  <= f_en;
      if (f_en) rs2_pc <= f_pc;
    end
  end

  trace_t                 mt_ways [MT_WAYS];
  logic [MTW-1:0]         mt_age  [MT_WAYS];
  logic [$clog2(MT_ENTRIES/MT_WAYS)-1:0] mt_set;
  logic                   conf_ok;
  logic [$clog2(CONF_SAT+1)-1:0] conf_val;

  logic                   hit, spec, adv;
  logic [MTW-1:0]         way;
  logic [$clog2(MAX_PRED+1)-1:0] npred;
  reg_t                   pred_r [MAX_PRED];
  word_t                  pred_v [MAX_PRED];
  tag_t                   pred_t [MAX_PRED];
  logic                   pv_room;

  logic                   bt_en;
  trace_t                 bt_tr, st_tr, ins_tr;
  instr_t                 g_ins;
  logic                   g_en;
  instr_t                 g_hit_ent;
  logic                   res_en, res_ok;
  pc_t                    res_pc;

  memo_table_t #(.ENTRIES(MT_ENTRIES), .WAYS(MT_WAYS)) u_mtt (
    .clk, .rst_n,
    .lk_en   (f_en),
    .lk_pc   (f_pc),
    .lk_ways (mt_ways),
    .lk_age  (mt_age),
    .lk_set  (mt_set),
    .up_en   (hit),
    .up_set  (mt_set),
    .up_way  (way),
    .up_adv  (adv),
    .ins_en  (bt_en),
    .ins_tr  (ins_tr),
    .ins_evict(ev_trace_evict)
  );

  memo_table_g #(.ENTRIES(MG_ENTRIES), .WAYS(MG_WAYS)) u_mtg (
    .clk, .rst_n,
    .lk_en  (f_en),
    .lk_pc  (f_pc),
    .rf_val,
    .rf_rdy,
    .ir_hit (ir_reuse),
    .ir_ent (g_hit_ent),
    .ins_en (g_en),
    .ins    (g_ins)
  );

  assign ir_wr  = g_hit_ent.wr;
  assign ir_rd  = g_hit_ent.rd;
  assign ir_res = g_hit_ent.res;
  assign ir_npc = g_hit_ent.npc;

  // Confidence training: a verified or wrong prediction (RS3) has priority; a
  // regular reuse counts as a correct prediction of the stored inputs.
  logic conf_upd, conf_good;
  pc_t  conf_pc;
  assign conf_upd  = res_en || (hit && !spec);
  assign conf_good = res_en ? res_ok : 1'b1;
  assign conf_pc   = res_en ? res_pc : rs2_pc;

  conf_table #(
    .ENTRIES(CONF_ENTRIES), .SAT(CONF_SAT), .THRESH(CONF_THRESH),
    .PENALTY(CONF_PENALTY), .INC(CONF_INC), .INIT(CONF_INIT)
  ) u_conf (
    .clk, .rst_n,
    .rd_en   (f_en),
    .rd_pc   (f_pc),
    .rd_conf (conf_val),
    .rd_ok   (conf_ok),
    .upd_en  (conf_upd),
    .upd_pc  (conf_pc),
    .upd_ok  (conf_good)
  );

  // ---------------- RS2 ----------------
  reuse_test #(.WAYS(MT_WAYS)) u_rs2 (
    .mode      (MODE),
    .valid     (rs2_v),
    .pc        (rs2_pc),
    .ways      (mt_ways),
    .age       (mt_age),
    .rf_val, .rf_rdy, .rf_tag,
    .conf_ok,
    .spec_room (pv_room),
    .hit, .spec, .adv, .way,
    .npc       (tr_npc),
    .bm        (tr_bm),
    .btk       (tr_btk),
    .ocnt      (tr_ocnt),
    .ocr       (tr_ocr),
    .ocv       (tr_ocv),
    .npred, .pred_r, .pred_v, .pred_t,
    .spec_no_conf   (ev_spec_no_conf),
    .spec_no_room   (ev_spec_no_room),
    .spec_no_filter (ev_spec_no_filter)
  );

  assign tr_reuse      = hit;
  assign tr_spec       = hit && spec;
  assign tr_pc         = rs2_pc;
  assign ev_stride_use = adv;

  // ---------------- RS3 ----------------
  logic [IDW-1:0] res_id;

  pred_verifier #(.ENTRIES(PV_ENTRIES), .WBP(WBP)) u_rs3 (
    .clk, .rst_n, .flush,
    .alloc_en (hit && spec),
    .alloc_pc (rs2_pc),
    .alloc_n  (npred),
    .alloc_r  (pred_r),
    .alloc_v  (pred_v),
    .alloc_t  (pred_t),
    .room     (pv_room),
    .alloc_id (tr_id),
    .wb_en, .wb_tag, .wb_val,
    .res_en, .res_ok, .res_pc, .res_id,
    .res_reg  (sq_reg)
  );

  assign sq_en  = res_en && !res_ok;
  assign sq_id  = res_id;
  assign sq_pc  = res_pc;
  assign ver_ok = res_en && res_ok;

  // ---------------- RS4 ----------------
  trace_builder u_rs4 (
    .clk, .rst_n,
    .c_en, .c, .brk,
    .tr_en      (bt_en),
    .tr         (bt_tr),
    .g_en, .g   (g_ins),
    .fin_domain (ev_fin_domain),
    .fin_mem    (ev_fin_mem),
    .fin_res    (ev_fin_res)
  );

  assign ev_trace_new = bt_en;

  generate
    if (MODE == RST_NVALUE) begin : g_nostride
      assign st_tr           = bt_tr;
      assign ev_stride_found = 1'b0;
      assign ev_stride_conf  = 1'b0;
    end else begin : g_stride
      stride_recognizer u_str (
        .clk, .rst_n,
        .en        (bt_en),
        .tr        (bt_tr),
        .tr_out    (st_tr),
        .found     (ev_stride_found),
        .confirmed (ev_stride_conf)
      );
    end
  endgenerate

  assign ins_tr = st_tr;

endmodule
