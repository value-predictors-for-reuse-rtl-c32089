// reuse_test: trace reuse test and input prediction (stage RS2).
//
// Combinational.  Takes the trace candidates read from Memo_Table_T for the
// fetched PC (every way of its set) and the current register state.  For each
// candidate whose start PC matches, every input-context register that is ready
// must hold the stored input value; inputs whose producer has not finished are
// counted as missing.
//   * No input missing: regular (non-speculative) reuse.
//   * 1..MAX_PRED inputs missing: the trace may be reused speculatively, the
//     missing inputs being predicted with the values stored in the trace (last
//     n-value prediction), provided the confidence counter allows it and the
//     prediction tracker (RS3) has room.  In RST_FILTERED mode no prediction
//     is made for a PC that has a trace marked as strided.
// A regular candidate wins over a speculative one.  Among speculative
// candidates the most recently used way is taken (the choice uses the LRU
// ages kept with the traces).
// In RST_STRIDE mode a trace carrying recognised strides is tested against its
// extrapolated inputs (last value + stride) and produces extrapolated outputs;
// adv then asks the table to record the new last values.
//
// Outputs describe the chosen trace: its way, output context (registers and
// values), next PC, branch masks and, for speculative reuse, the predicted
// registers with their predicted values and producer tags.  The spec_no_*
// flags report why an otherwise possible speculative reuse was refused.
// The reuse and prediction rules follow the RST description; the MRU choice
// among several candidates and the priority of regular reuse are this
// design's choices.
module reuse_test
  import rst_pkg::*;
#(
  parameter int unsigned WAYS = 4,
  localparam int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned PW  = (MAX_PRED > 1) ? $clog2(MAX_PRED) : 1
) (
  input  rst_mode_e       mode,
  input  logic            valid,
  input  pc_t             pc,
  input  trace_t          ways   [WAYS],
  input  logic [WW-1:0]   age    [WAYS],
  input  word_t           rf_val [NREGS],
  input  logic            rf_rdy [NREGS],
  input  tag_t            rf_tag [NREGS],
  input  logic            conf_ok,
  input  logic            spec_room,
  output logic            hit,
  output logic            spec,
  output logic            adv,
  output logic [WW-1:0]   way,
  output pc_t             npc,
  output logic [NB-1:0]   bm,
  output logic [NB-1:0]   btk,
  output logic [$clog2(N_OUT+1)-1:0] ocnt,
  output reg_t            ocr    [N_OUT],
  output word_t           ocv    [N_OUT],
  output logic [$clog2(MAX_PRED+1)-1:0] npred,
  output reg_t            pred_r [MAX_PRED],
  output word_t           pred_v [MAX_PRED],
  output tag_t            pred_t [MAX_PRED],
  output logic            spec_no_conf,
  output logic            spec_no_room,
  output logic            spec_no_filter
);

  logic                   reg_ok   [WAYS];
  logic                   spec_ok  [WAYS];
  logic                   filt     [WAYS];
  logic                   use_str  [WAYS];
  logic [CIW:0]           nmiss    [WAYS];

  always_comb begin
    for (int w = 0; w < int'(WAYS); w++) begin
      logic m;
      m          = valid && ways[w].vld && ways[w].pc == pc;
      use_str[w] = (mode == RST_STRIDE) && ways[w].strided;
      nmiss[w]   = '0;
      for (int i = 0; i < int'(N_IN); i++) begin
        if (i < int'(ways[w].icnt)) begin
          if (rf_rdy[ways[w].icr[i]])
            m &= (rf_val[ways[w].icr[i]] == exp_in(ways[w], i, use_str[w]));
          else
            nmiss[w] = nmiss[w] + 1'b1;
        end
      end
      reg_ok[w]  = m && (nmiss[w] == '0);
      spec_ok[w] = m && (nmiss[w] != '0) && (int'(nmiss[w]) <= int'(MAX_PRED));
      filt[w]    = (mode == RST_FILTERED) && valid && ways[w].vld &&
                   ways[w].pc == pc && ways[w].strided;
    end
  end

  logic          rhit, shit, filt_pc;
  logic [WW-1:0] rway, sway;

  always_comb begin
    rhit    = 1'b0; rway = '0;
    shit    = 1'b0; sway = '0;
    filt_pc = 1'b0;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (reg_ok[w] && !rhit) begin
        rhit = 1'b1;
        rway = WW'(w);
      end
      if (spec_ok[w] && (!shit || age[w] < age[sway])) begin
        shit = 1'b1;
        sway = WW'(w);
      end
      if (filt[w]) filt_pc = 1'b1;
    end
  end

  always_comb begin
    trace_t t;
    hit  = rhit || (shit && !filt_pc && conf_ok && spec_room);
    spec = !rhit && hit;
    way  = rhit ? rway : sway;
    t    = ways[way];
    adv  = hit && use_str[way];
    npc  = t.npc;
    bm   = t.bm;
    btk  = t.btk;
    ocnt = hit ? t.ocnt : '0;
    for (int j = 0; j < int'(N_OUT); j++) begin
      ocr[j] = t.ocr[j];
      ocv[j] = exp_out(t, j, use_str[way]);
    end
    npred = '0;
    for (int k = 0; k < int'(MAX_PRED); k++) begin
      pred_r[k] = '0;
      pred_v[k] = '0;
      pred_t[k] = '0;
    end
    if (spec) begin
      for (int i = 0; i < int'(N_IN); i++) begin
        if (i < int'(t.icnt) && !rf_rdy[t.icr[i]] && int'(npred) < int'(MAX_PRED)) begin
          pred_r[PW'(npred)] = t.icr[i];
          pred_v[PW'(npred)] = exp_in(t, i, use_str[way]);
          pred_t[PW'(npred)] = rf_tag[t.icr[i]];
          npred         = npred + 1'b1;
        end
      end
    end
    spec_no_filter = !rhit && shit && filt_pc;
    spec_no_conf   = !rhit && shit && !filt_pc && !conf_ok;
    spec_no_room   = !rhit && shit && !filt_pc && conf_ok && !spec_room;
  end

endmodule
