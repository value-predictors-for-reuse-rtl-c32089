// rst_pkg: shared constants and types of the Reuse-through-Speculation-on-Traces
// (RST) unit.
//
// The trace record follows the trace memoization table entry layout: start PC
// (30 bits), next PC (30 bits), input context register ids (5 bits each) and
// values (32 bits each), input strides, output context ids and values, output
// strides, branch mask, branch-taken mask and an iteration counter.  The
// context sizes (N_IN, N_OUT), the number of strided slots, the branch limit
// and the counter width are not fixed by the source and are this design's
// choices; N_STR_IN = 2 follows the limit of two predicted inputs per trace.
package rst_pkg;

  localparam int unsigned XLEN     = 32;  // integer value width
  localparam int unsigned PCW      = 30;  // word-aligned PC width
  localparam int unsigned NREGS    = 32;  // architectural integer registers
  localparam int unsigned RW       = 5;   // register id width
  localparam int unsigned N_IN     = 6;   // input context slots  (n)
  localparam int unsigned N_OUT    = 4;   // output context slots (m)
  localparam int unsigned N_STR_IN = 2;   // input strides        (n')
  localparam int unsigned N_STR_OUT= 2;   // output strides       (m')
  localparam int unsigned NB       = 4;   // branches per trace   (b)
  localparam int unsigned ITW      = 8;   // iteration counter width (it)
  localparam int unsigned MAX_PRED = 2;   // at most two predicted inputs per reuse
  localparam int unsigned TAGW     = 7;   // in-flight producer tag (128-entry RUU)
  localparam int unsigned CIW      = $clog2(N_IN);
  localparam int unsigned COW      = $clog2(N_OUT);

  typedef logic [XLEN-1:0] word_t;
  typedef logic [PCW-1:0]  pc_t;
  typedef logic [RW-1:0]   reg_t;
  typedef logic [TAGW-1:0] tag_t;

  // Predictor variants.  RST_NVALUE predicts missing inputs with values already
  // stored in the trace table; RST_STRIDE also extrapolates strided traces;
  // RST_FILTERED recognises strides only to refuse predicting such traces.
  typedef enum logic [1:0] {
    RST_NVALUE   = 2'd0,
    RST_STRIDE   = 2'd1,
    RST_FILTERED = 2'd2
  } rst_mode_e;

  // One stride: which context slot it applies to and the difference.
  typedef struct packed {
    logic            vld;
    logic [CIW-1:0]  slot;
    word_t           d;
  } istride_t;

  typedef struct packed {
    logic            vld;
    logic [COW-1:0]  slot;
    word_t           d;
  } ostride_t;

  // A trace as stored in Memo_Table_T.
  typedef struct packed {
    logic                       vld;
    pc_t                        pc;
    pc_t                        npc;
    logic [$clog2(N_IN+1)-1:0]  icnt;
    reg_t  [N_IN-1:0]           icr;
    word_t [N_IN-1:0]           icv;
    istride_t [N_STR_IN-1:0]    icd;
    logic [$clog2(N_OUT+1)-1:0] ocnt;
    reg_t  [N_OUT-1:0]          ocr;
    word_t [N_OUT-1:0]          ocv;
    ostride_t [N_STR_OUT-1:0]   ocd;
    logic [NB-1:0]              bm;    // valid branches inside the trace
    logic [NB-1:0]              btk;   // their outcomes (1 = taken)
    logic [ITW-1:0]             it;    // iterations reused with strides
    logic                       strided; // stride pattern recognised
  } trace_t;

  // Instruction classes seen at commit.
  typedef enum logic [1:0] {
    IC_ALU    = 2'd0,  // integer operation (reuse domain)
    IC_BRANCH = 2'd1,  // conditional branch (reuse domain)
    IC_MEM    = 2'd2,  // load/store: only the address calculation is reusable
    IC_OTHER  = 2'd3   // outside the reuse domain (FP, system, ...)
  } iclass_e;

  // A committed instruction as delivered to the trace builder.
  typedef struct packed {
    pc_t     pc;
    pc_t     npc;
    iclass_e cls;
    logic    use1;
    reg_t    rs1;
    word_t   v1;
    logic    use2;
    reg_t    rs2;
    word_t   v2;
    logic    wr;      // writes rd (address result for IC_MEM)
    reg_t    rd;
    word_t   res;
    logic    taken;   // branch outcome
  } commit_t;

  // Entry of Memo_Table_G (one instruction with its operands and result).
  typedef struct packed {
    logic  vld;
    pc_t   pc;
    pc_t   npc;
    logic  use1;
    reg_t  rs1;
    word_t v1;
    logic  use2;
    reg_t  rs2;
    word_t v2;
    logic  wr;
    reg_t  rd;
    word_t res;
  } instr_t;

  // Input value a trace expects in slot i: the stored last value, plus the
  // slot's stride when strides are in use.
  function automatic word_t exp_in(trace_t t, int unsigned i, logic use_str);
    word_t v = t.icv[i];
    for (int k = 0; k < int'(N_STR_IN); k++)
      if (use_str && t.icd[k].vld && int'(t.icd[k].slot) == int'(i)) v = v + t.icd[k].d;
    return v;
  endfunction

  // Output value produced in slot j, extrapolated the same way.
  function automatic word_t exp_out(trace_t t, int unsigned j, logic use_str);
    word_t v = t.ocv[j];
    for (int k = 0; k < int'(N_STR_OUT); k++)
      if (use_str && t.ocd[k].vld && int'(t.ocd[k].slot) == int'(j)) v = v + t.ocd[k].d;
    return v;
  endfunction

  // The trace one stride further on: last values move to the extrapolated
  // ones and the iteration counter advances (saturating).
  function automatic trace_t advance(trace_t t);
    trace_t r = t;
    for (int i = 0; i < int'(N_IN); i++)  r.icv[i] = exp_in(t, i, 1'b1);
    for (int j = 0; j < int'(N_OUT); j++) r.ocv[j] = exp_out(t, j, 1'b1);
    if (t.it != '1) r.it = t.it + 1'b1;
    return r;
  endfunction

  // Two traces describe the same computation instance: same start PC and the
  // same input context (registers and values).
  function automatic logic same_instance(trace_t a, trace_t b);
    logic eq = a.vld && b.vld && (a.pc == b.pc) && (a.icnt == b.icnt);
    for (int i = 0; i < int'(N_IN); i++)
      if (i < int'(a.icnt)) eq &= (a.icr[i] == b.icr[i]) && (a.icv[i] == b.icv[i]);
    return eq;
  endfunction

endpackage
