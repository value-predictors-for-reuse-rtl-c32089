// trace_builder: dynamic trace construction from committed instructions (stage RS4).
//
// Committed instructions arrive one per cycle (c_en, c).  Integer operations
// and branches are appended to the trace being built:
//   * a source register neither defined earlier in the trace nor already in the
//     input context is added to the input context with its current value;
//   * a destination register is added to the output context, and the value it
//     receives last is the output value;
//   * a branch sets its bit in the branch mask and its outcome in the taken mask.
// A trace is finished by an instruction outside the reuse domain, by a load or
// store (memory access reuse is not modelled, so only the address calculation
// is reused, as a single instruction), by brk (e.g. execution that bypassed the
// commit stream through reuse), or by lack of resources: when the next
// instruction would overflow the input or output context or the branch limit,
// the trace is finished and a new one starts with that instruction.
// Instructions are accepted whether they were reused or not.
//
// A finished trace of at least MIN_LEN instructions is presented on tr_en/tr
// in the cycle after the finishing event, for Memo_Table_T and the stride
// recogniser.  Every reuse-domain instruction (including load/store address
// calculations) is presented on g_en/g for Memo_Table_G, one cycle after
// commit.  fin_* report why a trace ended (one-cycle pulses).
// The construction rules follow the RST description; MIN_LEN, the handling of
// a single commit per cycle and the brk input are this design's choices.
module trace_builder
  import rst_pkg::*;
#(
  parameter int unsigned MIN_LEN = 2,
  localparam int unsigned BW     = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    c_en,
  input  commit_t c,
  input  logic    brk,
  output logic    tr_en,
  output trace_t  tr,
  output logic    g_en,
  output instr_t  g,
  output logic    fin_domain,  // ended by an instruction outside the reuse domain
  output logic    fin_mem,     // ended by a load or store
  output logic    fin_res      // ended by lack of context or branch resources
);

  typedef struct packed {
    trace_t           t;
    logic [NREGS-1:0] def;   // registers written inside the trace
    logic [NREGS-1:0] inr;   // registers in the input context
    logic [$clog2(NB+1)-1:0] bcnt;
    logic [7:0]       len;
  } build_t;

  build_t cur, nxt_app, nxt_new;
  logic   fits;

  // Append instruction i to trace state b.  ok = 0 if it does not fit.
  function automatic build_t append(build_t b, commit_t i, output logic ok);
    build_t r = b;
    ok = 1'b1;
    if (r.len == '0) begin
      r.t     = '0;
      r.t.vld = 1'b1;
      r.t.pc  = i.pc;
    end
    for (int s = 0; s < 2; s++) begin
      logic u;
      reg_t rs;
      word_t v;
      u  = (s == 0) ? i.use1 : i.use2;
      rs = (s == 0) ? i.rs1  : i.rs2;
      v  = (s == 0) ? i.v1   : i.v2;
      if (u && !r.def[rs] && !r.inr[rs]) begin
        if (int'(r.t.icnt) >= int'(N_IN)) ok = 1'b0;
        else begin
          r.t.icr[r.t.icnt] = rs;
          r.t.icv[r.t.icnt] = v;
          r.t.icnt          = r.t.icnt + 1'b1;
          r.inr[rs]         = 1'b1;
        end
      end
    end
    if (i.wr) begin
      logic found;
      found = 1'b0;
      for (int j = 0; j < int'(N_OUT); j++)
        if (j < int'(r.t.ocnt) && r.t.ocr[j] == i.rd) begin
          r.t.ocv[j] = i.res;
          found      = 1'b1;
        end
      if (!found) begin
        if (int'(r.t.ocnt) >= int'(N_OUT)) ok = 1'b0;
        else begin
          r.t.ocr[r.t.ocnt] = i.rd;
          r.t.ocv[r.t.ocnt] = i.res;
          r.t.ocnt          = r.t.ocnt + 1'b1;
        end
      end
      r.def[i.rd] = 1'b1;
    end
    if (i.cls == IC_BRANCH) begin
      if (int'(r.bcnt) >= int'(NB)) ok = 1'b0;
      else begin
        r.t.bm[BW'(r.bcnt)]  = 1'b1;
        r.t.btk[BW'(r.bcnt)] = i.taken;
        r.bcnt          = r.bcnt + 1'b1;
      end
    end
    r.t.npc = i.npc;
    if (r.len != '1) r.len = r.len + 1'b1;
    return r;
  endfunction

  logic in_domain;
  logic ok_new;
  assign in_domain = (c.cls == IC_ALU) || (c.cls == IC_BRANCH);

  always_comb begin
    nxt_app = append(cur, c, fits);
    nxt_new = append('0, c, ok_new);
  end

  // The trace in cur is emitted when it ends now.
  logic ending;
  always_comb begin
    ending = 1'b0;
    if (brk) ending = 1'b1;
    else if (c_en && (!in_domain || !fits)) ending = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur        <= '0;
      tr_en      <= 1'b0;
      tr         <= '0;
      g_en       <= 1'b0;
      g          <= '0;
      fin_domain <= 1'b0;
      fin_mem    <= 1'b0;
      fin_res    <= 1'b0;
    end else begin
      tr_en      <= ending && int'(cur.len) >= int'(MIN_LEN);
      tr         <= cur.t;
      fin_domain <= c_en && !brk && c.cls == IC_OTHER && cur.len != '0;
      fin_mem    <= c_en && !brk && c.cls == IC_MEM && cur.len != '0;
      fin_res    <= c_en && !brk && in_domain && !fits && cur.len != '0;
      if (brk)
        cur <= (c_en && in_domain) ? nxt_new : '0;
      else if (c_en) begin
        if (!in_domain) cur <= '0;
        else if (fits)  cur <= nxt_app;
        else            cur <= nxt_new;
      end
      g_en     <= c_en && c.cls != IC_OTHER;
      g.vld    <= 1'b1;
      g.pc     <= c.pc;
      g.npc    <= c.npc;
      g.use1   <= c.use1;
      g.rs1    <= c.rs1;
      g.v1     <= c.v1;
      g.use2   <= c.use2;
      g.rs2    <= c.rs2;
      g.v2     <= c.v2;
      g.wr     <= c.wr;
      g.rd     <= c.rd;
      g.res    <= c.res;
    end
  end

  // A single reuse-domain instruction always fits an empty trace.
  a_single_fits: assert property (@(posedge clk) disable iff (!rst_n) c_en |-> ok_new);

endmodule
