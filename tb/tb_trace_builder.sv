// tb_trace_builder: self-checking test of trace construction.
// Replays the path i1 i2 b3 i7 b8 i11 i12 of the trace-construction example
// (integer operations and two taken branches, ended by a load) and checks the
// input context r2 r3 r5 r7 r8, the output context r1 r4 r3 with the last
// values written, the branch masks and the next PC.  Then checks termination
// by an instruction outside the reuse domain, by context overflow and by the
// branch limit, and that one-instruction traces are not stored.
module tb_trace_builder;
  import rst_pkg::*;
  logic clk = 0, rst_n = 0;
  logic c_en, brk, tr_en, g_en, fin_domain, fin_mem, fin_res;
  commit_t c;
  trace_t tr;
  instr_t g;
  int checks = 0, failures = 0;
  int n_tr = 0, n_g = 0;
  trace_t got [$];

  trace_builder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (tr_en) begin n_tr++; got.push_back(tr); end
    if (g_en) n_g++;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t R [NREGS];

  // commit one instruction; the model register file R supplies operand values
  task automatic ins(int pc, int npc, iclass_e cls, int rd, int rs1, int rs2, word_t res, logic taken = 0);
    @(negedge clk);
    c = '0;
    c.pc = 30'(pc); c.npc = 30'(npc); c.cls = cls;
    c.use1 = rs1 >= 0; c.rs1 = reg_t'(rs1 < 0 ? 0 : rs1); c.v1 = R[rs1 < 0 ? 0 : rs1];
    c.use2 = rs2 >= 0; c.rs2 = reg_t'(rs2 < 0 ? 0 : rs2); c.v2 = R[rs2 < 0 ? 0 : rs2];
    c.wr = rd >= 0; c.rd = reg_t'(rd < 0 ? 0 : rd); c.res = res; c.taken = taken;
    c_en = 1;
    @(posedge clk); #1 c_en = 0;
    if (rd >= 0 && cls != IC_MEM) R[rd] = res;
  endtask

  initial begin
    trace_t t;
    c_en = 0; brk = 0; c = '0;
    for (int r = 0; r < int'(NREGS); r++) R[r] = word_t'(100 + r);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the example path
    ins(1,  2,  IC_ALU,    1, 2, 3, R[2] + R[3]);          // i1 add r1,r2,r3
    ins(2,  3,  IC_ALU,    4, 3, 5, R[3] - R[5]);          // i2 sub r4,r3,r5
    ins(3,  7,  IC_BRANCH, -1, 4, 5, 0, 1);                // b3 beq r4,r5,i7 (taken)
    ins(7,  8,  IC_ALU,    4, 5, 7, 32'd3);                // i7 div r4,r5,r7
    ins(8,  11, IC_BRANCH, -1, 4, 8, 0, 1);                // b8 bne r4,r8,i11 (taken)
    ins(11, 12, IC_ALU,    3, 4, 5, R[4] ^ R[5]);          // i11 xor r3,r4,r5
    ins(12, 13, IC_MEM,    7, 3, -1, R[3] + 100);          // i12 lw r7,100(r3)
    @(negedge clk); #1;
    check("fin by load", 1);
    check("one trace", n_tr == 1);
    if (got.size() > 0) begin
      t = got.pop_front();
      check("start pc", t.pc == 30'd1);
      check("next pc is the load", t.npc == 30'd12);
      check("input count", t.icnt == 5);
      check("input regs r2 r3 r5 r7 r8",
            t.icr[0] == 2 && t.icr[1] == 3 && t.icr[2] == 5 && t.icr[3] == 7 && t.icr[4] == 8);
      check("input values", t.icv[0] == 102 && t.icv[1] == 103 && t.icv[2] == 105 &&
            t.icv[3] == 107 && t.icv[4] == 108);
      check("output regs r1 r4 r3", t.ocnt == 3 && t.ocr[0] == 1 && t.ocr[1] == 4 && t.ocr[2] == 3);
      check("output values (last written)", t.ocv[0] == 205 && t.ocv[1] == 3 && t.ocv[2] == (32'd3 ^ 32'd105));
      check("branch masks", t.bm == 4'b0011 && t.btk == 4'b0011);
    end
    check("every instruction offered to Memo_Table_G", n_g == 7);
    // outside the reuse domain
    ins(20, 21, IC_ALU, 9, 10, 11, 5);
    ins(21, 22, IC_ALU, 12, 9, 13, 6);
    ins(22, 23, IC_OTHER, 14, 15, -1, 0);
    @(negedge clk); #1;
    check("fin by domain", n_tr == 2 && got.size() == 1);
    if (got.size() > 0) begin
      t = got.pop_front();
      check("domain trace", t.pc == 30'd20 && t.npc == 30'd22 && t.icnt == 3 && t.ocnt == 2);
    end
    check("other class not offered to Memo_Table_G", n_g == 9);
    // context overflow: 7 distinct inputs split the trace after 3 instructions
    ins(30, 31, IC_ALU, 20, 1, 2, 1);
    ins(31, 32, IC_ALU, 21, 3, 4, 2);
    ins(32, 33, IC_ALU, 22, 5, 6, 3);
    ins(33, 34, IC_ALU, 23, 7, 8, 4);
    ins(34, 35, IC_ALU, 24, 23, -1, 5);
    ins(35, 36, IC_OTHER, -1, -1, -1, 0);
    @(negedge clk); #1;
    check("overflow splits", n_tr == 4 && got.size() == 2);
    if (got.size() == 2) begin
      t = got.pop_front();
      check("first part", t.pc == 30'd30 && t.icnt == 6 && t.npc == 30'd33);
      t = got.pop_front();
      check("second part starts at the overflowing instruction", t.pc == 30'd33 && t.icnt == 2);
    end
    // branch limit: five branches
    for (int b = 0; b < 5; b++) ins(40 + b, 41 + b, IC_BRANCH, -1, 1, -1, 0, b[0]);
    ins(45, 46, IC_ALU, 2, 1, -1, 7);
    ins(46, 47, IC_OTHER, -1, -1, -1, 0);
    @(negedge clk); #1;
    check("branch limit splits", n_tr == 6 && got.size() == 2);
    if (got.size() == 2) begin
      t = got.pop_front();
      check("four branches", t.bm == 4'b1111 && t.btk == 4'b1010 && t.icnt == 1);
      t = got.pop_front();
      check("rest", t.pc == 30'd44 && t.bm == 4'b0001);
    end
    // a lone instruction is not a trace; brk ends a trace
    ins(50, 51, IC_ALU, 3, 1, -1, 1);
    ins(51, 52, IC_OTHER, -1, -1, -1, 0);
    ins(60, 61, IC_ALU, 3, 1, -1, 1);
    ins(61, 62, IC_ALU, 4, 3, -1, 1);
    @(negedge clk); brk = 1; @(negedge clk); brk = 0; @(negedge clk); #1;
    check("single not stored, brk ends trace", n_tr == 7 && got.size() == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count the reasons
  int nd = 0, nm = 0, nr = 0;
  always @(negedge clk) if (rst_n) begin
    if (fin_domain) nd++;
    if (fin_mem) nm++;
    if (fin_res) nr++;
  end
  final if (nd < 3 || nm != 1 || nr != 2) $display("reason counts %0d %0d %0d", nd, nm, nr);
endmodule
