// tb_stride_recognizer: self-checking test of stride recognition.
// Feeds consecutive traces of one start PC whose first input advances by 2
// and whose output advances by 6: the first pair gives a candidate, the third
// trace confirms it and comes out with its stride fields filled.  Then checks
// that a changed stride, a trace with branches, different register ids,
// another PC and too many changing inputs are not confirmed.
module tb_stride_recognizer;
  import rst_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, found, confirmed;
  trace_t tr, tr_out;
  int checks = 0, failures = 0;

  stride_recognizer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic trace_t mk(pc_t pc, word_t i0, word_t i1, word_t o0);
    trace_t t = '0;
    t.vld = 1; t.pc = pc; t.npc = pc + 3;
    t.icnt = 2; t.icr[0] = 5'd8; t.icr[1] = 5'd9; t.icv[0] = i0; t.icv[1] = i1;
    t.ocnt = 2; t.ocr[0] = 5'd8; t.ocr[1] = 5'd10; t.ocv[0] = o0; t.ocv[1] = 32'd77;
    return t;
  endfunction

  // present a trace for one cycle; return the combinational results
  task automatic give(trace_t t, output logic f, output logic cf, output trace_t o);
    @(negedge clk); en = 1; tr = t; #1;
    f = found; cf = confirmed; o = tr_out;
    @(posedge clk); #1 en = 0;
  endtask

  initial begin
    logic f, cf;
    trace_t o;
    en = 0; tr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    give(mk(30'd64, 1, 50, 10), f, cf, o);
    check("first trace: nothing to compare", !f && !cf && !o.strided);
    give(mk(30'd64, 3, 50, 16), f, cf, o);
    check("second trace: candidate", f && !cf && !o.strided);
    give(mk(30'd64, 5, 50, 22), f, cf, o);
    check("third trace: confirmed", f && cf && o.strided);
    check("input stride", o.icd[0].vld && o.icd[0].slot == 0 && o.icd[0].d == 32'd2 && !o.icd[1].vld);
    check("output stride", o.ocd[0].vld && o.ocd[0].slot == 0 && o.ocd[0].d == 32'd6 && !o.ocd[1].vld);
    check("last values kept", o.icv[0] == 32'd5 && o.ocv[0] == 32'd22 && o.it == 0);
    give(mk(30'd64, 7, 50, 28), f, cf, o);
    check("fourth trace still confirmed", cf);
    give(mk(30'd64, 10, 50, 37), f, cf, o);
    check("changed stride: candidate only", f && !cf && !o.strided);
    give(mk(30'd64, 13, 50, 46), f, cf, o);
    check("new stride confirmed", cf && o.icd[0].d == 32'd3 && o.ocd[0].d == 32'd9);
    // negative stride (wraps in 32 bits)
    give(mk(30'd64, 11, 50, 40), f, cf, o);
    give(mk(30'd64, 9, 50, 34), f, cf, o);
    check("negative stride", cf && o.icd[0].d == 32'hFFFF_FFFE);
    // branches
    o = mk(30'd64, 7, 50, 28); o.bm = 4'b0001;
    give(o, f, cf, o);
    check("trace with branch not a candidate", !f && !cf);
    // different register ids
    give(mk(30'd64, 5, 50, 22), f, cf, o);
    o = mk(30'd64, 3, 50, 16); o.icr[1] = 5'd11;
    give(o, f, cf, o);
    check("different registers", !f);
    // another PC
    give(mk(30'd68, 1, 50, 10), f, cf, o);
    check("another PC", !f);
    // three changing inputs
    o = mk(30'd72, 1, 1, 1); o.icnt = 3; o.icr[2] = 5'd12; o.icv[2] = 1;
    give(o, f, cf, o);
    o.icv[0] = 2; o.icv[1] = 2; o.icv[2] = 2;
    give(o, f, cf, o);
    check("three changing inputs exceed the stride slots", !f);
    // identical traces are not strided
    give(mk(30'd76, 1, 1, 1), f, cf, o);
    give(mk(30'd76, 1, 1, 1), f, cf, o);
    check("no change, no stride", !f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
