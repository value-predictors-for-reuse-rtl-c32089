// tb_memo_table_g: self-checking test of the instruction memoization table.
// Inserts instruction instances and checks the RS2 reuse test one cycle after
// lookup: a hit needs every used source ready and equal to the stored operand;
// several instances of one PC are told apart by their operand values; the
// oldest inserted instance is replaced when a set overflows.
module tb_memo_table_g;
  import rst_pkg::*;
  logic clk = 0, rst_n = 0;
  logic lk_en, ins_en, ir_hit;
  pc_t lk_pc;
  word_t rf_val [NREGS];
  logic  rf_rdy [NREGS];
  instr_t ir_ent, ins;
  int checks = 0, failures = 0;

  memo_table_g #(.ENTRIES(8), .WAYS(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(pc_t pc, word_t a, word_t b);
    instr_t i = '0;
    i.vld = 1; i.pc = pc; i.npc = pc + 1;
    i.use1 = 1; i.rs1 = 5'd4; i.v1 = a;
    i.use2 = 1; i.rs2 = 5'd5; i.v2 = b;
    i.wr = 1; i.rd = 5'd6; i.res = a + b;
    return i;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(instr_t i);
    @(negedge clk); ins_en = 1; ins = i;
    @(posedge clk); #1 ins_en = 0;
  endtask

  // look up pc with r4=a, r5=b (ready flags given) and check the outcome
  task automatic probe(pc_t pc, word_t a, word_t b, logic ra, logic rb, logic exp_hit, string what);
    @(negedge clk);
    lk_en = 1; lk_pc = pc;
    @(posedge clk); #1 lk_en = 0;
    rf_val[4] = a; rf_val[5] = b; rf_rdy[4] = ra; rf_rdy[5] = rb;
    #1;
    check(what, ir_hit == exp_hit);
    if (exp_hit) check({what, " result"}, ir_ent.res == a + b && ir_ent.rd == 5'd6 && ir_ent.npc == pc + 1);
  endtask

  initial begin
    lk_en = 0; ins_en = 0; lk_pc = '0; ins = '0;
    for (int r = 0; r < int'(NREGS); r++) begin rf_val[r] = '0; rf_rdy[r] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    probe(30'd2, 1, 2, 1, 1, 0, "empty table misses");
    put(mk(30'd2, 1, 2));
    put(mk(30'd2, 7, 9));
    probe(30'd2, 1, 2, 1, 1, 1, "first instance");
    probe(30'd2, 7, 9, 1, 1, 1, "second instance");
    probe(30'd2, 7, 8, 1, 1, 0, "operand differs");
    probe(30'd2, 7, 9, 1, 0, 0, "operand not ready");
    probe(30'd4, 7, 9, 1, 1, 0, "other PC, same set");
    // fill set 0 and overflow: instance (1,2) is the oldest
    put(mk(30'd4, 3, 3));
    put(mk(30'd6, 5, 5));
    put(mk(30'd8, 6, 6));
    probe(30'd2, 1, 2, 1, 1, 0, "oldest replaced");
    probe(30'd2, 7, 9, 1, 1, 1, "younger kept");
    probe(30'd8, 6, 6, 1, 1, 1, "newest present");
    // a source that is not used need not match
    begin
      instr_t i = mk(30'd3, 11, 0);
      i.use2 = 0; i.res = 11;
      put(i);
      @(negedge clk); lk_en = 1; lk_pc = 30'd3;
      @(posedge clk); #1 lk_en = 0;
      rf_val[4] = 11; rf_val[5] = 1234; rf_rdy[4] = 1; rf_rdy[5] = 0; #1;
      check("unused source ignored", ir_hit && ir_ent.res == 11);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
