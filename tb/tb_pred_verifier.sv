// tb_pred_verifier: self-checking test of the RS3 prediction tracker.
// Checks verification of correct predictions, detection of a wrong one with
// the offending register, waiting for every predicted input, the full
// condition, a producer finishing in the allocation cycle, and flush.
module tb_pred_verifier;
  import rst_pkg::*;
  localparam int unsigned E = 4, P = 2;
  logic clk = 0, rst_n = 0, flush;
  logic alloc_en, room, res_en, res_ok;
  pc_t alloc_pc, res_pc;
  logic [1:0] alloc_n;
  reg_t alloc_r [MAX_PRED];
  word_t alloc_v [MAX_PRED];
  tag_t alloc_t [MAX_PRED];
  logic [1:0] alloc_id, res_id;
  logic wb_en [P];
  tag_t wb_tag [P];
  word_t wb_val [P];
  reg_t res_reg;
  int checks = 0, failures = 0;

  pred_verifier #(.ENTRIES(E), .WBP(P)) dut (.*);

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

  task automatic idle();
    alloc_en = 0; wb_en[0] = 0; wb_en[1] = 0; flush = 0;
  endtask

  task automatic alloc(pc_t pc, int n, reg_t r0, word_t v0, tag_t t0, reg_t r1, word_t v1, tag_t t1);
    alloc_en = 1; alloc_pc = pc; alloc_n = 2'(n);
    alloc_r[0] = r0; alloc_v[0] = v0; alloc_t[0] = t0;
    alloc_r[1] = r1; alloc_v[1] = v1; alloc_t[1] = t1;
  endtask

  task automatic wb(int p, tag_t t, word_t v);
    wb_en[p] = 1; wb_tag[p] = t; wb_val[p] = v;
  endtask

  initial begin
    idle(); alloc_pc = '0; alloc_n = '0;
    for (int k = 0; k < int'(MAX_PRED); k++) begin alloc_r[k] = '0; alloc_v[k] = '0; alloc_t[k] = '0; end
    for (int p = 0; p < int'(P); p++) begin wb_tag[p] = '0; wb_val[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("room after reset", room && !res_en);
    // 1: one prediction, verified correct
    alloc(30'd100, 1, 5'd3, 32'd10, 7'd5, 5'd0, 0, 7'd0);
    @(negedge clk); idle();
    check("waiting", !res_en);
    wb(1, 7'd5, 32'd10);
    @(negedge clk); idle();
    check("verified ok", res_en && res_ok && res_pc == 30'd100);
    @(negedge clk);
    check("entry freed", !res_en);
    // 2: two predictions, second wrong, first right; must wait for both? wrong resolves at once
    alloc(30'd200, 2, 5'd4, 32'd1, 7'd9, 5'd6, 32'd2, 7'd11);
    @(negedge clk); idle();
    wb(0, 7'd9, 32'd1);
    @(negedge clk); idle();
    check("one of two verified: still waiting", !res_en);
    wb(0, 7'd11, 32'd3);
    @(negedge clk); idle();
    check("misprediction", res_en && !res_ok && res_pc == 30'd200 && res_reg == 5'd6);
    @(negedge clk);
    // 3: wrong first value resolves immediately without waiting for the second
    alloc(30'd300, 2, 5'd7, 32'd1, 7'd20, 5'd8, 32'd2, 7'd21);
    @(negedge clk); idle();
    wb(1, 7'd20, 32'd99);
    @(negedge clk); idle();
    check("early misprediction", res_en && !res_ok && res_reg == 5'd7);
    @(negedge clk);
    // 4: fill the tracker
    for (int i = 0; i < int'(E); i++) begin
      check("room while filling", room);
      alloc(30'(400 + i), 1, 5'd9, 32'(i), tag_t'(30 + i), 5'd0, 0, 7'd0);
      @(negedge clk); idle();
    end
    check("full", !room);
    // resolve them in a burst, one per cycle
    wb(0, 7'd30, 32'd0); wb(1, 7'd31, 32'd1);
    @(negedge clk); idle();
    wb(0, 7'd32, 32'd2); wb(1, 7'd33, 32'd3);
    begin
      int n = 0;
      for (int c = 0; c < 6; c++) begin
        @(negedge clk); idle();
        if (res_en) begin n++; check("burst ok", res_ok); end
      end
      check("one resolution per cycle, all four", n == 3);  // the first was counted before
    end
    check("room again", room);
    // 5: producer finishing in the allocation cycle
    alloc(30'd500, 1, 5'd10, 32'd5, 7'd40, 5'd0, 0, 7'd0);
    wb(0, 7'd40, 32'd6);
    @(negedge clk); idle();
    check("same-cycle misprediction", res_en && !res_ok);
    @(negedge clk);
    // 6: flush
    alloc(30'd600, 1, 5'd10, 32'd5, 7'd41, 5'd0, 0, 7'd0);
    @(negedge clk); idle(); flush = 1;
    @(negedge clk); idle();
    wb(0, 7'd41, 32'd5);
    @(negedge clk); idle();
    check("flushed entry never resolves", !res_en && room);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
