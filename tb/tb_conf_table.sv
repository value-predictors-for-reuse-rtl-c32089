// tb_conf_table: self-checking test of the confidence table.
// Drives random updates against a reference model of saturating counters
// (increment 1 up to 3, penalty 3 down to 0, initial value 1, predict at 3)
// and compares every registered read with the model.
module tb_conf_table;
  import rst_pkg::*;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0;
  logic rd_en, upd_en, upd_ok, rd_ok;
  pc_t  rd_pc, upd_pc;
  logic [1:0] rd_conf;
  int checks = 0, failures = 0;
  int model [N];

  conf_table #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c;
    rd_en = 0; upd_en = 0; upd_ok = 0; rd_pc = '0; upd_pc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(N); i++) model[i] = 1;
    // directed: three correct predictions reach the threshold, one miss drops to 0
    for (int s = 0; s < 6; s++) begin
      @(negedge clk);
      upd_en = (s < 2 || s == 3); upd_ok = (s < 2); upd_pc = 30'd5;
      rd_en = 1; rd_pc = 30'd5 + 30'(N);   // aliases entry 5
      @(posedge clk); #1;
      if (upd_en) begin
        if (upd_ok) model[5] = (model[5] + 1 > 3) ? 3 : model[5] + 1;
        else        model[5] = (model[5] <= 3) ? 0 : model[5] - 3;
      end
    end
    // random
    for (int n = 0; n < 3000; n++) begin
      int ri, ui;
      @(negedge clk);
      ri = $urandom_range(N - 1);
      ui = $urandom_range(N - 1);
      rd_en  = 1; rd_pc = 30'(ri);
      upd_en = $urandom_range(1); upd_ok = $urandom_range(3) != 0; upd_pc = 30'(ui);
      exp_c = model[ri];
      @(posedge clk); #1;
      checks++;
      if (rd_conf != 2'(exp_c) || rd_ok != (exp_c >= 3)) begin
        failures++;
        if (failures < 5) $display("mismatch idx %0d got %0d exp %0d", ri, rd_conf, exp_c);
      end
      if (upd_en) begin
        if (upd_ok) model[ui] = (model[ui] + 1 > 3) ? 3 : model[ui] + 1;
        else        model[ui] = (model[ui] <= 3) ? 0 : model[ui] - 3;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
