// memo_table_g: instruction memoization table (Memo_Table_G) with its reuse test.
//
// Holds single reuse-domain instructions (integer operations, branches and the
// address calculation of loads and stores) with their operand values, result
// and next PC, in a set-associative array indexed by the low PC bits with the
// full PC as tag.  Several instances of one instruction with different operand
// values may be held.
//
// Ports and timing:
//   Lookup (RS1): lk_en/lk_pc.  One cycle later (RS2) the stored instances are
//   tested against the register state rf_val/rf_rdy: ir_hit is raised when an
//   instance has every used source register ready and equal to its stored
//   value; ir_ent is that instance (result, destination, next PC).
//   Insert (RS4): ins_en/ins.  An identical instance (PC and operand values) is
//   refreshed in place, else an invalid way, else the oldest inserted way is
//   replaced.
// Size and associativity are the configuration given for RST; the entry
// fields, the reuse-test details and the insertion-order replacement are this
// design's choices.
module memo_table_g
  import rst_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned WAYS    = 4,
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned SW     = $clog2(SETS),
  localparam int unsigned WW     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   lk_en,
  input  pc_t    lk_pc,
  input  word_t  rf_val [NREGS],
  input  logic   rf_rdy [NREGS],
  output logic   ir_hit,
  output instr_t ir_ent,
  input  logic   ins_en,
  input  instr_t ins
);

  instr_t        mem [SETS][WAYS];
  logic [WW-1:0] age [SETS][WAYS];
  instr_t        q   [WAYS];
  pc_t           q_pc;
  logic          q_en;

  logic [SW-1:0] is;
  logic [WW-1:0] iw;
  logic          ihit, ifree;

  assign is = ins.pc[SW-1:0];

  always_comb begin
    ihit  = 1'b0;
    ifree = 1'b0;
    iw    = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (!ihit && mem[is][w].vld && mem[is][w].pc == ins.pc &&
          mem[is][w].v1 == ins.v1 && mem[is][w].v2 == ins.v2) begin
        ihit = 1'b1;
        iw   = WW'(w);
      end
    if (!ihit)
      for (int w = 0; w < int'(WAYS); w++)
        if (!ifree && !mem[is][w].vld) begin
          ifree = 1'b1;
          iw    = WW'(w);
        end
    if (!ihit && !ifree)
      for (int w = 0; w < int'(WAYS); w++)
        if (age[is][w] == WW'(WAYS - 1)) iw = WW'(w);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++)
        for (int w = 0; w < int'(WAYS); w++) begin
          mem[s][w].vld <= 1'b0;
          age[s][w]     <= WW'(w);
        end
    end else if (ins_en) begin
      mem[is][iw] <= ins;
      mem[is][iw].vld <= 1'b1;
      for (int w = 0; w < int'(WAYS); w++)
        if (age[is][w] < age[is][iw]) age[is][w] <= age[is][w] + 1'b1;
      age[is][iw] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_en <= 1'b0;
      q_pc <= '0;
      for (int w = 0; w < int'(WAYS); w++) q[w] <= '0;
    end else begin
      q_en <= lk_en;
      if (lk_en) begin
        q_pc <= lk_pc;
        for (int w = 0; w < int'(WAYS); w++) q[w] <= mem[lk_pc[SW-1:0]][w];
      end
    end
  end

  // RS2 instruction reuse test
  always_comb begin
    ir_hit = 1'b0;
    ir_ent = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (!ir_hit && q_en && q[w].vld && q[w].pc == q_pc &&
          (!q[w].use1 || (rf_rdy[q[w].rs1] && rf_val[q[w].rs1] == q[w].v1)) &&
          (!q[w].use2 || (rf_rdy[q[w].rs2] && rf_val[q[w].rs2] == q[w].v2))) begin
        ir_hit = 1'b1;
        ir_ent = q[w];
      end
    end
  end

endmodule
