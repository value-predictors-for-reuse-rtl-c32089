// conf_table: confidence estimator for speculative trace reuse.
//
// A direct-mapped table of saturating counters indexed by the low bits of the
// trace start PC.  A trace may be reused speculatively only while its counter
// is at or above THRESH.  A verified prediction adds INC (saturating at SAT); a
// misprediction subtracts PENALTY (floored at 0).  Every counter starts at INIT.
// Table size, saturation, threshold, penalty, increment and initial value are
// the configuration given for RST; the PC indexing and the synchronous read are
// this design's choices.
//
// Interface / timing:
//   rd_en, rd_pc  -> rd_conf, rd_ok one cycle later (RS1 -> RS2).
//   upd_en, upd_pc, upd_ok: counter update at the clock edge.  A read of the
//   same entry in the same cycle returns the value before the update.
//   Reset initialises every counter to INIT.
module conf_table
  import rst_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned SAT     = 3,
  parameter int unsigned THRESH  = 3,
  parameter int unsigned PENALTY = 3,
  parameter int unsigned INC     = 1,
  parameter int unsigned INIT    = 1,
  localparam int unsigned CW     = $clog2(SAT + 1),
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  pc_t           rd_pc,
  output logic [CW-1:0] rd_conf,
  output logic          rd_ok,
  input  logic          upd_en,
  input  pc_t           upd_pc,
  input  logic          upd_ok
);

  logic [CW-1:0] ctr [ENTRIES];
  logic [IW-1:0] ui;

  assign ui = upd_pc[IW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) ctr[i] <= CW'(INIT);
    end else if (upd_en) begin
      if (upd_ok)
        ctr[ui] <= (int'(ctr[ui]) + int'(INC) >= int'(SAT)) ? CW'(SAT) : ctr[ui] + CW'(INC);
      else
        ctr[ui] <= (int'(ctr[ui]) <= int'(PENALTY)) ? '0 : ctr[ui] - CW'(PENALTY);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     rd_conf <= '0;
    else if (rd_en) rd_conf <= ctr[rd_pc[IW-1:0]];
  end

  assign rd_ok = (int'(rd_conf) >= int'(THRESH));

endmodule
