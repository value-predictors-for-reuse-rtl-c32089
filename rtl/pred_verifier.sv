// pred_verifier: tracking and verification of predicted trace inputs (stage RS3).
//
// Each speculative trace reuse allocates one entry holding, for each predicted
// input register, the predicted value and the tag of the in-flight instruction
// that will produce the real value.  Writeback results (WBP per cycle) are
// matched by tag; a value that differs from the prediction marks the entry as
// mispredicted.  Once per cycle the lowest entry that is either mispredicted or
// fully verified is resolved and freed: res_en with res_ok = 1 (all predictions
// were right) or res_ok = 0 (the reuse must be squashed, res_id names it).  The
// resolution also drives the confidence update of the trace start PC.
//
// room is low when every entry is in use; speculative reuse is then refused.
// flush empties the tracker (pipeline flush in the host processor).
// Timing: alloc and writeback are registered at the clock edge; an entry can be
// resolved in the cycle after its last writeback.
// Verifying predictions at writeback follows the RST pipeline; the number of
// entries, tag matching and the one-resolution-per-cycle policy are this
// design's choices.
module pred_verifier
  import rst_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned WBP     = 4,
  localparam int unsigned IDW    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,
  // allocation from RS2
  input  logic           alloc_en,
  input  pc_t            alloc_pc,
  input  logic [$clog2(MAX_PRED+1)-1:0] alloc_n,
  input  reg_t           alloc_r [MAX_PRED],
  input  word_t          alloc_v [MAX_PRED],
  input  tag_t           alloc_t [MAX_PRED],
  output logic           room,
  output logic [IDW-1:0] alloc_id,
  // writeback
  input  logic           wb_en  [WBP],
  input  tag_t           wb_tag [WBP],
  input  word_t          wb_val [WBP],
  // resolution
  output logic           res_en,
  output logic           res_ok,
  output pc_t            res_pc,
  output logic [IDW-1:0] res_id,
  output reg_t           res_reg   // first mispredicted register (res_ok = 0)
);

  typedef struct packed {
    logic                 vld;
    logic                 bad;
    reg_t                 bad_r;
    pc_t                  pc;
    logic [MAX_PRED-1:0]  need;   // prediction still waiting for its value
    reg_t  [MAX_PRED-1:0] r;
    word_t [MAX_PRED-1:0] v;
    tag_t  [MAX_PRED-1:0] t;
  } ent_t;

  ent_t e [ENTRIES];

  logic           has_free;
  logic [IDW-1:0] free_id;

  always_comb begin
    has_free = 1'b0;
    free_id  = '0;
    for (int i = 0; i < int'(ENTRIES); i++)
      if (!has_free && !e[i].vld) begin
        has_free = 1'b1;
        free_id  = IDW'(i);
      end
  end

  assign room     = has_free;
  assign alloc_id = free_id;

  always_comb begin
    res_en  = 1'b0;
    res_id  = '0;
    for (int i = 0; i < int'(ENTRIES); i++)
      if (!res_en && e[i].vld && (e[i].bad || e[i].need == '0)) begin
        res_en = 1'b1;
        res_id = IDW'(i);
      end
    res_ok  = !e[res_id].bad;
    res_pc  = e[res_id].pc;
    res_reg = e[res_id].bad_r;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      for (int i = 0; i < int'(ENTRIES); i++) e[i] <= '0;
    end else begin
      for (int i = 0; i < int'(ENTRIES); i++) begin
        if (e[i].vld) begin
          for (int k = 0; k < int'(MAX_PRED); k++)
            for (int p = 0; p < int'(WBP); p++)
              if (e[i].need[k] && wb_en[p] && wb_tag[p] == e[i].t[k]) begin
                e[i].need[k] <= 1'b0;
                if (wb_val[p] != e[i].v[k] && !e[i].bad) begin
                  e[i].bad   <= 1'b1;
                  e[i].bad_r <= e[i].r[k];
                end
              end
        end
      end
      if (res_en) e[res_id].vld <= 1'b0;
      if (alloc_en && has_free) begin
        e[free_id].vld   <= 1'b1;
        e[free_id].bad   <= 1'b0;
        e[free_id].bad_r <= '0;
        e[free_id].pc    <= alloc_pc;
        for (int k = 0; k < int'(MAX_PRED); k++) begin
          e[free_id].need[k] <= (k < int'(alloc_n));
          e[free_id].r[k]    <= alloc_r[k];
          e[free_id].v[k]    <= alloc_v[k];
          e[free_id].t[k]    <= alloc_t[k];
          // a producer finishing in the allocation cycle is checked at once
          for (int p = 0; p < int'(WBP); p++)
            if (k < int'(alloc_n) && wb_en[p] && wb_tag[p] == alloc_t[k]) begin
              e[free_id].need[k] <= 1'b0;
              if (wb_val[p] != alloc_v[k]) begin
                e[free_id].bad   <= 1'b1;
                e[free_id].bad_r <= alloc_r[k];
              end
            end
        end
      end
    end
  end

  // A new speculative reuse is only offered while there is room.
  a_alloc_room: assert property (@(posedge clk) disable iff (!rst_n) alloc_en |-> has_free);

endmodule
