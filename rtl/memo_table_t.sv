// memo_table_t: trace memoization table (Memo_Table_T).
//
// Set-associative store of traces (rst_pkg::trace_t), indexed by the low bits
// of the trace start PC; the full 30-bit start PC is kept as tag.  Several
// traces may start at the same PC with different input values; they share a
// set, so the associativity is also the number n of values the last n-value
// predictor can offer for one PC.  Each set keeps true-LRU ages (0 = most
// recently used).
//
// Ports and timing:
//   Lookup (stage RS1): lk_en/lk_pc; one cycle later lk_ways holds every way of
//   the set, lk_age their LRU ages and lk_set the set index.
//   Reuse update (stage RS2): up_en with up_set/up_way marks the way most
//   recently used; with up_adv the way also moves one stride on (last values
//   replaced by the extrapolated ones, iteration counter incremented), which is
//   how a reused strided trace records its new last value.
//   Insert (stage RS4): ins_en/ins_tr.  A way holding the same instance (same
//   PC and input context) is overwritten in place; otherwise an invalid way, or
//   else the least recently used one, is replaced (ins_evict reports that a
//   valid trace was lost).  Insert is applied after a same-cycle reuse update.
// Size and associativity are the configuration given for RST.  Replacement and
// update policies are this design's choices.
module memo_table_t
  import rst_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned WAYS    = 4,
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned SW     = $clog2(SETS),
  localparam int unsigned WW     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic            lk_en,
  input  pc_t             lk_pc,
  output trace_t          lk_ways [WAYS],
  output logic [WW-1:0]   lk_age  [WAYS],
  output logic [SW-1:0]   lk_set,
  // reuse update
  input  logic            up_en,
  input  logic [SW-1:0]   up_set,
  input  logic [WW-1:0]   up_way,
  input  logic            up_adv,
  // insert
  input  logic            ins_en,
  input  trace_t          ins_tr,
  output logic            ins_evict
);

  trace_t        mem [SETS][WAYS];
  logic [WW-1:0] age [SETS][WAYS];

  logic [SW-1:0] is;
  logic [WW-1:0] iw;
  logic          ihit, ifree;

  assign is = ins_tr.pc[SW-1:0];

  // Victim choice for an insert.
  always_comb begin
    ihit  = 1'b0;
    ifree = 1'b0;
    iw    = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (!ihit && same_instance(mem[is][w], ins_tr)) begin
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

  assign ins_evict = ins_en && !ihit && !ifree;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++)
        for (int w = 0; w < int'(WAYS); w++) begin
          mem[s][w].vld <= 1'b0;
          age[s][w]     <= WW'(w);
        end
    end else begin
      if (up_en) begin
        if (up_adv) mem[up_set][up_way] <= advance(mem[up_set][up_way]);
        // an insert into the same set decides that set's ages this cycle
        if (!(ins_en && up_set == is)) begin
          for (int w = 0; w < int'(WAYS); w++)
            if (age[up_set][w] < age[up_set][up_way]) age[up_set][w] <= age[up_set][w] + 1'b1;
          age[up_set][up_way] <= '0;
        end
      end
      if (ins_en) begin
        mem[is][iw] <= ins_tr;
        for (int w = 0; w < int'(WAYS); w++)
          if (age[is][w] < age[is][iw]) age[is][w] <= age[is][w] + 1'b1;
        age[is][iw] <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lk_set <= '0;
      for (int w = 0; w < int'(WAYS); w++) begin
        lk_ways[w] <= '0;
        lk_age[w]  <= WW'(w);
      end
    end else if (lk_en) begin
      lk_set <= lk_pc[SW-1:0];
      for (int w = 0; w < int'(WAYS); w++) begin
        lk_ways[w] <= mem[lk_pc[SW-1:0]][w];
        lk_age[w]  <= age[lk_pc[SW-1:0]][w];
      end
    end
  end

endmodule
