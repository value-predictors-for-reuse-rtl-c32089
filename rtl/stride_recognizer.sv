// stride_recognizer: stride identification between consecutive traces (stage RS4).
//
// Keeps the last created trace in a buffer.  When the next trace is created
// (en, tr) it is compared with the buffered one: if both start at the same PC,
// carry no branches and have the same input and output register identifiers,
// the differences of the input and output values are formed.  A pattern is a
// candidate when at least one input changes, at most N_STR_IN inputs and at
// most N_STR_OUT outputs change.  When a candidate has the same differences as
// the candidate found for the previous pair, the stride is confirmed: tr_out
// is tr with its stride fields filled in (slot and difference per changing
// value), strided set and the iteration counter cleared.  Otherwise tr_out is
// tr unchanged.  The buffer then takes tr and its differences.
//
// Combinational from en/tr to tr_out/found/confirmed; the buffer updates at
// the clock edge when en is high.  Most bits of tr_out (PCs, register lists,
// values, branch masks) are tr itself; only the stride fields, strided and it
// are produced here, so those bits are wires from the input.
// Comparing two consecutive traces and confirming with a third follows the
// stride-aware RST description; the candidate limits and the slot encoding of
// the strides are this design's choices.
module stride_recognizer
  import rst_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  trace_t tr,
  output trace_t tr_out,
  output logic   found,      // a candidate stride between the last two traces
  output logic   confirmed   // the same stride seen twice in a row
);

  trace_t                   last;
  istride_t [N_STR_IN-1:0]  dlast_i;
  ostride_t [N_STR_OUT-1:0] dlast_o;
  logic                     dvld;

  istride_t [N_STR_IN-1:0]  di;
  ostride_t [N_STR_OUT-1:0] dout;
  logic                     shape, cand;

  always_comb begin
    int ni, no;
    logic over;
    di   = '0;
    dout = '0;
    ni   = 0;
    no   = 0;
    over = 1'b0;
    shape = last.vld && tr.vld && last.pc == tr.pc && last.icnt == tr.icnt &&
            last.ocnt == tr.ocnt && last.bm == '0 && tr.bm == '0;
    for (int i = 0; i < int'(N_IN); i++)
      if (i < int'(tr.icnt) && last.icr[i] != tr.icr[i]) shape = 1'b0;
    for (int j = 0; j < int'(N_OUT); j++)
      if (j < int'(tr.ocnt) && last.ocr[j] != tr.ocr[j]) shape = 1'b0;
    for (int i = 0; i < int'(N_IN); i++)
      if (i < int'(tr.icnt) && tr.icv[i] != last.icv[i]) begin
        if (ni < int'(N_STR_IN)) begin
          di[ni].vld  = 1'b1;
          di[ni].slot = CIW'(i);
          di[ni].d    = tr.icv[i] - last.icv[i];
        end else over = 1'b1;
        ni++;
      end
    for (int j = 0; j < int'(N_OUT); j++)
      if (j < int'(tr.ocnt) && tr.ocv[j] != last.ocv[j]) begin
        if (no < int'(N_STR_OUT)) begin
          dout[no].vld  = 1'b1;
          dout[no].slot = COW'(j);
          dout[no].d    = tr.ocv[j] - last.ocv[j];
        end else over = 1'b1;
        no++;
      end
    cand      = en && shape && ni > 0 && !over;
    found     = cand;
    confirmed = cand && dvld && di == dlast_i && dout == dlast_o;
    tr_out    = tr;
    if (confirmed) begin
      tr_out.icd     = di;
      tr_out.ocd     = dout;
      tr_out.strided = 1'b1;
      tr_out.it      = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last    <= '0;
      dlast_i <= '0;
      dlast_o <= '0;
      dvld    <= 1'b0;
    end else if (en) begin
      last    <= tr;
      dlast_i <= di;
      dlast_o <= dout;
      dvld    <= cand;
    end
  end

endmodule
