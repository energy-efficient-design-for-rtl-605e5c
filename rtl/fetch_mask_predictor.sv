// Fetch Mask Predictor.
//
// Produces, for every fetch, the word-enable mask that drives the segmented
// wordline of the instruction data array, so that only the instructions the
// processor will use are read. The mask is the AND of three masks over the
// WPL words of a line:
//   seg_mask    the aligned FETCH_W-word fetch segment that holds the fetch
//               address (the segmented-wordline part of the design);
//   target_mask the words from the fetch address to the end of the line,
//               which removes the words before a branch target (branch in);
//   pred_mask   the words up to and including the branch that the Predicted
//               Mask Table (PMT) says will be taken (branch out).
// A PMT entry whose branch lies before the fetch address does not apply to
// this fetch and gives an all-ones pred_mask.
//
// The branch predictor and BTB look the same fetch block up in parallel,
// too late to shape the mask but in time for the clock edge. Their outcome
// (bp_taken, bp_pos: a taken branch at word bp_pos of the line, inside the
// fetched words) gives need_mask, the words the processor really uses, and
// updates the line's PMT entry: a predicted-taken branch is recorded; a
// recorded branch inside the fetched words that is now predicted not taken
// is removed. mask_miss flags a fetch whose mask left out a needed word.
// Everything is combinational apart from the PMT write at the clock edge.
//
// The three masks, their combination and the PMT with one entry per line
// come from the design. Recording a branch position, the update rule and
// the mask_miss signal are this design's own choices.
module fetch_mask_predictor #(
  parameter int unsigned LINES   = fmp_pkg::LINES,
  parameter int unsigned WPL     = fmp_pkg::WPL,
  parameter int unsigned FETCH_W = fmp_pkg::FETCH_W,
  localparam int unsigned LINE_W = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int unsigned POS_W  = (WPL > 1) ? $clog2(WPL) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch access (a hit on line acc_line, starting at word acc_start)
  input  logic              acc_valid,
  input  logic [LINE_W-1:0] acc_line,
  input  logic [POS_W-1:0]  acc_start,
  // branch predictor / BTB outcome for the same fetch block
  input  logic              bp_taken,
  input  logic [POS_W-1:0]  bp_pos,
  // line fill: forget what was predicted for the old line
  input  logic              clr_en,
  input  logic [LINE_W-1:0] clr_line,
  // masks
  output logic [WPL-1:0]    seg_mask,
  output logic [WPL-1:0]    target_mask,
  output logic [WPL-1:0]    pred_mask,
  output logic [WPL-1:0]    fetch_mask,
  output logic [WPL-1:0]    need_mask,
  output logic              mask_miss
);

  logic             pmt_taken;
  logic [POS_W-1:0] pmt_pos;
  logic             upd_en;
  logic             upd_taken;
  logic [POS_W-1:0] upd_pos;
  logic [POS_W-1:0] seg_first;
  logic [POS_W-1:0] seg_last;

  pmt #(.LINES(LINES), .WPL(WPL)) u_pmt (
    .clk      (clk),
    .rd_line  (acc_line),
    .rd_taken (pmt_taken),
    .rd_pos   (pmt_pos),
    .upd_en   (upd_en),
    .upd_line (acc_line),
    .upd_taken(upd_taken),
    .upd_pos  (upd_pos),
    .clr_en   (clr_en),
    .clr_line (clr_line)
  );

  assign seg_first = POS_W'((int'(acc_start) / int'(FETCH_W)) * int'(FETCH_W));
  assign seg_last  = POS_W'(seg_first + POS_W'(FETCH_W - 1));

  always_comb begin
    for (int w = 0; w < WPL; w++) begin
      seg_mask[w]    = (POS_W'(w) >= seg_first) && (POS_W'(w) <= seg_last);
      target_mask[w] = POS_W'(w) >= acc_start;
      pred_mask[w]   = !(pmt_taken && (pmt_pos >= acc_start)) || (POS_W'(w) <= pmt_pos);
      need_mask[w]   = seg_mask[w] && target_mask[w] && (!bp_taken || (POS_W'(w) <= bp_pos));
    end
    fetch_mask = seg_mask & target_mask & pred_mask;
    mask_miss  = acc_valid && |(need_mask & ~fetch_mask);
  end

  // PMT update from the branch predictor outcome
  always_comb begin
    upd_taken = bp_taken;
    upd_pos   = bp_taken ? bp_pos : '0;
    if (bp_taken)
      upd_en = acc_valid;
    else
      upd_en = acc_valid && pmt_taken && (pmt_pos >= acc_start) && (pmt_pos <= seg_last);
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   acc_valid && bp_taken |-> (bp_pos >= acc_start) && (bp_pos <= seg_last))
    else $error("fetch_mask_predictor: predicted branch outside the fetched words");

endmodule
